// lock_detect - lock indicator for the digital PLL.
//
// Both clocks are sampled on the fast system clock; a rising edge is "high
// now, low in the previous cycle". Whenever either clock has a rising edge,
// the detector checks whether the other one rose in the same cycle: if so the
// run count goes up (saturating at LOCK_N), if not the count and the lock are
// cleared. `locked` is high while the last LOCK_N edges all coincided.
//
// The rule "a coincident rising edge three times in a row means lock" is the
// document's; building it as hardware that feeds the power-up sequencer, and
// clearing the lock on any unmatched edge, is this design's choice.
//
// Timing: lock_count and locked update on the rising clk edge after the
// cycle in which the edges were seen. Reset is synchronous, active high.
module lock_detect #(
  parameter int unsigned LOCK_N = 3
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       clk_in,
  input  logic                       clk_out,
  output logic [$clog2(LOCK_N+1)-1:0] lock_count,
  output logic                       locked
);

  localparam int unsigned CW = $clog2(LOCK_N+1);

  logic prev_in, prev_out;
  logic rise_in, rise_out;

  assign rise_in  = clk_in  & ~prev_in;
  assign rise_out = clk_out & ~prev_out;

  always_ff @(posedge clk) begin
    prev_in  <= clk_in;
    prev_out <= clk_out;
    if (reset) begin
      lock_count <= '0;
    end else if (rise_in && rise_out) begin
      if (lock_count != CW'(LOCK_N)) lock_count <= lock_count + 1'b1;
    end else if (rise_in || rise_out) begin
      lock_count <= '0;
    end
  end

  assign locked = (lock_count == CW'(LOCK_N));

endmodule
