// reset_ctrl - core reset control.
//
// Holds the core reset (active low output) asserted while the sequencer
// requests it, and releases it RST_HOLD + 1 system clocks after the request
// ends, so that the core clock has been running steadily for a while before
// the core leaves reset. A new request asserts the reset again at once. The
// document names the block and its core reset output; the hold time is this
// design's choice. rst_n is synchronous to clk, active low.
module reset_ctrl #(
  parameter int unsigned RST_HOLD = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic core_rst_n
);

  localparam int unsigned CW = $clog2(RST_HOLD + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || req) begin
      cnt        <= '0;
      core_rst_n <= 1'b0;
    end else if (cnt != CW'(RST_HOLD)) begin
      cnt        <= cnt + 1'b1;
      core_rst_n <= 1'b0;
    end else begin
      core_rst_n <= 1'b1;
    end
  end

endmodule
