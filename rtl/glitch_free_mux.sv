// glitch_free_mux - clock multiplexer that switches without runt pulses.
//
// Each input clock has an enable, synchronised on its own clock through two
// flops clocked on the falling edge. A side's enable may only rise after the
// other side's enable has fallen, and an enable only changes while its clock
// is low, so the output is never cut short: the old clock finishes its high
// phase, the output stays low for a few cycles of both clocks, and then the
// new clock appears starting with a full high phase. clk0 is the input taken
// when sel = 0 (the reference clock), clk1 the one taken when sel = 1.
//
// The document shows a "no glitch mux" with a select from the sequencer; the
// cross-coupled enable scheme is this design's choice. Both enables are
// cleared by rst_n (asynchronous, active low); the selected side's enable then
// rises two falling edges of its clock after reset ends. The output is formed
// by gating the two clocks, which is intended: it is the clock mux.
module glitch_free_mux (
  input  logic clk0,
  input  logic clk1,
  input  logic rst_n,
  input  logic sel,
  output logic clk_o
);

  logic req0, en0;
  logic req1, en1;

  always_ff @(negedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      req0 <= 1'b0;
      en0  <= 1'b0;
    end else begin
      req0 <= ~sel & ~en1;
      en0  <= req0;
    end
  end

  always_ff @(negedge clk1 or negedge rst_n) begin
    if (!rst_n) begin
      req1 <= 1'b0;
      en1  <= 1'b0;
    end else begin
      req1 <= sel & ~en0;
      en1  <= req1;
    end
  end

  assign clk_o = (clk0 & en0) | (clk1 & en1);

endmodule
