// dpll - all-digital phase locked loop with synchronous reset.
//
// A W-bit down counter, clocked by a fast system clock, runs from `limit`
// down to 0 and reloads, so the output period is limit+1 system clocks.
// The output clock is decoded from the counter: it is high while
// counter > limit>>1, which gives a square wave (about 50% duty) whose rising
// edge falls in the cycle the counter is reloaded to `limit`.
//
// The input clock is sampled every cycle; a rising edge is "high now, low
// last cycle". When an input edge is seen the counter should read `limit`
// (the output edge is in the same cycle). If it does not:
//   * counter < limit>>1  : the output edge is late, so the counter steps by
//                           two instead of one (one cycle removed);
//   * otherwise           : the output edge is early, so the counter holds
//                           for one cycle (one cycle added).
// Each input edge thus moves the output phase one system clock towards the
// input phase; with equal periods the loop locks within about limit/2 input
// periods, whatever the duty cycle of the input clock.
//
// This correction rule, the counter-based oscillator and the port list follow
// the document. Design choices of this implementation: the output is decoded
// from the counter (no extra flop); a step by two from 1 or 0 wraps modulo
// limit+1 so no cycle is lost at the reload; reset is synchronous and active
// high and clears the counter, while the one-bit input sample has no reset.
//
// Timing: clk_out and counter change on the rising edge of clk; clk_in is
// treated as synchronous to clk (synchronise it outside if it is not).
module dpll #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] limit,
  input  logic         clk_in,
  output logic         clk_out,
  output logic [W-1:0] counter
);

  logic         reg_in;       // clk_in of the previous cycle
  logic         in_rise;
  logic [W-1:0] half;
  logic [W-1:0] step;         // 0 = hold, 1 = normal, 2 = catch up
  logic [W-1:0] wrapped;      // counter + limit + 1 - step, for the wrap
  logic [W-1:0] counter_nxt;

  assign in_rise = clk_in & ~reg_in;
  assign half    = limit >> 1;

  always_comb begin
    step = W'(1);
    if (in_rise && counter != limit) begin
      if (counter < half) step = W'(2);
      else                step = '0;
    end
  end

  always_comb begin
    // Used only when counter < step; the result then lies in 0..limit, so
    // W-bit modular arithmetic gives it exactly.
    wrapped = counter + limit + W'(1) - step;
    if (counter >= step) counter_nxt = counter - step;
    else                 counter_nxt = wrapped;
  end

  always_ff @(posedge clk) begin
    reg_in <= clk_in;
    if (reset) counter <= '0;
    else       counter <= counter_nxt;
  end

  assign clk_out = (counter > half);

endmodule
