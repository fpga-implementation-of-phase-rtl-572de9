// pfd - three-state phase/frequency detector.
//
// States (from the document's state diagram):
//   STATE 0  : Qa = 0, Qb = 0
//   STATE I  : Qa = 1, Qb = 0
//   STATE II : Qa = 0, Qb = 1
// A rising edge of A moves 0 -> I and II -> 0 and keeps I; a rising edge of
// B moves 0 -> II and I -> 0 and keeps II. So when A runs at a higher
// frequency than B, Qa pulses and Qb stays low, and the reverse; at equal
// frequencies the pulse width on Qa or Qb equals the phase difference.
//
// The document only lets the state change on a rising edge of A or B. Here
// the FSM is synchronous: A and B are sampled on `clk` and their edges
// detected, so the phase difference is resolved to one clk period. Edges on
// A and B in the same cycle are taken as zero phase difference: state 0 is
// kept and states I and II return to 0 (this design's choice).
//
// Timing: qa/qb are registered state decodes; they change one clk cycle after
// the cycle in which the input edge is seen. Reset is synchronous, active high.
module pfd
  import pll_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic a,
  input  logic b,
  output logic qa,
  output logic qb
);

  pfd_state_t state, state_nxt;
  logic a_q, b_q;
  logic rise_a, rise_b;

  assign rise_a = a & ~a_q;
  assign rise_b = b & ~b_q;

  always_comb begin
    state_nxt = state;
    unique case (state)
      PFD_S0: begin
        if      (rise_a && !rise_b) state_nxt = PFD_SI;
        else if (rise_b && !rise_a) state_nxt = PFD_SII;
      end
      PFD_SI:  if (rise_b) state_nxt = PFD_S0;
      PFD_SII: if (rise_a) state_nxt = PFD_S0;
      default: state_nxt = PFD_S0;
    endcase
  end

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    if (reset) state <= PFD_S0;
    else       state <= state_nxt;
  end

  assign qa = (state == PFD_SI);
  assign qb = (state == PFD_SII);

endmodule
