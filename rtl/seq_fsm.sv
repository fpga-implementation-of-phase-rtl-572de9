// seq_fsm - power-up sequence controller for the PLL clock and reset logic.
//
// After the synchronised chip reset is released the controller
//   SAMPLE     : pulses sample_en for one cycle to capture the PLL
//                configuration pins, PLL still in reset;
//   PLL_START  : releases the PLL reset, or, if pll_bypass is set, goes to
//                BYPASS, leaving the PLL in reset and the core on the
//                reference clock;
//   WAIT_LOCK  : waits for pll_lock;
//   DIV_ON     : enables the clock divider and waits SETTLE cycles;
//   SWITCH     : sets the clock mux select to the PLL path and waits SETTLE
//                cycles;
//   RUN        : drops the core reset request.
// BYPASS also drops the core reset request, with select at 0.
//
// The signals (sample enable, PLL reset, PLL lock, divider enable, select,
// bypass, core reset) are the document's; the order of the steps, the wait
// lengths and keeping RUN after a later loss of lock are this design's.
//
// Timing: Moore outputs decoded from the state register, clocked by the
// system clock; rst_n is synchronous to clk and active low.
module seq_fsm
  import pll_pkg::*;
#(
  parameter int unsigned SETTLE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pll_bypass,
  input  logic       pll_lock,
  output logic       sample_en,
  output logic       pll_reset,
  output logic       div_en,
  output logic       select,
  output logic       core_rst_req,
  output seq_state_t state
);

  localparam int unsigned CW = $clog2(SETTLE + 1);

  seq_state_t    state_nxt;
  logic [CW-1:0] wait_cnt;
  logic          wait_done;

  assign wait_done = (wait_cnt == CW'(SETTLE - 1));

  always_comb begin
    state_nxt = state;
    unique case (state)
      SEQ_RESET:     state_nxt = SEQ_SAMPLE;
      SEQ_SAMPLE:    state_nxt = SEQ_PLL_START;
      SEQ_PLL_START: state_nxt = pll_bypass ? SEQ_BYPASS : SEQ_WAIT_LOCK;
      SEQ_WAIT_LOCK: if (pll_lock)  state_nxt = SEQ_DIV_ON;
      SEQ_DIV_ON:    if (wait_done) state_nxt = SEQ_SWITCH;
      SEQ_SWITCH:    if (wait_done) state_nxt = SEQ_RUN;
      SEQ_RUN:       state_nxt = SEQ_RUN;
      SEQ_BYPASS:    state_nxt = SEQ_BYPASS;
      default:       state_nxt = SEQ_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= SEQ_RESET;
      wait_cnt <= '0;
    end else begin
      state <= state_nxt;
      if (state_nxt != state) wait_cnt <= '0;
      else if (!wait_done)    wait_cnt <= wait_cnt + 1'b1;
    end
  end

  always_comb begin
    sample_en    = (state == SEQ_SAMPLE);
    pll_reset    = (state == SEQ_RESET) || (state == SEQ_SAMPLE) || (state == SEQ_BYPASS);
    div_en       = (state == SEQ_DIV_ON) || (state == SEQ_SWITCH) || (state == SEQ_RUN);
    select       = (state == SEQ_SWITCH) || (state == SEQ_RUN);
    core_rst_req = !((state == SEQ_RUN) || (state == SEQ_BYPASS));
  end

endmodule
