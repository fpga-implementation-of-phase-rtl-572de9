// pll_sync_reset_top - chip-level clock and reset block built around a
// digital PLL with synchronous reset.
//
// Data flow:
//   ext_rst_n --reset_sync--> rst_n (clk domain) --> seq_fsm, reset_ctrl
//   ref_clk --bit_sync--> ref_s --> dpll.clk_in, lock_detect, pfd.A
//   pll_cfg --pll_config (sampled on sample_en)--> dpll.limit
//   dpll.clk_out (pll_clk) --clk_divider (en)--> div_clk
//   glitch_free_mux: sel=0 -> ref_clk, sel=1 -> div_clk  ==> core_clk
//   seq_fsm.core_rst_req --reset_ctrl--> core reset --reset_sync(core_clk)--> core_rst_n
//
// The sequencer samples the configuration, starts the PLL, waits for the lock
// detector, enables the divider, switches the mux to the PLL path and only
// then lets the core reset go. With pll_bypass set it keeps the PLL in reset
// and the core on the reference clock. The PFD compares the synchronised
// reference (A) with the PLL clock (B) and reports which one leads.
//
// The PLL itself needs a fast system clock `clk`; its output period is
// pll_cfg+1 clk periods, so pll_cfg must be set to the reference period (in
// clk periods) minus one for the PLL to lock. The block set and the signal
// names follow the document's system diagram; the wiring of the PFD as a
// monitor, the reference synchroniser and all timing constants are this
// design's. The gated core clock is produced by the clock mux on purpose.
// The synchronised chip reset drives synchronous resets in the clk domain and
// the asynchronous resets of the divider and mux, which run on other clocks;
// lint notes that mix, and it is intended.
module pll_sync_reset_top
  import pll_pkg::*;
#(
  parameter int unsigned W        = 4,
  parameter int unsigned DIV      = 2,
  parameter int unsigned SETTLE   = 8,
  parameter int unsigned RST_HOLD = 8
) (
  input  logic         clk,
  input  logic         ext_rst_n,
  input  logic         ref_clk,
  input  logic [W-1:0] pll_cfg,
  input  logic         pll_bypass,
  output logic         core_clk,
  output logic         core_rst_n,
  output logic         pll_clk,
  output logic         pll_lock,
  output logic         pfd_qa,
  output logic         pfd_qb,
  output logic [W-1:0] pll_counter,
  output logic [1:0]   lock_count,
  output seq_state_t   seq_state
);

  logic         rst_n;
  logic         ref_s;
  logic         sample_en, pll_reset, div_en, select, core_rst_req;
  logic [W-1:0] limit;
  logic         div_clk;
  logic         core_rst_n_sys;

  reset_sync u_rst_sync (.clk(clk), .arst_n(ext_rst_n), .rst_n(rst_n));

  bit_sync u_ref_sync (.clk(clk), .d(ref_clk), .q(ref_s));

  seq_fsm #(.SETTLE(SETTLE)) u_seq (
    .clk(clk), .rst_n(rst_n), .pll_bypass(pll_bypass), .pll_lock(pll_lock),
    .sample_en(sample_en), .pll_reset(pll_reset), .div_en(div_en),
    .select(select), .core_rst_req(core_rst_req), .state(seq_state)
  );

  pll_config #(.W(W)) u_cfg (
    .clk(clk), .reset(!rst_n), .sample_en(sample_en), .cfg_in(pll_cfg), .cfg(limit)
  );

  dpll #(.W(W)) u_pll (
    .clk(clk), .reset(pll_reset), .limit(limit), .clk_in(ref_s),
    .clk_out(pll_clk), .counter(pll_counter)
  );

  lock_detect #(.LOCK_N(3)) u_lock (
    .clk(clk), .reset(pll_reset), .clk_in(ref_s), .clk_out(pll_clk),
    .lock_count(lock_count), .locked(pll_lock)
  );

  pfd u_pfd (
    .clk(clk), .reset(!rst_n), .a(ref_s), .b(pll_clk), .qa(pfd_qa), .qb(pfd_qb)
  );

  clk_divider #(.DIV(DIV)) u_div (
    .clk_i(pll_clk), .rst_n(rst_n), .en(div_en), .clk_o(div_clk)
  );

  glitch_free_mux u_mux (
    .clk0(ref_clk), .clk1(div_clk), .rst_n(rst_n), .sel(select), .clk_o(core_clk)
  );

  reset_ctrl #(.RST_HOLD(RST_HOLD)) u_rst_ctrl (
    .clk(clk), .rst_n(rst_n), .req(core_rst_req), .core_rst_n(core_rst_n_sys)
  );

  // Reset synchronizer of the design block, on the core clock.
  reset_sync u_core_rst_sync (.clk(core_clk), .arst_n(core_rst_n_sys), .rst_n(core_rst_n));

endmodule
