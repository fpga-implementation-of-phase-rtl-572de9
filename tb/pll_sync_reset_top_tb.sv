// pll_sync_reset_top_tb - end-to-end testbench of the clock and reset block,
// with every parameter at its default.
//
// The reference clock is made as a lopsided test clock: a down counter on the
// 100 MHz system clock that reloads `ref_lim` after 0 and is high only while
// it reads 0, so its period is ref_lim+1 system clocks. For each
// configuration 15, 10, 5, 7 and 3 (configuration = reference limit) the
// chip is reset and must: sample the configuration (a later pin change must
// not reach the PLL), lock, run the core on the reference clock until the
// switch, switch the core clock to the PLL clock divided by two (period
// 2*(cfg+1) system clocks), and release the core reset only after the
// switch. Then the bypass pin is tested: the PLL stays in reset, the core
// runs on the reference clock and its reset is released. A reset while
// running must put the core back in reset at once. A monitor checks that no
// high or low phase of the core clock is shorter than one system clock
// period. Each mechanism (lock, config hold, clock switch, bypass, core reset
// release, PFD up and down pulses) is counted and must happen at least once.
module pll_sync_reset_top_tb;

  import pll_pkg::*;

  logic       clk = 1'b0;
  logic       ext_rst_n;
  logic       ref_clk;
  logic [3:0] pll_cfg;
  logic       pll_bypass;
  logic       core_clk, core_rst_n, pll_clk, pll_lock, pfd_qa, pfd_qb;
  logic [3:0] pll_counter;
  logic [1:0] lock_count;
  seq_state_t seq_state;

  int checks = 0;
  int failures = 0;
  int n_lock = 0, n_cfg_held = 0, n_switch = 0, n_bypass = 0, n_release = 0;
  int n_qa = 0, n_qb = 0, n_reset_run = 0;

  pll_sync_reset_top dut (
    .clk(clk), .ext_rst_n(ext_rst_n), .ref_clk(ref_clk), .pll_cfg(pll_cfg),
    .pll_bypass(pll_bypass), .core_clk(core_clk), .core_rst_n(core_rst_n),
    .pll_clk(pll_clk), .pll_lock(pll_lock), .pfd_qa(pfd_qa), .pfd_qb(pfd_qb),
    .pll_counter(pll_counter), .lock_count(lock_count), .seq_state(seq_state)
  );

  always #5 clk = ~clk;

  // lopsided reference clock
  logic [3:0] ref_lim = 4'd15;
  logic [3:0] ref_cnt = 4'd0;
  always_ff @(posedge clk) begin
    if (ref_cnt == 0) ref_cnt <= ref_lim;
    else              ref_cnt <= ref_cnt - 1'b1;
  end
  assign ref_clk = (ref_cnt == 0);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (state=%0d t=%0t)", what, seq_state, $time);
    end
  endtask

  // core clock phase monitor: no phase shorter than one system clock
  realtime last_edge = 0;
  bit      mon_on = 1'b0;
  always @(core_clk) begin
    if (mon_on && ($realtime - last_edge) < 9.999) check(1'b0, $sformatf("core clock phase of %0.3f ns", $realtime - last_edge));
    last_edge = $realtime;
  end

  always @(negedge clk) begin
    if (pfd_qa) n_qa++;
    if (pfd_qb) n_qb++;
  end

  // period of core_clk in ns over one rising-to-rising interval
  int meas;
  task automatic core_period(output int p);
    longint t0;
    meas = -1;
    fork
      begin
        @(posedge core_clk);
        t0 = $time;
        @(posedge core_clk);
        meas = int'($time - t0);
      end
      begin
        #2000;
      end
    join_any
    disable fork;
    p = meas;
  endtask

  task automatic chip_reset(input logic [3:0] cfg, input bit bypass);
    @(negedge clk);
    mon_on = 1'b0;
    ext_rst_n = 1'b0;
    pll_cfg = cfg;
    pll_bypass = bypass;
    ref_lim = cfg;
    repeat (4) @(negedge clk);
    check(!core_rst_n, "core in reset during chip reset");
    ext_rst_n = 1'b1;
    @(core_clk);
    #0.5;
    mon_on = 1'b1;
  endtask

  task automatic normal_run(input logic [3:0] cfg);
    int      cyc = 0;
    int      bound;
    int      p;
    bit      saw_ref_core = 1'b0;
    chip_reset(cfg, 1'b0);
    // let the sequencer sample, then move the pins: they must not matter
    repeat (4) @(negedge clk);
    pll_cfg = cfg ^ 4'b0110;
    bound = (int'(cfg) / 2 + 6) * (int'(cfg) + 1) + 10;
    while (seq_state != SEQ_DIV_ON && cyc < 2000) begin
      @(negedge clk);
      cyc++;
      check(!core_rst_n, "core held in reset before the switch");
      if (seq_state == SEQ_WAIT_LOCK && !saw_ref_core && cyc > 4 * (int'(cfg) + 1)) begin
        core_period(p);
        check(p == 10 * (int'(cfg) + 1), $sformatf("core on reference clock before switch: %0d ns", p));
        saw_ref_core = 1'b1;
      end
    end
    check(pll_lock, $sformatf("PLL locked for cfg %0d", cfg));
    check(cyc <= bound, $sformatf("lock after %0d cycles, bound %0d (cfg %0d)", cyc, bound, cfg));
    if (pll_lock) n_lock++;
    check(dut.u_pll.limit == cfg, "PLL limit is the sampled configuration");
    if (dut.u_pll.limit == cfg) n_cfg_held++;
    cyc = 0;
    while (seq_state != SEQ_RUN && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(seq_state == SEQ_RUN, "sequence reaches RUN");
    // core reset released after the switch
    cyc = 0;
    while (!core_rst_n && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(core_rst_n, "core reset released");
    if (core_rst_n) n_release++;
    for (int k = 0; k < 4; k++) begin
      core_period(p);
      check(p == 20 * (int'(cfg) + 1), $sformatf("core clock period %0d ns on PLL/2 (cfg %0d)", p, cfg));
      if (k == 3 && p == 20 * (int'(cfg) + 1)) n_switch++;
    end
    // PLL edge: one system clock after the synchronised reference edge
    for (int k = 0; k < 3; k++) begin
      @(posedge ref_clk);
      repeat (2) @(posedge clk);
      #1 check(pll_clk && pll_counter == cfg, "PLL clock rises with the synchronised reference");
    end
    check(pll_lock && lock_count == 2'd3, "lock held while running");
  endtask

  int pb;

  initial begin
    ext_rst_n = 1'b0;
    pll_cfg = 4'd15;
    pll_bypass = 1'b0;
    normal_run(4'd15);
    normal_run(4'd10);
    normal_run(4'd5);
    normal_run(4'd7);
    normal_run(4'd3);
    // reset while running: core reset must follow within two system clocks
    @(negedge clk);
    ext_rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(!core_rst_n, "chip reset in RUN resets the core");
    if (!core_rst_n) n_reset_run++;
    // bypass
    chip_reset(4'd9, 1'b1);
    repeat (10) @(negedge clk);
    check(seq_state == SEQ_BYPASS, "bypass state");
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      check(!pll_clk, "PLL held in reset in bypass");
    end
    repeat (20) @(negedge clk);
    check(core_rst_n, "core reset released in bypass");
    core_period(pb);
    check(pb == 100, $sformatf("bypass: core on reference clock, period %0d ns", pb));
    if (seq_state == SEQ_BYPASS && core_rst_n && pb == 100) n_bypass++;
    $display("mechanisms: lock=%0d cfg_held=%0d switch=%0d release=%0d bypass=%0d reset_in_run=%0d pfd_qa=%0d pfd_qb=%0d",
             n_lock, n_cfg_held, n_switch, n_release, n_bypass, n_reset_run, n_qa, n_qb);
    check(n_lock > 0, "mechanism: lock");
    check(n_cfg_held > 0, "mechanism: configuration held");
    check(n_switch > 0, "mechanism: clock switch");
    check(n_release > 0, "mechanism: core reset release");
    check(n_bypass > 0, "mechanism: bypass");
    check(n_reset_run > 0, "mechanism: reset while running");
    check(n_qa > 0, "mechanism: PFD up pulses");
    check(n_qb > 0, "mechanism: PFD down pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
