// seq_fsm_tb - self-checking testbench for the power-up sequencer.
//
// Normal start: after reset the sequencer must pulse sample_en for exactly
// one cycle with the PLL in reset, release the PLL reset, wait (for any
// number of cycles, at least one) for lock, enable the divider for SETTLE cycles before
// raising select, keep select SETTLE cycles before dropping the core reset
// request, and keep all of that in RUN. The expected output vector of every
// cycle is worked out from the sequence above. Bypass start: the PLL stays
// in reset, select stays 0, the divider stays off and the core reset request
// drops two cycles after sampling. Reset in RUN restarts the sequence.
module seq_fsm_tb;

  import pll_pkg::*;

  localparam int SETTLE = 8;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       pll_bypass, pll_lock;
  logic       sample_en, pll_reset, div_en, select, core_rst_req;
  seq_state_t state;

  int checks = 0;
  int failures = 0;

  seq_fsm #(.SETTLE(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .pll_bypass(pll_bypass), .pll_lock(pll_lock),
    .sample_en(sample_en), .pll_reset(pll_reset), .div_en(div_en),
    .select(select), .core_rst_req(core_rst_req), .state(state)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (state=%0d se=%0d pr=%0d de=%0d sel=%0d crr=%0d t=%0t)", what, state,
               sample_en, pll_reset, div_en, select, core_rst_req, $time);
    end
  endtask

  // expect {sample_en, pll_reset, div_en, select, core_rst_req}
  task automatic expect_out(input logic [4:0] v, input string what);
    check({sample_en, pll_reset, div_en, select, core_rst_req} == v, what);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    expect_out(5'b01001, "in reset: PLL reset, core reset requested");
    rst_n = 1'b1;
  endtask

  task automatic normal_start(input int lock_delay);
    pll_bypass = 1'b0;
    pll_lock = 1'b0;
    do_reset();
    @(negedge clk); expect_out(5'b11001, "sample cycle: sample_en with PLL in reset");
    @(negedge clk); expect_out(5'b00001, "PLL released, nothing else");
    for (int i = 0; i < lock_delay; i++) begin
      @(negedge clk); expect_out(5'b00001, "waiting for lock");
    end
    pll_lock = 1'b1;
    for (int i = 0; i < SETTLE; i++) begin
      @(negedge clk); expect_out(5'b00101, $sformatf("divider on, settle %0d", i));
    end
    for (int i = 0; i < SETTLE; i++) begin
      @(negedge clk); expect_out(5'b00111, $sformatf("select PLL, settle %0d", i));
    end
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); expect_out(5'b00110, "run: core reset request dropped");
    end
    pll_lock = 1'b0;
    repeat (3) @(negedge clk);
    expect_out(5'b00110, "run is kept when lock drops");
  endtask

  initial begin
    rst_n = 1'b0;
    pll_bypass = 1'b0;
    pll_lock = 1'b0;
    normal_start(1);
    normal_start(5);
    normal_start(37);
    // bypass
    pll_bypass = 1'b1;
    pll_lock = 1'b0;
    do_reset();
    @(negedge clk); expect_out(5'b11001, "bypass: sample cycle");
    @(negedge clk); expect_out(5'b00001, "bypass: start cycle");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); expect_out(5'b01000, "bypass: PLL in reset, reference clock, core running");
      check(state == SEQ_BYPASS, "bypass state");
    end
    normal_start(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
