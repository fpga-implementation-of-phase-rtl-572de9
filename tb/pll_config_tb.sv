// pll_config_tb - self-checking testbench for the PLL configuration register.
//
// Checks the reset value (all ones), that the pins are captured only in a
// cycle with sample_en high, and that pin changes without sample_en are
// ignored; random pin values and strobes are compared with a value the
// testbench keeps itself.
module pll_config_tb;

  logic       clk = 1'b0;
  logic       reset;
  logic       sample_en;
  logic [3:0] cfg_in;
  logic [3:0] cfg;

  int checks = 0;
  int failures = 0;

  pll_config #(.W(4)) dut (
    .clk(clk), .reset(reset), .sample_en(sample_en), .cfg_in(cfg_in), .cfg(cfg)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cfg=%0d t=%0t)", what, cfg, $time);
    end
  endtask

  logic [3:0] expected;

  initial begin
    reset = 1'b1;
    sample_en = 1'b0;
    cfg_in = 4'd3;
    repeat (2) @(negedge clk);
    check(cfg == 4'hF, "reset value is all ones");
    reset = 1'b0;
    cfg_in = 4'd6;
    repeat (3) @(negedge clk);
    check(cfg == 4'hF, "pins ignored without sample_en");
    sample_en = 1'b1;
    @(negedge clk);
    sample_en = 1'b0;
    check(cfg == 4'd6, "pins captured on sample_en");
    cfg_in = 4'd9;
    repeat (2) @(negedge clk);
    check(cfg == 4'd6, "held after sample_en");
    expected = 4'd6;
    for (int i = 0; i < 200; i++) begin
      cfg_in = 4'($urandom);
      sample_en = ($urandom_range(0, 3) == 0);
      if (sample_en) expected = cfg_in;
      @(negedge clk);
      check(cfg == expected, "random capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
