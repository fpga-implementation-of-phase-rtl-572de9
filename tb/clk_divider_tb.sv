// clk_divider_tb - self-checking testbench for the clock divider.
//
// Two instances, DIV = 2 (the default) and DIV = 6. For each: the output is
// held low while disabled, the first rising edge comes 2 + DIV/2 input clocks
// after the enable is raised (two for the enable synchroniser), and then the
// output toggles every DIV/2 input clocks (period DIV, 50% duty). Disabling
// stops the output low within three input clocks.
module clk_divider_tb;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic clk_o2, clk_o6;

  int checks = 0;
  int failures = 0;

  clk_divider #(.DIV(2)) dut2 (.clk_i(clk), .rst_n(rst_n), .en(en), .clk_o(clk_o2));
  clk_divider #(.DIV(6)) dut6 (.clk_i(clk), .rst_n(rst_n), .en(en), .clk_o(clk_o6));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // record both outputs for n input cycles after en rises
  logic o2 [0:63];
  logic o6 [0:63];

  task automatic run_enabled();
    @(negedge clk);
    en = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      o2[i] = clk_o2;
      o6[i] = clk_o6;
    end
  endtask

  // expected output sampled after input cycle i+1 following enable
  function automatic bit expect_out(input int div, input int i);
    int k = i + 1 - 2;  // clocks seen with the enable synchronised
    if (k < div / 2) return 1'b0;
    return ((k / (div / 2)) % 2) == 1;
  endfunction

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!clk_o2 && !clk_o6, "held low while disabled");
    for (int r = 0; r < 2; r++) begin
      run_enabled();
      for (int i = 0; i < 64; i++) begin
        check(o2[i] == expect_out(2, i), $sformatf("DIV=2 cycle %0d", i));
        check(o6[i] == expect_out(6, i), $sformatf("DIV=6 cycle %0d", i));
      end
      en = 1'b0;
      repeat (3) @(negedge clk);
      check(!clk_o2 && !clk_o6, "stopped low after disable");
      repeat (4) @(negedge clk);
    end
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
