// glitch_free_mux_tb - self-checking testbench for the glitch-free clock mux.
//
// clk0 has a 10 ns period and clk1 a 14 ns period, unrelated in phase. The
// select is switched back and forth at random times. Checks: after reset the
// output follows clk0; once settled after a switch the output equals the
// selected clock at every sample; and every high and every low phase of the
// output lasts at least the shorter half period (5 ns), i.e. no runt pulse.
module glitch_free_mux_tb;

  logic clk0 = 1'b0;
  logic clk1 = 1'b0;
  logic rst_n;
  logic sel;
  logic clk_o;

  int checks = 0;
  int failures = 0;
  int switches = 0;

  glitch_free_mux dut (.clk0(clk0), .clk1(clk1), .rst_n(rst_n), .sel(sel), .clk_o(clk_o));

  always #5 clk0 = ~clk0;
  initial begin
    #3.3;
    forever #7 clk1 = ~clk1;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // pulse-width monitor
  realtime last_edge = 0;
  bit      mon_on = 1'b0;
  always @(clk_o) begin
    if (mon_on) check(($realtime - last_edge) >= 4.999, $sformatf("phase of %0.3f ns", $realtime - last_edge));
    last_edge = $realtime;
  end

  // compare with the selected clock for a while, sampling every 1 ns
  task automatic compare(input bit s, input int ns);
    for (int t = 0; t < ns; t++) begin
      #1;
      check(clk_o == (s ? clk1 : clk0), $sformatf("output follows clk%0d", s));
    end
  endtask

  initial begin
    rst_n = 1'b0;
    sel = 1'b0;
    #23;
    rst_n = 1'b1;
    #40;
    @(clk_o);
    #0.5;
    mon_on = 1'b1;
    compare(1'b0, 60);
    for (int i = 0; i < 12; i++) begin
      #($urandom_range(0, 13));
      sel = ~sel;
      switches++;
      #80;  // settle: two falling edges of each clock
      compare(sel, 100);
    end
    check(switches == 12, "all switches made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
