// reset_ctrl_tb - self-checking testbench for the core reset control.
//
// Checks that the core reset is asserted one clock after a request and is
// released exactly RST_HOLD + 1 clocks after the request ends, that a new
// request during the hold restarts it, and that the chip reset forces it.
module reset_ctrl_tb;

  localparam int HOLD = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic req;
  logic core_rst_n;

  int checks = 0;
  int failures = 0;

  reset_ctrl #(.RST_HOLD(HOLD)) dut (.clk(clk), .rst_n(rst_n), .req(req), .core_rst_n(core_rst_n));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (core_rst_n=%0d t=%0t)", what, core_rst_n, $time);
    end
  endtask

  // cycles from the request ending until core_rst_n rises
  task automatic release_time(output int n);
    n = 0;
    @(negedge clk);
    req = 1'b0;
    do begin
      @(negedge clk);
      n++;
    end while (!core_rst_n && n < 100);
  endtask

  int n;

  initial begin
    rst_n = 1'b0;
    req = 1'b1;
    repeat (2) @(negedge clk);
    check(!core_rst_n, "asserted in chip reset");
    rst_n = 1'b1;
    release_time(n);
    check(n == HOLD + 1, $sformatf("release after %0d clocks (exp %0d)", n, HOLD + 1));
    repeat (3) @(negedge clk);
    check(core_rst_n, "stays released");
    req = 1'b1;
    @(negedge clk);
    check(!core_rst_n, "new request asserts at once");
    req = 1'b0;
    repeat (4) @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    check(!core_rst_n, "request during hold keeps reset");
    release_time(n);
    check(n == HOLD + 1, $sformatf("hold restarted: %0d clocks", n));
    rst_n = 1'b0;
    @(negedge clk);
    check(!core_rst_n, "chip reset forces core reset");
    rst_n = 1'b1;
    repeat (HOLD + 2) @(negedge clk);
    check(core_rst_n, "released after chip reset without request");
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
