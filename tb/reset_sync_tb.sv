// reset_sync_tb - self-checking testbench for the reset synchronizer.
//
// Checks that the output reset asserts at once when the input reset falls
// (between clock edges, with no clock edge needed) and that it is released
// on exactly the second rising clock edge after the input is released, for
// several release times relative to the clock.
module reset_sync_tb;

  logic clk = 1'b0;
  logic arst_n;
  logic rst_n;

  int checks = 0;
  int failures = 0;

  reset_sync #(.STAGES(2)) dut (.clk(clk), .arst_n(arst_n), .rst_n(rst_n));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (rst_n=%0d t=%0t)", what, rst_n, $time);
    end
  endtask

  initial begin
    arst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(!rst_n, "held in reset");
    for (int k = 0; k < 8; k++) begin
      // release at an arbitrary point of the low clock phase
      @(negedge clk);
      #(1 + k % 4);
      arst_n = 1'b1;
      #0.1 check(!rst_n, "not released before a clock edge");
      @(posedge clk); #1 check(!rst_n, "still in reset after first edge");
      @(posedge clk); #1 check(rst_n,  "released after second edge");
      repeat (k % 3 + 1) @(posedge clk);
      // assert in the middle of the high phase: must act without a clock edge
      #2 arst_n = 1'b0;
      #0.5 check(!rst_n, "assertion is immediate");
      @(posedge clk); #1 check(!rst_n, "held after assertion");
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
