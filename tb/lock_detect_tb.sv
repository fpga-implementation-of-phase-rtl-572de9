// lock_detect_tb - self-checking testbench for the PLL lock detector.
//
// Directed part: three coincident rising edges give lock_count 1, 2, 3 and
// lock on the third; a fourth keeps the lock; an input edge without an output
// edge, or the reverse, clears count and lock. Random part: one-cycle pulses
// on either clock at random, mostly together, compared cycle by cycle with
// an expected count kept by the testbench from the pulse pattern it drove.
module lock_detect_tb;

  logic       clk = 1'b0;
  logic       reset;
  logic       clk_in, clk_out;
  logic [1:0] lock_count;
  logic       locked;

  int checks = 0;
  int failures = 0;

  lock_detect #(.LOCK_N(3)) dut (
    .clk(clk), .reset(reset), .clk_in(clk_in), .clk_out(clk_out),
    .lock_count(lock_count), .locked(locked)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (count=%0d locked=%0d t=%0t)", what, lock_count, locked, $time);
    end
  endtask

  // one cycle with the given pulses, then two idle cycles (levels low)
  task automatic pulse(input bit pi, input bit po);
    @(negedge clk);
    clk_in  = pi;
    clk_out = po;
    @(negedge clk);
    clk_in  = 1'b0;
    clk_out = 1'b0;
    @(negedge clk);
  endtask

  int exp_count;

  initial begin
    reset = 1'b1;
    clk_in = 1'b0;
    clk_out = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(lock_count == 0 && !locked, "cleared after reset");
    pulse(1, 1); check(lock_count == 1 && !locked, "one coincident edge");
    pulse(1, 1); check(lock_count == 2 && !locked, "two coincident edges");
    pulse(1, 1); check(lock_count == 3 && locked,  "three in a row: locked");
    pulse(1, 1); check(lock_count == 3 && locked,  "fourth keeps lock");
    pulse(1, 0); check(lock_count == 0 && !locked, "lone input edge clears lock");
    pulse(1, 1); pulse(1, 1);
    check(lock_count == 2, "count rebuilt");
    pulse(0, 1); check(lock_count == 0 && !locked, "lone output edge clears count");
    pulse(1, 1); pulse(1, 1); pulse(1, 1);
    check(locked, "locked again");
    // a held-high level is not a new edge
    @(negedge clk); clk_in = 1'b1; clk_out = 1'b1;
    repeat (4) @(negedge clk);
    check(lock_count == 3, "levels held high count once");
    clk_in = 1'b0; clk_out = 1'b0;
    @(negedge clk);
    // random part
    reset = 1'b1; @(negedge clk); reset = 1'b0;
    exp_count = 0;
    for (int i = 0; i < 400; i++) begin
      int r;
      bit pi, po;
      r  = $urandom_range(0, 9);
      pi = (r < 8) || (r == 8);
      po = (r < 8) || (r == 9);
      pulse(pi, po);
      if (pi && po) exp_count = (exp_count < 3) ? exp_count + 1 : 3;
      else          exp_count = 0;
      check(lock_count == exp_count && locked == (exp_count == 3), $sformatf("random step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
