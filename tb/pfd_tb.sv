// pfd_tb - self-checking testbench for the three-state phase/frequency
// detector.
//
// Directed part walks every transition of the state diagram: A from 0 to I,
// A held in I, B from I to 0, B from 0 to II, B held in II, A from II to 0,
// and simultaneous edges. Frequency part: with A faster than B only Qa
// pulses, with B faster only Qb, and at equal frequencies with A leading by
// d cycles Qa is high for exactly d cycles of each period.
module pfd_tb;

  logic clk = 1'b0;
  logic reset;
  logic a, b;
  logic qa, qb;

  int checks = 0;
  int failures = 0;

  pfd dut (.clk(clk), .reset(reset), .a(a), .b(b), .qa(qa), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (qa=%0d qb=%0d t=%0t)", what, qa, qb, $time);
    end
  endtask

  // one-cycle pulse on the chosen inputs, then return low
  task automatic pulse(input bit pa, input bit pb);
    @(negedge clk);
    a = pa;
    b = pb;
    @(negedge clk);
    a = 1'b0;
    b = 1'b0;
  endtask

  // free-running pulse trains: A every pa cycles, B every pb cycles
  task automatic run_trains(input int pa, input int pb, input int offs, input int cycles,
                            output int na, output int nb);
    na = 0;
    nb = 0;
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      a = ((t % pa) == 0);
      b = (((t + pa - offs) % pb) == 0);
      if (t > 40 && qa) na++;
      if (t > 40 && qb) nb++;
    end
    a = 1'b0;
    b = 1'b0;
  endtask

  int na, nb;

  initial begin
    reset = 1'b1;
    a = 1'b0;
    b = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(!qa && !qb, "state 0 after reset");
    pulse(1, 0); check(qa && !qb,  "A: 0 -> I");
    pulse(1, 0); check(qa && !qb,  "A in I stays");
    pulse(0, 1); check(!qa && !qb, "B: I -> 0");
    pulse(0, 1); check(!qa && qb,  "B: 0 -> II");
    pulse(0, 1); check(!qa && qb,  "B in II stays");
    pulse(1, 0); check(!qa && !qb, "A: II -> 0");
    pulse(1, 1); check(!qa && !qb, "A and B together in 0 stay in 0");
    pulse(1, 0); pulse(1, 1); check(!qa && !qb, "A and B together in I go to 0");
    pulse(0, 1); pulse(1, 1); check(!qa && !qb, "A and B together in II go to 0");
    // level held high is one edge
    @(negedge clk); a = 1'b1;
    repeat (3) @(negedge clk);
    b = 1'b1; @(negedge clk); @(negedge clk);
    check(!qa && !qb, "held levels count one edge each");
    a = 1'b0; b = 1'b0;
    repeat (2) @(negedge clk);
    // frequency behaviour
    run_trains(7, 11, 0, 600, na, nb);
    check(na > 0 && nb == 0, $sformatf("A faster: Qa only (qa cycles %0d, qb cycles %0d)", na, nb));
    reset = 1'b1; @(negedge clk); reset = 1'b0;
    run_trains(11, 7, 0, 600, na, nb);
    check(na == 0 && nb > 0, $sformatf("B faster: Qb only (qa cycles %0d, qb cycles %0d)", na, nb));
    // equal frequency, A leads B by 3 cycles: Qa high 3 of every 10 cycles
    reset = 1'b1; @(negedge clk); reset = 1'b0;
    run_trains(10, 10, 3, 541, na, nb);
    check(na == 150 && nb == 0, $sformatf("A leads by 3: qa cycles %0d (exp 150), qb %0d", na, nb));
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
