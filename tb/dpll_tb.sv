// dpll_tb - self-checking testbench for the digital PLL.
//
// Part 1 drives clk_in directly and checks each correction rule on single
// input edges: counter == limit counts normally, counter < limit>>1 steps by
// two (with wrap at 1 and 0), otherwise the counter holds.
// Part 2 generates the input clock the way a lopsided test clock would be
// made: a down counter that reloads `limit` after 0 and gives a one-cycle
// high pulse at 0. For every limit from 15 down to 1 (first the sequence
// 15, 10, 5, 7) it waits for three coincident rising edges in a row (lock),
// checks the lock time against a bound of (limit/2 + 4) input periods, and
// then checks over several periods that every input edge has an output edge
// in the same cycle, that the output period is limit+1 and that the output
// is high for limit - limit/2 cycles of each period.
module dpll_tb;

  localparam int W = 4;

  logic         clk = 1'b0;
  logic         reset;
  logic [W-1:0] limit;
  logic         clk_in;
  logic         clk_out;
  logic [W-1:0] counter;

  int checks = 0;
  int failures = 0;

  dpll #(.W(W)) dut (
    .clk(clk), .reset(reset), .limit(limit), .clk_in(clk_in),
    .clk_out(clk_out), .counter(counter)
  );

  always #5 clk = ~clk;

  // input clock generator
  logic         use_gen;
  logic         clk_in_direct;
  logic [W-1:0] gen_cnt;
  always_ff @(posedge clk) begin
    if (gen_cnt == 0) gen_cnt <= limit;
    else              gen_cnt <= gen_cnt - 1'b1;
  end
  assign clk_in = use_gen ? (gen_cnt == 0) : clk_in_direct;

  // edge observation, sampled at the falling edge (values of the cycle)
  logic last_in = 1'b0, last_out = 1'b0;
  logic rise_in, rise_out;
  always @(negedge clk) begin
    rise_in  = clk_in  && !last_in;
    rise_out = clk_out && !last_out;
    last_in  = clk_in;
    last_out = clk_out;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (counter=%0d limit=%0d time=%0t)", what, counter, limit, $time);
    end
  endtask

  task automatic wait_count(input logic [W-1:0] v);
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (counter != v && n < 64);
  endtask

  // one input pulse while counter reads `at`, expect `exp` next cycle
  task automatic edge_at(input logic [W-1:0] at, input logic [W-1:0] exp, input string what);
    wait_count(at);
    clk_in_direct = 1'b1;
    @(negedge clk);
    clk_in_direct = 1'b0;
    check(counter == exp, what);
  endtask

  task automatic lock_test(input logic [W-1:0] lim);
    int cyc = 0;
    int run = 0;
    int bound;
    int high, period;
    @(negedge clk);
    limit = lim;
    bound = (int'(lim) / 2 + 4) * (int'(lim) + 1);
    while (run < 3 && cyc < 4000) begin
      @(negedge clk);
      cyc++;
      if (rise_in && rise_out) run++;
      else if (rise_in || rise_out) run = 0;
    end
    check(run == 3, $sformatf("lock reached for limit %0d", lim));
    check(cyc <= bound, $sformatf("lock time %0d within %0d cycles for limit %0d", cyc, bound, lim));
    // measure over 4 periods, starting right after an input edge
    for (int p = 0; p < 4; p++) begin
      high = 0;
      period = 0;
      do begin
        @(negedge clk);
        period++;
        if (clk_out) high++;
        if (rise_in) check(rise_out, "output edge with input edge after lock");
      end while (!rise_in && period < 64);
      if (p > 0 || high > 0) begin
        check(period == int'(lim) + 1, $sformatf("period %0d for limit %0d", period, lim));
        check(high == int'(lim) - int'(lim) / 2, $sformatf("high time %0d for limit %0d", high, lim));
      end
    end
  endtask

  initial begin
    reset = 1'b1;
    limit = 4'd15;
    use_gen = 1'b0;
    clk_in_direct = 1'b0;
    gen_cnt = 4'd3;
    repeat (3) @(negedge clk);
    check(counter == 0, "counter cleared by synchronous reset");
    reset = 1'b0;
    @(negedge clk);
    check(counter == 15, "reload to limit after 0");
    @(negedge clk);
    check(counter == 14, "normal down count");
    // Part 1: single corrections, limit 15, half 7
    edge_at(4'd3,  4'd1,  "late edge: counter 3 steps by two");
    edge_at(4'd12, 4'd12, "early edge: counter 12 holds");
    edge_at(4'd7,  4'd7,  "counter == limit>>1 holds");
    edge_at(4'd15, 4'd14, "edge at limit counts normally");
    edge_at(4'd1,  4'd15, "step by two from 1 wraps to limit");
    edge_at(4'd0,  4'd14, "step by two from 0 wraps to limit-1");
    edge_at(4'd6,  4'd4,  "late edge: counter 6 steps by two");
    // Part 2: locking onto generated input clocks
    use_gen = 1'b1;
    lock_test(4'd15);
    lock_test(4'd10);
    lock_test(4'd5);
    lock_test(4'd7);
    for (int l = 14; l >= 1; l--) lock_test(W'(l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
