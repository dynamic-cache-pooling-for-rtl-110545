// tb_pool_policy: stage-2 pooling rules for one job pair.
// Directed cases with hand-worked partition counts (the competing-partition
// example: 4+1 partitions, both grow, the last free partition goes to the
// job with the larger gain, a gain below 3 % reverts), then random gain
// sequences compared step by step with a reference model written from the
// rules: start at 4 (ceiling 7) if the predicted gain exceeds 9 %, else at 1
// (ceiling 4); grow while the gain exceeds 3 %, revert the last step when it
// does not, never exceed the 8 partitions of the pair.
module tb_pool_policy;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, step = 0;
  logic [PERF_W-1:0] pa0 = '0, pb0 = '0, pa = '0, pb = '0;
  logic [CNT_W-1:0] na, nb;
  logic done, upd;

  pool_policy dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_compete = 0, n_revert = 0, n_ceiling = 0;

  // reference model state
  int  ra, rb, mxa, mxb;
  bit  ga, gb, ia, ib;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (na=%0d nb=%0d ref %0d %0d)", what, $time, na, nb, ra, rb);
    end
  endtask

  function automatic int pct(input real p);   // percent -> Q0.10
    return int'(p * 1024.0 / 100.0);
  endfunction

  task automatic ref_start(input int p_a, input int p_b);
    ra = (p_a > THR_INIT) ? 4 : 1;  mxa = (ra == 4) ? 7 : 4;
    rb = (p_b > THR_INIT) ? 4 : 1;  mxb = (rb == 4) ? 7 : 4;
    ga = 1; gb = 1; ia = 0; ib = 0;
  endtask

  task automatic ref_step(input int g_a, input int g_b);
    bit wa, wb, give_a, give_b;
    int free;
    if (!ga && !gb) return;
    wa = 0; wb = 0;
    if (ga) begin
      if (g_a <= THR_T) begin ga = 0; if (ia) begin ra--; n_revert++; end end
      else if (ra >= mxa) begin ga = 0; n_ceiling++; end
      else wa = 1;
    end
    if (gb) begin
      if (g_b <= THR_T) begin gb = 0; if (ib) begin rb--; n_revert++; end end
      else if (rb >= mxb) begin gb = 0; n_ceiling++; end
      else wb = 1;
    end
    free = 8 - ra - rb;
    give_a = wa && free >= 1 && (!wb || free >= 2 || g_a >= g_b);
    give_b = wb && free >= 1 && (!wa || free >= 2 || g_b > g_a);
    if (wa && wb && free == 1) n_compete++;
    if (wa && !give_a) ga = 0;
    if (wb && !give_b) gb = 0;
    ra += give_a; rb += give_b; ia = give_a; ib = give_b;
  endtask

  task automatic do_start(input int p_a, input int p_b);
    @(negedge clk); pa0 = PERF_W'(p_a); pb0 = PERF_W'(p_b); start = 1;
    @(negedge clk); start = 0;
    ref_start(p_a, p_b);
    check(na == CNT_W'(ra) && nb == CNT_W'(rb), "start counts");
  endtask

  task automatic do_step(input int g_a, input int g_b);
    @(negedge clk); pa = PERF_W'(g_a); pb = PERF_W'(g_b); step = 1;
    @(negedge clk); step = 0;
    ref_step(g_a, g_b);
    check(na == CNT_W'(ra) && nb == CNT_W'(rb), "step counts");
    check(done == (!ga && !gb), "done");
    check(na + nb <= 8, "pool size");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // competing for the last partition (hand-worked numbers)
    do_start(pct(20), pct(2));     check(na == 4 && nb == 1, "4/1 start");
    do_step(pct(10), pct(6));      check(na == 5 && nb == 2, "both grow");
    do_step(pct(8), pct(5));       check(na == 6 && nb == 2, "last partition to larger gain");
    do_step(pct(2), pct(9));       check(na == 5 && nb == 2 && done, "revert and finish");
    // both small: each grows to its ceiling of 4
    do_start(pct(5), pct(8));      check(na == 1 && nb == 1, "1/1 start");
    repeat (3) do_step(pct(5), pct(5));
    check(na == 4 && nb == 4, "both at 4");
    do_step(pct(5), pct(5));       check(done, "ceiling reached");
    // revert right after one step
    do_start(pct(1), pct(1));
    do_step(pct(5), pct(1));       check(na == 2 && nb == 1, "grow one");
    do_step(pct(1), pct(1));       check(na == 1 && nb == 1 && done, "reverted");
    // random sequences
    for (int n = 0; n < 300; n++) begin
      do_start($urandom_range(0, pct(20)), $urandom_range(0, pct(20)));
      for (int s = 0; s < 8; s++) do_step($urandom_range(0, pct(12)), $urandom_range(0, pct(12)));
    end
    check(n_compete > 0 && n_revert > 0 && n_ceiling > 0, "all rules exercised");
    $display("competitions=%0d reverts=%0d ceilings=%0d", n_compete, n_revert, n_ceiling);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
