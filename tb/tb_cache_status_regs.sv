// tb_cache_status_regs: checks the LCSR/RCSR register set.
// Random configuration writes are compared with a reference copy kept by the
// testbench: partition 0 must stay local, a write with both RCSR bits set
// must be refused with cfg_err, flush must flag exactly the partitions whose
// status changes, and clr must return everything to 0.
module tb_cache_status_regs;
  import cp_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       cfg_we = 0, clr = 0;
  lcsr_e      cfg_lcsr [NUM_WAYS];
  logic [1:0] cfg_rcsr = '0;
  lcsr_e      lcsr [NUM_WAYS];
  logic [1:0] rcsr;
  logic [NUM_WAYS-1:0] flush;
  logic       cfg_err;
  int checks = 0, failures = 0;
  int n_err = 0, n_flush = 0, n_clr = 0;

  lcsr_e      ref_l [NUM_WAYS];
  logic [1:0] ref_r;

  cache_status_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_WAYS-1:0] exp_flush;
    logic bad;
    for (int w = 0; w < NUM_WAYS; w++) begin
      cfg_lcsr[w] = LCSR_LOCAL;
      ref_l[w]    = LCSR_LOCAL;
    end
    ref_r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NUM_WAYS; w++) check(lcsr[w] == LCSR_LOCAL, "reset lcsr");
    check(rcsr == 2'b00, "reset rcsr");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cfg_we = 1'($urandom_range(0, 3) != 0);
      clr    = ($urandom_range(0, 19) == 0);
      cfg_rcsr = 2'($urandom);
      for (int w = 0; w < NUM_WAYS; w++) cfg_lcsr[w] = lcsr_e'($urandom_range(0, 3));
      bad = cfg_we && !clr && cfg_rcsr == 2'b11;
      // expected flush mask, from the reference
      for (int w = 0; w < NUM_WAYS; w++) begin
        lcsr_e nxt;
        nxt = ref_l[w];
        if (clr) nxt = LCSR_LOCAL;
        else if (cfg_we && !bad) nxt = (w == 0) ? LCSR_LOCAL : cfg_lcsr[w];
        exp_flush[w] = (nxt != ref_l[w]);
      end
      #1;
      check(flush == exp_flush, "flush mask");
      if (flush != 0) n_flush++;
      @(posedge clk);
      for (int w = 0; w < NUM_WAYS; w++) begin
        if (clr) ref_l[w] = LCSR_LOCAL;
        else if (cfg_we && !bad) ref_l[w] = (w == 0) ? LCSR_LOCAL : cfg_lcsr[w];
      end
      if (clr) begin ref_r = '0; n_clr++; end
      else if (cfg_we && !bad) ref_r = cfg_rcsr;
      if (bad) n_err++;
      @(negedge clk);
      cfg_we = 0; clr = 0;
      for (int w = 0; w < NUM_WAYS; w++) check(lcsr[w] == ref_l[w], "lcsr value");
      check(rcsr == ref_r, "rcsr value");
      check(cfg_err == bad, "cfg_err");
    end
    check(n_err > 0 && n_flush > 0 && n_clr > 0, "all cases reached");
    $display("refused=%0d flushes=%0d clears=%0d", n_err, n_flush, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
