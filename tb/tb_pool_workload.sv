// tb_pool_workload: a cache-hungry job paired with a streaming job, with the
// policy loop closed on measured throughput.
//
// A two-layer stack (one pair, 64 sets per way to keep the run short) runs
// two synthetic jobs standing in for the two kinds of program the policy is
// built for:
//  * layer 0, cache-hungry: random reads and writes over 6 lines per set in
//    8 sets, so its hit rate rises with every way it gets up to 6;
//  * layer 1, streaming: every access touches a new line, so extra cache
//    cannot help it.
// After placement and the start of pooling, the testbench measures each
// job's completed accesses per interval (its throughput, standing in for
// IPC), turns the change since the previous interval into a gain and feeds
// it to the policy as the next step. The hungry job must grow past its own
// four ways into the partner's, give back the seventh way that brought
// nothing, and finish with 6 partitions; the streaming job must stay at 1.
// Its throughput at the end must clearly beat its throughput with 4 ways.
// Every read is checked against a reference memory throughout.
// The grow / revert / give-last-partition behaviour checked here is the
// published policy's; the two synthetic jobs, the interval length and using
// access throughput in place of IPC are this testbench's own choices.
module tb_pool_workload;
  import cp_pkg::*;
  localparam int L = 2;
  localparam int INTERVAL = 20000;

  logic clk = 0, rst_n = 0;
  logic core_valid [L], core_write [L], core_ifetch [L], core_ready [L];
  logic [ADDR_W-1:0] core_addr [L];
  logic [DATA_W-1:0] core_wdata [L];
  logic resp_valid [L], resp_hit [L], remote_hit [L], coh_inval [L];
  logic [DATA_W-1:0] resp_rdata [L];
  logic mem_req_valid [L], mem_req_write [L], mem_req_ready [L], mem_rsp_valid [L];
  logic [ADDR_W-1:0] mem_req_addr [L];
  logic [DATA_W-1:0] mem_req_wdata [L], mem_rsp_data [L];
  logic perf_snap = 0;
  logic [31:0] perf_replacements [L], perf_writes [L], perf_read_misses [L],
               perf_ifetch_misses [L], perf_cycles [L];
  logic alloc_start = 0, alloc_done, pool_start = 0, pool_step = 0, pool_done;
  logic [PERF_W-1:0] job_p [L], layer_gain [L];
  logic [11:0] job_ipc [L];
  logic [0:0] job_of_layer [L], layer_of_job [L];
  logic [CNT_W-1:0] partitions [L];
  logic reconfig_pending, cfg_err;
  lcsr_e lcsr [L][NUM_WAYS];
  logic [1:0] rcsr [L];

  crp_top #(.NUM_LAYERS(L), .SETS(64)) dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_mem
    mem_model #(.LAT(10), .SEED(32'h0101_0101 * l), .RANDOM_READY(1'b0)) u_mem (
      .clk, .rst_n, .req_valid(mem_req_valid[l]), .req_write(mem_req_write[l]),
      .req_addr(mem_req_addr[l]), .req_wdata(mem_req_wdata[l]), .req_ready(mem_req_ready[l]),
      .rsp_valid(mem_rsp_valid[l]), .rsp_data(mem_rsp_data[l]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit stop = 0;
  int done_cnt [L];
  int n_remote_hit = 0;
  logic [DATA_W-1:0] ref_mem [L][logic [ADDR_W-1:0]];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [DATA_W-1:0] ref_rd(input int l, input logic [ADDR_W-1:0] a);
    if (ref_mem[l].exists(a)) return ref_mem[l][a];
    return {a[31:0] ^ 32'h5a5a_0000 ^ (32'h0101_0101 * l), ~a[31:0]};
  endfunction

  task automatic core_run(input int l);
    logic [ADDR_W-1:0] a;
    logic [DATA_W-1:0] d;
    logic wr;
    int stream = 0;
    while (!stop) begin
      if (l == 0)   // 6 lines per set, 8 sets
        a = ADDR_W'({20'($urandom_range(0, 5)), 6'($urandom_range(0, 7)), 3'($urandom_range(0, 7)), 3'b000});
      else begin    // a new line every access
        a = ADDR_W'({20'(stream / 64 + 100), 6'(stream % 64), 3'($urandom_range(0, 7)), 3'b000});
        stream++;
      end
      wr = ($urandom_range(0, 4) == 0);
      d  = {$urandom, $urandom};
      @(negedge clk);
      core_valid[l] = 1; core_write[l] = wr; core_addr[l] = a; core_wdata[l] = d;
      core_ifetch[l] = 0;
      while (!core_ready[l]) @(negedge clk);
      @(negedge clk);
      core_valid[l] = 0;
      while (!resp_valid[l]) @(negedge clk);
      if (wr) ref_mem[l][a] = d;
      else begin
        check(resp_rdata[l] == ref_rd(l, a), "read data");
        if (resp_hit[l] && remote_hit[l]) n_remote_hit++;
      end
      done_cnt[l]++;
    end
  endtask

  // completed accesses of each job over one interval; after every change one
  // interval is spent refilling the re-assigned ways before measuring
  task automatic measure(output int thr [L]);
    int c0 [L];
    for (int l = 0; l < L; l++) c0[l] = done_cnt[l];
    repeat (INTERVAL) @(negedge clk);
    for (int l = 0; l < L; l++) thr[l] = done_cnt[l] - c0[l];
  endtask

  function automatic int gain(input int now, input int prev);   // Q0.10, floored at 0
    int g;
    g = (prev == 0) ? 0 : ((now - prev) * 1024) / prev;
    return (g < 0) ? 0 : ((g > 4095) ? 4095 : g);
  endfunction

  task automatic step(input int g0, input int g1);
    @(negedge clk);
    layer_gain[0] = PERF_W'(g0); layer_gain[1] = PERF_W'(g1); pool_step = 1;
    @(negedge clk);
    pool_step = 0;
    @(negedge clk);                               // pending rises one clock after the update
    while (reconfig_pending) @(negedge clk);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thr_start [L], thr_prev [L], thr [L];
    int n;
    for (int l = 0; l < L; l++) begin
      core_valid[l] = 0; core_write[l] = 0; core_ifetch[l] = 0; core_addr[l] = '0;
      core_wdata[l] = '0; coh_inval[l] = 0; layer_gain[l] = '0; done_cnt[l] = 0;
    end
    // predicted 1->4 way gains from the (external) predictor: 25 % and 1 %
    job_p[0] = 256; job_p[1] = 10; job_ipc[0] = 500; job_ipc[1] = 500;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      core_run(0);
      core_run(1);
      begin
        @(negedge clk); alloc_start = 1;
        @(negedge clk); alloc_start = 0;
        check(job_of_layer[0] == 0 && job_of_layer[1] == 1, "hungry job on layer 0");
        @(negedge clk); pool_start = 1;
        @(negedge clk); pool_start = 0;
        @(negedge clk);
        while (reconfig_pending) @(negedge clk);
        check(partitions[0] == 4 && partitions[1] == 1, "start 4 / 1");
        measure(thr_start);                       // warm-up interval
        measure(thr_start);
        thr_prev = thr_start;
        // first step uses the predicted gains
        step(int'(job_p[0]), int'(job_p[1]));
        n = 0;
        while (!pool_done && n < 8) begin
          measure(thr);                           // warm-up after the change
          measure(thr);
          $display("partitions %0d/%0d  throughput %0d/%0d  gain %0d/%0d (x1/1024)",
                   partitions[0], partitions[1], thr[0], thr[1],
                   gain(thr[0], thr_prev[0]), gain(thr[1], thr_prev[1]));
          step(gain(thr[0], thr_prev[0]), gain(thr[1], thr_prev[1]));
          thr_prev = thr;
          n++;
        end
        check(pool_done, "policy converged");
        check(partitions[0] == 6 && partitions[1] == 1, "hungry job ends at 6, streaming at 1");
        check(rcsr[0] == 2'b10 && lcsr[1][0] == LCSR_LOCAL && lcsr[1][1] == LCSR_OFF &&
              lcsr[1][2] == LCSR_LOWER && lcsr[1][3] == LCSR_LOWER, "two ways of layer 1 lent down");
        measure(thr);
        measure(thr);
        $display("hungry job: %0d accesses per interval with 4 ways, %0d with 6", thr_start[0], thr[0]);
        check(thr[0] * 4 > thr_start[0] * 5, "pooling speeds the hungry job up by more than 25 %");
        check(n_remote_hit > 0, "hungry job hits in borrowed ways");
        stop = 1;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
