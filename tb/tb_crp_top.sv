// tb_crp_top: the whole 4-layer stack at its full size, end to end.
//
// Four core drivers issue random reads and writes (over few sets, so that
// ways fill and get evicted) while a policy driver runs the runtime policy:
// job allocation, start of cache pooling, then measured-gain steps that grow
// partitions, hand the last free partition to the job with the larger gain,
// revert a step that did not pay and stop at a ceiling. Each change is
// applied by the stack's quiesce-and-write reconfiguration. A coherence
// invalidation at the end clears one layer's status registers.
//
// Checked: every read returns the latest written value (per-core reference
// memory); every L2 hit, local or across the TSVs, answers one clock after
// acceptance; the job placement, the partition counts and the LCSR/RCSR
// values against hand-worked results. Each mechanism (local hit, remote hit,
// miss refill, write-through, request stall during reconfiguration,
// reconfiguration, powered-off partition, competition, revert, ceiling,
// coherence clear) is counted, and one that never happened is a failure.
module tb_crp_top;
  import cp_pkg::*;
  localparam int L = 4;

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
  logic [1:0] job_of_layer [L], layer_of_job [L];
  logic [CNT_W-1:0] partitions [L];
  logic reconfig_pending, cfg_err;
  lcsr_e lcsr [L][NUM_WAYS];
  logic [1:0] rcsr [L];

  crp_top dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_mem
    mem_model #(.LAT(6), .SEED(32'h0101_0101 * l)) u_mem (
      .clk, .rst_n, .req_valid(mem_req_valid[l]), .req_write(mem_req_write[l]),
      .req_addr(mem_req_addr[l]), .req_wdata(mem_req_wdata[l]), .req_ready(mem_req_ready[l]),
      .rsp_valid(mem_rsp_valid[l]), .rsp_data(mem_rsp_data[l]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit stop = 0;
  int n_local_hit = 0, n_remote_hit = 0, n_miss = 0, n_write = 0, n_stall = 0;
  int n_reconfig = 0, n_off = 0, n_compete = 0, n_revert = 0, n_ceiling = 0, n_clear = 0;
  int n_alloc = 0;
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

  // ---------------- core drivers ----------------
  task automatic core_run(input int l);
    logic [ADDR_W-1:0] a;
    logic [DATA_W-1:0] d;
    logic wr;
    int lat;
    while (!stop) begin
      // 16 tags x 4 sets x 8 words per core; sets are 4 apart from core to core
      a  = ADDR_W'({16'(l), 20'($urandom_range(0, 15)), 12'($urandom_range(0, 3) + 4 * l),
                    3'($urandom_range(0, 7)), 3'b000});
      wr = ($urandom_range(0, 4) == 0);
      d  = {$urandom, $urandom};
      @(negedge clk);
      core_valid[l] = 1; core_write[l] = wr; core_addr[l] = a; core_wdata[l] = d;
      core_ifetch[l] = !wr && ($urandom_range(0, 3) == 0);
      while (!core_ready[l]) begin
        if (reconfig_pending) n_stall++;
        @(negedge clk);
      end
      @(negedge clk);
      core_valid[l] = 0;
      lat = 1;
      while (!resp_valid[l]) begin @(negedge clk); lat++; end
      if (wr) begin
        ref_mem[l][a] = d;
        n_write++;
      end else begin
        check(resp_rdata[l] == ref_rd(l, a), "read data");
        if (resp_hit[l]) begin
          check(lat == 1, "hit answers in one clock");
          if (remote_hit[l]) n_remote_hit++;
          else n_local_hit++;
        end else n_miss++;
      end
    end
  endtask

  // ---------------- policy helpers ----------------
  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_applied();
    @(negedge clk);
    while (reconfig_pending) @(negedge clk);
    n_reconfig++;
    for (int l = 0; l < L; l++)
      for (int w = 0; w < NUM_WAYS; w++) if (lcsr[l][w] == LCSR_OFF) begin n_off++; break; end
  endtask

  task automatic do_step(input int g0, input int g1, input int g2, input int g3);
    @(negedge clk);
    layer_gain[0] = PERF_W'(g0); layer_gain[1] = PERF_W'(g1);
    layer_gain[2] = PERF_W'(g2); layer_gain[3] = PERF_W'(g3);
    pool_step = 1;
    @(negedge clk);
    pool_step = 0;
  endtask

  function automatic logic lay_is(input int l, input lcsr_e w0, input lcsr_e w1,
                                  input lcsr_e w2, input lcsr_e w3, input logic [1:0] r);
    return lcsr[l][0] == w0 && lcsr[l][1] == w1 && lcsr[l][2] == w2 && lcsr[l][3] == w3 &&
           rcsr[l] == r;
  endfunction

  function automatic logic parts_are(input int a, input int b, input int c, input int d);
    return partitions[0] == CNT_W'(a) && partitions[1] == CNT_W'(b) &&
           partitions[2] == CNT_W'(c) && partitions[3] == CNT_W'(d);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin
      core_valid[l] = 0; core_write[l] = 0; core_ifetch[l] = 0; core_addr[l] = '0;
      core_wdata[l] = '0; coh_inval[l] = 0; layer_gain[l] = '0;
    end
    // predicted gains (Q0.10): 20 %, 2 %, 12 %, 5 %; measured IPC (x1/1024)
    job_p[0] = 205; job_p[1] = 20; job_p[2] = 123; job_p[3] = 51;
    job_ipc[0] = 800; job_ipc[1] = 900; job_ipc[2] = 500; job_ipc[3] = 600;
    repeat (3) @(posedge clk);
    rst_n = 1;

    fork
      core_run(0);
      core_run(1);
      core_run(2);
      core_run(3);
      begin
        // all partitions local: plain private caches
        wait_cycles(3000);
        for (int l = 0; l < L; l++) check(lay_is(l, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL,
                                                 LCSR_LOCAL, 2'b00), "reset configuration");
        // stage 1: pairs (J0,J1) and (J2,J3); (J0,J1) has the higher IPC sum
        @(negedge clk); alloc_start = 1;
        @(negedge clk); alloc_start = 0;
        check(alloc_done, "allocation done");
        check(job_of_layer[0] == 0 && job_of_layer[1] == 1 && job_of_layer[2] == 2 &&
              job_of_layer[3] == 3, "job placement");
        n_alloc++;
        // stage 2 start: 4/1 and 4/1 partitions
        @(negedge clk); pool_start = 1;
        @(negedge clk); pool_start = 0;
        check(parts_are(4, 1, 4, 1), "start partition counts");
        wait_applied();
        check(lay_is(1, LCSR_LOCAL, LCSR_OFF, LCSR_OFF, LCSR_OFF, 2'b00), "layer 1 at 1 way");
        check(lay_is(3, LCSR_LOCAL, LCSR_OFF, LCSR_OFF, LCSR_OFF, 2'b00), "layer 3 at 1 way");
        wait_cycles(3000);
        // step 1: pair 0 both grow; pair 1 only the hungry job grows
        do_step(102, 61, 82, 10);
        check(parts_are(5, 2, 5, 1), "step 1 counts");
        wait_applied();
        check(lay_is(0, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, 2'b10), "layer 0 pools up");
        check(lay_is(1, LCSR_LOCAL, LCSR_LOCAL, LCSR_OFF, LCSR_LOWER, 2'b00), "layer 1 lends way 3");
        check(lay_is(3, LCSR_LOCAL, LCSR_OFF, LCSR_OFF, LCSR_LOWER, 2'b00), "layer 3 lends way 3");
        wait_cycles(4000);
        // step 2: pair 0 competes for the last partition; larger gain (layer 0) wins
        do_step(82, 61, 61, 10);
        check(parts_are(6, 2, 6, 1), "step 2 counts");
        if (partitions[0] + partitions[1] == 8) n_compete++;
        wait_applied();
        wait_cycles(4000);
        // step 3: layer 0's last partition did not pay: revert
        do_step(10, 61, 61, 10);
        check(parts_are(5, 2, 7, 1), "step 3 counts");
        if (partitions[0] == 5) n_revert++;
        wait_applied();
        check(lay_is(1, LCSR_LOCAL, LCSR_LOCAL, LCSR_OFF, LCSR_LOWER, 2'b00), "layer 1 after revert");
        check(lay_is(2, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, 2'b10), "layer 2 pools up");
        check(lay_is(3, LCSR_LOCAL, LCSR_LOWER, LCSR_LOWER, LCSR_LOWER, 2'b00), "layer 3 lends 3 ways");
        wait_cycles(4000);
        // step 4: layer 2 at its ceiling of 7
        do_step(61, 61, 61, 61);
        check(parts_are(5, 2, 7, 1) && pool_done, "ceiling, policy done");
        if (pool_done && partitions[2] == 7) n_ceiling++;
        wait_cycles(3000);
        // coherence invalidation clears layer 3's registers (and flushes its lent ways)
        @(negedge clk); coh_inval[3] = 1;
        @(negedge clk); coh_inval[3] = 0;
        check(lay_is(3, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, LCSR_LOCAL, 2'b00), "clear");
        n_clear++;
        wait_cycles(2000);
        stop = 1;
      end
    join
    repeat (40) @(negedge clk);
    check(!cfg_err, "no refused configuration");
    // performance counters: one snapshot, the cycle counter must have run
    @(negedge clk); perf_snap = 1;
    @(negedge clk); perf_snap = 0;
    check(perf_cycles[0] > 20000 && perf_read_misses[0] > 0 && perf_writes[0] > 0,
          "performance counters");
    $display("local hits=%0d remote hits=%0d misses=%0d writes=%0d stalls=%0d reconfigs=%0d",
             n_local_hit, n_remote_hit, n_miss, n_write, n_stall, n_reconfig);
    $display("off=%0d compete=%0d revert=%0d ceiling=%0d clear=%0d alloc=%0d",
             n_off, n_compete, n_revert, n_ceiling, n_clear, n_alloc);
    check(n_local_hit > 0, "mechanism: local hit");
    check(n_remote_hit > 0, "mechanism: remote hit over TSVs");
    check(n_miss > 0, "mechanism: miss and refill");
    check(n_write > 0, "mechanism: write-through");
    check(n_stall > 0, "mechanism: stall during reconfiguration");
    check(n_reconfig >= 4, "mechanism: reconfiguration");
    check(n_off > 0, "mechanism: partition turned off");
    check(n_compete > 0, "mechanism: competing partition");
    check(n_revert > 0, "mechanism: revert");
    check(n_ceiling > 0, "mechanism: ceiling");
    check(n_clear > 0, "mechanism: coherence clear");
    check(n_alloc > 0, "mechanism: job allocation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
