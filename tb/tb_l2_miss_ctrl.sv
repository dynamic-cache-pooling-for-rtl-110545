// tb_l2_miss_ctrl: the L2 controller with one real pooled-L2 layer and the
// behavioural memory. Random reads and writes over a small address range
// (so that hits, misses and evictions all occur) are checked against a
// reference memory: every read must return the latest written value. A
// read hit must answer exactly one clock after it was accepted; a miss must
// take at least the memory latency plus 8 beats, and a re-read right after
// a miss must hit. In a second phase ways 2 and 3 are turned off and the
// core pools ways 1-2 of the layer below: fill beats must then go only to
// local ways 0-1 or over the TSVs to the lent ways.
module tb_l2_miss_ctrl;
  import cp_pkg::*;
  localparam int unsigned SETS  = 64;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PADDR_W - OFF_W - SET_W;
  localparam int unsigned LAT   = 4;

  logic clk = 0, rst_n = 0;
  // core side
  logic core_valid = 0, core_write = 0, core_ifetch = 0, core_ready;
  logic [ADDR_W-1:0] core_addr = '0;
  logic [DATA_W-1:0] core_wdata = '0;
  logic resp_valid, resp_hit;
  logic [DATA_W-1:0] resp_rdata;
  // ctrl <-> layer
  l2_req_t l2_req; tgt_e l2_tgt; l2_rsp_t l2_rsp;
  logic [NUM_WAYS-1:0] own_local, own_remote; tgt_e own_tgt;
  // memory
  logic mem_req_valid, mem_req_write, mem_req_ready, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr; logic [DATA_W-1:0] mem_req_wdata, mem_rsp_data;
  logic ev_read_miss, ev_ifetch_miss, ev_write, ev_replace, busy;
  // layer config and TSV side
  logic cfg_we = 0; lcsr_e cfg_lcsr [NUM_WAYS]; logic [1:0] cfg_rcsr = '0;
  lcsr_e lcsr [NUM_WAYS]; logic [1:0] rcsr; logic cfg_err;
  l2_req_t req_to_lower, req_to_upper; l2_rsp_t rsp_to_lower, rsp_to_upper;
  logic [NUM_WAYS-1:0] lend_to_lower, lend_to_upper;
  logic [NUM_WAYS-1:0] lower_lends_up = '0;

  l2_miss_ctrl dut (.*);

  l2_pool_layer #(.SETS(SETS)) u_layer (
    .clk, .rst_n, .cfg_we, .cfg_lcsr, .cfg_rcsr, .clr(1'b0), .lcsr, .rcsr, .cfg_err,
    .core_req(l2_req), .core_tgt(l2_tgt), .core_rsp(l2_rsp),
    .own_local, .own_remote, .own_tgt,
    .req_to_lower, .req_from_lower(L2_REQ_IDLE), .rsp_to_lower, .rsp_from_lower(L2_RSP_IDLE),
    .lend_to_lower, .lower_lends_up,
    .req_to_upper, .req_from_upper(L2_REQ_IDLE), .rsp_to_upper, .rsp_from_upper(L2_RSP_IDLE),
    .lend_to_upper, .upper_lends_down('0));

  mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_write(mem_req_write), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid),
    .rsp_data(mem_rsp_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wr = 0, n_local_fill = 0, n_remote_fill = 0;
  int phase = 1;
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];

  function automatic logic [DATA_W-1:0] ref_rd(input logic [ADDR_W-1:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {a[31:0] ^ 32'h5a5a_0000, ~a[31:0]};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [ADDR_W-1:0] mk_addr(input int tag, input int set, input int word);
    return ADDR_W'({TAG_W'(tag), SET_W'(set), WOFF_W'(word), BOFF_W'(0)});
  endfunction

  // one core request; returns hit flag and latency
  task automatic access(input logic wr, input logic [ADDR_W-1:0] a, output logic hit, output int lat);
    logic [DATA_W-1:0] d;
    d = {$urandom, $urandom};
    @(negedge clk);
    while (!core_ready) @(negedge clk);
    core_valid = 1; core_write = wr; core_addr = a; core_wdata = d;
    core_ifetch = !wr && ($urandom_range(0, 3) == 0);
    @(negedge clk);
    core_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    hit = resp_hit;
    if (wr) begin
      ref_mem[a] = d; n_wr++;
    end else begin
      check(resp_rdata == ref_rd(a), "read data");
      if (hit) begin n_hit++; check(lat == 1, "hit latency 1"); end
      else     begin n_miss++; check(lat >= LAT + WORDS_PER_LINE, "miss latency"); end
    end
  endtask

  // watch every fill beat
  always @(posedge clk) if (rst_n && l2_req.valid && l2_req.fill) begin
    if (l2_tgt == TGT_LOCAL) begin
      n_local_fill++;
      check(lcsr[l2_req.way] == LCSR_LOCAL, "local fill only into a local way");
    end else begin
      n_remote_fill++;
      check(l2_tgt == TGT_LOWER && req_to_lower.valid && req_to_lower.fill &&
            lower_lends_up[l2_req.way], "remote fill only into a lent way");
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hit; int lat;
    logic [ADDR_W-1:0] a;
    for (int w = 0; w < NUM_WAYS; w++) cfg_lcsr[w] = LCSR_LOCAL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: miss then hit on the same line
    a = mk_addr(3, 2, 5);
    access(0, a, hit, lat); check(!hit, "first read misses");
    access(0, mk_addr(3, 2, 1), hit, lat); check(hit, "re-read of the line hits");
    access(1, mk_addr(3, 2, 1), hit, lat); check(hit, "write hit");
    access(0, mk_addr(3, 2, 1), hit, lat); check(hit, "read after write hits");
    for (int n = 0; n < 600; n++)
      access($urandom_range(0, 3) == 0, mk_addr($urandom_range(0, 5), $urandom_range(0, 3),
             $urandom_range(0, 7)), hit, lat);
    check(n_local_fill > 0, "phase 1 fills");
    // phase 2: ways 2,3 off; pool ways 1,2 from the layer below
    phase = 2;
    @(negedge clk);
    cfg_lcsr[2] = LCSR_OFF; cfg_lcsr[3] = LCSR_OFF; cfg_rcsr = 2'b01; cfg_we = 1;
    lower_lends_up = 4'b0110;
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 600; n++)
      access($urandom_range(0, 3) == 0, mk_addr($urandom_range(0, 5), $urandom_range(0, 3),
             $urandom_range(0, 7)), hit, lat);
    check(n_remote_fill > 0, "remote fills happened");
    check(n_hit > 50 && n_miss > 50 && n_wr > 50, "hits, misses and writes all happened");
    $display("hits=%0d misses=%0d writes=%0d local fill beats=%0d remote fill beats=%0d",
             n_hit, n_miss, n_wr, n_local_fill, n_remote_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
