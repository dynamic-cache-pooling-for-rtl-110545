// tb_l2_pool_layer: directed checks of one layer's poolable L2 with the TSV
// side driven by the testbench in place of the neighbour layers.
// Covers: local fill and hit, a reconfiguration that lends way 2 up and way 3
// down (with flush of exactly those ways), lookups forwarded over the TSVs
// per RCSR, remote responses merged into the core's hit, requests from the
// neighbours served by the lent ways and answered towards the right side,
// the owned-way report and refusal of a both-neighbour RCSR.
module tb_l2_pool_layer;
  import cp_pkg::*;
  localparam int unsigned SETS  = 64;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PADDR_W - OFF_W - SET_W;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, clr = 0;
  lcsr_e cfg_lcsr [NUM_WAYS];
  logic [1:0] cfg_rcsr = '0;
  lcsr_e lcsr [NUM_WAYS];
  logic [1:0] rcsr;
  logic cfg_err;
  l2_req_t core_req = '0;
  tgt_e core_tgt = TGT_LOCAL;
  l2_rsp_t core_rsp;
  logic remote_hit;
  logic [NUM_WAYS-1:0] own_local, own_remote;
  tgt_e own_tgt;
  l2_req_t req_to_lower, req_from_lower = '0, req_to_upper, req_from_upper = '0;
  l2_rsp_t rsp_to_lower, rsp_from_lower = '0, rsp_to_upper, rsp_from_upper = '0;
  logic [NUM_WAYS-1:0] lend_to_lower, lend_to_upper;
  logic [NUM_WAYS-1:0] lower_lends_up = 4'b1100, upper_lends_down = 4'b0010;

  l2_pool_layer #(.SETS(SETS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] line [4][WORDS_PER_LINE];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [ADDR_W-1:0] mk_addr(input int set, input int tag, input int word);
    return ADDR_W'({TAG_W'(tag), SET_W'(set), WOFF_W'(word), BOFF_W'(0)});
  endfunction

  // fill beat request
  function automatic l2_req_t fill_req(input int way, input int set, input int tag, input int w,
                                       input logic [DATA_W-1:0] d);
    l2_req_t r;
    r = '0; r.valid = 1; r.fill = 1; r.way = WAY_W'(way);
    r.addr = mk_addr(set, tag, w); r.wdata = d;
    return r;
  endfunction

  function automatic l2_req_t rd_req(input int set, input int tag, input int w);
    l2_req_t r;
    r = '0; r.valid = 1; r.addr = mk_addr(set, tag, w);
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 4; l++)
      for (int w = 0; w < WORDS_PER_LINE; w++) line[l][w] = {$urandom, $urandom};
    for (int w = 0; w < NUM_WAYS; w++) cfg_lcsr[w] = LCSR_LOCAL;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. local fill of line 0 into way 1 and line 1 into way 2, then hits
    for (int w = 0; w < WORDS_PER_LINE; w++) begin
      @(negedge clk); core_req = fill_req(1, 3, 7, w, line[0][w]); core_tgt = TGT_LOCAL;
      @(negedge clk); core_req = fill_req(2, 4, 9, w, line[1][w]);
    end
    @(negedge clk); core_req = rd_req(3, 7, 5);
    check(!req_to_lower.valid && !req_to_upper.valid, "no remote lookup with RCSR 00");
    @(negedge clk); core_req = '0;
    check(core_rsp.hit && core_rsp.rdata == line[0][5], "local hit way 1");
    @(negedge clk); core_req = rd_req(4, 9, 2);
    @(negedge clk); core_req = '0;
    check(core_rsp.hit && core_rsp.rdata == line[1][2], "local hit way 2");

    // 2. reconfigure: way 2 lent up, way 3 lent down, core pools from below
    @(negedge clk);
    cfg_lcsr[2] = LCSR_UPPER; cfg_lcsr[3] = LCSR_LOWER; cfg_rcsr = 2'b01; cfg_we = 1;
    @(negedge clk); cfg_we = 0;
    check(lend_to_upper == 4'b0100 && lend_to_lower == 4'b1000, "lent masks");
    check(own_local == 4'b0011 && own_tgt == TGT_LOWER && own_remote == 4'b1100, "owned ways");
    @(negedge clk); core_req = rd_req(3, 7, 1);
    #1 check(req_to_lower.valid && !req_to_upper.valid && req_to_lower.addr == mk_addr(3, 7, 1),
             "lookup forwarded down");
    @(negedge clk); core_req = '0;
    check(core_rsp.hit && core_rsp.rdata == line[0][1], "way 1 kept after reconfig");
    @(negedge clk); core_req = rd_req(4, 9, 2);
    @(negedge clk); core_req = '0;
    check(!core_rsp.hit, "flushed way 2 misses");

    // 3. remote hit comes back from below and is merged
    @(negedge clk); core_req = rd_req(5, 11, 0);
    @(negedge clk); core_req = '0; rsp_from_lower.hit = 1; rsp_from_lower.rdata = line[3][0];
    #1 check(core_rsp.hit && core_rsp.rdata == line[3][0], "remote hit merged");
    @(negedge clk); rsp_from_lower = '0;

    // 4. the upper core fills and reads the lent way 2; the lower core way 3
    for (int w = 0; w < WORDS_PER_LINE; w++) begin
      @(negedge clk); req_from_upper = fill_req(2, 6, 13, w, line[2][w]);
                      req_from_lower = fill_req(3, 6, 15, w, line[3][w]);
    end
    @(negedge clk); req_from_upper = rd_req(6, 13, 4); req_from_lower = rd_req(6, 15, 6);
    @(negedge clk); req_from_upper = '0; req_from_lower = '0;
    check(rsp_to_upper.hit && rsp_to_upper.rdata == line[2][4], "hit returned upward");
    check(rsp_to_lower.hit && rsp_to_lower.rdata == line[3][6], "hit returned downward");
    check(!core_rsp.hit, "remote owners' hits not seen by local core");
    @(negedge clk); core_req = rd_req(6, 13, 4);
    @(negedge clk); core_req = '0;
    check(!core_rsp.hit, "local core cannot reach a lent way");

    // 5. a remote fill aimed below goes over the TSVs only
    @(negedge clk); core_req = fill_req(2, 1, 1, 0, 64'h1); core_tgt = TGT_LOWER;
    #1 check(req_to_lower.valid && req_to_lower.fill && !req_to_upper.valid, "remote fill down");
    @(negedge clk); core_req = '0; core_tgt = TGT_LOCAL;

    // 6. both RCSR bits refused
    @(negedge clk); cfg_rcsr = 2'b11; cfg_we = 1;
    @(negedge clk); cfg_we = 0;
    check(cfg_err && rcsr == 2'b01 && lcsr[2] == LCSR_UPPER, "both-neighbour RCSR refused");

    // 7. clr returns all to local and flushes the lent ways
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    check(rcsr == 2'b00 && lcsr[2] == LCSR_LOCAL && lcsr[3] == LCSR_LOCAL, "clear");
    @(negedge clk); core_req = rd_req(6, 13, 4);
    @(negedge clk); core_req = '0;
    check(!core_rsp.hit, "cleared way was flushed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
