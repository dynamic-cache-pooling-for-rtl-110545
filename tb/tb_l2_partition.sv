// tb_l2_partition: checks one L2 way against a reference model.
// A small set count keeps the run short. Random fills (to this way and to
// other ways), lookups, write hits/misses, LCSR changes (local, lower,
// upper, off) and flushes are applied; every lookup's hit, data and owner
// are compared with the reference one clock after the request, which also
// checks the one-cycle access time for local and remote requesters alike.
module tb_l2_partition;
  import cp_pkg::*;
  localparam int unsigned SETS  = 64;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PADDR_W - OFF_W - SET_W;
  localparam int unsigned WAY   = 2;

  logic    clk = 0, rst_n = 0;
  lcsr_e   lcsr = LCSR_LOCAL;
  logic    flush = 0;
  l2_req_t req_local, req_from_lower, req_from_upper;
  l2_rsp_t rsp;
  lcsr_e   rsp_owner;

  l2_partition #(.WAY_ID(WAY), .SETS(SETS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_whit = 0, n_flush = 0, n_remote_hit = 0;

  // reference state
  logic              ref_v [SETS];
  logic [TAG_W-1:0]  ref_t [SETS];
  logic [DATA_W-1:0] ref_d [SETS][WORDS_PER_LINE];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [ADDR_W-1:0] mk_addr(input int set, input logic [TAG_W-1:0] tag, input int word);
    return ADDR_W'({tag, SET_W'(set), WOFF_W'(word), BOFF_W'(0)});
  endfunction

  // drive one request from the source selected by src for one cycle
  task automatic issue(input int src, input l2_req_t r);
    @(negedge clk);
    req_local = L2_REQ_IDLE; req_from_lower = L2_REQ_IDLE; req_from_upper = L2_REQ_IDLE;
    case (src)
      0: req_local = r;
      1: req_from_lower = r;
      default: req_from_upper = r;
    endcase
    @(negedge clk);
    req_local = L2_REQ_IDLE; req_from_lower = L2_REQ_IDLE; req_from_upper = L2_REQ_IDLE;
  endtask

  function automatic int src_of(input lcsr_e l);
    return (l == LCSR_LOCAL) ? 0 : (l == LCSR_LOWER) ? 1 : 2;
  endfunction

  task automatic fill_line(input int src, input int way, input int set, input logic [TAG_W-1:0] tag);
    l2_req_t r;
    for (int w = 0; w < WORDS_PER_LINE; w++) begin
      r = L2_REQ_IDLE;
      r.valid = 1; r.fill = 1; r.way = WAY_W'(way);
      r.addr  = mk_addr(set, tag, w);
      r.wdata = {$urandom, $urandom};
      issue(src, r);
      if (way == WAY && src == src_of(lcsr) && lcsr != LCSR_OFF) begin
        ref_d[set][w] = r.wdata;
        if (w == 0) ref_v[set] = 0;
        if (w == WORDS_PER_LINE - 1) begin ref_v[set] = 1; ref_t[set] = tag; end
      end
    end
  endtask

  // lookup; the response is checked one clock after the request
  task automatic lookup(input int src, input int set, input logic [TAG_W-1:0] tag, input int word,
                        input logic wr);
    l2_req_t r;
    logic exp_hit;
    r = L2_REQ_IDLE;
    r.valid = 1; r.write = wr;
    r.addr  = mk_addr(set, tag, word);
    r.wdata = {$urandom, $urandom};
    @(negedge clk);
    req_local = L2_REQ_IDLE; req_from_lower = L2_REQ_IDLE; req_from_upper = L2_REQ_IDLE;
    case (src)
      0: req_local = r;
      1: req_from_lower = r;
      default: req_from_upper = r;
    endcase
    exp_hit = (lcsr != LCSR_OFF) && src == src_of(lcsr) && ref_v[set] && ref_t[set] == tag;
    @(negedge clk);
    req_local = L2_REQ_IDLE; req_from_lower = L2_REQ_IDLE; req_from_upper = L2_REQ_IDLE;
    check(rsp.hit == exp_hit, "hit");
    if (exp_hit) begin
      if (!wr) check(rsp.rdata == ref_d[set][word], "read data");
      check(rsp_owner == lcsr, "owner");
      n_hit++;
      if (src != 0) n_remote_hit++;
      if (wr) begin ref_d[set][word] = r.wdata; n_whit++; end
    end else n_miss++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TAG_W-1:0] tags [4];
    req_local = L2_REQ_IDLE; req_from_lower = L2_REQ_IDLE; req_from_upper = L2_REQ_IDLE;
    for (int s = 0; s < SETS; s++) ref_v[s] = 0;
    for (int i = 0; i < 4; i++) tags[i] = TAG_W'({$urandom, $urandom});
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: miss when empty, fill, hit every word, fill to another way ignored
    lookup(0, 5, tags[0], 3, 0);
    fill_line(0, WAY, 5, tags[0]);
    for (int w = 0; w < WORDS_PER_LINE; w++) lookup(0, 5, tags[0], w, 0);
    fill_line(0, WAY ^ 1, 6, tags[1]);
    lookup(0, 6, tags[1], 0, 0);
    // random mix
    for (int n = 0; n < 3000; n++) begin
      int op, src, set, word;
      op   = $urandom_range(0, 99);
      src  = $urandom_range(0, 2);
      set  = $urandom_range(0, 3);
      word = $urandom_range(0, WORDS_PER_LINE - 1);
      if (op < 8) begin
        // mostly from the requester the LCSR selects, sometimes from another
        fill_line((op < 6) ? src_of(lcsr) : src, (op < 7) ? WAY : WAY ^ 3, set,
                  tags[$urandom_range(0, 1)]);
      end else if (op < 70) begin
        lookup(($urandom_range(0, 3) != 0) ? src_of(lcsr) : src, set, tags[$urandom_range(0, 1)], word, 0);
      end else if (op < 90) begin
        lookup(($urandom_range(0, 3) != 0) ? src_of(lcsr) : src, set, tags[$urandom_range(0, 1)], word, 1);
      end else if (op < 98) begin
        @(negedge clk);
        lcsr = lcsr_e'($urandom_range(0, 3));
      end else begin
        @(negedge clk);
        flush = 1;
        @(negedge clk);
        flush = 0;
        for (int s = 0; s < SETS; s++) ref_v[s] = 0;
        n_flush++;
      end
    end
    check(n_hit > 50 && n_miss > 50 && n_whit > 10 && n_flush > 0 && n_remote_hit > 10,
          "all cases reached");
    $display("hits=%0d (remote %0d) misses=%0d write hits=%0d flushes=%0d",
             n_hit, n_remote_hit, n_miss, n_whit, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
