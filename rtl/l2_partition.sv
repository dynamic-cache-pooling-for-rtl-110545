// l2_partition: one way of a layer's L2 cache, the unit of cache pooling.
//
// A 1 MB 4-way L2 is built from four of these 256 KB partitions (selective
// cache ways). Each partition can serve exactly one requester at a time,
// chosen by its LCSR: the local core, the core on the layer below, or the
// core on the layer above; with LCSR = OFF it ignores everything (in silicon
// its arrays would be power-gated). The LCSR drives the input mux that picks
// whose request and address reach the tag and data arrays.
//
// Operations on the selected request:
//  * lookup (valid, !fill): tag and data arrays are read with the set index;
//    next cycle the tag is compared and rsp.hit / rsp.rdata are produced.
//    A lookup with write set also updates the word on a hit (write-through
//    L2: the controller always passes the write on to memory as well).
//  * fill beat (valid, fill, way == WAY_ID): writes one 64-bit word of a
//    line. Word 0 clears the line's valid bit, the last word writes the tag
//    and sets it valid; the controller sends the 8 words in order.
//  * flush: clears every valid bit on the clock edge; with a write-through
//    L2 there is nothing to write back, so a flush is a single cycle.
//
// Timing: lookup result one clock after the request, for local and remote
// requesters alike. rsp_owner tells the output location logic which LCSR
// value the request was accepted under.
//
// Follows the source: per-way partitions, LCSR-driven request mux, flush
// before re-allocation, equal access time to local and remote partitions.
// Own choices: 64-byte lines fetched as 8 words, write-through with no write
// allocate, valid bits held in flip-flops so that a flush takes one cycle.
module l2_partition
  import cp_pkg::*;
#(
  parameter int unsigned WAY_ID = 0,
  parameter int unsigned SETS   = L2_SETS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  lcsr_e   lcsr,
  input  logic    flush,
  input  l2_req_t req_local,
  input  l2_req_t req_from_lower,
  input  l2_req_t req_from_upper,
  output l2_rsp_t rsp,
  output lcsr_e   rsp_owner
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PADDR_W - OFF_W - SET_W;
  localparam int unsigned IDX_W = SET_W + WOFF_W;

  // ---- request source mux (selected by LCSR) ---------------------------
  l2_req_t req;
  always_comb begin
    unique case (lcsr)
      LCSR_LOCAL: req = req_local;
      LCSR_LOWER: req = req_from_lower;
      LCSR_UPPER: req = req_from_upper;
      default:    req = L2_REQ_IDLE;
    endcase
  end

  logic [SET_W-1:0] set_idx;
  logic [WOFF_W-1:0] word_idx;
  logic [TAG_W-1:0] tag_in;
  logic             do_lookup, do_fill;

  assign set_idx   = req.addr[OFF_W +: SET_W];
  assign word_idx  = req.addr[BOFF_W +: WOFF_W];
  assign tag_in    = req.addr[OFF_W + SET_W +: TAG_W];
  assign do_lookup = req.valid && !req.fill;
  assign do_fill   = req.valid && req.fill && (req.way == WAY_ID[WAY_W-1:0]);

  // ---- arrays ----------------------------------------------------------
  logic [TAG_W-1:0]  tag_mem  [SETS];
  logic [DATA_W-1:0] data_mem [SETS*WORDS_PER_LINE];
  logic [SETS-1:0]   valid_q;

  logic [TAG_W-1:0]  tag_rd;
  logic [DATA_W-1:0] data_rd;

  // stage-1 (response cycle) registers
  logic              s1_lookup, s1_write;
  logic [SET_W-1:0]  s1_set;
  logic [IDX_W-1:0]  s1_idx;
  logic [TAG_W-1:0]  s1_tag;
  logic [DATA_W-1:0] s1_wdata;
  lcsr_e             s1_owner;
  logic              s1_hit;

  assign s1_hit = s1_lookup && valid_q[s1_set] && (tag_rd == s1_tag);

  // one write port on the data array: a write hit (stage 1) or a fill beat
  logic              dwe;
  logic [IDX_W-1:0]  dwaddr;
  logic [DATA_W-1:0] dwdata;
  always_comb begin
    dwe    = 1'b0;
    dwaddr = {set_idx, word_idx};
    dwdata = req.wdata;
    if (s1_hit && s1_write) begin
      dwe    = 1'b1;
      dwaddr = s1_idx;
      dwdata = s1_wdata;
    end else if (do_fill) begin
      dwe    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (dwe) data_mem[dwaddr] <= dwdata;
    if (do_fill && word_idx == WOFF_W'(WORDS_PER_LINE - 1)) tag_mem[set_idx] <= tag_in;
    tag_rd  <= tag_mem[set_idx];
    data_rd <= data_mem[{set_idx, word_idx}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      s1_lookup <= 1'b0;
      s1_write  <= 1'b0;
      s1_set    <= '0;
      s1_idx    <= '0;
      s1_tag    <= '0;
      s1_wdata  <= '0;
      s1_owner  <= LCSR_OFF;
    end else begin
      if (flush) begin
        valid_q <= '0;
      end else if (do_fill) begin
        if (word_idx == '0)
          valid_q[set_idx] <= 1'b0;
        else if (word_idx == WOFF_W'(WORDS_PER_LINE - 1))
          valid_q[set_idx] <= 1'b1;
      end
      s1_lookup <= do_lookup && !flush;
      s1_write  <= req.write;
      s1_set    <= set_idx;
      s1_idx    <= {set_idx, word_idx};
      s1_tag    <= tag_in;
      s1_wdata  <= req.wdata;
      s1_owner  <= lcsr;
    end
  end

  assign rsp.hit   = s1_hit && !flush;
  assign rsp.rdata = s1_hit ? data_rd : '0;
  assign rsp_owner = s1_owner;

  // a fill beat never lands in the cycle a write hit updates the array
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(s1_hit && s1_write && do_fill));

endmodule
