// l2_pool_layer: the poolable private L2 cache of one layer of the stack.
//
// Four l2_partition ways, their status registers (cache_status_regs), the
// request generation for this layer's core (l2_req_gen) and one output
// location demux per partition (out_loc_gen). The TSV side has, towards each
// neighbour, a request bundle out and in, a response bundle out and in, and
// the mask of partitions lent to that neighbour.
//
// A lookup from this core goes to the local partitions and, if an RCSR bit
// is set, to the partitions of that neighbour lent to this core. Hits come
// back from both sides in the next cycle and are ORed: core_rsp.hit = 0
// means an L2 miss (at most one way holds a line, so at most one hits).
// Requests arriving from a neighbour are seen only by partitions whose LCSR
// points at that neighbour; their responses are sent back the same way.
//
// remote_hit flags a hit that came back over the TSVs (for observation).
// For the miss controller the layer also reports which ways this core owns:
// own_local (LCSR = local) and own_remote with own_tgt (the neighbour's ways
// lent to this core). The lent-way masks crossing the TSVs are this
// design's addition; the source gives the registers, muxes and demuxes.
module l2_pool_layer
  import cp_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS
) (
  input  logic                clk,
  input  logic                rst_n,
  // runtime-policy configuration
  input  logic                cfg_we,
  input  lcsr_e               cfg_lcsr [NUM_WAYS],
  input  logic [1:0]          cfg_rcsr,
  input  logic                clr,
  output lcsr_e               lcsr     [NUM_WAYS],
  output logic [1:0]          rcsr,
  output logic                cfg_err,
  // this layer's core side (from the miss controller)
  input  l2_req_t             core_req,
  input  tgt_e                core_tgt,
  output l2_rsp_t             core_rsp,
  output logic                remote_hit,
  output logic [NUM_WAYS-1:0] own_local,
  output logic [NUM_WAYS-1:0] own_remote,
  output tgt_e                own_tgt,
  // TSV side, towards the layer below
  output l2_req_t             req_to_lower,
  input  l2_req_t             req_from_lower,
  output l2_rsp_t             rsp_to_lower,
  input  l2_rsp_t             rsp_from_lower,
  output logic [NUM_WAYS-1:0] lend_to_lower,
  input  logic [NUM_WAYS-1:0] lower_lends_up,
  // TSV side, towards the layer above
  output l2_req_t             req_to_upper,
  input  l2_req_t             req_from_upper,
  output l2_rsp_t             rsp_to_upper,
  input  l2_rsp_t             rsp_from_upper,
  output logic [NUM_WAYS-1:0] lend_to_upper,
  input  logic [NUM_WAYS-1:0] upper_lends_down
);

  logic [NUM_WAYS-1:0] flush;
  l2_req_t             req_local;
  l2_rsp_t             prt_rsp       [NUM_WAYS];
  lcsr_e               prt_owner     [NUM_WAYS];
  l2_rsp_t             rsp_loc_w     [NUM_WAYS];
  l2_rsp_t             rsp_low_w     [NUM_WAYS];
  l2_rsp_t             rsp_up_w      [NUM_WAYS];

  cache_status_regs #(.WAYS(NUM_WAYS)) u_csr (
    .clk, .rst_n, .cfg_we, .cfg_lcsr, .cfg_rcsr, .clr,
    .lcsr, .rcsr, .flush, .cfg_err
  );

  l2_req_gen u_reqgen (
    .core_req  (core_req),
    .tgt       (core_tgt),
    .rcsr      (rcsr),
    .req_local (req_local),
    .req_lower (req_to_lower),
    .req_upper (req_to_upper)
  );

  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_way
    l2_partition #(.WAY_ID(w), .SETS(SETS)) u_part (
      .clk, .rst_n,
      .lcsr           (lcsr[w]),
      .flush          (flush[w]),
      .req_local      (req_local),
      .req_from_lower (req_from_lower),
      .req_from_upper (req_from_upper),
      .rsp            (prt_rsp[w]),
      .rsp_owner      (prt_owner[w])
    );
    out_loc_gen u_olg (
      .rsp       (prt_rsp[w]),
      .owner     (prt_owner[w]),
      .rsp_local (rsp_loc_w[w]),
      .rsp_lower (rsp_low_w[w]),
      .rsp_upper (rsp_up_w[w])
    );
  end

  // OR-combine the per-way responses for each destination
  always_comb begin
    l2_rsp_t loc, low, up;
    loc = L2_RSP_IDLE;
    low = L2_RSP_IDLE;
    up  = L2_RSP_IDLE;
    for (int w = 0; w < NUM_WAYS; w++) begin
      loc = loc | rsp_loc_w[w];
      low = low | rsp_low_w[w];
      up  = up  | rsp_up_w[w];
      own_local[w]     = (lcsr[w] == LCSR_LOCAL);
      lend_to_lower[w] = (lcsr[w] == LCSR_LOWER);
      lend_to_upper[w] = (lcsr[w] == LCSR_UPPER);
    end
    rsp_to_lower = low;
    rsp_to_upper = up;
    // local hit OR remote hits: both 0 means an L2 miss
    core_rsp = loc | rsp_from_lower | rsp_from_upper;
    remote_hit = rsp_from_lower.hit | rsp_from_upper.hit;

    if (rcsr[RCSR_LOWER]) begin
      own_tgt    = TGT_LOWER;
      own_remote = lower_lends_up;
    end else if (rcsr[RCSR_UPPER]) begin
      own_tgt    = TGT_UPPER;
      own_remote = upper_lends_down;
    end else begin
      own_tgt    = TGT_NONE;
      own_remote = '0;
    end
  end

endmodule
