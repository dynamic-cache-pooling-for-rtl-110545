// crp_top: a 3D stack of single-core layers with L2 cache resource pooling.
//
// NUM_LAYERS layers are stacked; each has a core port (the L1-miss side of a
// core), a private 1 MB 4-way L2 built from poolable partitions
// (l2_pool_layer), its L2 controller (l2_miss_ctrl), a memory port and the
// performance counters the policy reads. Vertically adjacent L2s are joined
// by TSV bundles (request, response and lent-way mask in each direction).
//
// The runtime policy is built in as well:
//  * job_pair_alloc (stage 1) sorts the jobs by predicted gain, pairs them
//    and tells the operating system which job to run on which layer
//    (job_of_layer); moving the jobs is done by software;
//  * one pool_policy per pair of layers (2k, 2k+1) runs stage 2: pool_start
//    loads the predicted gains of the jobs now on those layers, each
//    pool_step supplies the measured gains of the last interval;
//  * pool_cfg_encode turns each pair's partition counts into LCSR/RCSR values.
// A change of counts marks a reconfiguration pending. New core requests are
// then held off (core_ready low) until every L2 controller is idle; the new
// register values are then written into all layers in one clock, flushing
// every partition whose owner changes.
//
// The gain predictor (a regression over the counters), the cores, their L1s
// and main memory are outside this design: their signals are ports. Layer 0
// is taken to be the one nearest the heat sink. Holding requests during a
// reconfiguration is this design's choice.
module crp_top
  import cp_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 4,
  parameter int unsigned SETS       = L2_SETS,
  parameter int unsigned IPC_W      = 12,
  parameter int unsigned CW         = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // cores (L1-miss side), one per layer
  input  logic                      core_valid  [NUM_LAYERS],
  input  logic                      core_write  [NUM_LAYERS],
  input  logic                      core_ifetch [NUM_LAYERS],
  input  logic [ADDR_W-1:0]         core_addr   [NUM_LAYERS],
  input  logic [DATA_W-1:0]         core_wdata  [NUM_LAYERS],
  output logic                      core_ready  [NUM_LAYERS],
  output logic                      resp_valid  [NUM_LAYERS],
  output logic                      resp_hit    [NUM_LAYERS],
  output logic [DATA_W-1:0]         resp_rdata  [NUM_LAYERS],
  output logic                      remote_hit  [NUM_LAYERS],
  input  logic                      coh_inval   [NUM_LAYERS],
  // memory ports, one per layer
  output logic                      mem_req_valid [NUM_LAYERS],
  output logic                      mem_req_write [NUM_LAYERS],
  output logic [ADDR_W-1:0]         mem_req_addr  [NUM_LAYERS],
  output logic [DATA_W-1:0]         mem_req_wdata [NUM_LAYERS],
  input  logic                      mem_req_ready [NUM_LAYERS],
  input  logic                      mem_rsp_valid [NUM_LAYERS],
  input  logic [DATA_W-1:0]         mem_rsp_data  [NUM_LAYERS],
  // performance counters
  input  logic                      perf_snap,
  output logic [CW-1:0]             perf_replacements  [NUM_LAYERS],
  output logic [CW-1:0]             perf_writes        [NUM_LAYERS],
  output logic [CW-1:0]             perf_read_misses   [NUM_LAYERS],
  output logic [CW-1:0]             perf_ifetch_misses [NUM_LAYERS],
  output logic [CW-1:0]             perf_cycles        [NUM_LAYERS],
  // runtime policy
  input  logic                      alloc_start,
  input  logic [PERF_W-1:0]         job_p   [NUM_LAYERS],
  input  logic [IPC_W-1:0]          job_ipc [NUM_LAYERS],
  output logic                      alloc_done,
  output logic [$clog2(NUM_LAYERS)-1:0] job_of_layer [NUM_LAYERS],
  output logic [$clog2(NUM_LAYERS)-1:0] layer_of_job [NUM_LAYERS],
  input  logic                      pool_start,
  input  logic                      pool_step,
  input  logic [PERF_W-1:0]         layer_gain [NUM_LAYERS],
  output logic [CNT_W-1:0]          partitions [NUM_LAYERS],
  output logic                      pool_done,
  output logic                      reconfig_pending,
  // status registers, for observation
  output lcsr_e                     lcsr [NUM_LAYERS][NUM_WAYS],
  output logic [1:0]                rcsr [NUM_LAYERS],
  output logic                      cfg_err
);

  localparam int unsigned NPAIR = NUM_LAYERS / 2;

  // ---------------- stage 1: job allocation ------------------------------
  job_pair_alloc #(.NJOBS(NUM_LAYERS), .IPC_W(IPC_W)) u_alloc (
    .clk, .rst_n,
    .start        (alloc_start),
    .p            (job_p),
    .ipc          (job_ipc),
    .done         (alloc_done),
    .job_of_layer (job_of_layer),
    .layer_of_job (layer_of_job)
  );

  // ---------------- stage 2: pooling per pair ----------------------------
  lcsr_e         cfg_lcsr [NUM_LAYERS][NUM_WAYS];
  logic [1:0]    cfg_rcsr [NUM_LAYERS];
  logic [NPAIR-1:0] pair_upd, pair_done;

  for (genvar k = 0; k < NPAIR; k++) begin : g_pair
    logic [CNT_W-1:0] na, nb;
    pool_policy u_pol (
      .clk, .rst_n,
      .start (pool_start),
      .pa0   (job_p[job_of_layer[2*k]]),
      .pb0   (job_p[job_of_layer[2*k+1]]),
      .step  (pool_step),
      .pa    (layer_gain[2*k]),
      .pb    (layer_gain[2*k+1]),
      .na    (na),
      .nb    (nb),
      .done  (pair_done[k]),
      .upd   (pair_upd[k])
    );
    assign partitions[2*k]   = na;
    assign partitions[2*k+1] = nb;
    pool_cfg_encode u_enc (
      .na     (na),
      .nb     (nb),
      .lcsr_a (cfg_lcsr[2*k]),
      .rcsr_a (cfg_rcsr[2*k]),
      .lcsr_b (cfg_lcsr[2*k+1]),
      .rcsr_b (cfg_rcsr[2*k+1])
    );
  end
  assign pool_done = &pair_done;

  // ---------------- reconfiguration: quiesce, then write -----------------
  logic [NUM_LAYERS-1:0] ctrl_busy;
  logic                  pending_q, cfg_we;
  logic [NUM_LAYERS-1:0] layer_cfg_err;

  assign cfg_we = pending_q && (ctrl_busy == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          pending_q <= 1'b0;
    else if (|pair_upd)  pending_q <= 1'b1;
    else if (cfg_we)     pending_q <= 1'b0;
  end
  assign reconfig_pending = pending_q;
  assign cfg_err          = |layer_cfg_err;

  // ---------------- layers and their TSV links ---------------------------
  l2_req_t             req_up   [NUM_LAYERS];   // layer l -> l+1
  l2_req_t             req_down [NUM_LAYERS];   // layer l -> l-1
  l2_rsp_t             rsp_up   [NUM_LAYERS];
  l2_rsp_t             rsp_down [NUM_LAYERS];
  logic [NUM_WAYS-1:0] lend_up  [NUM_LAYERS];
  logic [NUM_WAYS-1:0] lend_down[NUM_LAYERS];

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    l2_req_t             core_l2_req;
    tgt_e                core_l2_tgt;
    l2_rsp_t             core_l2_rsp;
    logic [NUM_WAYS-1:0] own_local, own_remote;
    tgt_e                own_tgt;
    logic                ev_rm, ev_im, ev_wr, ev_rp, ctrl_ready;

    l2_req_t             from_lower_req, from_upper_req;
    l2_rsp_t             from_lower_rsp, from_upper_rsp;
    logic [NUM_WAYS-1:0] lower_lends, upper_lends;

    if (l == 0) begin : g_bottom
      assign from_lower_req = L2_REQ_IDLE;
      assign from_lower_rsp = L2_RSP_IDLE;
      assign lower_lends    = '0;
    end else begin : g_below
      assign from_lower_req = req_up[l-1];
      assign from_lower_rsp = rsp_up[l-1];
      assign lower_lends    = lend_up[l-1];
    end
    if (l == NUM_LAYERS - 1) begin : g_topmost
      assign from_upper_req = L2_REQ_IDLE;
      assign from_upper_rsp = L2_RSP_IDLE;
      assign upper_lends    = '0;
    end else begin : g_above
      assign from_upper_req = req_down[l+1];
      assign from_upper_rsp = rsp_down[l+1];
      assign upper_lends    = lend_down[l+1];
    end

    l2_pool_layer #(.SETS(SETS)) u_l2 (
      .clk, .rst_n,
      .cfg_we           (cfg_we),
      .cfg_lcsr         (cfg_lcsr[l]),
      .cfg_rcsr         (cfg_rcsr[l]),
      .clr              (coh_inval[l]),
      .lcsr             (lcsr[l]),
      .rcsr             (rcsr[l]),
      .cfg_err          (layer_cfg_err[l]),
      .core_req         (core_l2_req),
      .core_tgt         (core_l2_tgt),
      .core_rsp         (core_l2_rsp),
      .remote_hit       (remote_hit[l]),
      .own_local        (own_local),
      .own_remote       (own_remote),
      .own_tgt          (own_tgt),
      .req_to_lower     (req_down[l]),
      .req_from_lower   (from_lower_req),
      .rsp_to_lower     (rsp_down[l]),
      .rsp_from_lower   (from_lower_rsp),
      .lend_to_lower    (lend_down[l]),
      .lower_lends_up   (lower_lends),
      .req_to_upper     (req_up[l]),
      .req_from_upper   (from_upper_req),
      .rsp_to_upper     (rsp_up[l]),
      .rsp_from_upper   (from_upper_rsp),
      .lend_to_upper    (lend_up[l]),
      .upper_lends_down (upper_lends)
    );

    l2_miss_ctrl u_ctrl (
      .clk, .rst_n,
      .core_valid     (core_valid[l] && !pending_q),
      .core_write     (core_write[l]),
      .core_ifetch    (core_ifetch[l]),
      .core_addr      (core_addr[l]),
      .core_wdata     (core_wdata[l]),
      .core_ready     (ctrl_ready),
      .resp_valid     (resp_valid[l]),
      .resp_hit       (resp_hit[l]),
      .resp_rdata     (resp_rdata[l]),
      .l2_req         (core_l2_req),
      .l2_tgt         (core_l2_tgt),
      .l2_rsp         (core_l2_rsp),
      .own_local      (own_local),
      .own_remote     (own_remote),
      .own_tgt        (own_tgt),
      .mem_req_valid  (mem_req_valid[l]),
      .mem_req_write  (mem_req_write[l]),
      .mem_req_addr   (mem_req_addr[l]),
      .mem_req_wdata  (mem_req_wdata[l]),
      .mem_req_ready  (mem_req_ready[l]),
      .mem_rsp_valid  (mem_rsp_valid[l]),
      .mem_rsp_data   (mem_rsp_data[l]),
      .ev_read_miss   (ev_rm),
      .ev_ifetch_miss (ev_im),
      .ev_write       (ev_wr),
      .ev_replace     (ev_rp),
      .busy           (ctrl_busy[l])
    );
    assign core_ready[l] = ctrl_ready && !pending_q;

    perf_counters #(.CW(CW)) u_perf (
      .clk, .rst_n,
      .ev_replace     (ev_rp),
      .ev_write       (ev_wr),
      .ev_read_miss   (ev_rm),
      .ev_ifetch_miss (ev_im),
      .snap           (perf_snap),
      .replacements   (perf_replacements[l]),
      .writes         (perf_writes[l]),
      .read_misses    (perf_read_misses[l]),
      .ifetch_misses  (perf_ifetch_misses[l]),
      .cycles         (perf_cycles[l])
    );
  end

endmodule
