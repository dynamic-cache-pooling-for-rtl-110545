// job_pair_alloc: stage 1 of the runtime policy, job allocation across the stack.
//
// Input per job: p, the predicted IPC gain from 1 to 4 L2 partitions, and
// ipc, the IPC measured in the sampling interval. The jobs are sorted by p
// (largest first) and paired from both ends of the sorted list: highest with
// lowest, second highest with second lowest, and so on, so each pair
// matches a cache-hungry job with one that is not. Pairs are then ordered by
// the sum of their IPCs (same order as their average) and the pair with the
// highest IPC goes to layers 0 and 1, the ones nearest the heat sink, the next
// to layers 2 and 3, and so on. Inside a pair the job with the larger p takes
// the lower layer.
//
// Sorting is done by ranking: a job's rank is the number of jobs that beat
// it (larger value, or equal value and lower index), which gives a unique
// position without a sorting network. Same for the pair ordering.
//
// Interface: pulse start with p/ipc valid; one clock later done pulses and
// job_of_layer[l] names the job to run on layer l, layer_of_job[j] the
// inverse. Sorting and pairing follow the source; the layer numbering (0 =
// nearest the heat sink), the tie rules and the in-pair order are own
// choices.
module job_pair_alloc
  import cp_pkg::*;
#(
  parameter int unsigned NJOBS = 4,
  parameter int unsigned IPC_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [PERF_W-1:0]        p   [NJOBS],
  input  logic [IPC_W-1:0]         ipc [NJOBS],
  output logic                     done,
  output logic [$clog2(NJOBS)-1:0] job_of_layer [NJOBS],
  output logic [$clog2(NJOBS)-1:0] layer_of_job [NJOBS]
);

  localparam int unsigned JW    = $clog2(NJOBS);
  localparam int unsigned NPAIR = NJOBS / 2;
  localparam int unsigned PW    = (NPAIR > 1) ? $clog2(NPAIR) : 1;

  logic [JW-1:0]    rank   [NJOBS];
  logic [JW-1:0]    sorted [NJOBS];        // sorted[k] = job with rank k
  logic [IPC_W:0]   psum   [NPAIR];
  logic [PW-1:0]    prank  [NPAIR];
  logic [JW-1:0]    map_d  [NJOBS];

  always_comb begin
    for (int i = 0; i < NJOBS; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NJOBS; j++)
        if (p[j] > p[i] || (p[j] == p[i] && j < i)) rank[i] = rank[i] + 1'b1;
    end
    for (int k = 0; k < NJOBS; k++) sorted[k] = '0;
    for (int i = 0; i < NJOBS; i++) sorted[rank[i]] = JW'(i);

    for (int k = 0; k < NPAIR; k++)
      psum[k] = ipc[sorted[k]] + ipc[sorted[NJOBS-1-k]];
    for (int k = 0; k < NPAIR; k++) begin
      prank[k] = '0;
      for (int m = 0; m < NPAIR; m++)
        if (psum[m] > psum[k] || (psum[m] == psum[k] && m < k)) prank[k] = prank[k] + 1'b1;
    end
    for (int l = 0; l < NJOBS; l++) map_d[l] = '0;
    for (int k = 0; k < NPAIR; k++) begin
      map_d[2*prank[k]]     = sorted[k];            // larger p: lower layer
      map_d[2*prank[k] + 1] = sorted[NJOBS-1-k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int l = 0; l < NJOBS; l++) begin
        job_of_layer[l] <= JW'(l);
        layer_of_job[l] <= JW'(l);
      end
    end else begin
      done <= start;
      if (start) begin
        for (int l = 0; l < NJOBS; l++) begin
          job_of_layer[l]        <= map_d[l];
          layer_of_job[map_d[l]] <= JW'(l);
        end
      end
    end
  end

endmodule
