// pool_policy: stage 2 of the runtime policy, cache pooling within a job pair.
//
// Two jobs run on vertically adjacent layers a and b and share their pool of
// 2 x 4 = 8 partitions. On start the predicted IPC gain of each job from 1 to
// 4 partitions (pa0, pb0) decides its starting size: more than 9 % gives 4
// partitions and a ceiling of 7, otherwise 1 partition and a ceiling of 4.
// Each later step supplies the measured relative IPC gain of each job over the
// last interval (pa, pb) and applies, per job:
//  * the job had just been given a partition and its gain is below the
//    threshold t (3 %, from sqrt(1 + dPower/Power) - 1): take it back and
//    stop growing the job;
//  * gain above t and below the ceiling: ask for one more partition;
//  * otherwise stop growing the job.
// If both ask and only one partition is free, it goes to the job with the
// larger gain (a on a tie); a job that cannot get a partition stops.
// done is high once neither job can grow. Gains are Q0.10 fractions.
//
// Timing: one clock per start/step; upd pulses in the cycle na/nb change.
// The rules and the 3 % / 9 % / 4 / 7 numbers follow the source; the
// fixed-point format, the tie rule and "stop after a revert" are own choices.
module pool_policy
  import cp_pkg::*;
#(
  parameter int unsigned POOL    = 2 * NUM_WAYS,
  parameter int unsigned T_GAIN  = THR_T,
  parameter int unsigned T_START = THR_INIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [PERF_W-1:0] pa0,
  input  logic [PERF_W-1:0] pb0,
  input  logic              step,
  input  logic [PERF_W-1:0] pa,
  input  logic [PERF_W-1:0] pb,
  output logic [CNT_W-1:0]  na,
  output logic [CNT_W-1:0]  nb,
  output logic              done,
  output logic              upd
);

  logic [CNT_W-1:0] na_q, nb_q, maxa_q, maxb_q;
  logic             grow_a_q, grow_b_q;     // still allowed to grow
  logic             incd_a_q, incd_b_q;     // grew in the last step

  logic [CNT_W-1:0] na_r, nb_r;             // after reverts
  logic             want_a, want_b, stop_a, stop_b;
  logic             give_a, give_b;
  logic [CNT_W-1:0] free_r;

  always_comb begin
    na_r   = na_q;
    nb_r   = nb_q;
    want_a = 1'b0;
    want_b = 1'b0;
    stop_a = 1'b0;
    stop_b = 1'b0;
    if (grow_a_q) begin
      if (pa <= PERF_W'(T_GAIN)) begin
        stop_a = 1'b1;
        if (incd_a_q) na_r = na_q - 1'b1;
      end else if (na_q >= maxa_q) stop_a = 1'b1;
      else want_a = 1'b1;
    end
    if (grow_b_q) begin
      if (pb <= PERF_W'(T_GAIN)) begin
        stop_b = 1'b1;
        if (incd_b_q) nb_r = nb_q - 1'b1;
      end else if (nb_q >= maxb_q) stop_b = 1'b1;
      else want_b = 1'b1;
    end
    free_r = CNT_W'(POOL) - na_r - nb_r;
    give_a = 1'b0;
    give_b = 1'b0;
    if (want_a && want_b) begin
      if (free_r >= 2) begin
        give_a = 1'b1;
        give_b = 1'b1;
      end else if (free_r == 1) begin
        if (pa >= pb) give_a = 1'b1;
        else          give_b = 1'b1;
      end
    end else if (want_a) give_a = (free_r != 0);
    else if (want_b)     give_b = (free_r != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      na_q     <= CNT_W'(1);
      nb_q     <= CNT_W'(1);
      maxa_q   <= CNT_W'(4);
      maxb_q   <= CNT_W'(4);
      grow_a_q <= 1'b0;
      grow_b_q <= 1'b0;
      incd_a_q <= 1'b0;
      incd_b_q <= 1'b0;
      upd      <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (start) begin
        na_q     <= (pa0 > PERF_W'(T_START)) ? CNT_W'(4) : CNT_W'(1);
        nb_q     <= (pb0 > PERF_W'(T_START)) ? CNT_W'(4) : CNT_W'(1);
        maxa_q   <= (pa0 > PERF_W'(T_START)) ? CNT_W'(7) : CNT_W'(4);
        maxb_q   <= (pb0 > PERF_W'(T_START)) ? CNT_W'(7) : CNT_W'(4);
        grow_a_q <= 1'b1;
        grow_b_q <= 1'b1;
        incd_a_q <= 1'b0;
        incd_b_q <= 1'b0;
        upd      <= 1'b1;
      end else if (step && !done) begin
        na_q     <= na_r + CNT_W'(give_a);
        nb_q     <= nb_r + CNT_W'(give_b);
        incd_a_q <= give_a;
        incd_b_q <= give_b;
        grow_a_q <= grow_a_q && !stop_a && give_a;
        grow_b_q <= grow_b_q && !stop_b && give_b;
        upd      <= give_a || give_b || (na_r != na_q) || (nb_r != nb_q);
      end
    end
  end

  assign na   = na_q;
  assign nb   = nb_q;
  assign done = !grow_a_q && !grow_b_q;

  a_pool_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (na_q + nb_q) <= CNT_W'(POOL));

endmodule
