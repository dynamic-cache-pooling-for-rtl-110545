// perf_counters: the per-core counters the runtime policy samples.
//
// The gain predictor of the policy reads five numbers per core and interval:
// L2 replacements, L2 write accesses, L2 read misses, L2 instruction-fetch
// misses and elapsed cycles. Each counter adds its event pulse every clock.
// snap copies all five into the snapshot outputs and restarts counting from
// zero in the same clock, so intervals are back to back with no lost events
// (an event in the snap cycle is counted in the new interval).
//
// The list of counted events follows the source; widths and the snapshot
// scheme are own choices. Counters saturate rather than wrap.
module perf_counters #(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ev_replace,
  input  logic          ev_write,
  input  logic          ev_read_miss,
  input  logic          ev_ifetch_miss,
  input  logic          snap,
  output logic [CW-1:0] replacements,
  output logic [CW-1:0] writes,
  output logic [CW-1:0] read_misses,
  output logic [CW-1:0] ifetch_misses,
  output logic [CW-1:0] cycles
);

  logic [CW-1:0] cnt_q [5];
  logic [4:0]    ev;

  assign ev = {1'b1, ev_ifetch_miss, ev_read_miss, ev_write, ev_replace};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) cnt_q[i] <= '0;
      replacements  <= '0;
      writes        <= '0;
      read_misses   <= '0;
      ifetch_misses <= '0;
      cycles        <= '0;
    end else begin
      for (int i = 0; i < 5; i++) begin
        if (snap)                 cnt_q[i] <= CW'(ev[i]);
        else if (&cnt_q[i] == 1'b0) cnt_q[i] <= cnt_q[i] + CW'(ev[i]);
      end
      if (snap) begin
        replacements  <= cnt_q[0];
        writes        <= cnt_q[1];
        read_misses   <= cnt_q[2];
        ifetch_misses <= cnt_q[3];
        cycles        <= cnt_q[4];
      end
    end
  end

endmodule
