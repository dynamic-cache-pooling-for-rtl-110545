// cache_status_regs: the Local and Remote Cache Status Registers of one layer.
//
// One 2-bit LCSR per L2 partition says who the partition serves (this core,
// the core below, the core above, or nobody: powered off). Two 1-bit RCSRs
// tell this core's L1 side that it uses partitions on the layer below
// (RCSR_0) or above (RCSR_1). 4 x 2 + 2 = 10 register bits, as in the source
// design. The runtime policy writes all of them at once through cfg_*.
//
// Rules enforced here:
//  * partition 0 is the reserved partition and always stays LOCAL;
//  * a core may not pool from both neighbours at once, so a write with both
//    RCSR bits set is refused (cfg_err pulses, nothing changes);
//  * clr (a coherence invalidation) returns every register to 0.
// Any partition whose LCSR changes must be emptied before it serves its new
// owner: flush[w] pulses in the same cycle the new value is registered, and
// the partition clears its valid bits on that same clock edge.
//
// Timing: registered; lcsr/rcsr show a write one cycle after cfg_we.
// The encoding (00 = local) and the reserved-partition and both-neighbours
// checks in hardware are this design's choices; the source gives the
// register set, their meaning and the reset-to-0 rule.
module cache_status_regs
  import cp_pkg::*;
#(
  parameter int unsigned WAYS = NUM_WAYS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  lcsr_e           cfg_lcsr [WAYS],
  input  logic [1:0]      cfg_rcsr,
  input  logic            clr,
  output lcsr_e           lcsr     [WAYS],
  output logic [1:0]      rcsr,
  output logic [WAYS-1:0] flush,
  output logic            cfg_err
);

  lcsr_e      lcsr_q [WAYS];
  lcsr_e      lcsr_d [WAYS];
  logic [1:0] rcsr_q, rcsr_d;
  logic       accept;

  assign accept = cfg_we && !clr && (cfg_rcsr != 2'b11);

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      lcsr_d[w] = lcsr_q[w];
      if (clr)
        lcsr_d[w] = LCSR_LOCAL;
      else if (accept)
        lcsr_d[w] = (w == 0) ? LCSR_LOCAL : cfg_lcsr[w];
      flush[w] = (lcsr_d[w] != lcsr_q[w]);
    end
    rcsr_d = clr ? 2'b00 : (accept ? cfg_rcsr : rcsr_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) lcsr_q[w] <= LCSR_LOCAL;
      rcsr_q  <= 2'b00;
      cfg_err <= 1'b0;
    end else begin
      for (int w = 0; w < WAYS; w++) lcsr_q[w] <= lcsr_d[w];
      rcsr_q  <= rcsr_d;
      cfg_err <= cfg_we && !clr && (cfg_rcsr == 2'b11);
    end
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) lcsr[w] = lcsr_q[w];
    rcsr = rcsr_q;
  end

  // The reserved partition can never be lent or turned off.
  a_reserved_local: assert property (@(posedge clk) disable iff (!rst_n)
    lcsr_q[0] == LCSR_LOCAL);
  // Never pooling from both neighbours.
  a_one_neighbour: assert property (@(posedge clk) disable iff (!rst_n)
    rcsr_q != 2'b11);

endmodule
