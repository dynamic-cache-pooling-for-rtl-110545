// l2_req_gen: L2 request generation for one core.
//
// An L2 lookup (an L1 miss, or a write passed down by the write-through L1
// side) always goes to the local L2 partitions. When an RCSR bit is set the
// same request and address are also sent over the TSVs to the layer below
// (RCSR_0) or above (RCSR_1), where the partitions lent to this core look it
// up in parallel with the local ones. This is the request/address demux of
// the source design.
//
// A fill beat (req.fill) writes a missed line into one chosen way, so it is
// sent only to the group named by tgt; a remote target whose RCSR bit is
// clear is not a legal fill and is dropped.
//
// Purely combinational: the request reaches every destination in the cycle
// it is issued (the TSV delay is a few picoseconds and is not modelled).
module l2_req_gen
  import cp_pkg::*;
(
  input  l2_req_t    core_req,
  input  tgt_e       tgt,
  input  logic [1:0] rcsr,
  output l2_req_t    req_local,
  output l2_req_t    req_lower,
  output l2_req_t    req_upper
);

  logic to_local, to_lower, to_upper;

  always_comb begin
    if (core_req.fill) begin
      to_local = (tgt == TGT_LOCAL);
      to_lower = (tgt == TGT_LOWER) && rcsr[RCSR_LOWER];
      to_upper = (tgt == TGT_UPPER) && rcsr[RCSR_UPPER];
    end else begin
      to_local = 1'b1;
      to_lower = rcsr[RCSR_LOWER];
      to_upper = rcsr[RCSR_UPPER];
    end

    req_local = core_req;
    req_lower = core_req;
    req_upper = core_req;
    req_local.valid = core_req.valid && to_local;
    req_lower.valid = core_req.valid && to_lower;
    req_upper.valid = core_req.valid && to_upper;
  end

endmodule
