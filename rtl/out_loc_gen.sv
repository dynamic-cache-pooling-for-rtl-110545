// out_loc_gen: output location generation for one L2 partition.
//
// After a lookup, the partition's hit signal and data must go back to the
// core that asked. The LCSR value the request was accepted under (owner)
// selects the destination: the local core, the layer below or the layer
// above, reached through the TSVs. A powered-off partition sends nothing.
// This is the output-destination demux of the source design.
//
// Purely combinational; destinations that are not selected see hit = 0 and
// data = 0, so a layer can OR together the responses of all partitions.
module out_loc_gen
  import cp_pkg::*;
(
  input  l2_rsp_t rsp,
  input  lcsr_e   owner,
  output l2_rsp_t rsp_local,
  output l2_rsp_t rsp_lower,
  output l2_rsp_t rsp_upper
);

  always_comb begin
    rsp_local = L2_RSP_IDLE;
    rsp_lower = L2_RSP_IDLE;
    rsp_upper = L2_RSP_IDLE;
    unique case (owner)
      LCSR_LOCAL: rsp_local = rsp;
      LCSR_LOWER: rsp_lower = rsp;
      LCSR_UPPER: rsp_upper = rsp;
      default: ;
    endcase
  end

endmodule
