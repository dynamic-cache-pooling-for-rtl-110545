// pool_cfg_encode: partition counts of a job pair -> status register values.
//
// Layer a is the lower and layer b the upper layer of a pair. Each job keeps
// its own partitions from way 0 (the reserved, never-pooled way) upwards.
// A job given more than 4 partitions borrows the rest from its partner,
// taken from the partner's way 3 downwards; those ways get LCSR = UPPER (on
// a) or LOWER (on b) and the borrower's RCSR bit towards the partner is set.
// Every way nobody uses is turned OFF to save power.
//
// Combinational. Legal inputs: 1 <= na, nb; na + nb <= 8; not both above 4.
// The counts-to-ways layout is this design's choice; the register meaning
// follows the source.
module pool_cfg_encode
  import cp_pkg::*;
(
  input  logic [CNT_W-1:0] na,
  input  logic [CNT_W-1:0] nb,
  output lcsr_e            lcsr_a [NUM_WAYS],
  output logic [1:0]       rcsr_a,
  output lcsr_e            lcsr_b [NUM_WAYS],
  output logic [1:0]       rcsr_b
);

  localparam logic [CNT_W-1:0] W = CNT_W'(NUM_WAYS);

  always_comb begin
    logic [CNT_W-1:0] borrow_a, borrow_b;   // ways taken from the partner
    borrow_a = (na > W) ? na - W : '0;
    borrow_b = (nb > W) ? nb - W : '0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      // layer a
      if (CNT_W'(w) < na)                          lcsr_a[w] = LCSR_LOCAL;
      else if (CNT_W'(NUM_WAYS - 1 - w) < borrow_b) lcsr_a[w] = LCSR_UPPER;
      else                                         lcsr_a[w] = LCSR_OFF;
      // layer b
      if (CNT_W'(w) < nb)                          lcsr_b[w] = LCSR_LOCAL;
      else if (CNT_W'(NUM_WAYS - 1 - w) < borrow_a) lcsr_b[w] = LCSR_LOWER;
      else                                         lcsr_b[w] = LCSR_OFF;
    end
    rcsr_a = '0;
    rcsr_b = '0;
    rcsr_a[RCSR_UPPER] = (borrow_a != 0);
    rcsr_b[RCSR_LOWER] = (borrow_b != 0);
  end

endmodule
