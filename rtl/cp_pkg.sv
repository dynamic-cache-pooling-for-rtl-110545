// cp_pkg: shared constants and types of the 3D cache-resource-pooling stack.
//
// The stack has one core per layer. Each core owns a private 1 MB, 4-way L2
// whose ways ("partitions") can be lent to the core directly above or below
// through TSVs. Every partition carries a 2-bit Local Cache Status Register
// (LCSR) and every core two 1-bit Remote Cache Status Registers (RCSR).
//
// Sizes that follow the source design: 4 layers, 1 MB 4-way L2 per core,
// 64 address TSVs and 64 data TSVs in each direction, a 30-bit tag path.
// Own choices: a 64-byte line, a 48-bit physical address (which with 4096
// sets and 64-byte lines gives exactly the 30-bit tag), a 64-bit word per
// access, and the LCSR encoding below (00 = local, so that clearing the
// registers to 0 removes every remote access).
package cp_pkg;

  // ---- geometry -------------------------------------------------------
  localparam int unsigned NUM_WAYS    = 4;      // partitions per 1 MB L2
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned WORD_BYTES  = 8;      // 64-bit data TSV bundle
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / WORD_BYTES;  // 8
  localparam int unsigned PADDR_W     = 48;     // physical address bits used
  localparam int unsigned ADDR_W      = 64;     // address TSVs
  localparam int unsigned DATA_W      = 64;     // data TSVs per direction
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);      // 6
  localparam int unsigned WOFF_W      = $clog2(WORDS_PER_LINE);  // 3
  localparam int unsigned BOFF_W      = $clog2(WORD_BYTES);      // 3
  localparam int unsigned WAY_W       = $clog2(NUM_WAYS);        // 2
  // Default set count: 1 MB / 4 ways / 64 B = 4096 sets (tag = 48-12-6 = 30).
  localparam int unsigned L2_SETS     = 4096;

  // ---- status registers -----------------------------------------------
  typedef enum logic [1:0] {
    LCSR_LOCAL = 2'b00,   // partition serves the core on this layer
    LCSR_LOWER = 2'b01,   // partition lent to the core on the layer below
    LCSR_UPPER = 2'b10,   // partition lent to the core on the layer above
    LCSR_OFF   = 2'b11    // partition powered down
  } lcsr_e;

  // RCSR bit positions: RCSR_0 = lower layer, RCSR_1 = upper layer.
  localparam int unsigned RCSR_LOWER = 0;
  localparam int unsigned RCSR_UPPER = 1;

  // Which group of partitions a fill beat is aimed at.
  typedef enum logic [1:0] {
    TGT_LOCAL = 2'b00,
    TGT_LOWER = 2'b01,
    TGT_UPPER = 2'b10,
    TGT_NONE  = 2'b11
  } tgt_e;

  // ---- L2 request / response bundles (also what crosses the TSVs) ------
  // A lookup (valid & !fill) reads or, with write set, updates one word on a
  // hit. A fill beat (valid & fill) writes one word of a line into way `way`
  // of the target group; beat 0 invalidates the line, beat 7 sets tag+valid.
  typedef struct packed {
    logic                 valid;
    logic                 write;
    logic                 fill;
    logic [WAY_W-1:0]     way;
    logic [ADDR_W-1:0]    addr;
    logic [DATA_W-1:0]    wdata;
  } l2_req_t;

  typedef struct packed {
    logic                 hit;
    logic [DATA_W-1:0]    rdata;
  } l2_rsp_t;

  localparam l2_req_t L2_REQ_IDLE = '0;
  localparam l2_rsp_t L2_RSP_IDLE = '0;

  // ---- pooling policy ---------------------------------------------------
  // Improvements are unsigned fixed point in units of 1/1024 (Q0.10).
  localparam int unsigned PERF_W    = 12;
  localparam int unsigned THR_T     = 31;   // t  = 3 %  (31/1024)
  localparam int unsigned THR_INIT  = 92;   // 9 % rule for 1 -> 4 partitions
  localparam int unsigned CNT_W     = 4;    // partition count 0..8

endpackage
