// l2_miss_ctrl: L2 cache control of one core in the pooled stack.
//
// Takes one request at a time from the core's L1 side, looks it up in all
// partitions the core currently owns (local ones and, through the layer's
// request generation, the ones a neighbour lends it), and handles the result:
//  * read hit  : data returned the cycle after the request was accepted;
//  * read miss : the local and remote hit signals were both 0. A victim way
//                is picked among the owned ways (round robin over the 4
//                local and 4 remote candidates), the line is read from
//                memory as 8 words and each word is written into the victim
//                as a fill beat, to a local way or across the TSVs to a
//                lent way. The requested word is returned after the 8th beat;
//  * write     : write-through, no write allocate. A hit updates the L2 copy
//                during the lookup; the write always goes on to memory.
//
// Interfaces: core_valid/core_ready handshake, one resp_valid pulse per
// request. Memory: mem_req_valid/mem_req_ready, reads answered by 8
// in-order mem_rsp_valid beats, writes posted. Event pulses (ev_*) feed the
// performance counters that the runtime policy samples.
//
// The source defines the miss condition and that a core's cache grows by the
// ways it pools; the write policy, line transfer and victim choice here are
// this design's own.
module l2_miss_ctrl
  import cp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // core (L1 miss) side
  input  logic                core_valid,
  input  logic                core_write,
  input  logic                core_ifetch,
  input  logic [ADDR_W-1:0]   core_addr,
  input  logic [DATA_W-1:0]   core_wdata,
  output logic                core_ready,
  output logic                resp_valid,
  output logic                resp_hit,
  output logic [DATA_W-1:0]   resp_rdata,
  // pooled L2 of this layer
  output l2_req_t             l2_req,
  output tgt_e                l2_tgt,
  input  l2_rsp_t             l2_rsp,
  input  logic [NUM_WAYS-1:0] own_local,
  input  logic [NUM_WAYS-1:0] own_remote,
  input  tgt_e                own_tgt,
  // memory side
  output logic                mem_req_valid,
  output logic                mem_req_write,
  output logic [ADDR_W-1:0]   mem_req_addr,
  output logic [DATA_W-1:0]   mem_req_wdata,
  input  logic                mem_req_ready,
  input  logic                mem_rsp_valid,
  input  logic [DATA_W-1:0]   mem_rsp_data,
  // events for the performance counters
  output logic                ev_read_miss,
  output logic                ev_ifetch_miss,
  output logic                ev_write,
  output logic                ev_replace,
  output logic                busy
);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_MEM_WR, S_MEM_RD, S_FILL, S_RESP} state_e;
  state_e state_q, state_d;

  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] wdata_q, rdata_q;
  logic              write_q, ifetch_q, hit_q;
  logic [WOFF_W-1:0] beat_q;
  logic [2:0]        rr_q;
  logic [2:0]        victim_q;
  logic [2:0]        victim;

  // ---- victim choice: first owned candidate at or after the pointer ------
  logic [7:0] owned;
  assign owned = {own_remote, own_local};
  always_comb begin
    victim = 3'd0;
    for (int k = 7; k >= 0; k--) begin
      if (owned[3'(rr_q + 3'(k))]) victim = 3'(rr_q + 3'(k));
    end
  end

  logic [ADDR_W-1:0] line_addr;
  assign line_addr = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_comb begin
    state_d       = state_q;
    l2_req        = L2_REQ_IDLE;
    l2_tgt        = TGT_LOCAL;
    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = addr_q;
    mem_req_wdata = wdata_q;
    core_ready    = (state_q == S_IDLE);
    unique case (state_q)
      S_IDLE: if (core_valid) begin
        l2_req.valid = 1'b1;
        l2_req.write = core_write;
        l2_req.addr  = core_addr;
        l2_req.wdata = core_wdata;
        state_d      = S_CHECK;
      end
      S_CHECK: begin
        if (write_q)          state_d = S_MEM_WR;
        else if (l2_rsp.hit)  state_d = S_IDLE;
        else                  state_d = S_MEM_RD;
      end
      S_MEM_WR: begin
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
        if (mem_req_ready) state_d = S_RESP;
      end
      S_MEM_RD: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = line_addr;
        if (mem_req_ready) state_d = S_FILL;
      end
      S_FILL: if (mem_rsp_valid) begin
        l2_req.valid = 1'b1;
        l2_req.fill  = 1'b1;
        l2_req.way   = victim_q[WAY_W-1:0];
        l2_req.addr  = line_addr | (ADDR_W'(beat_q) << BOFF_W);
        l2_req.wdata = mem_rsp_data;
        l2_tgt       = victim_q[2] ? own_tgt : TGT_LOCAL;
        if (beat_q == WOFF_W'(WORDS_PER_LINE - 1)) state_d = S_RESP;
      end
      S_RESP:  state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      addr_q   <= '0;
      wdata_q  <= '0;
      rdata_q  <= '0;
      write_q  <= 1'b0;
      ifetch_q <= 1'b0;
      hit_q    <= 1'b0;
      beat_q   <= '0;
      rr_q     <= '0;
      victim_q <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && core_valid) begin
        addr_q   <= core_addr;
        wdata_q  <= core_wdata;
        write_q  <= core_write;
        ifetch_q <= core_ifetch;
      end
      if (state_q == S_CHECK) begin
        hit_q <= l2_rsp.hit;
        if (!write_q && !l2_rsp.hit) begin
          victim_q <= victim;
          rr_q     <= victim + 3'd1;
        end
      end
      if (state_q == S_MEM_RD) beat_q <= '0;
      if (state_q == S_FILL && mem_rsp_valid) begin
        beat_q <= beat_q + 1'b1;
        if (beat_q == addr_q[BOFF_W +: WOFF_W]) rdata_q <= mem_rsp_data;
      end
    end
  end

  // responses: a read hit answers from the CHECK cycle, everything else from RESP
  always_comb begin
    resp_valid = 1'b0;
    resp_hit   = hit_q;
    resp_rdata = rdata_q;
    if (state_q == S_CHECK && !write_q && l2_rsp.hit) begin
      resp_valid = 1'b1;
      resp_hit   = 1'b1;
      resp_rdata = l2_rsp.rdata;
    end else if (state_q == S_RESP) begin
      resp_valid = 1'b1;
    end
  end

  assign ev_read_miss   = (state_q == S_CHECK) && !write_q && !l2_rsp.hit;
  assign ev_ifetch_miss = ev_read_miss && ifetch_q;
  assign ev_write       = (state_q == S_CHECK) && write_q;
  assign ev_replace     = ev_read_miss;
  assign busy           = (state_q != S_IDLE);

  // the reserved local way guarantees a victim always exists
  a_victim_owned: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_CHECK && !write_q && !l2_rsp.hit) |-> owned[victim]);

endmodule
