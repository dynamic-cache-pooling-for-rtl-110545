// mem_model: behavioural main memory for the testbenches (not synthesizable).
// One port per L2 controller. A request is accepted when req_valid and
// req_ready are both high (ready is random when RANDOM_READY is set). Writes
// are posted. A read returns the 8 words of the 64-byte line starting at the
// given line address, in order, beginning LAT clocks after acceptance, one
// word per clock with occasional random gaps. Words never written read as
// INIT(addr) = {addr[31:0] ^ 32'h5a5a_0000 ^ SEED, ~addr[31:0]}, which the
// testbenches recompute on their own.
module mem_model
  import cp_pkg::*;
#(
  parameter int unsigned LAT          = 4,
  parameter logic [31:0] SEED         = 32'h0,
  parameter bit          RANDOM_READY = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              req_ready,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_data
);

  logic [DATA_W-1:0] store [logic [ADDR_W-1:0]];
  int unsigned       reads = 0, writes = 0;

  function automatic logic [DATA_W-1:0] rd(input logic [ADDR_W-1:0] a);
    if (store.exists(a)) return store[a];
    return {a[31:0] ^ 32'h5a5a_0000 ^ SEED, ~a[31:0]};
  endfunction

  logic              busy = 1'b0;
  logic [ADDR_W-1:0] line_a;
  int                wait_cnt, beat;

  always @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rsp_valid <= 1'b0;
      req_ready <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      req_ready <= !busy && (!RANDOM_READY || ($urandom_range(0, 3) != 0));
      if (req_valid && req_ready) begin
        if (req_write) begin
          store[{req_addr[ADDR_W-1:BOFF_W], {BOFF_W{1'b0}}}] = req_wdata;
          writes++;
        end else begin
          busy      <= 1'b1;
          req_ready <= 1'b0;
          line_a    <= {req_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
          wait_cnt  <= LAT;
          beat      <= 0;
          reads++;
        end
      end
      if (busy) begin
        if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
        else if ($urandom_range(0, 7) != 0) begin
          rsp_valid <= 1'b1;
          rsp_data  <= rd(line_a + ADDR_W'(beat * WORD_BYTES));
          beat      <= beat + 1;
          if (beat == WORDS_PER_LINE - 1) busy <= 1'b0;
        end
      end
    end
  end

endmodule
