// tb_l2_req_gen: exhaustive check of L2 request generation.
// Lookups must reach the local cache always and each neighbour exactly when
// its RCSR bit is set; fill beats must reach only their target group, and a
// remote fill only if the matching RCSR bit is set. Address and data must be
// passed unchanged.
module tb_l2_req_gen;
  import cp_pkg::*;
  l2_req_t    core_req, r_loc, r_low, r_up;
  tgt_e       tgt;
  logic [1:0] rcsr;
  int checks = 0, failures = 0;

  l2_req_gen dut (.core_req(core_req), .tgt(tgt), .rcsr(rcsr),
                  .req_local(r_loc), .req_lower(r_low), .req_upper(r_up));

  task automatic check_out(input l2_req_t got, input logic exp_valid, input string what);
    checks++;
    if (got.valid !== exp_valid || (exp_valid && (got.addr !== core_req.addr ||
        got.wdata !== core_req.wdata || got.write !== core_req.write ||
        got.fill !== core_req.fill || got.way !== core_req.way))) begin
      failures++;
      $display("FAIL %s rcsr=%b fill=%b tgt=%0d valid=%b exp=%b", what, rcsr,
               core_req.fill, tgt, got.valid, exp_valid);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic el, ed, eu;
    for (int n = 0; n < 16; n++)
      for (int v = 0; v < 2; v++)
        for (int f = 0; f < 2; f++)
          for (int t = 0; t < 4; t++)
            for (int r = 0; r < 3; r++) begin   // 2'b11 is never a legal RCSR
              core_req.valid = 1'(v);
              core_req.fill  = 1'(f);
              core_req.write = 1'($urandom);
              core_req.way   = WAY_W'($urandom);
              core_req.addr  = {$urandom, $urandom};
              core_req.wdata = {$urandom, $urandom};
              tgt  = tgt_e'(t);
              rcsr = 2'(r);
              #1;
              if (f == 0) begin
                el = 1; ed = rcsr[0]; eu = rcsr[1];
              end else begin
                el = (t == 0); ed = (t == 1) && rcsr[0]; eu = (t == 2) && rcsr[1];
              end
              check_out(r_loc, el && v == 1, "local");
              check_out(r_low, ed && v == 1, "lower");
              check_out(r_up,  eu && v == 1, "upper");
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
