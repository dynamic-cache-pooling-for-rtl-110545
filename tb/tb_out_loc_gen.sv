// tb_out_loc_gen: exhaustive check of the output-destination demux.
// For every owner value and a set of random responses, exactly the selected
// destination must carry the partition's hit and data; the others stay 0.
module tb_out_loc_gen;
  import cp_pkg::*;
  l2_rsp_t rsp, r_loc, r_low, r_up;
  lcsr_e   owner;
  int checks = 0, failures = 0;

  out_loc_gen dut (.rsp(rsp), .owner(owner), .rsp_local(r_loc), .rsp_lower(r_low), .rsp_upper(r_up));

  task automatic expect_eq(input l2_rsp_t got, input l2_rsp_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s owner=%0d got=%h exp=%h", what, owner, got, exp);
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
    for (int n = 0; n < 64; n++) begin
      for (int o = 0; o < 4; o++) begin
        owner     = lcsr_e'(o);
        rsp.hit   = 1'($urandom);
        rsp.rdata = {$urandom, $urandom};
        #1;
        expect_eq(r_loc, (o == 0) ? rsp : L2_RSP_IDLE, "local");
        expect_eq(r_low, (o == 1) ? rsp : L2_RSP_IDLE, "lower");
        expect_eq(r_up,  (o == 2) ? rsp : L2_RSP_IDLE, "upper");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
