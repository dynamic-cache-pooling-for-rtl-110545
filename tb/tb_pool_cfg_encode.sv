// tb_pool_cfg_encode: every legal pair of partition counts.
// From the register values alone the testbench recounts how many partitions
// each job can reach (its local ways plus the partner's ways lent to it,
// only if its RCSR bit towards the partner is set) and checks: the counts
// match, way 0 is always local, lent ways sit at the top of the partner,
// every other way is off, and RCSR bits are set only when something is lent.
module tb_pool_cfg_encode;
  import cp_pkg::*;
  logic [CNT_W-1:0] na, nb;
  lcsr_e lcsr_a [NUM_WAYS], lcsr_b [NUM_WAYS];
  logic [1:0] rcsr_a, rcsr_b;
  int checks = 0, failures = 0;

  pool_cfg_encode dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s na=%0d nb=%0d", what, na, nb);
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
    int ca, cb, la, lb, offs, lent_a, lent_b;
    for (int a = 1; a <= 7; a++)
      for (int b = 1; b <= 7; b++) begin
        if (a + b > 8 || (a > 4 && b > 4)) continue;
        na = CNT_W'(a); nb = CNT_W'(b);
        #1;
        ca = 0; cb = 0; offs = 0; lent_a = 0; lent_b = 0;
        for (int w = 0; w < NUM_WAYS; w++) begin
          if (lcsr_a[w] == LCSR_LOCAL) ca++;
          if (lcsr_b[w] == LCSR_LOCAL) cb++;
          if (lcsr_a[w] == LCSR_UPPER) lent_a++;       // a lends to b
          if (lcsr_b[w] == LCSR_LOWER) lent_b++;       // b lends to a
          if (lcsr_a[w] == LCSR_OFF) offs++;
          if (lcsr_b[w] == LCSR_OFF) offs++;
          check(lcsr_a[w] != LCSR_LOWER && lcsr_b[w] != LCSR_UPPER, "lent only within the pair");
          // local ways form a prefix from way 0
          if (w > 0) begin
            check(!(lcsr_a[w] == LCSR_LOCAL && lcsr_a[w-1] != LCSR_LOCAL), "a local prefix");
            check(!(lcsr_b[w] == LCSR_LOCAL && lcsr_b[w-1] != LCSR_LOCAL), "b local prefix");
            check(!(lcsr_a[w-1] == LCSR_UPPER && lcsr_a[w] != LCSR_UPPER), "a lent ways on top");
            check(!(lcsr_b[w-1] == LCSR_LOWER && lcsr_b[w] != LCSR_LOWER), "b lent ways on top");
          end
        end
        check(lcsr_a[0] == LCSR_LOCAL && lcsr_b[0] == LCSR_LOCAL, "reserved way local");
        check(ca + (rcsr_a[RCSR_UPPER] ? lent_b : 0) == a, "a reaches na partitions");
        check(cb + (rcsr_b[RCSR_LOWER] ? lent_a : 0) == b, "b reaches nb partitions");
        check(offs == 8 - a - b, "unused ways off");
        check(rcsr_a == ((lent_b > 0) ? 2'b10 : 2'b00), "rcsr a");
        check(rcsr_b == ((lent_a > 0) ? 2'b01 : 2'b00), "rcsr b");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
