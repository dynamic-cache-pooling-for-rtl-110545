// tb_perf_counters: random event pulses and snapshots.
// The testbench counts the same events itself; at each snapshot the five
// outputs must equal its counts for the interval just ended, and the event
// in the snapshot cycle must be counted in the next interval.
module tb_perf_counters;
  logic clk = 0, rst_n = 0;
  logic ev_replace = 0, ev_write = 0, ev_read_miss = 0, ev_ifetch_miss = 0, snap = 0;
  logic [31:0] replacements, writes, read_misses, ifetch_misses, cycles;
  int checks = 0, failures = 0;

  perf_counters dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [5];
    int e [5];
    for (int i = 0; i < 5; i++) c[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      e[0] = $urandom_range(0, 1); e[1] = $urandom_range(0, 1); e[2] = $urandom_range(0, 1);
      e[3] = e[2] & $urandom_range(0, 1); e[4] = 1;
      ev_replace = e[0]; ev_write = e[1]; ev_read_miss = e[2]; ev_ifetch_miss = e[3];
      snap = ($urandom_range(0, 99) == 0);
      @(negedge clk);
      if (snap) begin
        check(replacements == 32'(c[0]) && writes == 32'(c[1]) && read_misses == 32'(c[2]) &&
              ifetch_misses == 32'(c[3]) && cycles == 32'(c[4]), "snapshot");
        for (int i = 0; i < 5; i++) c[i] = e[i];
      end else
        for (int i = 0; i < 5; i++) c[i] += e[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
