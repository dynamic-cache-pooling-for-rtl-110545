// tb_job_pair_alloc: stage-1 job allocation.
// The worked example (four jobs J1 >= J2 >= J3 >= J4 by predicted gain give
// the pairs (J1,J4) and (J2,J3), the pair with the higher IPC sum nearest the
// heat sink), then random inputs checked against a reference that sorts the
// jobs with a plain insertion sort in the testbench. One clock from start to
// done is also checked.
module tb_job_pair_alloc;
  import cp_pkg::*;
  localparam int N = 4;
  localparam int IPC_W = 12;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [PERF_W-1:0] p [N];
  logic [IPC_W-1:0] ipc [N];
  logic [1:0] job_of_layer [N], layer_of_job [N];
  int checks = 0, failures = 0;

  job_pair_alloc #(.NJOBS(N), .IPC_W(IPC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_and_check();
    int ord [N];
    int exp [N];
    int tmp, s0, s1;
    // insertion sort: larger p first, equal p by lower index
    for (int i = 0; i < N; i++) ord[i] = i;
    for (int i = 1; i < N; i++)
      for (int j = i; j > 0; j--)
        if (p[ord[j]] > p[ord[j-1]]) begin tmp = ord[j]; ord[j] = ord[j-1]; ord[j-1] = tmp; end
    s0 = ipc[ord[0]] + ipc[ord[3]];
    s1 = ipc[ord[1]] + ipc[ord[2]];
    if (s0 >= s1) begin
      exp[0] = ord[0]; exp[1] = ord[3]; exp[2] = ord[1]; exp[3] = ord[2];
    end else begin
      exp[0] = ord[1]; exp[1] = ord[2]; exp[2] = ord[0]; exp[3] = ord[3];
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(done, "done one clock after start");
    for (int l = 0; l < N; l++) begin
      check(job_of_layer[l] == 2'(exp[l]), "job on layer");
      check(layer_of_job[job_of_layer[l]] == 2'(l), "inverse map");
    end
    @(negedge clk);
    check(!done, "done is a pulse");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: jobs 2,0,3,1 in decreasing gain; pair (2,1) has the higher IPC
    p[0] = 200; p[1] = 10; p[2] = 300; p[3] = 50;
    ipc[0] = 400; ipc[1] = 900; ipc[2] = 700; ipc[3] = 500;
    run_and_check();
    check(job_of_layer[0] == 2 && job_of_layer[1] == 1 && job_of_layer[2] == 0 &&
          job_of_layer[3] == 3, "worked example layout");
    for (int n = 0; n < 500; n++) begin
      // distinct gains keep the reference tie rule out of play, except sometimes
      for (int i = 0; i < N; i++) begin
        p[i]   = PERF_W'($urandom_range(0, (n % 5 == 0) ? 3 : 4000));
        ipc[i] = IPC_W'($urandom_range(0, 4000));
      end
      run_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
