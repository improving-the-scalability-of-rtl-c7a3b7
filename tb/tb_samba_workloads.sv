// tb_samba_workloads - effective bandwidth of a 24-module SAMBA bus.
//
// Saturated traffic (every module always has a pending communication) with
// three distance distributions - uniform, Poisson and exponential - on
// buses without clustering and with clusters of 2 and 3 (1-stage
// lookahead), 2000 cycles each. Every cycle is checked against the
// reference model. The effective bandwidth, the mean number of
// transactions performed per bus cycle, is printed for each case. Checks
// beyond the model comparison: short-distance traffic gives more
// bandwidth (exponential > Poisson > uniform), and clustering never gives
// less bandwidth than the unclustered bus under the same traffic.
module tb_samba_workloads;

  localparam int CYC = 2000;
  localparam int CS [3] = '{1, 2, 3};
  localparam int TS [3] = '{1, 2, 3};        // uniform, Poisson, exponential
  localparam string TN [3] = '{"uniform", "Poisson", "exponential"};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic done     [3][3];
  int   e_checks [3][3];
  int   e_fail   [3][3];
  real  bw       [3][3];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar ci = 0; ci < 3; ci++) begin : g_c
    for (genvar ti = 0; ti < 3; ti++) begin : g_t
      samba_bus_env #(
        .N (24), .C (CS[ci]), .LA (1), .CYCLES (CYC), .TRAFFIC (TS[ti]),
        .REQ_PCT (100), .SEED (500 + ti)
      ) env (.clk, .rst_n, .done (done[ci][ti]), .checks (e_checks[ci][ti]), .failures (e_fail[ci][ti]));
      always @(posedge done[ci][ti]) bw[ci][ti] = real'(env.h.model.cnt_trans) / real'(CYC);
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0][0]);
    repeat (2) @(posedge clk);
    for (int ci = 0; ci < 3; ci++) begin
      for (int ti = 0; ti < 3; ti++) begin
        checks   += e_checks[ci][ti];
        failures += e_fail[ci][ti];
        check(done[ci][ti], "run finished");
        $display("cluster size %0d, %-12s traffic: effective bandwidth %0.3f transactions/cycle",
                 CS[ci], TN[ti], bw[ci][ti]);
      end
      check(bw[ci][2] > bw[ci][1] && bw[ci][1] > bw[ci][0], "exponential > Poisson > uniform");
    end
    for (int ti = 0; ti < 3; ti++) begin
      check(bw[1][ti] >= bw[0][ti] && bw[2][ti] >= bw[0][ti], "clustering does not lose bandwidth");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYC + 1000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
