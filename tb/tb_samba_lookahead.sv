// tb_samba_lookahead - control signal lookahead across bus sizes.
//
// Runs the bus sizes and lookahead depths of the delay study side by side:
// 24, 16, 12 and 8 interface units (no clustering) with 0, 1, 2 and 4
// lookahead stages, plus 24 modules in clusters of 2 and 3 with 0, 1, 2 and
// 4 stages. Lookahead only restructures the multiplexer select logic, so
// every configuration must match the reference model cycle by cycle under
// the same kind of random mixed traffic.
module tb_samba_lookahead;

  localparam int NCFG = 6;
  localparam int NS [NCFG] = '{24, 16, 12, 8, 24, 24};
  localparam int CS [NCFG] = '{1, 1, 1, 1, 2, 3};
  localparam int LS [4]    = '{0, 1, 2, 4};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic done     [NCFG][4];
  int   e_checks [NCFG][4];
  int   e_fail   [NCFG][4];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_n
    for (genvar l = 0; l < 4; l++) begin : g_la
      samba_bus_env #(
        .N (NS[i]), .C (CS[i]), .LA (LS[l]), .CYCLES (800), .TRAFFIC (0),
        .REQ_PCT (50), .SEED (100 + 10 * i + l)
      ) env (.clk, .rst_n, .done (done[i][l]), .checks (e_checks[i][l]), .failures (e_fail[i][l]));
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0][0]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      for (int l = 0; l < 4; l++) begin
        if (!done[i][l]) failures++;
        checks   += e_checks[i][l] + 1;
        failures += e_fail[i][l];
        $display("N=%0d cluster=%0d lookahead=%0d: checks %0d failures %0d",
                 NS[i], CS[i], LS[l], e_checks[i][l], e_fail[i][l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
