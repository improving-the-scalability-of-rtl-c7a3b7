// tb_samba_bus - end-to-end test of samba_bus at its default size
// (24 modules, clusters of 3, 1-stage lookahead).
//
// Random mixed traffic (intra- and inter-cluster, both directions) runs
// through the bus for 3000 cycles. Every output is compared with the
// reference model each cycle, which also checks that each served
// transaction completes in the cycle it is granted. The test also counts how
// often each bus mechanism happened and fails if one never did:
// inter-cluster and intra-cluster transfers, compatible (non-winner)
// transactions, several transactions in one cycle, a ready request held
// back because a transaction passes its unit, a request held back by the
// ready rule, source- and destination-selection conflicts, a cluster
// receiving from and sending onto the same sub-bus in one cycle, an
// intra-cluster transfer while the sub-bus passes through the cluster, and
// a module receiving from both directions at once.
module tb_samba_bus;
  import samba_pkg::*;

  localparam int N = 24;
  localparam int C = 3;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  req_valid  [N];
  addr_t req_dest   [N];
  data_t req_data   [N];
  logic  req_sent   [N];
  logic  rx_f_valid [N];
  data_t rx_f_data  [N];
  logic  rx_b_valid [N];
  data_t rx_b_data  [N];
  logic  f_win_valid, b_win_valid;
  addr_t f_win_addr, b_win_addr;
  logic  done;
  int    h_checks, h_failures;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  samba_bus dut (.*);

  samba_bus_harness #(.N (N), .C (C), .CYCLES (3000), .TRAFFIC (0), .REQ_PCT (40), .SEED (7)) h (
    .clk, .rst_n, .req_valid, .req_dest, .req_data, .req_sent,
    .rx_f_valid, .rx_f_data, .rx_b_valid, .rx_b_data,
    .f_win_valid, .f_win_addr, .b_win_valid, .b_win_addr,
    .done, .checks (h_checks), .failures (h_failures)
  );

  task automatic need(longint count, string what);
    checks++;
    $display("  %-44s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("MECHANISM NEVER SEEN: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    checks   += h_checks;
    failures += h_failures;
    $display("transactions %0d in 3000 cycles, mechanism counts:", h.model.cnt_trans);
    need(h.model.cnt_inter,      "inter-cluster transfers");
    need(h.model.cnt_intra,      "intra-cluster transfers");
    need(h.model.cnt_compat,     "compatible (non-winner) transactions");
    need(h.model.cnt_multi,      "cycles with more than two transactions");
    need(h.model.cnt_pass_block, "ready request blocked by passing transaction");
    need(h.model.cnt_not_ready,  "request not ready (arbitration rule)");
    need(h.model.cnt_src_conf,   "source selection conflicts");
    need(h.model.cnt_dest_conf,  "destination selection conflicts");
    need(h.model.cnt_fig5a,      "cluster receives and sends on one sub-bus");
    need(h.model.cnt_fig5b,      "intra-cluster transfer under passing bus");
    need(h.model.cnt_both_rx,    "module receives from both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
