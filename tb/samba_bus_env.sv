// samba_bus_env - one samba_bus instance with its own traffic harness, for
// testbenches that run several bus configurations side by side.
// Parameters are passed to both the bus and the harness.
module samba_bus_env
  import samba_pkg::*;
#(
  parameter int N         = 24,
  parameter int C         = 3,
  parameter int LA        = 1,
  parameter int CYCLES    = 1000,
  parameter int TRAFFIC   = 0,
  parameter int REQ_PCT   = 50,
  parameter int SEED      = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

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

  samba_bus #(.N_MODULES (N), .CLUSTER_SIZE (C), .LOOKAHEAD (LA)) dut (.*);

  samba_bus_harness #(
    .N (N), .C (C), .CYCLES (CYCLES), .TRAFFIC (TRAFFIC), .REQ_PCT (REQ_PCT), .SEED (SEED)
  ) h (.*);

endmodule
