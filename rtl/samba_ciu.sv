// samba_ciu - cluster interface unit of a clustered SAMBA bus.
//
// Connects CLUSTER_SIZE neighbouring modules to both sub-buses. Each module
// has at most one pending communication (req_valid, req_dest, req_data),
// held until req_sent pulses. A destination above the source's address goes
// to the forward component, one below to the backward component; both are
// samba_ciu_dir instances. The unit also reports, per module and direction,
// whether a request is pending, which feeds the two sub-bus arbiters.
//
// A module can receive one bundle from each direction in the same cycle
// (rx_f_*, rx_b_*). A request addressed to the module itself or to an
// address outside the bus is never served (samba_bus asserts against it).
// With CLUSTER_SIZE = 1 this is the plain (unclustered) SAMBA interface unit.
// The split into a forward and a backward component follows the published
// unit; choosing the direction by comparing addresses is this design's.
// Purely combinational.
module samba_ciu
  import samba_pkg::*;
#(
  parameter int N_MODULES    = 24,
  parameter int CLUSTER_SIZE = 3,
  parameter int CLUSTER      = 0,
  parameter int LOOKAHEAD    = 1
) (
  // module side, index j = module address - CLUSTER*CLUSTER_SIZE
  input  logic  req_valid  [CLUSTER_SIZE],
  input  addr_t req_dest   [CLUSTER_SIZE],
  input  data_t req_data   [CLUSTER_SIZE],
  output logic  req_sent   [CLUSTER_SIZE],
  output logic  rx_f_valid [CLUSTER_SIZE],
  output data_t rx_f_data  [CLUSTER_SIZE],
  output logic  rx_b_valid [CLUSTER_SIZE],
  output data_t rx_b_data  [CLUSTER_SIZE],
  // arbitration
  output logic  f_req      [CLUSTER_SIZE],
  output logic  b_req      [CLUSTER_SIZE],
  input  logic  f_win_valid,
  input  addr_t f_win_addr,
  input  logic  b_win_valid,
  input  addr_t b_win_addr,
  // sub-bus chains
  input  link_t f_prev [LOOKAHEAD+1],
  output link_t f_link,
  input  link_t b_prev [LOOKAHEAD+1],
  output link_t b_link
);

  da_t  req_da [CLUSTER_SIZE];
  logic f_sent [CLUSTER_SIZE];
  logic b_sent [CLUSTER_SIZE];

  always_comb begin
    for (int j = 0; j < CLUSTER_SIZE; j++) begin
      automatic addr_t self = addr_t'(CLUSTER * CLUSTER_SIZE + j);
      automatic logic  ok   = req_dest[j] < addr_t'(N_MODULES);
      req_da[j]   = '{dest: req_dest[j], data: req_data[j]};
      f_req[j]    = req_valid[j] && ok && (req_dest[j] > self);
      b_req[j]    = req_valid[j] && ok && (req_dest[j] < self);
      req_sent[j] = f_sent[j] | b_sent[j];
    end
  end

  samba_ciu_dir #(
    .DIR (DIR_FWD), .N_MODULES (N_MODULES), .CLUSTER_SIZE (CLUSTER_SIZE),
    .CLUSTER (CLUSTER), .LOOKAHEAD (LOOKAHEAD)
  ) u_fwd (
    .req_valid (f_req),
    .req_da    (req_da),
    .sent      (f_sent),
    .rx_valid  (rx_f_valid),
    .rx_data   (rx_f_data),
    .win_valid (f_win_valid),
    .win_addr  (f_win_addr),
    .prev      (f_prev),
    .link      (f_link)
  );

  samba_ciu_dir #(
    .DIR (DIR_BWD), .N_MODULES (N_MODULES), .CLUSTER_SIZE (CLUSTER_SIZE),
    .CLUSTER (CLUSTER), .LOOKAHEAD (LOOKAHEAD)
  ) u_bwd (
    .req_valid (b_req),
    .req_da    (req_da),
    .sent      (b_sent),
    .rx_valid  (rx_b_valid),
    .rx_data   (rx_b_data),
    .win_valid (b_win_valid),
    .win_addr  (b_win_addr),
    .prev      (b_prev),
    .link      (b_link)
  );

endmodule
