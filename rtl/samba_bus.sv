// samba_bus - clustered SAMBA bus with control signal lookahead.
//
// SAMBA is a shared bus that performs several transactions per bus cycle
// under a single-winner arbitration. It has a forward sub-bus (towards
// higher module addresses) and a backward sub-bus (towards lower ones). On
// each sub-bus, interface units are chained through multiplexers: a unit
// passes the upstream transaction on unless it is addressed to it, and
// otherwise may put its own ready communication on the bus. The arbitration
// winner is always served; other ready communications ("compatible
// transactions") are served whenever their path is free.
//
// Two techniques shorten the combinational path through the chain:
//  * module clustering: CLUSTER_SIZE neighbouring modules share one cluster
//    interface unit (samba_ciu), which cuts the number of units in series to
//    N_MODULES / CLUSTER_SIZE and adds point-to-point intra-cluster paths;
//  * control signal lookahead: each unit computes its multiplexer select
//    from the signals of the LOOKAHEAD units upstream of it (samba_iu).
//
// Defaults follow the configuration with the largest reported delay saving:
// 24 modules, clusters of 3 and 1-stage lookahead. CLUSTER_SIZE = 1 and
// LOOKAHEAD = 0 give the original SAMBA bus. N_MODULES must be a multiple of
// CLUSTER_SIZE.
//
// Module-side protocol (per module m): hold req_valid/req_dest/req_data until
// req_sent[m] is high at a rising clock edge; the transaction is performed in
// that cycle. rx_f_valid/rx_b_valid mark a bundle delivered in this cycle
// from the forward/backward direction; the receiver must take it. All paths
// from requests to req_sent and rx_* are combinational; the only state is
// the round-robin pointer of each arbiter. The arbitration winners are
// brought out for observation.
module samba_bus
  import samba_pkg::*;
#(
  parameter int N_MODULES    = 24,
  parameter int CLUSTER_SIZE = 3,
  parameter int LOOKAHEAD    = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid  [N_MODULES],
  input  addr_t req_dest   [N_MODULES],
  input  data_t req_data   [N_MODULES],
  output logic  req_sent   [N_MODULES],
  output logic  rx_f_valid [N_MODULES],
  output data_t rx_f_data  [N_MODULES],
  output logic  rx_b_valid [N_MODULES],
  output data_t rx_b_data  [N_MODULES],
  output logic  f_win_valid,
  output addr_t f_win_addr,
  output logic  b_win_valid,
  output addr_t b_win_addr
);

  localparam int NU = N_MODULES / CLUSTER_SIZE;   // interface units per sub-bus
  localparam int IW = (N_MODULES > 1) ? $clog2(N_MODULES) : 1;

  logic [N_MODULES-1:0] f_req_vec, b_req_vec;
  logic                 f_req [N_MODULES];
  logic                 b_req [N_MODULES];

  // links indexed by position along each sub-bus
  link_t f_link [NU];
  link_t b_link [NU];

  always_comb begin
    for (int m = 0; m < N_MODULES; m++) begin
      f_req_vec[m] = f_req[m];
      b_req_vec[m] = b_req[m];
    end
  end

  samba_arbiter #(.N_MODULES (N_MODULES)) u_f_arb (
    .clk (clk), .rst_n (rst_n), .req (f_req_vec),
    .win_valid (f_win_valid), .win_addr (f_win_addr)
  );

  samba_arbiter #(.N_MODULES (N_MODULES)) u_b_arb (
    .clk (clk), .rst_n (rst_n), .req (b_req_vec),
    .win_valid (b_win_valid), .win_addr (b_win_addr)
  );

  for (genvar c = 0; c < NU; c++) begin : g_cl
    localparam int FP = c;            // forward position
    localparam int BP = NU - 1 - c;   // backward position

    link_t f_prev [LOOKAHEAD+1];
    link_t b_prev [LOOKAHEAD+1];

    // prev[k] is the unit k+1 places upstream; none beyond the bus end
    for (genvar k = 0; k <= LOOKAHEAD; k++) begin : g_prev
      if (FP - 1 - k >= 0) begin : g_f
        assign f_prev[k] = f_link[FP-1-k];
      end else begin : g_f0
        assign f_prev[k] = '0;
      end
      if (BP - 1 - k >= 0) begin : g_b
        assign b_prev[k] = b_link[BP-1-k];
      end else begin : g_b0
        assign b_prev[k] = '0;
      end
    end

    logic  c_req_valid  [CLUSTER_SIZE];
    addr_t c_req_dest   [CLUSTER_SIZE];
    data_t c_req_data   [CLUSTER_SIZE];
    logic  c_req_sent   [CLUSTER_SIZE];
    logic  c_rx_f_valid [CLUSTER_SIZE];
    data_t c_rx_f_data  [CLUSTER_SIZE];
    logic  c_rx_b_valid [CLUSTER_SIZE];
    data_t c_rx_b_data  [CLUSTER_SIZE];
    logic  c_f_req      [CLUSTER_SIZE];
    logic  c_b_req      [CLUSTER_SIZE];

    for (genvar j = 0; j < CLUSTER_SIZE; j++) begin : g_m
      localparam int M = c * CLUSTER_SIZE + j;
      assign c_req_valid[j] = req_valid[M];
      assign c_req_dest[j]  = req_dest[M];
      assign c_req_data[j]  = req_data[M];
      assign req_sent[M]    = c_req_sent[j];
      assign rx_f_valid[M]  = c_rx_f_valid[j];
      assign rx_f_data[M]   = c_rx_f_data[j];
      assign rx_b_valid[M]  = c_rx_b_valid[j];
      assign rx_b_data[M]   = c_rx_b_data[j];
      assign f_req[M]       = c_f_req[j];
      assign b_req[M]       = c_b_req[j];
    end

    samba_ciu #(
      .N_MODULES (N_MODULES), .CLUSTER_SIZE (CLUSTER_SIZE),
      .CLUSTER (c), .LOOKAHEAD (LOOKAHEAD)
    ) u_ciu (
      .req_valid   (c_req_valid),
      .req_dest    (c_req_dest),
      .req_data    (c_req_data),
      .req_sent    (c_req_sent),
      .rx_f_valid  (c_rx_f_valid),
      .rx_f_data   (c_rx_f_data),
      .rx_b_valid  (c_rx_b_valid),
      .rx_b_data   (c_rx_b_data),
      .f_req       (c_f_req),
      .b_req       (c_b_req),
      .f_win_valid (f_win_valid),
      .f_win_addr  (f_win_addr),
      .b_win_valid (b_win_valid),
      .b_win_addr  (b_win_addr),
      .f_prev      (f_prev),
      .f_link      (f_link[FP]),
      .b_prev      (b_prev),
      .b_link      (b_link[BP])
    );
  end

  // The arbitration winner of each sub-bus is always served.
  a_f_winner_served : assert property (@(posedge clk) disable iff (!rst_n)
    f_win_valid |-> req_sent[f_win_addr[IW-1:0]]);
  a_b_winner_served : assert property (@(posedge clk) disable iff (!rst_n)
    b_win_valid |-> req_sent[b_win_addr[IW-1:0]]);

  // Requests must name another module on the bus.
  for (genvar m = 0; m < N_MODULES; m++) begin : g_chk
    a_legal_dest : assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[m] |-> (req_dest[m] < addr_t'(N_MODULES) && req_dest[m] != addr_t'(m)));
  end

  initial begin
    assert (N_MODULES % CLUSTER_SIZE == 0)
      else $error("N_MODULES must be a multiple of CLUSTER_SIZE");
    assert (LOOKAHEAD >= 0) else $error("LOOKAHEAD must not be negative");
  end

endmodule
