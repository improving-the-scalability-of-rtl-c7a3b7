// samba_ciu_dir - one direction (forward or backward component) of a cluster
// interface unit of a clustered SAMBA bus.
//
// A cluster of CLUSTER_SIZE neighbouring modules shares one interface unit
// on the sub-bus. This component does three things for the cluster:
//
//  * Ready test. A pending communication may be performed only if it is
//    ready: its source is the sub-bus arbitration winner or downstream of
//    it, or its destination is not downstream of the winner. This holds for
//    intra-cluster and inter-cluster communications alike.
//  * Intra-cluster communication runs over point-to-point connections from
//    every module to each module downstream of it in the cluster.
//    Destination selection picks, per destination module, one bundle: a
//    bundle arriving over the sub-bus first (it is already on its way and
//    cannot be refused), then the ready intra-cluster sender nearest the
//    upstream end (on the forward sub-bus: the leftmost module).
//  * Source selection picks, among the ready inter-cluster communications,
//    the one nearest the upstream end; it becomes the ready communication
//    (fReady, fDAsd) of the shared interface unit (samba_iu), which decides
//    whether the bus segment is free.
//
// Interface: req_* carry each module's pending communication for this
// direction only (local index j = module address - CLUSTER*CLUSTER_SIZE);
// sent[j] pulses in the cycle the communication is performed, the module
// then drops or replaces it. rx_*[j] deliver at most one bundle per cycle
// and direction to module j. prev/link form the sub-bus chain (see
// samba_iu). Purely combinational.
//
// The ordering of the bus delivery ahead of intra-cluster senders, and the
// requirement that receivers always accept, are this design's choices.
module samba_ciu_dir
  import samba_pkg::*;
#(
  parameter dir_e DIR          = DIR_FWD,
  parameter int   N_MODULES    = 24,
  parameter int   CLUSTER_SIZE = 3,
  parameter int   CLUSTER      = 0,   // cluster index (by module address)
  parameter int   LOOKAHEAD    = 1
) (
  input  logic  req_valid [CLUSTER_SIZE],
  input  da_t   req_da    [CLUSTER_SIZE],
  output logic  sent      [CLUSTER_SIZE],
  output logic  rx_valid  [CLUSTER_SIZE],
  output data_t rx_data   [CLUSTER_SIZE],
  input  logic  win_valid,
  input  addr_t win_addr,
  input  link_t prev [LOOKAHEAD+1],
  output link_t link
);

  localparam int N_CLUSTERS = N_MODULES / CLUSTER_SIZE;
  // position of this cluster's interface unit along the sub-bus
  localparam int POS = (DIR == DIR_FWD) ? CLUSTER : N_CLUSTERS - 1 - CLUSTER;
  localparam int LO  = POS * CLUSTER_SIZE;
  localparam int HI  = LO + CLUSTER_SIZE - 1;
  localparam int SEL_W = (CLUSTER_SIZE > 1) ? $clog2(CLUSTER_SIZE) : 1;

  // module index inside the cluster for local position q (0 = upstream end)
  function automatic int mod_of(int q);
    return (DIR == DIR_FWD) ? q : CLUSTER_SIZE - 1 - q;
  endfunction

  addr_t win_pos;
  assign win_pos = pos_of(win_addr, DIR, N_MODULES);

  // Per local position: ready, intra/inter classification, local dest.
  logic             rdy   [CLUSTER_SIZE];
  logic             intra [CLUSTER_SIZE];
  logic [SEL_W-1:0] dloc  [CLUSTER_SIZE];

  always_comb begin
    for (int q = 0; q < CLUSTER_SIZE; q++) begin
      automatic int    j   = mod_of(q);
      automatic addr_t src = addr_t'(LO + q);
      automatic addr_t dst = pos_of(req_da[j].dest, DIR, N_MODULES);
      rdy[q]   = req_valid[j] & win_valid & is_ready(src, dst, win_pos);
      intra[q] = (dst <= addr_t'(HI));
      dloc[q]  = SEL_W'(dst - addr_t'(LO));
    end
  end

  // Source selection: the ready inter-cluster communication nearest the
  // upstream end.
  logic             src_found;
  logic [SEL_W-1:0] src_q;
  always_comb begin
    src_found = 1'b0;
    src_q     = '0;
    for (int q = 0; q < CLUSTER_SIZE; q++) begin
      if (!src_found && rdy[q] && !intra[q]) begin
        src_found = 1'b1;
        src_q     = SEL_W'(q);
      end
    end
  end

  // Bus access logic of the shared interface unit.
  logic  bus_sent;
  logic  bus_rd_valid;
  da_t   bus_rd_da;
  logic [SEL_W-1:0] bus_rd_loc;

  samba_iu #(
    .DIR          (DIR),
    .N_MODULES    (N_MODULES),
    .CLUSTER_SIZE (CLUSTER_SIZE),
    .POS          (POS),
    .LOOKAHEAD    (LOOKAHEAD)
  ) u_iu (
    .prev     (prev),
    .ready    (src_found),
    .da_sd    (req_da[mod_of(int'(src_q))]),
    .link     (link),
    .sent     (bus_sent),
    .rd_valid (bus_rd_valid),
    .rd_da    (bus_rd_da)
  );

  assign bus_rd_loc = SEL_W'(pos_of(bus_rd_da.dest, DIR, N_MODULES) - addr_t'(LO));

  // Destination selection for every destination position t.
  logic sent_q [CLUSTER_SIZE];
  always_comb begin
    for (int q = 0; q < CLUSTER_SIZE; q++) begin
      sent_q[q] = rdy[q] && !intra[q] && src_found && (src_q == SEL_W'(q)) && bus_sent;
    end
    for (int t = 0; t < CLUSTER_SIZE; t++) begin
      automatic int   jt    = mod_of(t);
      automatic logic taken = bus_rd_valid && (bus_rd_loc == SEL_W'(t));
      rx_valid[jt] = taken;
      rx_data[jt]  = bus_rd_da.data;
      for (int q = 0; q < t; q++) begin
        if (!taken && rdy[q] && intra[q] && (dloc[q] == SEL_W'(t))) begin
          taken        = 1'b1;
          sent_q[q]    = 1'b1;
          rx_valid[jt] = 1'b1;
          rx_data[jt]  = req_da[mod_of(q)].data;
        end
      end
    end
    for (int q = 0; q < CLUSTER_SIZE; q++) begin
      sent[mod_of(q)] = sent_q[q];
    end
  end

endmodule
