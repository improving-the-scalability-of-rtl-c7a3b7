// tb_samba_ciu_dir - one direction of a cluster interface unit.
//
// For 4000 random bus states (24 modules in clusters of 3, 1-stage
// lookahead) the reference model computes the whole bus. The forward
// component of cluster 3 and the backward component of cluster 5 receive
// their modules' requests, the arbitration winner and the upstream links
// from that state, and must reproduce the model's sent flags, deliveries
// (bus and intra-cluster, after destination selection) and outgoing link
// (after source selection). Counts intra-cluster transfers, destination
// and source conflicts, and fails if one of them never occurred.
module tb_samba_ciu_dir;
  import samba_pkg::*;
  import samba_ref_pkg::*;

  localparam int N  = 24;
  localparam int C  = 3;
  localparam int LA = 1;
  localparam int CL [2] = '{3, 5};     // cluster of each instance
  localparam int NU = N / C;

  samba_model md;
  logic  req_valid [2][C];
  da_t   req_da    [2][C];
  logic  sent      [2][C];
  logic  rx_valid  [2][C];
  data_t rx_data   [2][C];
  logic  win_valid [2];
  addr_t win_addr  [2];
  link_t prev      [2][LA+1];
  link_t link      [2];
  int    checks = 0, failures = 0;
  int    n_intra = 0, n_inter = 0, n_rx_bus = 0;
  logic  done = 1'b0;

  samba_ciu_dir #(.DIR (DIR_FWD), .N_MODULES (N), .CLUSTER_SIZE (C), .CLUSTER (CL[0]), .LOOKAHEAD (LA)) u_f (
    .req_valid (req_valid[0]), .req_da (req_da[0]), .sent (sent[0]), .rx_valid (rx_valid[0]),
    .rx_data (rx_data[0]), .win_valid (win_valid[0]), .win_addr (win_addr[0]),
    .prev (prev[0]), .link (link[0]));
  samba_ciu_dir #(.DIR (DIR_BWD), .N_MODULES (N), .CLUSTER_SIZE (C), .CLUSTER (CL[1]), .LOOKAHEAD (LA)) u_b (
    .req_valid (req_valid[1]), .req_da (req_da[1]), .sent (sent[1]), .rx_valid (rx_valid[1]),
    .rx_data (rx_data[1]), .win_valid (win_valid[1]), .win_addr (win_addr[1]),
    .prev (prev[1]), .link (link[1]));

  function automatic int pos(int i);     // unit position of instance i
    return (i == 0) ? CL[0] : NU - 1 - CL[1];
  endfunction

  function automatic link_t link_of(int i, int q);
    if (q < 0) return '0;
    return (i == 0) ? md.flink[q] : md.blink[q];
  endfunction

  task automatic check(logic cond, string what, int i);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("MISMATCH instance %0d: %s", i, what);
    end
  endtask

  initial begin
    md = new(N, C);
    for (int it = 0; it < 4000; it++) begin
      md.random_state(30 + (it % 4) * 20, 50);
      md.eval();
      for (int i = 0; i < 2; i++) begin
        for (int j = 0; j < C; j++) begin
          req_valid[i][j] = md.wants(CL[i] * C + j, i == 1);
          req_da[i][j]    = '{dest: md.req_dest[CL[i] * C + j], data: md.req_data[CL[i] * C + j]};
        end
        win_valid[i] = (i == 0) ? md.f_win_valid : md.b_win_valid;
        win_addr[i]  = addr_t'((i == 0) ? md.f_win : md.b_win);
        for (int k = 0; k <= LA; k++) prev[i][k] = link_of(i, pos(i) - 1 - k);
      end
      #1;
      for (int i = 0; i < 2; i++) begin
        link_t ex;
        ex = link_of(i, pos(i));
        for (int j = 0; j < C; j++) begin
          int    m;
          logic  ev;
          data_t ed;
          m  = CL[i] * C + j;
          ev = (i == 0) ? md.rxfv[m] : md.rxbv[m];
          ed = (i == 0) ? md.rxfd[m] : md.rxbd[m];
          check(sent[i][j] == (md.sent[m] && req_valid[i][j]), "sent", i);
          check(rx_valid[i][j] == ev && (!ev || rx_data[i][j] == ed), "delivery", i);
          if (sent[i][j] && int'(md.req_dest[m]) / C == CL[i]) n_intra++;
          if (sent[i][j] && int'(md.req_dest[m]) / C != CL[i]) n_inter++;
        end
        if (prev[i][0].valid && int'(prev[i][0].da.dest) / C == CL[i]) n_rx_bus++;
        check(link[i].valid == ex.valid && link[i].mux_sel == ex.mux_sel && link[i].ready == ex.ready,
              "valid / mux select / ready", i);
        check(!ex.valid || link[i].da == ex.da, "outgoing bundle", i);
        check(!ex.ready || link[i].pend_dest == ex.pend_dest, "source selection", i);
      end
    end
    $display("intra %0d inter %0d bus deliveries %0d dest conflicts %0d source conflicts %0d",
             n_intra, n_inter, n_rx_bus, md.cnt_dest_conf, md.cnt_src_conf);
    checks += 1;
    if (n_intra == 0 || n_inter == 0 || n_rx_bus == 0 || md.cnt_dest_conf == 0 || md.cnt_src_conf == 0)
      failures++;
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!done) begin
      $display("WATCHDOG: simulation did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

endmodule
