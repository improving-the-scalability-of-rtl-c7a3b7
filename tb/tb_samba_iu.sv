// tb_samba_iu - bus access logic of one interface unit.
//
// For each of 4000 random bus states the reference model computes the
// links of all units; the units under test are then fed the links of the
// units upstream of their position and must reproduce the model's link,
// sent and delivery outputs at that position. Instances: forward and
// backward units of an unclustered 24-module bus with 0, 1, 2 and 4
// lookahead stages (position 9), and a unit of a bus clustered by 3 with
// 1-stage lookahead (forward position 4, backward position 2).
module tb_samba_iu;
  import samba_pkg::*;
  import samba_ref_pkg::*;

  localparam int N = 24;
  localparam int NI = 6;                                     // instances
  localparam int CS [NI] = '{1, 1, 1, 1, 3, 3};
  localparam int LS [NI] = '{0, 1, 2, 4, 1, 1};
  localparam int PS [NI] = '{9, 9, 9, 9, 4, 2};
  localparam int DS [NI] = '{0, 1, 0, 1, 0, 1};               // 1 = backward
  localparam int MAXLA = 4;

  samba_model mdl1, mdl3;
  link_t prev  [NI][MAXLA+1];
  logic  ready [NI];
  da_t   da_sd [NI];
  link_t link  [NI];
  logic  sent  [NI];
  logic  rd_valid [NI];
  da_t   rd_da [NI];
  int    checks = 0, failures = 0;
  int    n_pass = 0, n_sent = 0, n_rd = 0, n_blocked = 0;
  logic  done = 1'b0;

  for (genvar i = 0; i < NI; i++) begin : g_u
    link_t p [LS[i]+1];
    for (genvar k = 0; k <= LS[i]; k++) begin : g_p
      assign p[k] = prev[i][k];
    end
    samba_iu #(
      .DIR (DS[i] ? DIR_BWD : DIR_FWD), .N_MODULES (N), .CLUSTER_SIZE (CS[i]),
      .POS (PS[i]), .LOOKAHEAD (LS[i])
    ) u (
      .prev (p), .ready (ready[i]), .da_sd (da_sd[i]), .link (link[i]),
      .sent (sent[i]), .rd_valid (rd_valid[i]), .rd_da (rd_da[i])
    );
  end

  // link the model computed for unit position q of instance i's bus
  function automatic link_t link_of(int i, int q);
    samba_model md = (CS[i] == 1) ? mdl1 : mdl3;
    if (q < 0) return '0;
    return DS[i] ? md.blink[q] : md.flink[q];
  endfunction

  task automatic check(logic cond, string what, int i);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("MISMATCH instance %0d: %s", i, what);
    end
  endtask

  initial begin
    mdl1 = new(N, 1);
    mdl3 = new(N, 3);
    for (int it = 0; it < 4000; it++) begin
      mdl1.random_state(20 + (it % 5) * 20, 0);
      mdl3.random_state(20 + (it % 5) * 20, 40);
      mdl1.eval();
      mdl3.eval();
      for (int i = 0; i < NI; i++) begin
        for (int k = 0; k <= MAXLA; k++) prev[i][k] = link_of(i, PS[i] - 1 - k);
        ready[i] = link_of(i, PS[i]).ready;
        da_sd[i] = '{dest: link_of(i, PS[i]).pend_dest, data: data_t'($urandom)};
      end
      #1;
      for (int i = 0; i < NI; i++) begin
        link_t ex;
        int    lo;
        int    dpos;
        logic  ex_rd;
        ex = link_of(i, PS[i]);
        lo = PS[i] * CS[i];
        dpos  = DS[i] ? N - 1 - int'(prev[i][0].da.dest) : int'(prev[i][0].da.dest);
        ex_rd = prev[i][0].valid && dpos >= lo && dpos < lo + CS[i];
        check(link[i].mux_sel == ex.mux_sel, "fMuxSel", i);
        check(link[i].valid == ex.valid, "fValidOut", i);
        check(!ex.valid || link[i].da.dest == ex.da.dest, "fDAOut address", i);
        check(!ex.valid || link[i].da.data == (ex.mux_sel ? prev[i][0].da.data : da_sd[i].data),
              "fDAOut data", i);
        check(sent[i] == (ex.ready && !ex.mux_sel), "sent", i);
        check(rd_valid[i] == ex_rd, "delivery", i);
        check(!ex_rd || rd_da[i] == prev[i][0].da, "delivered bundle", i);
        if (ex.mux_sel) n_pass++;
        if (sent[i]) n_sent++;
        if (ex_rd) n_rd++;
        if (ex.ready && ex.mux_sel) n_blocked++;
      end
    end
    checks += 4;
    if (n_pass == 0 || n_sent == 0 || n_rd == 0 || n_blocked == 0) failures++;
    $display("pass-through %0d, sent %0d, delivered %0d, blocked %0d", n_pass, n_sent, n_rd, n_blocked);
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
