// tb_samba_ciu - cluster interface unit with both components.
//
// For 4000 random bus states (24 modules in clusters of 3, 1-stage
// lookahead) the reference model computes the whole bus. Cluster 2's unit
// receives its modules' requests, both arbitration winners and the
// upstream links of both sub-buses, and must reproduce the model's
// per-direction request flags, sent flags, deliveries from both directions
// and both outgoing links.
module tb_samba_ciu;
  import samba_pkg::*;
  import samba_ref_pkg::*;

  localparam int N  = 24;
  localparam int C  = 3;
  localparam int LA = 1;
  localparam int CL = 2;
  localparam int NU = N / C;
  localparam int FP = CL;
  localparam int BP = NU - 1 - CL;

  samba_model md;
  logic  req_valid [C];
  addr_t req_dest  [C];
  data_t req_data  [C];
  logic  req_sent  [C];
  logic  rx_f_valid [C];
  data_t rx_f_data  [C];
  logic  rx_b_valid [C];
  data_t rx_b_data  [C];
  logic  f_req [C];
  logic  b_req [C];
  logic  f_win_valid, b_win_valid;
  addr_t f_win_addr, b_win_addr;
  link_t f_prev [LA+1];
  link_t b_prev [LA+1];
  link_t f_link, b_link;
  int    checks = 0, failures = 0;
  int    n_f = 0, n_b = 0;
  logic  done = 1'b0;

  samba_ciu #(.N_MODULES (N), .CLUSTER_SIZE (C), .CLUSTER (CL), .LOOKAHEAD (LA)) dut (.*);

  function automatic link_t flink_of(int q);
    return (q < 0) ? '0 : md.flink[q];
  endfunction
  function automatic link_t blink_of(int q);
    return (q < 0) ? '0 : md.blink[q];
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("MISMATCH: %s", what);
    end
  endtask

  initial begin
    md = new(N, C);
    for (int it = 0; it < 4000; it++) begin
      md.random_state(30 + (it % 4) * 20, 40);
      md.eval();
      for (int j = 0; j < C; j++) begin
        req_valid[j] = md.req_valid[CL * C + j];
        req_dest[j]  = md.req_dest[CL * C + j];
        req_data[j]  = md.req_data[CL * C + j];
      end
      f_win_valid = md.f_win_valid;
      f_win_addr  = addr_t'(md.f_win);
      b_win_valid = md.b_win_valid;
      b_win_addr  = addr_t'(md.b_win);
      for (int k = 0; k <= LA; k++) begin
        f_prev[k] = flink_of(FP - 1 - k);
        b_prev[k] = blink_of(BP - 1 - k);
      end
      #1;
      for (int j = 0; j < C; j++) begin
        int m;
        m = CL * C + j;
        check(f_req[j] == md.wants(m, 1'b0) && b_req[j] == md.wants(m, 1'b1), "direction split");
        check(req_sent[j] == md.sent[m], "req_sent");
        check(rx_f_valid[j] == md.rxfv[m] && (!md.rxfv[m] || rx_f_data[j] == md.rxfd[m]), "forward delivery");
        check(rx_b_valid[j] == md.rxbv[m] && (!md.rxbv[m] || rx_b_data[j] == md.rxbd[m]), "backward delivery");
        if (req_sent[j] && f_req[j]) n_f++;
        if (req_sent[j] && b_req[j]) n_b++;
      end
      check(f_link.valid == md.flink[FP].valid && f_link.mux_sel == md.flink[FP].mux_sel &&
            (!f_link.valid || f_link.da == md.flink[FP].da), "forward link");
      check(b_link.valid == md.blink[BP].valid && b_link.mux_sel == md.blink[BP].mux_sel &&
            (!b_link.valid || b_link.da == md.blink[BP].da), "backward link");
    end
    $display("forward sends %0d backward sends %0d", n_f, n_b);
    checks += 1;
    if (n_f == 0 || n_b == 0) failures++;
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
