// samba_ref_pkg - cycle reference model of a (clustered) SAMBA bus, used by
// the testbenches to check the RTL.
//
// The model is written as a walk along each sub-bus rather than as the
// multiplexer chain of the RTL: a single "in flight" transaction is carried
// from one interface unit to the next, delivered where its destination
// lies, and a unit with nothing passing through it may start a new one.
// Ready test, source selection and destination selection follow the same
// rules as the hardware: winner or downstream of it or destination not
// downstream of it; nearest-upstream module first; bus delivery before
// intra-cluster senders. It also models the round-robin arbiters and counts
// how often each bus mechanism occurs.
package samba_ref_pkg;
  import samba_pkg::*;

  localparam int MAXN = 48;

  class samba_model;
    int n, c;

    // inputs of the current cycle
    logic  req_valid [MAXN];
    addr_t req_dest  [MAXN];
    data_t req_data  [MAXN];

    // arbiter state and result
    int   f_ptr, b_ptr;
    logic f_win_valid, b_win_valid;
    int   f_win, b_win;

    // expected outputs of the current cycle
    logic  sent [MAXN];
    logic  rxfv [MAXN];
    data_t rxfd [MAXN];
    logic  rxbv [MAXN];
    data_t rxbd [MAXN];
    link_t flink [MAXN];   // per unit position on the forward sub-bus
    link_t blink [MAXN];   // per unit position on the backward sub-bus
    int    cycle_trans;    // transactions performed this cycle

    // cumulative mechanism counts
    longint cnt_trans, cnt_intra, cnt_inter, cnt_compat, cnt_pass_block;
    longint cnt_dest_conf, cnt_src_conf, cnt_not_ready, cnt_fig5a, cnt_fig5b;
    longint cnt_multi, cnt_both_rx, cnt_winner;

    function new(int n_modules, int cluster_size);
      n = n_modules;
      c = cluster_size;
      reset();
    endfunction

    function void reset();
      f_ptr = 0; b_ptr = 0;
      cnt_trans = 0; cnt_intra = 0; cnt_inter = 0; cnt_compat = 0;
      cnt_pass_block = 0; cnt_dest_conf = 0; cnt_src_conf = 0;
      cnt_not_ready = 0; cnt_fig5a = 0; cnt_fig5b = 0; cnt_multi = 0;
      cnt_both_rx = 0; cnt_winner = 0;
      for (int m = 0; m < MAXN; m++) begin
        req_valid[m] = 1'b0; req_dest[m] = '0; req_data[m] = '0;
      end
    endfunction

    function bit wants(int m, bit bwd);
      if (!req_valid[m] || int'(req_dest[m]) >= n) return 0;
      return bwd ? (int'(req_dest[m]) < m) : (int'(req_dest[m]) > m);
    endfunction

    function void arbitrate(bit bwd, int ptr, output logic wv, output int w);
      wv = 1'b0; w = 0;
      for (int k = 0; k < n; k++) begin
        int m = (ptr + k) % n;
        if (!wv && wants(m, bwd)) begin
          wv = 1'b1; w = m;
        end
      end
    endfunction

    function void eval_dir(bit bwd);
      int    pos_mod [MAXN];
      logic  v [MAXN];
      logic  rdy [MAXN];
      int    dp [MAXN];
      int    wp, nu;
      logic  wv;
      logic  ifl;
      int    ifl_dp;
      da_t   ifl_da;
      nu = n / c;
      wv = bwd ? b_win_valid : f_win_valid;
      wp = bwd ? (n - 1 - b_win) : f_win;
      for (int m = 0; m < n; m++) begin
        int p = bwd ? n - 1 - m : m;
        pos_mod[p] = m;
        v[p]  = wants(m, bwd);
        dp[p] = bwd ? n - 1 - int'(req_dest[m]) : int'(req_dest[m]);
        rdy[p] = v[p] && wv && (p >= wp || dp[p] <= wp);
        if (v[p] && wv && !rdy[p]) cnt_not_ready++;
      end
      ifl = 1'b0; ifl_dp = 0; ifl_da = '0;
      for (int u = 0; u < nu; u++) begin
        int   base = u * c;
        int   top  = base + c - 1;
        logic passes, from_bus;
        logic taken [MAXN];
        int   sel, n_inter;
        link_t lk;
        for (int t = 0; t < c; t++) taken[t] = 1'b0;
        passes   = ifl && ifl_dp > top;
        from_bus = 1'b0;
        if (ifl && !passes) begin
          int m = pos_mod[ifl_dp];
          if (bwd) begin rxbv[m] = 1'b1; rxbd[m] = ifl_da.data; end
          else     begin rxfv[m] = 1'b1; rxfd[m] = ifl_da.data; end
          taken[ifl_dp - base] = 1'b1;
          from_bus = 1'b1;
          ifl = 1'b0;
        end
        // source selection
        sel = -1; n_inter = 0;
        for (int p = base; p <= top; p++) begin
          if (rdy[p] && dp[p] > top) begin
            n_inter++;
            if (sel < 0) sel = p;
          end
        end
        if (n_inter > 1) cnt_src_conf++;
        lk.mux_sel   = passes;
        lk.ready     = (sel >= 0);
        lk.pend_dest = (sel >= 0) ? req_dest[pos_mod[sel]] : req_dest[pos_mod[base]];
        if (sel >= 0 && !passes) begin
          sent[pos_mod[sel]] = 1'b1;
          ifl    = 1'b1;
          ifl_dp = dp[sel];
          ifl_da = '{dest: req_dest[pos_mod[sel]], data: req_data[pos_mod[sel]]};
          cnt_inter++;
          if (from_bus) cnt_fig5a++;
        end else if (sel >= 0) begin
          cnt_pass_block++;
        end
        lk.valid = ifl;
        lk.da    = ifl_da;
        if (bwd) blink[u] = lk; else flink[u] = lk;
        // destination selection for intra-cluster communications
        for (int t = base; t <= top; t++) begin
          for (int p = base; p < t; p++) begin
            if (rdy[p] && dp[p] == t) begin
              if (!taken[t - base]) begin
                int mt = pos_mod[t];
                taken[t - base] = 1'b1;
                sent[pos_mod[p]] = 1'b1;
                if (bwd) begin rxbv[mt] = 1'b1; rxbd[mt] = req_data[pos_mod[p]]; end
                else     begin rxfv[mt] = 1'b1; rxfd[mt] = req_data[pos_mod[p]]; end
                cnt_intra++;
                if (passes) cnt_fig5b++;
              end else begin
                cnt_dest_conf++;
              end
            end
          end
        end
      end
    endfunction

    // Compute winners and all expected outputs for the current inputs.
    function void eval();
      for (int m = 0; m < MAXN; m++) begin
        sent[m] = 1'b0; rxfv[m] = 1'b0; rxbv[m] = 1'b0;
        rxfd[m] = '0; rxbd[m] = '0;
      end
      arbitrate(1'b0, f_ptr, f_win_valid, f_win);
      arbitrate(1'b1, b_ptr, b_win_valid, b_win);
      eval_dir(1'b0);
      eval_dir(1'b1);
      cycle_trans = 0;
      for (int m = 0; m < n; m++) begin
        if (sent[m]) cycle_trans++;
        if (rxfv[m] && rxbv[m]) cnt_both_rx++;
      end
      cnt_trans += cycle_trans;
      if (f_win_valid) cnt_winner++;
      if (b_win_valid) cnt_winner++;
      cnt_compat += cycle_trans - (f_win_valid ? 1 : 0) - (b_win_valid ? 1 : 0);
      if (cycle_trans > 2) cnt_multi++;
    endfunction

    // Random pending communications (pct percent of the modules, intra_pct
    // percent of those inside the own cluster) and random arbiter pointers,
    // for tests of single units that need a consistent bus state.
    function void random_state(int pct, int intra_pct);
      for (int m = 0; m < n; m++) begin
        int d;
        req_valid[m] = ($urandom % 100) < pct;
        if (c > 1 && ($urandom % 100) < intra_pct) begin
          do d = (m / c) * c + int'($urandom % c); while (d == m);
        end else begin
          do d = int'($urandom % n); while (d == m);
        end
        req_dest[m] = addr_t'(d);
        req_data[m] = $urandom;
      end
      f_ptr = int'($urandom % n);
      b_ptr = int'($urandom % n);
    endfunction

    // Clock edge: the arbiters move past their winners.
    function void clock();
      if (f_win_valid) f_ptr = (f_win + 1) % n;
      if (b_win_valid) b_ptr = (b_win + 1) % n;
    endfunction
  endclass

endpackage
