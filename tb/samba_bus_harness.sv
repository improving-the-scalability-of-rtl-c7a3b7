// samba_bus_harness - traffic source, reference model and checker for one
// samba_bus instance.
//
// Every module holds at most one pending communication and keeps it until
// the bus reports it sent, as the bus protocol requires. A new request
// appears with probability REQ_PCT percent per idle cycle (100 = saturated
// traffic: a module always has a request). Destinations follow TRAFFIC:
//   0  mixed: 40 % to another module of the same cluster, else uniform
//   1  uniform over all other modules
//   2  Poisson distance: 1 + Poisson(2), random direction
//   3  exponential distance: 1 + floor(Exp(mean 2)), random direction
// Distances falling off the bus are drawn again. The data word carries the
// source address and a sequence number.
//
// Each cycle, after the inputs settle (falling clock edge), every output of
// the bus is compared with samba_ref_pkg::samba_model. done rises after
// CYCLES cycles; checks/failures count the comparisons.
module samba_bus_harness
  import samba_pkg::*;
  import samba_ref_pkg::*;
#(
  parameter int N       = 24,
  parameter int C       = 3,
  parameter int CYCLES  = 2000,
  parameter int TRAFFIC = 0,
  parameter int REQ_PCT = 50,
  parameter int SEED    = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  req_valid  [N],
  output addr_t req_dest   [N],
  output data_t req_data   [N],
  input  logic  req_sent   [N],
  input  logic  rx_f_valid [N],
  input  data_t rx_f_data  [N],
  input  logic  rx_b_valid [N],
  input  data_t rx_b_data  [N],
  input  logic  f_win_valid,
  input  addr_t f_win_addr,
  input  logic  b_win_valid,
  input  addr_t b_win_addr,
  output logic  done,
  output int    checks,
  output int    failures
);

  samba_model model;
  int         cyc;
  int         seq [N];
  int unsigned rng;

  function automatic int rnd(int range);
    rng = rng * 1103515245 + 12345 + $urandom;
    return int'((rng >> 8) % range);
  endfunction

  function automatic real runif();
    return (real'(rnd(1 << 20)) + 0.5) / real'(1 << 20);
  endfunction

  function automatic int poisson(real lambda);
    real l = $exp(-lambda);
    real p = 1.0;
    int  k = 0;
    do begin
      k++;
      p = p * runif();
    end while (p > l);
    return k - 1;
  endfunction

  function automatic int pick_dest(int m);
    int d;
    if (TRAFFIC == 0) begin
      if (C > 1 && rnd(100) < 40) begin
        do d = (m / C) * C + rnd(C); while (d == m);
        return d;
      end
      do d = rnd(N); while (d == m);
      return d;
    end else if (TRAFFIC == 1) begin
      do d = rnd(N); while (d == m);
      return d;
    end else begin
      forever begin
        int dd = (TRAFFIC == 2) ? 1 + poisson(2.0)
                                  : 1 + int'($floor(-2.0 * $ln(runif())));
        d = (rnd(2) == 0) ? m + dd : m - dd;
        if (d >= 0 && d < N) return d;
      end
    end
  endfunction

  task automatic new_request(int m);
    req_valid[m] = 1'b1;
    req_dest[m]  = addr_t'(pick_dest(m));
    req_data[m]  = {8'(m), 24'(seq[m])};
    seq[m]++;
  endtask

  task automatic check(logic cond, string what, int m);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("MISMATCH cycle %0d t=%0t module %0d: %s", cyc, $time, m, what);
    end
  endtask

  initial begin
    model    = new(N, C);
    rng      = SEED;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    cyc      = 0;
    for (int m = 0; m < N; m++) begin
      seq[m]       = 0;
      req_valid[m] = 1'b0;
      req_dest[m]  = '0;
      req_data[m]  = '0;
    end
    @(posedge rst_n);
    @(posedge clk);
    #1;
    while (cyc < CYCLES) begin
      // new requests for idle modules
      for (int m = 0; m < N; m++) begin
        if (!req_valid[m] && rnd(100) < REQ_PCT) new_request(m);
      end
      @(negedge clk);
      for (int m = 0; m < N; m++) begin
        model.req_valid[m] = req_valid[m];
        model.req_dest[m]  = req_dest[m];
        model.req_data[m]  = req_data[m];
      end
      model.eval();
      check(f_win_valid == model.f_win_valid &&
            (!f_win_valid || int'(f_win_addr) == model.f_win), "forward winner", -1);
      check(b_win_valid == model.b_win_valid &&
            (!b_win_valid || int'(b_win_addr) == model.b_win), "backward winner", -1);
      for (int m = 0; m < N; m++) begin
        check(req_sent[m] == model.sent[m], "req_sent", m);
        check(rx_f_valid[m] == model.rxfv[m] && (!rx_f_valid[m] || rx_f_data[m] == model.rxfd[m]),
              "forward delivery", m);
        check(rx_b_valid[m] == model.rxbv[m] && (!rx_b_valid[m] || rx_b_data[m] == model.rxbd[m]),
              "backward delivery", m);
      end
      @(posedge clk);
      #1;
      model.clock();
      for (int m = 0; m < N; m++) begin
        if (model.sent[m]) req_valid[m] = 1'b0;
      end
      cyc++;
    end
    done = 1'b1;
  end

endmodule
