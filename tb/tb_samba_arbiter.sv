// tb_samba_arbiter - round-robin single-winner arbiter.
//
// Random request vectors are applied for 3000 cycles and the winner is
// compared with an independent pointer model each cycle. A second phase
// holds every request high: each module must then win exactly once in
// every N_MODULES consecutive cycles, in address order.
module tb_samba_arbiter;
  import samba_pkg::*;

  localparam int N = 24;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [N-1:0] req;
  logic         win_valid;
  addr_t        win_addr;
  int           checks = 0, failures = 0;
  int           ptr;

  always #5 clk = ~clk;

  samba_arbiter #(.N_MODULES (N)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("MISMATCH t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic exp_v;
    int   exp_w;
    int   last_w = 0;
    req = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ptr = 0;
    for (int cyc = 0; cyc < 3000 + 3 * N; cyc++) begin
      if (cyc < 3000) begin
        for (int m = 0; m < N; m++) req[m] = ($urandom % 100) < ((cyc % 7) * 5);
      end else begin
        req = '1;
      end
      #1;
      exp_v = 1'b0; exp_w = 0;
      for (int k = 0; k < N; k++) begin
        if (!exp_v && req[(ptr + k) % N]) begin
          exp_v = 1'b1; exp_w = (ptr + k) % N;
        end
      end
      check(win_valid == exp_v, "win_valid");
      if (exp_v) check(int'(win_addr) == exp_w, "win_addr");
      if (cyc > 3000) check(int'(win_addr) == (last_w + 1) % N, "rotation under full load");
      last_w = int'(win_addr);
      @(posedge clk);
      #1;
      if (exp_v) ptr = (exp_w + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
