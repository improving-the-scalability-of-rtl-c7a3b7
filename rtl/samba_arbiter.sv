// samba_arbiter - single-winner round-robin arbiter for one SAMBA sub-bus.
//
// The SAMBA bus works with any conventional single-winner arbitration; this
// design uses round robin. Each cycle the arbiter looks at the request
// vector (module m has a pending communication on this sub-bus) and names
// the first requester at or after a rotating pointer as the winner. The
// bus access rules guarantee that the winner's transaction is performed in
// the same cycle, so the pointer moves to the module after the winner at
// the next clock edge.
//
// Interface: req[m] per module, win_valid / win_addr out. Timing: winner is
// combinational from req in the same cycle (no arbitration pipeline); the
// pointer is the only state and resets to module 0 (active-low rst_n).
module samba_arbiter
  import samba_pkg::*;
#(
  parameter int N_MODULES = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MODULES-1:0] req,
  output logic                 win_valid,
  output addr_t                win_addr
);

  localparam int IW = (N_MODULES > 1) ? $clog2(N_MODULES) : 1;

  addr_t ptr;

  always_comb begin
    win_valid = 1'b0;
    win_addr  = '0;
    // Two passes over the modules: first those at or after the pointer,
    // then the ones before it. The first requester found wins.
    for (int k = 0; k < 2 * N_MODULES; k++) begin
      automatic int m = (k < N_MODULES) ? k : k - N_MODULES;
      automatic logic eligible = (k < N_MODULES) ? (addr_t'(m) >= ptr) : 1'b1;
      if (!win_valid && eligible && req[m]) begin
        win_valid = 1'b1;
        win_addr  = addr_t'(m);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (win_valid) begin
      ptr <= (win_addr == addr_t'(N_MODULES - 1)) ? '0 : win_addr + addr_t'(1);
    end
  end

  // The winner must be one of the requesters.
  a_win_requests : assert property (@(posedge clk) disable iff (!rst_n)
    win_valid |-> req[win_addr[IW-1:0]]);
  a_win_exists : assert property (@(posedge clk) disable iff (!rst_n)
    (|req) |-> win_valid);

endmodule
