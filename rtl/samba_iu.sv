// samba_iu - bus access logic of one interface unit on one SAMBA sub-bus.
//
// The unit sits in series on the sub-bus. Its multiplexer either passes the
// bundle arriving from the upstream unit (fDAOut[i-1]) on to the next unit,
// or puts the unit's own pending communication (fDAsd) on the bus:
//
//   fMuxSel[i]   = fValidOut[i-1] & (fDAOut[i-1] not addressed to unit i)
//   fValidOut[i] = fMuxSel[i] | fReady[i]
//   fDAOut[i]    = fMuxSel[i] ? fDAOut[i-1] : fDAsd[i]
//
// A ready pending communication is sent when nothing passes through the unit
// (sent = fReady & ~fMuxSel). A bundle addressed to the unit is delivered to
// it on rd_valid / rd_da. A unit may stand for a cluster of CLUSTER_SIZE
// modules: every module address of the cluster then counts as its own.
//
// Control signal lookahead (LOOKAHEAD = n > 0) computes fMuxSel[i] from the
// signals of the n upstream units instead of waiting for the decoder of the
// bundle on fDAOut[i-1]. A transaction passes unit i either because it
// already passed unit i-n and its destination lies beyond unit i, or because
// one of units i-1..i-n sent its own pending communication with a destination
// beyond unit i:
//
//   fMuxSel[i] = fMuxSel[i-n] & beyond_i(fDAOut[i-n-1].dest)
//              | OR_{k=1..n} ~fMuxSel[i-k] & fReady[i-k] & beyond_i(pend[i-k])
//
// Every term of the sum depends only on signals of the upstream units, so
// the decoders work in parallel with the fMuxSel chain. With n = 0 the unit
// is the plain one with an equality decoder. All settings give the same
// function; only the logic depth differs.
//
// The plain select, valid and multiplexer follow the published interface
// unit; the lookahead expression is derived here from that definition and
// uses the published set of upstream signals. Covering a cluster by an
// address range compare is this design's way of giving a unit several
// addresses.
//
// Interface: prev[k] is the link of unit i-1-k (k = 0..LOOKAHEAD); a link of
// a unit that does not exist (upstream end of the bus) must be all zeros.
// Purely combinational: one transaction per sub-bus segment per bus cycle.
module samba_iu
  import samba_pkg::*;
#(
  parameter dir_e DIR          = DIR_FWD,
  parameter int   N_MODULES    = 24,
  parameter int   CLUSTER_SIZE = 3,
  parameter int   POS          = 0,   // position of the unit along the sub-bus
  parameter int   LOOKAHEAD    = 1
) (
  input  link_t prev [LOOKAHEAD+1],
  input  logic  ready,      // fReady: own pending communication is ready
  input  da_t   da_sd,      // fDAsd: own pending communication
  output link_t link,       // this unit's outputs to the downstream units
  output logic  sent,       // own pending communication put on the bus
  output logic  rd_valid,   // bundle from upstream addressed to this unit
  output da_t   rd_da       // fDArd
);

  localparam int LO = POS * CLUSTER_SIZE;       // first position covered
  localparam int HI = LO + CLUSTER_SIZE - 1;    // last position covered

  function automatic logic at_me(addr_t dest);
    // one subtract and compare: positions below LO wrap to large values
    addr_t off = pos_of(dest, DIR, N_MODULES) - addr_t'(LO);
    return off < addr_t'(CLUSTER_SIZE);
  endfunction

  function automatic logic beyond_me(addr_t dest);
    return pos_of(dest, DIR, N_MODULES) > addr_t'(HI);
  endfunction

  logic mux_sel;

  if (LOOKAHEAD == 0) begin : g_plain
    assign mux_sel = prev[0].valid & ~at_me(prev[0].da.dest);
  end else begin : g_lookahead
    always_comb begin
      mux_sel = prev[LOOKAHEAD-1].mux_sel & beyond_me(prev[LOOKAHEAD].da.dest);
      for (int k = 0; k < LOOKAHEAD; k++) begin
        mux_sel |= ~prev[k].mux_sel & prev[k].ready & beyond_me(prev[k].pend_dest);
      end
    end
  end

  assign sent           = ready & ~mux_sel;
  assign rd_valid       = prev[0].valid & at_me(prev[0].da.dest);
  assign rd_da          = prev[0].da;

  assign link.mux_sel   = mux_sel;
  assign link.valid     = mux_sel | ready;
  assign link.da        = mux_sel ? prev[0].da : da_sd;
  assign link.ready     = ready;
  assign link.pend_dest = da_sd.dest;

endmodule
