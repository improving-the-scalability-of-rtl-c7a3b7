// samba_pkg - types and helper functions shared by the SAMBA bus blocks.
//
// A SAMBA bus has two uni-directional sub-buses. The forward sub-bus carries
// transactions from lower to higher module addresses, the backward sub-bus
// from higher to lower ones. Every block below works in "positions": the
// distance of a module from the upstream end of its sub-bus. On the forward
// sub-bus the position is the module address, on the backward sub-bus it is
// (N_MODULES-1-address). With that mapping the backward sub-bus uses exactly
// the logic of the forward one, which is how the two sub-buses are described:
// symmetric in structure and operation.
//
// The address/data bundle carried along a sub-bus holds the destination module
// address and one data word. The field widths are this design's choice: 8
// address bits allow up to 256 modules, and the data word is 32 bits wide.
package samba_pkg;

  localparam int ADDR_W = 8;
  localparam int DATA_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Address/data bundle (fDAOut / fDAsd / fDArd in the signal naming of the
  // interface unit).
  typedef struct packed {
    addr_t dest;
    data_t data;
  } da_t;

  // What one interface unit shows to the units downstream of it. The bus
  // itself is valid + da; mux_sel, ready and pend_dest are the extra wires
  // that control signal lookahead takes from upstream units.
  typedef struct packed {
    logic  valid;      // fValidOut: da carries a valid transaction
    da_t   da;         // fDAOut: bundle leaving the unit
    logic  mux_sel;    // fMuxSel: the unit passes an upstream transaction on
    logic  ready;      // fReady: the unit has a ready pending communication
    addr_t pend_dest;  // destination address of that pending communication
  } link_t;

  typedef enum logic {
    DIR_FWD = 1'b0,
    DIR_BWD = 1'b1
  } dir_e;

  // Position of a module address along a sub-bus of n modules.
  function automatic addr_t pos_of(addr_t a, dir_e dir, int n);
    return (dir == DIR_FWD) ? a : addr_t'(n - 1) - a;
  endfunction

  // Bus access rule for a pending communication from position src to
  // position dst, given the arbitration winner at position win: the source
  // is the winner or downstream of it, or the destination is not downstream
  // of the winner.
  function automatic logic is_ready(addr_t src, addr_t dst, addr_t win);
    return (src >= win) || (dst <= win);
  endfunction

endpackage
