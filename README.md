# Clustered SAMBA bus with control signal lookahead

A conventional shared bus carries one transaction per cycle, so its usable
bandwidth per module falls as modules are added. The SAMBA bus keeps a single
arbitration winner per cycle but lets every other transaction whose path is
free travel at the same time. It does this with two one-way sub-buses built
from a chain of multiplexers, one per attached unit:

* the **forward sub-bus** runs from low to high module addresses;
* the **backward sub-bus** runs from high to low module addresses.

Each sub-bus is split into independent segments by the transactions on it.
The cost is logic depth: every unit sits in series on the bus, so the
combinational path grows linearly with the number of units. That path sets
the bus clock. This RTL adds two ways to shorten it:

* **Module clustering.** `CLUSTER_SIZE` neighbouring modules share one
  cluster interface unit, which cuts the number of units in series by that
  factor. Traffic inside a cluster moves over point-to-point paths and never
  touches the bus.
* **Control signal lookahead.** Each unit works out its multiplexer select
  from the signals of the `LOOKAHEAD` units upstream of it. It no longer
  waits for the address that arrives from its direct neighbour.

The default build is 24 modules in clusters of 3 with 1-stage lookahead. For
24 modules, this combination cut the bus logic delay the most in the delay
study this design follows: from about 8.6 ns to about 2 ns in a 0.18 µm
process. Setting `CLUSTER_SIZE = 1` and `LOOKAHEAD = 0` gives the original
unclustered SAMBA bus without lookahead.

## Positions and the two sub-buses

Everything below is stated for the forward sub-bus. The backward sub-bus is
the same logic mirrored. The RTL handles the mirroring by working in
*positions*, meaning the distance from the upstream end of a sub-bus:

* On the forward sub-bus, a module's position is its address.
* On the backward sub-bus, it is `N_MODULES-1-address`.

`samba_pkg::pos_of` does this mapping. The forward and backward components
are the same module with a `DIR` parameter.

A module's request goes to the forward sub-bus if its destination address is
higher than its own, and to the backward sub-bus if it is lower. A request
addressed to the module itself, or to an address off the bus, is illegal and
is caught by an assertion.

## The access rule: ready communications

Each sub-bus has its own single-winner arbiter, `samba_arbiter`. It uses
round robin with the winner chosen in the same cycle. A pending
communication is **ready** if any of these holds:

* its source is the winner;
* its source is downstream of the winner;
* its destination is not downstream of the winner.

A ready communication is sent in the current cycle unless another
transaction is already passing through its unit. These rules guarantee that
nothing ever passes through the winner's unit, so the winner is always
served. `samba_bus` asserts this every cycle. All other served transactions
are "compatible" transactions, which is where the extra bandwidth comes
from.

## One interface unit (`samba_iu`)

On each sub-bus, one unit has three parts:

* a decoder on the address arriving from upstream;
* a 2:1 multiplexer onto the next segment;
* a valid bit.

In the plain form (`LOOKAHEAD = 0`) it computes:

```
MuxSel[i]   = ValidOut[i-1] & (DAOut[i-1] is not addressed to unit i)
ValidOut[i] = MuxSel[i] | Ready[i]
DAOut[i]    = MuxSel[i] ? DAOut[i-1] : DAsd[i]     // DAsd = own pending bundle
sent[i]     = Ready[i] & ~MuxSel[i]
```

A bundle addressed to the unit is delivered to it (`rd_valid`, `rd_da`). In a
clustered bus, one unit covers the `CLUSTER_SIZE` positions of its cluster.

**Lookahead.** `MuxSel` has a serial dependence: `MuxSel[i]` waits for the
address from unit `i-1`, which itself waits for `MuxSel[i-1]`. Lookahead
breaks this by noting that once a unit puts a transaction on the bus, it
passes every unit until it reaches its destination. So a transaction passes
unit `i` in one of two cases:

* it was already passing unit `i-n`, and its destination lies beyond unit `i`;
* one of units `i-1 … i-n` sent its own pending communication, and that
  communication's destination lies beyond unit `i`.

```
MuxSel[i] =   MuxSel[i-n] & beyond_i(DAOut[i-n-1].dest)
            | OR over k = 1..n of  ~MuxSel[i-k] & Ready[i-k] & beyond_i(pend_dest[i-k])
```

Every address compare in this formula uses signals from units upstream of
`i`. The compares therefore run in parallel with the select chain, and the
chain only passes through the AND/OR terms. Each unit sends its downstream
neighbours a `link_t` record: valid, bundle, mux select, ready and the
address of its pending communication. Unit `i` receives the links of units
`i-1 … i-1-n`. Lookahead does not change the bus's function, only its logic
depth. The tests check that every depth (0, 1, 2, 4) behaves exactly like
the reference.

This formula is derived directly from the plain unit's definition above. It
uses the same upstream signals as the published lookahead scheme.

## Cluster interface unit (`samba_ciu`, `samba_ciu_dir`)

A cluster interface unit has a forward component and a backward component,
each a `samba_ciu_dir`. For its direction, each component does the
following:

1. **Ready test per module.** It uses the winner's module address. The test
   applies to intra-cluster and inter-cluster communications alike, which
   keeps a sender upstream of the winner from taking the winner's
   destination.
2. **Source selection.** Among the ready communications that leave the
   cluster, it picks the one nearest the upstream end: the leftmost module
   on the forward bus, the rightmost on the backward bus. That one becomes
   the `Ready`/`DAsd` of the shared `samba_iu`.
3. **Destination selection.** Each module can receive from the modules
   upstream of it in the cluster over direct paths, and from the bus. Per
   destination module, a bundle arriving over the bus wins first, because it
   is already on the bus and cannot be refused. After that, the ready
   intra-cluster sender nearest the upstream end wins. Losers stay pending.

Clustering allows transactions that would collide on an unclustered bus. In
one cycle, a cluster can:

* receive a bus transaction and send its own transaction onto the same
  sub-bus;
* carry an intra-cluster transfer while an unrelated transaction passes
  through on the bus.

## Module-side protocol and timing

For each module `m` of `samba_bus`:

| signal | dir | meaning |
|---|---|---|
| `req_valid[m]`, `req_dest[m]` (8 b), `req_data[m]` (32 b) | in | one pending communication; hold it until it is sent |
| `req_sent[m]` | out | the communication is performed in this cycle; at the next rising edge the module may drop or replace it |
| `rx_f_valid[m]`, `rx_f_data[m]` | out | a bundle delivered from the forward direction in this cycle |
| `rx_b_valid[m]`, `rx_b_data[m]` | out | a bundle delivered from the backward direction in this cycle |
| `f_win_*`, `b_win_*` | out | the arbitration winners, for observation |

The path from the request inputs to `req_sent` and `rx_*` is entirely
combinational: a transaction completes in the bus cycle it is granted. The
only state is the round-robin pointer of each arbiter, reset
asynchronously by `rst_n` (active low) to module 0. Receivers must accept
every delivery. A module can receive at most one bundle per direction per
cycle. The bundle carries the destination address and the data, not the
source.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_MODULES` | 24 | `samba_bus`, must be a multiple of `CLUSTER_SIZE`, at most 256 |
| `CLUSTER_SIZE` | 3 | `samba_bus`; 1 = no clustering |
| `LOOKAHEAD` | 1 | `samba_bus`; 0 = plain units, any depth allowed |
| `ADDR_W`, `DATA_W` | 8, 32 | `samba_pkg` (fixed, shared by the structs) |

## What follows the published design, and what is this design's own

The following come from the published design:

* the two sub-buses;
* the multiplexer chain and its select, valid and ready rules;
* the lookahead principle and its inputs;
* cluster interface units with point-to-point intra-cluster paths;
* priority-based source and destination selection;
* the reuse of the plain unit for cluster bus access;
* the 24 / 3 / 1 configuration.

The following are choices made here, where the published description is
silent:

* round-robin arbitration with no arbitration latency (any single-winner
  scheme is allowed);
* 8-bit addresses and 32-bit data;
* a bundle made of destination and data only;
* the hold-until-sent request handshake, with receivers always accepting;
* bus deliveries ranked ahead of intra-cluster senders at a destination;
* reset values;
* requiring uniform cluster sizes.

Not modelled: the modules themselves, and the gate-level delay figures,
which belong to a particular standard-cell mapping.

## Verification

`tb/samba_ref_pkg.sv` is a cycle reference model written as a walk along
each sub-bus. It carries the one in-flight transaction from unit to unit,
delivers it, and lets idle units start new ones. It does not use the mux
chain. Every testbench compares the RTL with it:

| testbench | what it runs |
|---|---|
| `tb_samba_bus` | default 24/3/1 bus, 3000 cycles of mixed random traffic, every output checked every cycle. Fails if any mechanism never happened (see below) |
| `tb_samba_lookahead` | 24, 16, 12 and 8 units with 0/1/2/4 lookahead stages, plus 24 modules in clusters of 2 and 3 at every depth |
| `tb_samba_workloads` | saturated traffic with uniform, Poisson and exponential distance distributions, no clustering and clusters of 2 and 3; prints the effective bandwidth (transactions per cycle) |
| `tb_samba_iu`, `tb_samba_ciu_dir`, `tb_samba_ciu` | single units fed from random consistent bus states |
| `tb_samba_arbiter` | winner against a pointer model, and strict rotation under full load |

The mechanisms counted by `tb_samba_bus` are:

* intra-cluster and inter-cluster transfers;
* compatible transactions;
* cycles with more than two transactions;
* ready requests blocked by a passing transaction;
* requests held back by the ready rule;
* source-selection and destination-selection conflicts;
* a cluster receiving and sending on one sub-bus in the same cycle;
* an intra-cluster transfer while a transaction passes through the cluster;
* a module receiving from both directions in one cycle.

Bandwidth measured with this testbench's own traffic model (the published
traffic generator is not specified), for 24 modules at 1-stage lookahead:

| traffic | no clustering | clusters of 2 | clusters of 3 |
|---|---|---|---|
| uniform | 3.55 | 3.62 | 3.62 |
| Poisson (distance 1 + Poisson(2)) | 11.1 | 12.0 | 12.5 |
| exponential (distance 1 + ⌊Exp(mean 2)⌋) | 13.3 | 14.3 | 15.1 |

The ordering matches the published trend: shorter distances give more
bandwidth, and larger clusters give no less in any of the runs. That is an
average over many cycles, not a rule for every cycle.
Source selection always prefers the module nearest the upstream end.
Occasionally that module's transaction blocks two or more transactions
that the unclustered bus would have carried, so in a single cycle the
clustered bus can serve fewer. The absolute values depend
on the distance distributions, so they should not be compared number for
number with other traffic models.

Running a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/samba_pkg.sv tb/samba_ref_pkg.sv tb/tb_samba_bus.sv --top-module tb_samba_bus
./obj_dir/Vtb_samba_bus
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. All run in
well under a second.
