# A mesh router that keeps working after permanent faults

This is a 5-port, 4-virtual-channel wormhole router for a 2D mesh network-on-chip. Each of its four pipeline stages has a small amount of correction logic, so a permanent fault in one of its units no longer blocks the traffic through it. The four stages are:

- **RC**: routing computation.
- **VA**: virtual-channel allocation.
- **SA**: switch allocation.
- **XB**: crossbar traversal.

The correction logic does not replicate whole stages. Each stage reuses redundancy the router already has: the other virtual channels (VCs) of the same port, the other arbiters, and the other crossbar multiplexers. The only exception is the small routing unit, which is duplicated.

Fault *detection* is not part of this design. Every unit that can fail has a fault-status input. The correction logic reacts to those inputs by switching the unit out and taking another route around it. Faults are treated as permanent: the status inputs are expected to stay constant while traffic flows.

## Configuration

| Item | Value |
|---|---|
| Ports | 5: 0 local, 1 north (+y), 2 east (+x), 3 south (−y), 4 west (−x) |
| VCs per input port | 4, each a FIFO of 4 flits |
| Flit | 32 bits |
| Routing | dimension-order XY (x first, then y) on a mesh of up to 8×8 nodes (3-bit coordinates) |
| Flow control | credit based, one credit per flit slot |
| Zero-load latency | 5 cycles, from the cycle a head flit is on the input link to the cycle it is in the output link register |

Flit layout (`rtl/noc_pkg.sv`):

| Bits | Meaning |
|---|---|
| 31 | head |
| 30 | tail |
| 29:24 | destination `{y[2:0], x[2:0]}` (meaningful in head flits) |
| 23:0 | payload |

A single-flit packet has both head and tail set. A downstream VC is allocated to one packet at a time. It is offered again only when that packet's tail has left and all four of its credits have come back.

## Pipeline

```
link -> [VC buffer write] -> RC -> VA -> SA -> XB -> [output register] -> link
             edge 0          1     2     3     4          edge 5
```

1. A head flit is written into its VC buffer at the first clock edge.
2. The VC then spends one cycle in each of RC, VA and SA. The input port pops the flit in the cycle of its switch grant.
3. The flit crosses the crossbar from a pipeline register.
4. It lands in the output link register.

Body and tail flits skip RC and VA and follow at one per cycle. The extra cycles each mechanism costs are listed in the table in [Timing under faults](#timing-under-faults).

## How each stage survives a fault

### RC: duplicated routing unit

XY routing needs only comparators, so each input port has two copies of its routing unit (`xy_rc_unit`).

- The duplicate is switched off until `fault_rc_primary` flags the primary. After that, the duplicate computes every route.
- If both units of a port are flagged, head flits on that port are no longer routed and stay in their buffers.

The RC stage (`ft_rc_stage`) also fills in two fields used later by the crossbar repair:

- **SP**: the output whose multiplexer the packet will actually use.
- **FSP**: set when SP differs from the route.

### VA: arbiter sharing between the VCs of a port

VC allocation is a separable allocator (`ft_va_allocator`) in two stages:

- **Stage 1:** every input VC owns five 4:1 arbiters, one per output port. The arbiter for the routed port picks a free VC of the downstream router.
- **Stage 2:** one 20:1 arbiter per downstream VC resolves conflicts between input VCs. That is 20 arbiters, one for each of the 5×4 downstream VCs.

A fault in stage 1 retires the whole arbiter set of one input VC. That VC then *borrows* the set of a sibling VC on the same port. The lender is the first sibling, scanning upward with wrap-around, whose arbiters are healthy, whose own packet is not in VA, and that is not already lending. The loan is recorded in three fields of the lender:

| Field | Width | Holds |
|---|---|---|
| R2 | 3 bits | the borrower's route |
| ID | 2 bits | the borrower's VC number |
| VF | 1 bit | set while the lender's arbiters work for someone else |

The loan takes effect in its first cycle, so a borrow that succeeds at once costs no cycle. If the attempt fails, VF keeps the loan in place and the lender keeps serving the borrower. If a head flit arrives in the lender's own VC meanwhile, the lender allocates for its own VC first and serves the borrower in the cycle after its own grant, which costs the borrower one cycle. On success, the grant is written into the borrower's state (via ID) and R2/ID/VF are cleared.

The router still allocates VCs with three of the four arbiter sets of a port flagged. The one healthy set then serves all four VCs in turn.

A fault in a stage-2 arbiter makes that one downstream VC unallocatable. Nothing else is added for it. The stage-2 arbiter grants nothing, the requester loses, and on its retry in the next cycle its stage-1 arbiter has moved on to another free downstream VC.

### SA: default-winner bypass and VC-to-VC transfer

Switch allocation (`ft_sa_allocator`) is also separable:

- **Stage 1:** one 4:1 arbiter per input port picks one of its VCs.
- **Stage 2:** one 5:1 arbiter per output port picks one of the requesting input ports.

Each stage-1 arbiter has a 2:1 multiplexer behind it whose other input is a 2-bit **default-winner register**. When the arbiter is flagged (`fault_sa1`), the multiplexer forwards the register instead, and the default-winner VC competes in stage 2 without arbitration. The register steps through VC 0, 1, 2, 3, 0, … every `DW_PERIOD` cycles (default 16) so that no VC is locked out for good. All five ports step together.

A bypass alone would still strand a packet that sits in a VC other than the current default winner. If the default winner is idle and empty, the input port (`ft_input_port`) therefore **moves** such a packet into it. In a single cycle it copies:

- all buffered flits;
- the read and write pointers and the fill count;
- the G/R/O/SP/FSP state fields.

The port requests no switch in that cycle, and the move costs the packet one cycle. A move is not started in a cycle in which a flit arrives for either of the two VCs.

**The logical-to-physical VC map.** This is the subtle part of the design, and it is this design's own addition. After a move, the upstream router still sends the rest of the packet, and expects credits back, under the *old* VC number. Each input port therefore keeps a small table (`map_q`/`inv_q` in `ft_input_port`) from the VC number used on the link to the buffer that holds it:

- A move swaps two entries of the table.
- Incoming flits are written through `map_q`, so later flits follow the moved packet.
- Credits are returned through `inv_q`, so the upstream router's counters stay exact.

Without the table, a moved packet's tail would land in an empty VC and the upstream credit counts would drift.

### XB: secondary paths through the crossbar

The baseline crossbar has one 5:1 multiplexer M1…M5 per output out1…out5, so a failed multiplexer cuts its output off. `ft_crossbar` adds three kinds of element:

- **Demultiplexers behind some multiplexers:** D1 (1:3) behind M2, feeding P1, P2 and P3. D2 (1:2) behind M3, feeding P2 and P3. D3 (1:2) behind M4 and D4 (1:2) behind M5, each feeding P4 and P5.
- **2:1 multiplexers P1…P5 in front of the outputs:** each selects between the output's own multiplexer and the one demultiplexed path that can reach it.
- **Reachability:** M2 can serve out1, out2 or out3. M3 can serve out2 or out3. M4 and M5 can each serve out4 or out5. M1 serves only out1.

Each output therefore has one secondary multiplexer:

| Output | Normal multiplexer | Secondary multiplexer |
|---|---|---|
| out1 | M1 | M2 |
| out2 | M2 | M3 |
| out3 | M3 | M2 |
| out4 | M4 | M5 |
| out5 | M5 | M4 |

A fault in a stage-2 SA arbiter (`fault_sa2`) is handled the same way. To a packet, "the arbiter for output *o* is dead" and "multiplexer *o* is dead" look alike: both make output *o* unreachable on its own path.

For each output, `port_unreach = fault_sa2 | fault_xb`. When RC sees that a packet's route is unreachable, it sets:

- **SP** to the output that owns the secondary multiplexer;
- **FSP** to 1.

From then on the packet arbitrates for output SP in switch allocation. It uses that output's multiplexer, and the demultiplexer and P multiplexer carry the flit to its real output. In the SA→XB pipeline register the router keeps both:

- the multiplexer to use (SP when FSP is set, otherwise R);
- the real destination (R).

The router's crossbar control drives the selects of M, D and P from those two values.

These paths protect up to two simultaneous multiplexer faults: M2 and M4 faulty together still leave every output reachable. A second fault on the same output's pair of paths makes that output unreachable. Packets routed to it then stay blocked.

## Timing under faults

| Situation | Extra cycles |
|---|---|
| Duplicate RC unit in use | 0 |
| Borrowed VA arbiters, borrow succeeds at once | 0 |
| Borrowed VA arbiters while the lender's own VC also allocates | 1 |
| Requested downstream VC has a dead stage-2 VA arbiter | 1 per retry |
| SA bypass | 0, but the VC waits until it is the default winner |
| Move into the default winner | 1 |
| Secondary crossbar path | 0 |

## Modules

| File | Role |
|---|---|
| `rtl/noc_pkg.sv` | sizes, flit and VC-state types, helper functions (`secondary_port`, `mux_reaches`) |
| `rtl/ft_router.sv` | top level: five input ports, VA, SA, output VC state, SA→XB register, crossbar, output link registers |
| `rtl/ft_input_port.sv` | VC buffers, state fields, RC stage, VC-to-VC move, logical/physical VC map, credit return |
| `rtl/ft_rc_stage.sv` | primary and duplicate routing units, SP/FSP computation |
| `rtl/xy_rc_unit.sv` | one XY routing unit |
| `rtl/ft_va_allocator.sv` | VC allocator with arbiter sharing (R2/ID/VF) |
| `rtl/ft_sa_allocator.sv` | switch allocator with default-winner registers and bypass multiplexers |
| `rtl/ft_crossbar.sv` | crossbar with M1–M5, D1–D4, P1–P5 |
| `rtl/output_vc_state.sv` | busy bit and credit counter per downstream VC |
| `rtl/rr_arbiter.sv` | round-robin N:1 arbiter used by both allocators |

### Top-level interface (`ft_router`)

| Group | Signals |
|---|---|
| Position | `cur_x`, `cur_y` |
| Per input port *p* | `in_valid[p]`, `in_vc[p]`, `in_flit[p]`; credits back out on `credit_out_valid[p]`, `credit_out_vc[p]` |
| Per output port *o* | `out_valid[o]`, `out_vc[o]`, `out_flit[o]`; credits in on `credit_in_valid[o]`, `credit_in_vc[o]` |
| Fault status | `fault_rc_primary[5]`, `fault_rc_dup[5]`, `fault_va1[20]` (input VC *i* = port×4 + vc), `fault_va2[5][4]` (per downstream VC), `fault_sa1[5]` (per input port), `fault_sa2[5]` (per output), `fault_xb[5]` (M1..M5) |
| Activity | pulse when a mechanism acts: `ev_rc_dup`, `ev_va_borrow`, `ev_sa_bypass`, `ev_xfer`, `ev_secondary` |

Parameter: `DW_PERIOD`, the number of cycles each VC stays default winner. The structural sizes (ports, VCs, depth, flit width, coordinate width) are constants in `noc_pkg`.

Reset is asynchronous and active low. The neighbour's link registers and credit counters must be reset together with this router, since each side starts with a full set of credits.

## Departures and choices

These points are decisions made in this RTL where the description it follows is silent:

- **Flit format, port numbering and coordinate width:** chosen here, as listed above.
- **Link numbering to crossbar labels:** output port *k* is out(*k*+1) and uses multiplexer M(*k*+1).
- **Arbiters:** round robin everywhere.
- **Fault granularity:**
  - a VA stage-1 fault covers the whole arbiter set of an input VC;
  - SA stage-1 faults are per input port;
  - SA stage-2 and crossbar faults are per output.
- **Borrowing for VA:** the lender is the first sibling, scanning upward from the borrower, that is idle or in switch allocation. The borrower waits if no such VC exists.
- **Default-winner period:** 16 cycles.
- **VC map:** the logical/physical map that keeps credits right after a VC-to-VC move is this design's addition.
- **Downstream VC release:** a VC is reused only after all its credits are back.
- **RC units:** one pair per input port, routing one head flit per cycle, lowest-numbered VC first.
- **Not built:**
  - the fault detector;
  - faults in the correction logic itself (bypass multiplexer, demultiplexers, P multiplexers);
  - a mesh as synthesizable RTL; the 8×8 mesh exists only in the testbench `tb_mesh_8x8`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against values worked out in the testbench and prints `TB_RESULT checks=… failures=…`.

| Testbench | What it checks |
|---|---|
| `tb_ft_router` | The whole router at its default sizes, as one node (3,3) of an 8×8 mesh. **Directed cycle counts:** 5 cycles fault-free; 5 with the duplicate RC unit; 5 with a borrowed VA arbiter set; 5 over a secondary crossbar path; 6 through a VC-to-VC move. No delivery when both RC units of a port are dead. **Random traffic:** 400 packets fault-free, then 600 packets with 11 faults spread over all stages, then 300 packets with 27 faults at once (every primary RC unit, three of the four VA arbiter sets of every port, every SA stage-1 arbiter, multiplexers M2 and M4). Checks: every flit arrives once, in order, on the right port and VC; credits balance. Each mechanism must have acted. |
| `tb_mesh_8x8` | 64 routers in an 8×8 mesh. A corner-to-corner packet must take exactly 75 cycles (15 routers × 5). Then 2500 random packets fault-free, and again with about 500 tolerable faults spread over all routers. Every flit must reach its destination node in order, and every mechanism must act. It prints the mean head latency of both runs; with the default seed, faults raise it by about 7%. This test takes a few minutes to compile. |
| `tb_ft_input_port` | Stage timing, state fields, credit numbering, the move and the VC map. A random phase with the SA arbiter alternately healthy and faulty. |
| `tb_ft_va_allocator` | Directed borrowing scenarios (R2/ID/VF contents), then random requests against a reference of the allocation rules. |
| `tb_ft_sa_allocator` | One grant per input and output, bypass only to the default winner, default-winner rotation, no starvation. |
| `tb_ft_crossbar` | Every select and fault combination against a reference model of the path table above. |
| `tb_ft_rc_stage` | All destinations and fault combinations against an XY reference. |
| `tb_output_vc_state` | Random allocation, send and credit traffic against a reference model. |

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ft_router \
    -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_ft_router.sv -o sim
./obj_dir/sim
```

The whole-router test finishes in well under a second.
