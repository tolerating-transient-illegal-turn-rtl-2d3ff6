# ODT: a mesh router that survives illegal turns

In a network-on-chip, packets avoid deadlock by obeying a turn model. Some
turns are forbidden, so no cycle of packets waiting on each other can form. A
transient fault in a router's routing logic can send a packet through a
forbidden turn anyway. That one turn can close a waiting cycle and freeze part
of the network.

This design addresses that. Each router checks where every arriving packet
came from and judges whether the previous router made a turn it was not
allowed to make. A harmless illegal turn is ignored. A harmful one is steered
back onto a safe path by two mechanisms:

* **Spare routing** gives the packet a small set of extra turns.
* **Shortest-path priority** keeps the packet as close to its shortest path as
  the turn rules allow.

The checking runs in parallel with normal route selection and adds no
pipeline stage.

The RTL is written in SystemVerilog (IEEE 1800-2017):

* a 7-channel router;
* its routing-computation (RC) unit and the sub-blocks of that unit;
* an 8x8 mesh top.

## Channels and the turn model

Each router has seven input and seven output channels. The code names them
with the `ch_e` enum in `odt_pkg`, and the 3-bit value of the enum is the code
carried in flits:

| code | channel | physical link |
|------|---------|---------------|
| 0 | E  | east |
| 1 | W  | west |
| 2 | N1 | north, VC 0 |
| 3 | N2 | north, VC 1 |
| 4 | S1 | south, VC 0 |
| 5 | S2 | south, VC 1 |
| 6 | L  | local node |

North is +y. The north and south directions each have two virtual channels
that share one physical link. Flits on that link carry a VC bit.

The position of the destination relative to a router (`pos_e`) is one of
nine regions: L (here), E, W, N, S, NE, NW, SE, SW.

### The baseline eligibility rule (`odt_route_legal`)

This is a non-minimal, deadlock-free rule. It says which output channels a
packet that arrived on input `in` may take towards region `pos`:

| output | allowed when |
|--------|--------------|
| L  | pos = L |
| E  | in ≠ E and pos ∈ {E, NE, SE} |
| W  | in ∈ {L, N1, S1, E} |
| N1 | in ∈ {L, S1, E} |
| S1 | in ∈ {L, N1, E} |
| N2 | in ≠ N2 and pos ∈ {N, E, NE, SE} |
| S2 | in ≠ S2 and pos ∈ {S, E, NE, SE} |

Some consequences follow from the table:

* Packets heading west must do so before anything else.
* VC 1 (N2, S2) is used only by packets with no westward distance left.
* VC 0 (N1, S1) is used by packets that may still turn west.

A turn that this table forbids is an *illegal turn*.

### Minimal adaptive selection (`odt_min_select`)

Without faults, a packet uses only minimal outputs:

* E, W or L for the pure east, west or local regions;
* N1/S1 if the destination lies west of the source (`dst_x < src_x`), N2/S2
  otherwise;
* for the diagonal regions, the productive x output or the productive y
  output.

A candidate set can hold two outputs. `odt_out_select` then takes the one
whose downstream buffer has more free slots. Ties go to the lower channel
code. The source column `src_x` travels in the head flit for this choice.

## Fault detection and classification (`odt_fault_judge`)

A head flit carries the input channel it used in the previous router. Each
router rewrites the `up_in` field when the head leaves. From that field, its
own input and its own coordinates, the RC unit rebuilds the upstream router's
view of the packet:

* the upstream router's position is one step back along the arrival side;
* the upstream region is recomputed from that position.

The unit then asks: was (upstream input → output that led here) a legal turn
there? It sorts the turn into one of three classes:

* **legal** — nothing to do;
* **ignorable** — illegal, but the turn cannot be part of a waiting cycle.
  Routing continues normally. Examples are turns onto an E link, or a turn
  that ends on L;
* **severe** — illegal and dangerous. The packet must leave normal routing at
  this router.

For arrivals on N1, S1 and E, the classification uses the lists of ignorable
upstream inputs of the original scheme:

* N1: {E, W, N1, N2, L}
* S1: {E, W, S1, S2, L}
* E: {E, N1, N2, S1, L}

Arrivals on W, N2 and S2 use the baseline eligibility table above. See
"Departures" below for why.

## Route choice in the RC unit (`odt_rc_unit`)

Each head flit gets exactly one of four modes. `events` reports which one:

1. **Normal.** Used when at least one minimal output is also eligible and no
   severe fault was judged. The least congested such output is chosen.
2. **Spare routing** (`odt_spare_route`). Used when the input is W, N2 or S2
   and normal routing has nothing to offer. These inputs are where an illegal
   turn leaves a packet with no eligible output towards its destination. The
   extra turns are:
   * S2 → N1 and N2 → S1 (reverse in y on the west-capable VC);
   * W → N1 when the destination is to the north;
   * W → S1 when it is to the south;
   * W → either of the two, by congestion, when the destination is straight
     west.
3. **Shortest-path priority** (`odt_spp_filter`). Used for every other case,
   e.g. a severe fault seen on an E, N1 or S1 input. From the eligible outputs
   that exist it removes:
   * the U-turn;
   * outputs that move the packet away from the destination in x.

   It then prefers minimal outputs, then the x step towards the destination.
   If nothing eligible is left, it falls back to any non-U-turn output other
   than Local. A misrouted packet therefore keeps moving and is never ejected
   at the wrong node.
4. **Fault.** A test input forces the output. This models the transient fault
   itself.

**Spare-routing input blocking.** A spare turn is only safe if no second
packet can follow the first one into it. So after an input has spare-routed a
packet, the input unit stops returning credits to the upstream router. The
block starts once that packet's tail is in the buffer and ends when the tail
has left. Credits that the packet itself still needs are never withheld:
withholding them would deadlock the packet that holds the spare turn.

## Router pipeline and timing (`odt_router`)

```
link -> input buffer -> RC (registered) -> VA -> SA + crossbar -> link register -> link
        odt_input_unit                     odt_vc_alloc  odt_switch_alloc / odt_crossbar
```

* **Head flit:** 4 cycles per router without contention. It is written into
  the buffer, routed, granted its output channel, switched, and then appears
  on the output link. Body flits follow at one per cycle.
* **Corner to corner** on the 8x8 mesh (15 routers): a 4-flit packet's tail
  arrives 4·15 + 3 = 63 cycles after its head was injected. The full-size
  bench checks this.
* **VA:** an output channel belongs to one packet from its head to its tail
  (wormhole). Requests are arbitrated round-robin per output channel.
* **SA:** one flit per physical link per cycle, round-robin. N1/N2 share the
  north link and S1/S2 the south link. A flit may only go if the downstream
  buffer of its channel has a free slot.
* **Flow control:** credit based, per channel. A router starts with DEPTH
  credits per output channel. It receives a credit pulse when the downstream
  unit frees a slot, and returns one itself one cycle after it pops a flit.
  The credit counters are the congestion figure used by the output selection.

## Mesh top (`odt_mesh`)

Parameters `MESH_X = 8`, `MESH_Y = 8`, `DEPTH = 4`. Router `id = y*MESH_X + x`
sits at (x, y). All arrays below are indexed by `id`.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `inj_valid[id]`, `inj_flit[id]` | in | flit into the router's Local input |
| `inj_credit[id]` | out | Local input freed a slot (start with DEPTH credits) |
| `ej_valid[id]`, `ej_flit[id]` | out | flit delivered to the node |
| `ej_credit[id]` | in | node consumed a delivered flit |
| `fault_en[id][c]`, `fault_ch[id][c]` | in | while set, every head flit routed by input c goes to output `fault_ch` |
| `events[id]` | out | per-cycle flags per input channel: normal, spp, spare, fault, ignorable, severe, VA wait, SA wait, blocked |

A flit (`flit_t`, 78 bits) holds these fields:

* `head` and `tail` flags;
* `up_in`, the channel code above;
* `src_x`, `dst_x` and `dst_y`, 3 bits each;
* 32 data bits.

The injecting node sets `src_x` and the destination, and sets `up_in = L`.
Packets may have any length. The benches use 4 flits.

Mesh edges are handled as follows:

* Links at the mesh edge are tied off.
* Outputs that would leave the mesh are never selected.
* A forced fault naming such an output is ignored.

## Departures and choices

These points follow the original scheme:

* the seven channels;
* the turn table;
* the minimal selection rule;
* the classification for N1/S1/E arrivals;
* the spare turns;
* the aims of shortest-path priority;
* the 8x8 size;
* the 4-flit packets.

These points are this design's own choices:

* **Classification of W, N2 and S2 arrivals.** The original lists for these
  inputs contradict its own turn table. For example, they would call a packet
  injected locally and sent east a severe fault. Here these inputs use the
  turn table directly: a turn is illegal exactly when the table forbids it.
* **When spare routing applies.** It applies whenever a W/N2/S2 arrival has no
  minimal eligible output. This covers the cases the original scheme lists. It
  also covers a few more, e.g. a W arrival for a destination straight north
  that lies west of the source.
* **Shortest-path priority.** The original defines it by a set of examples.
  The filter above is a general rule that reproduces those examples. Its
  fallback, which avoids U-turns and Local, is an addition.
* **N2 → W is not tolerated directly.** The original scheme also lists this
  turn as tolerable. Here an N2 arrival with a western destination is
  spare-routed to S1, and W is eligible from there.
* **W arrivals with a destination straight north.** When the destination is
  not west of the source, the packet continues on N2, which the turn table
  allows. Only the case where it would need N1 falls to spare routing.
* **How blocking works.** The input is blocked by withholding credits, as
  described above.
* **Cycle-level details.** Pipeline split, buffer depth (4), credit flow
  control, round-robin arbitration, tie-breaks, 32-bit payload and the flit
  layout are all this design's choices.
* **Fault model.** A fault is modelled by the `fault_en`/`fault_ch` override of
  an RC unit's decision. The flit datapath is assumed protected and has no
  error coding here.
* **Deadlocks are not cleared.** The original evaluation counts packets that
  survive. Nothing in this design drops packets. A cycle closed by forced
  turns stays closed until reset, and every packet queued behind it stays in
  the network.

## Measured behaviour

`tb_odt_traffic` runs four traffic patterns on the default 8x8 mesh: uniform,
transpose (two orientations) and shuffle. The load is 0.015 packets per node
per cycle, injected for 1500 cycles. Forced-turn faults are applied to 0 %,
2 % and 4 % of 864 routing modules (17 and 35 faulty units). The fault set is
redrawn every 100 cycles.

Results of one run (delivered packets, mean latency in cycles):

| pattern | 0 % | 2 % (17 units) | 4 % (35 units) |
|---------|-----|----------------|----------------|
| uniform    | 100 %, 29 | 99 %, 32 | 24 %, 34 |
| transpose1 | 100 %, 33 | 71 %, 34 | 59 %, 37 |
| transpose2 | 100 %, 33 | 78 %, 39 | 42 %, 35 |
| shuffle    | 100 %, 24 | 95 %, 27 | 99 %, 31 |

Packets that do arrive are always intact and at the right node.

Several points bear on these numbers:

* The losses are deadlocks. Forced turns on three to four dozen units per
  pattern, each misrouting every head it sees for 100 cycles, close waiting
  cycles.
* How often such cycles form depends strongly on how aggressive the fault
  model is. Here it is harsher than a single wrong decision per fault.
* The losses are larger than the original evaluation reports (under about
  10 % lost at 4 %).

## Verification

Every block has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* Leaf benches compare the block against an independent model or table. The
  full turn table is checked cell by cell.
* `tb_odt_router` places one router at (1,1) of a 3x3 mesh and checks:
  * 4-cycle head latency;
  * every mode;
  * VC interleaving on a shared link;
  * credit stalls;
  * random legal traffic.
* `tb_odt_mesh` runs a 4x4 mesh through directed, random and faulty traffic.
  It counts every mechanism (normal, SPP, spare, forced fault, ignorable,
  severe, VA wait, SA wait, input block) and fails if any never happened.
* `tb_odt_mesh_full` uses the default 8x8 mesh and checks:
  * corner-to-corner latency;
  * transpose exchanges with and without faults.
* `tb_odt_traffic` runs the traffic patterns described above.

Assertions in the RTL check these rules:

* no buffer overflow or underflow;
* a packet starts with a head flit;
* a link carries only a granted owner's flit;
* credits never exceed DEPTH.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert -j 4 -y rtl +libext+.sv \
    rtl/odt_pkg.sv tb/tb_odt_mesh.sv --top-module tb_odt_mesh
./obj_dir/Vtb_odt_mesh
```

Swap in any other bench name. The 8x8 benches take about two minutes to
build and seconds to run.

## Files

All RTL is in `rtl/`, one module per file; `odt_pkg.sv` holds the shared
types. Each file opens with a description of its behaviour and interface.

| hierarchy | role |
|-----------|------|
| `odt_mesh` | 8x8 mesh of routers |
| ` odt_router` | one router |
| `  odt_input_unit` ×7 | buffer + RC + wormhole state per input channel |
| `   odt_input_buffer` | flit FIFO |
| `   odt_rc_unit` | routing computation |
| `    odt_pos_unit`, `odt_route_legal`, `odt_min_select`, `odt_fault_judge`, `odt_spare_route`, `odt_spp_filter`, `odt_out_select` | RC sub-blocks |
| `  odt_vc_alloc`, `odt_switch_alloc`, `odt_crossbar` | allocation and switching |
