# ERFAN: fault-tolerant deflection routing for a 3-D mesh network-on-chip

This is RTL for a 3-D mesh network-on-chip whose switches have no buffers.
Every packet that enters a switch leaves it in the next cycle. If it loses the
port it wanted, it is *deflected* to another free port rather than made to
wait. The network keeps delivering packets when links are broken, both the
links inside a layer and the vertical links between layers (TSVs,
through-silicon vias). Each switch needs only information about its own layer
to do this:

* a **routing table** of n² × 4 hop counts, where n² is the number of nodes
  in the layer. It gives the distance to every node of the layer through each
  of the four horizontal ports;
* a **horizontal fault table** (n² × 4) and a **TSV fault table** (n² × 2).
  They say which links of the layer are broken.

Packets change layer first and then travel inside the destination layer, so
the table needs no z dimension. Suppose the TSV a packet needs is broken. The
switch then writes the nearest node of the layer with a healthy TSV into the
packet's *temporary address* (T-Add) and sets the TV bit. The packet goes to
that node, changes layer there, and carries on.

There are two routing variants, chosen by a parameter:

* **ERFAN-Dy** (`DYNAMIC = 1`, the default): when several ports are equally
  short, the packet takes the one whose neighbour carried the fewest packets
  in the previous cycle.
* **ERFAN-Sp** (`DYNAMIC = 0`): ties go to a fixed port order (N, E, S, W).

The RTL is IEEE 1800-2017 SystemVerilog and synthesizable. All testbenches are
self-checking and run on Verilator 5.

## Files

| file | contents |
|---|---|
| `rtl/erfan_pkg.sv` | packet type, port numbering, widths |
| `rtl/erfan_noc.sv` | top: X × Y × Z mesh of switches, fault-report distribution |
| `rtl/erfan_router.sv` | one switch |
| `rtl/route_compute.sv` | per-packet routing decision (T-Add/TV, vertical first, port costs) |
| `rtl/port_allocator.sv` | priority allocation of output ports, deflection, ejection |
| `rtl/routing_table.sv` | layer hop-count table, computed by distance-vector exchange |
| `rtl/fault_table.sv` | layer fault table (used once with 4 bits per node, once with 2) |
| `rtl/inter_node_select.sv` | search for the nearest node with a healthy TSV |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a workload test |
| `tb/noc_traffic.sv` | random-traffic and fault harness with a scoreboard, used by the network tests |

## The packet

Each packet is a single 128-bit flit (`erfan_pkg::pkt_t`). The fields, from
the most significant bit down:

| field | bits | use |
|---|---|---|
| V | 1 | valid |
| TV | 1 | T-Add is valid: the packet is heading for an intermediate node |
| D-Add | 18 | destination (z, y, x), 6 bits each |
| T-Add | 18 | intermediate node, always in the layer where it was chosen |
| HC | 10 | hops travelled so far (saturates at 1023); this is also the priority |
| payload | 80 | data |

## Network and coordinates

`erfan_noc` places switch (x, y, z) at index `[z][y][x]` of every per-node
port. Within a layer, node index p = y·X + x.

* Port N leads to y−1 and E to x+1. S and W are the opposite directions.
* Up leads to z+1 and Down to z−1.

Each link is the output register of the sending switch, wired straight to the
input of the receiving switch. A hop therefore takes exactly one cycle. A
packet accepted at the local port in cycle t shows up on `ej_valid` at its
destination in cycle t + HC + 1.

At the mesh border, ports have no neighbour. A switch always has as many
usable outputs as it has inputs that can carry a packet: border ports are
missing on both sides, and a broken link is unusable in both directions.
Because of this, every arriving packet always gets some output. An assertion
in `erfan_router` checks this.

## Inside a switch (one cycle)

Each cycle a switch has up to seven candidates: the packets on its six input
links and one packet offered by its local node.

1. **Routing decision** (`route_compute`, one copy per candidate). This
   follows the published routing algorithm:
   * **TV handling.** If TV is set and T-Add is this switch, the packet has
     reached its intermediate node, and TV is cleared. If T-Add is in
     another layer, which happens when the packet was deflected vertically,
     TV is also dropped.
   * **Change layer first.** If the destination layer differs and this
     switch's TSV in that direction is usable, the Up or Down port costs 0.
   * **Broken TSV.** If the destination layer differs but that TSV is broken,
     the packet takes the nearest node with a healthy TSV in that direction
     as T-Add and sets TV. `inter_node_select` does this search, by
     routing-table distance. It runs once per direction per switch and
     serves all seven candidates.
   * **Port costs inside the layer.** Each horizontal port costs the
     routing-table entry [target][port], where the target is T-Add if TV is
     set and D-Add otherwise. In ERFAN-Dy the neighbour's load is appended
     as the low-order part of the cost, so it only breaks ties between equal
     hop counts.
   * **Vertical ports** that do not lead towards the destination layer get
     the worst cost. They are used only for deflection.
   * **At the destination**, the packet asks for the eject port.
2. **Allocation** (`port_allocator`).
   * The candidates are ranked by HC. By default the smaller HC wins (see
     the departures below). On equal HC the lower input index wins. The
     local packet always comes last.
   * In that order, each candidate takes the eject port if it wants it and
     the port is still free. Otherwise it takes the cheapest free usable
     port.
   * A packet that does not get its cheapest port has been deflected. This
     includes a second packet for this node in the same cycle, because there
     is only one eject port per cycle.
   * The local packet is accepted (`inj_accept`, combinational in the same
     cycle) only if a port is left over.
3. **Output registers.** Every granted packet is written to its output
   register with HC + 1, or to the eject register. The switch also records
   how many packets it handled. That count is the `load` its neighbours use
   in the next cycle.

## The routing table and how it adapts to faults

Entry [p][d] of the table holds the hop count to node p through port d. The
all-ones code stands for "no route", the −1 of the published example table.
The table is filled by the recurrence

    H[p][d] = 1 + min_k H_nbr(d)[p][k]      (a switch is 0 hops from itself)

This is implemented as a distance-vector exchange. Each switch exports the
minimum over its four entries, `mv[p]`, to its four neighbours. Every entry
is recomputed from the neighbours' vectors once per cycle. After reset the
tables settle within X + Y + 1 cycles, and `ready` then rises. For a
fault-free 3 × 3 layer the result matches the published example. For
instance, node 5 to node 2 gives (N, E, S, W) = (1, −1, 3, 3).

A port whose link is broken is treated like a border port in this recurrence.
So the table is **reconfigured around faults**: it always holds the true
shortest distances over the healthy links. This matters for correctness. A
fault-blind table lets two switches beside a broken link each consider the
other to be on a shortest path, and a packet then bounces between them for
ever. The testbenches saw exactly this on a 4 × 4 × 4 mesh before the
change. After a fault report the entries settle again, one hop of detour per
cycle. A node that becomes unreachable counts up to just below the no-route
code.

The same `mv` vector gives the distance to every node of the layer. This is
what the intermediate-node search uses.

## Fault tables and fault reports

Faults are reported from outside, by a fault-detection mechanism that is not
part of this design. Two report buses go into `erfan_noc`, one report per
cycle on each:

* `hf_*` (layer, node, direction N/E/S/W, faulty or healed). Every switch of
  that layer updates its horizontal table, for both ends of the link.
* `vf_*` (lower layer z, node). This updates the Up entry in layer z and the
  Down entry in layer z + 1.

A report takes effect in the next cycle. Give reports only while the link
concerned carries no packet. A packet already on a link that becomes broken
can leave a switch with one more arrival than usable outputs, and the
assertion then fires.

## Interface summary (`erfan_noc`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `inj_valid[z][y][x]`, `inj_pkt[...]` | in | local packet offered; only D-Add and payload are used. Keep offering until accepted |
| `inj_accept[...]` | out | packet taken this cycle |
| `ej_valid[...]`, `ej_pkt[...]` | out | delivered packet; the node must take it |
| `hf_valid, hf_z, hf_node, hf_dir, hf_faulty` | in | horizontal link report |
| `vf_valid, vf_z, vf_node, vf_faulty` | in | TSV report |
| `ready` | out | all routing tables settled after reset (injection waits for it) |
| `ev_deflect`, `ev_set_tv`, `ev_clr_tv`, `ev_detour` | out | events this cycle, network-wide: deflections, intermediate nodes chosen, intermediate nodes reached, packets routed on a detour around a broken link |

The parameters are `X`, `Y`, `Z` (default 7 × 7 × 7, the larger of the two
evaluated meshes), `HW` (hop-count width of the table, default 5),
`DYNAMIC` and `LOW_HC_FIRST`. The coordinate fields are 6 bits wide, so X, Y
and Z can each be up to 64. Choose `HW` so that 2^HW − 2 exceeds the longest
in-layer route.

## Departures from the published description, and choices it leaves open

* **Routing table is reconfigured on faults.** The published overview lists
  the table as static. Its text, though, speaks of Equation (1)
  "reconfiguring" the table and of using it to bypass faulty links. The
  static reading caused packets to cycle for ever (see above), so the table
  here excludes broken links.
* **Priority.** The published text says HC counts hops travelled and that a
  packet with *fewer* hops has priority. That is followed here
  (`LOW_HC_FIRST = 1`). An oldest-first order (`LOW_HC_FIRST = 0`) is the
  usual guarantee against livelock. It is provided but not the default. In
  all simulations every packet was delivered with either setting.
* **Traffic load.** ERFAN-Dy balances on "the number of packets handled by
  neighboring switches". Here that is the neighbour's packet count in the
  previous cycle, exported on a 3-bit wire. The published text also mentions
  credit-based flow control. With no input buffers there are no credits to
  count, so no credit mechanism is built.
* **Algorithm details.** These are all choices of this design:
  * ERFAN-Sp breaks ties by fixed port order;
  * the intermediate-node search breaks ties by lowest node index;
  * if no node of the layer has a healthy TSV, the packet heads for its
    destination column and retries;
  * the local packet has the lowest priority;
  * there is one ejection per cycle.
* **Addresses are absolute** (z, y, x). Only HC, TV and T-Add change on the
  way.
* **Not built.** Not part of this RTL:
  * the fault-detection mechanism (reports come in on ports);
  * the processing elements;
  * the baseline routers the scheme is compared against.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

| testbench | what it checks |
|---|---|
| `tb_routing_table` | 3 × 3 layer of tables. Every entry is checked against 1 + Manhattan distance with border codes, including the two published example rows, and `ready` timing. Then two links are broken and all tables are compared with a shortest-path search |
| `tb_fault_table` | every node and direction set and healed, mirroring of bidirectional links, out-of-range reports ignored, 200 random reports against a model |
| `tb_inter_node_select` | 3000 random layers against a linear-scan reference |
| `tb_route_compute` | 20 000 random packets against a reference of the rules, for both variants, plus the three-layer worked example (broken Up TSV at A, bypass through C) |
| `tb_port_allocator` | 20 000 random contention cases against a sorted greedy reference, for both priority orders. Also checks that no network packet is dropped, no port is given twice and no unusable port is used |
| `tb_erfan_router` | one switch, with directed cases: vertical first, ejection, HC priority and deflection, TSV bypass, least-loaded tie-break, full switch refusing injection, load output, and injection held until the table is ready |
| `tb_erfan_noc` | 3 × 3 × 3 ERFAN-Dy, 1080 packets at injection rate 0.6 with 4 broken horizontal links and 3 broken TSVs. Every packet is delivered once, to the right node, with its payload. Latency = HC + 1 exactly, and HC ≥ distance. No packet uses a broken link. Deflection, TSV bypass, arrival at an intermediate node, detour and refused injection each happen (counted) |
| `tb_erfan_noc_uniform` | 4 × 4 × 4 ERFAN-Sp, uniform traffic at rate 0.1 with about 10 % of links broken (10 of 96 horizontal, 5 of 48 TSVs). Same checks; reports the mean latency (about 5.4 cycles) |

The largest network simulated is 4 × 4 × 4. The default 7 × 7 × 7 network
passes lint and elaboration. It was not simulated: the Verilator C++ model of
343 switches is too large to build in reasonable time.

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Irtl rtl/erfan_pkg.sv rtl/*.sv \
        tb/noc_traffic.sv tb/tb_erfan_noc.sv --top-module tb_erfan_noc -j 4
    ./obj_dir/Vtb_erfan_noc

For the unit testbenches, drop `tb/noc_traffic.sv` and use the matching
`tb/tb_<module>.sv` and `--top-module`. To change the network size or variant,
set the `noc_traffic` parameters in the network testbenches: `X`, `Y`, `Z`,
`DYNAMIC`, `NPKT` (packets per node), `RATE` (injection percentage), `NHF`
and `NVF` (broken horizontal links and TSVs).
