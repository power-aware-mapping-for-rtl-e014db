# Reconfigurable mesh network-on-chip with per-application topologies

A system-on-chip often runs several applications, and their communication
patterns differ. A network topology tuned for one application fits the
others badly. This design keeps the regular, tiled layout of a 2-D mesh
but does not wire routers to each other directly. Programmable **switch
boxes** sit between them. When an application starts, the switch boxes are
set to build the topology chosen for that application, and the routers'
routing tables are loaded with that application's paths. Heavy
communications can then run over wire-only links that pass over
intermediate routers.

Power is the reason for this. In the reference 70 nm technology, a 0.5 mm
wire segment with its pass gates and a one-flit buffer uses about a quarter
to a fifth of the power of a router at the same load. The mapping method
that produces the configurations therefore counts **1 per wire segment and
5 per router** when it chooses a path.

The RTL is SystemVerilog (IEEE 1800-2017). The defaults are 4 x 4 routers,
32-bit flits and three stored applications. The reference operating point
is 250 MHz in a 70 nm process. The RTL carries no timing constraints and
has not been taken through a technology flow.

## The grid

The routers and switch boxes share one grid of (2·ROWS−1) × (2·COLS−1)
positions. Routers (`R`) sit at even (row, column) positions. Switch boxes
(`o`) fill every other position. Every pair of neighbouring positions is
joined by one wire segment:

```
   col: 0   1   2   3   4   5   6
row 0   R - o - R - o - R - o - R        R  router (tile k = 4*(row/2) + col/2)
        |   |   |   |   |   |   |        o  switch box
row 1   o - o - o - o - o - o - o        -, |  one wire segment (both directions)
        |   |   |   |   |   |   |
row 2   R - o - R - o - R - o - R
       ...
```

For 4 × 4 routers this gives 33 switch boxes and 84 segments, which is 42
two-segment links. A plain mesh of the same size has 24 links. Each router
port faces a switch box, and each switch-box port faces a router or another
switch box. Ports on the outer edge of the grid have no segment.

A **link** between two routers is a chain of segments joined inside switch
boxes. It starts at one router port and ends at another router port. Some
examples:

* **Mesh.** Every switch between two routers in a row joins E–W. Every
  switch between two routers in a column joins N–S. The switches in odd
  rows and odd columns stay open.
* **Express link.** Router 0 goes S into switch (1,0), which joins N–E.
  The link runs along row 1 through E–W joins, and switch (1,6) turns it
  N–W into router 3. Routers 1 and 2 are passed over. The switches at
  (1,2) and (1,4) can join N–S and E–W at the same time (a crossing), so
  the vertical mesh links in columns 1 and 2 stay usable.
* **Trees and other shapes** come from leaving links open. The end-to-end
  testbench uses a comb-shaped tree: every router row, joined through
  column 0 only.

Switch boxes are numbered row by row over the grid, skipping router
positions (`noc_pkg::switch_index`). Routers are numbered row by row
(`noc_pkg::router_index`).

## Switch box (`switch_box`)

A switch box has four ports, N, E, S and W. It has six two-port
connections, one for each pair of ports. Its 6-bit configuration word holds
one bit per pair:

| bit | 0   | 1   | 2   | 3   | 4   | 5   |
|-----|-----|-----|-----|-----|-----|-----|
| joins | N–E | N–S | N–W | E–S | E–W | S–W |

In silicon these connections are transmission gates on a bidirectional
wire. In this RTL, each segment is two one-way channels. Joining ports a
and b sends a's incoming flits out of b and b's incoming flits out of a.

Each port may be joined to at most one other port. A word that joins a port
to two others raises `cfg_err`. Under such a word, a port passes flits only
if it and its lowest-numbered partner choose each other. The tools that
produce configurations must never emit such a word. Any set of disjoint
pairs is legal, including the N–S + E–W crossing.

Every incoming segment ends in a **one-flit buffer** (`flit_buf1`). The
buffer cuts long chained links into one-segment pipeline stages and serves
as a repeater. A flit therefore spends exactly one cycle in each switch box
it crosses.

### Flow control and throughput

All channels use a valid/ready handshake: a flit moves when both signals
are high at a rising clock edge. The one-flit buffer gives `ready` only
when it is empty. Ready is taken from a register, so no combinational path
runs backwards through a chain of switch boxes. A ring of joined switch
boxes therefore cannot form a combinational loop. The cost is that one
wire link carries at most one flit every two cycles. At 32 bits and
250 MHz, that is 4 Gbit/s per link. This is an implementation choice, and
it is the main place to change if full link rate is needed: a two-entry
buffer would restore one flit per cycle without a combinational ready path.

## Router (`noc_router`)

The router has five ports: N, E, S, W and the local core (L = 4). Each
input has a `FIFO_DEPTH`-flit queue (`flit_fifo`). Switching is wormhole:
a head flit reserves an output, the body flits follow, and the tail flit
releases the output. Each output picks among waiting head flits with a
round-robin arbiter (`rr_arbiter`). A flit written into an input queue can
leave in the next cycle, and each output passes one flit per cycle.

**Routing table.** The table is indexed by *flow*, which is
source × N_NODES + destination. It is not indexed by destination alone.
Once switch boxes build arbitrary links, two flows to the same destination
may need to leave one router by different ports, because the mapping tool
picks a path for every communication separately. Each entry is a 3-bit port
number. The destination router's entry is L. The table has no reset; it is
loaded by the reconfiguration controller.

## Flit format

`noc_pkg::flit_t` is 34 bits wide:

| field | bits | meaning |
|-------|------|---------|
| `head` | 33 | first flit of a packet |
| `tail` | 32 | last flit (head and tail both set: a one-flit packet) |
| `data` | 31:0 | payload; in a head flit, [15:8] = source tile and [7:0] = destination tile |

The bits of a head flit above bit 15 are free for the application.

## Loading an application (`cfg_store`, `reconfig_ctrl`)

Configurations are computed offline, per application. They are the switch
words and the paths that the routing tables hold. A host writes them into
`cfg_store` through the `cfg_sw_*` and `cfg_rt_*` ports of the top. The
memory holds, for each of `NUM_APPS` applications:

* one 6-bit word per switch box;
* one **routing row** per flow, holding the 3-bit port of every router for
  that flow. Router k's port is at bits [3k+2:3k].

Pulsing `reconf_start` with `reconf_app` runs the following sequence:

1. **Hold.** `reconf_busy` rises. Cores may not start new packets: at the
   top, `core_in_ready` is low for head flits. Packets already under way
   run to their end, because stopping one halfway through would leave an
   output reserved forever.
2. **Drain.** The controller waits until `net_busy` is low. That means no
   flit remains in any queue or buffer, and no output is still reserved.
   No configuration is ever changed under a flit in flight.
3. **Load.** For N_SW cycles, the controller writes one switch box per
   cycle. For N_NODES² cycles, it writes one routing row per cycle, and
   every router takes its own field of the row. At the defaults this is
   33 + 256 = 289 cycles.
4. `active_app` changes, `reconf_done` pulses for one cycle, and new
   packets are accepted again.

A start request that arrives while a reconfiguration runs is ignored.
After reset every switch box is open and the routing tables are undefined,
so load an application before sending traffic.

## Top level (`reconfig_noc`)

| port | width (defaults) | use |
|------|------------------|-----|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset |
| `cfg_sw_we/app/idx/data` | 1/2/6/6 | host write of one switch word of one application |
| `cfg_rt_we/app/flow/row` | 1/2/8/48 | host write of one routing row of one application |
| `reconf_start`, `reconf_app` | 1, 2 | load an application |
| `reconf_busy`, `reconf_done`, `active_app` | 1, 1, 2 | loading status |
| `core_in_valid/flit/ready` | 16, 16×flit, 16 | cores to routers (local port) |
| `core_out_valid/flit/ready` | 16, 16×flit, 16 | routers to cores |
| `net_busy` | 1 | some flit is in the network |
| `sw_cfg_err` | 1 | some switch box holds an illegal word |

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 4, 4 | routers per column and per row |
| `NUM_APPS` | 3 | stored configurations |
| `FIFO_DEPTH` | 4 | router input queue depth, in flits (own choice) |

The flit width is `noc_pkg::FLIT_W` = 32.

**Latency.** An idle path costs one cycle per wire segment plus one cycle
in the source router. A flit taken from a core at clock edge t reaches the
destination core's output after t + segments + 1 edges. A mesh hop between
neighbouring routers is 2 segments. The express link from router 0 to
router 3 is 8 segments. It is slower in cycles than the 6-segment mesh path
through routers 1 and 2, but it is cheaper in power: 8 segments against
6 segments + 2 routers. Lower power is the goal of the design.

## Testbenches

Each testbench checks itself, ends with a line
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_flit_buf1` | order, content, `ready` = empty, one-cycle latency, random back-pressure |
| `tb_switch_box` | all 64 configuration words: `cfg_err` for illegal ones; for legal ones each joined port delivers to its partner in one cycle and nowhere else; a streamed crossing under back-pressure |
| `tb_noc_router` | random routing table, 1500 packets of 1–4 flits from all five inputs: packets whole (wormhole), in order, on the table's port; one-cycle latency |
| `tb_cfg_store` | all words of three applications written and read back; writes to one application leave the others alone |
| `tb_reconfig_ctrl` | hold, no loading while busy, write order and count (N_SW + N_NODES² cycles), `done` pulse, ignored second start |
| `tb_reconfig_noc` | the whole network at default size, described below |
| `tb_opd_workload` | the object-plane-decoder workload, described below |
| `tb_random_workload` | the two 25-core random graphs on a 5 × 5 network, described below |

**`tb_reconfig_noc`** plays both the host and the offline tool. It builds
three topologies:

1. a mesh;
2. the mesh plus two express links in switch rows 1 and 5;
3. a comb-shaped tree, made of all router rows joined through column 0.

It finds routes by a shortest-path search over the links it traces through
the switch words, with cost 1 per segment and 5 per router. It loads the
three configurations and sends about 4800 random packets while it switches
applications six times during the traffic. It checks delivery, order and
integrity, and the segments + 1 latency on each topology. It also counts
each mechanism: reconfigurations, drain cycles, held-back head flits,
back-pressure at cores and at outputs, packets on router-bypassing links,
and a crossing switch carrying two paths at once. It fails if any of them
never happened.

**`tb_opd_workload`** runs the object-plane-decoder workload: 16 cores on
the published placement, and three task graphs. These are the base graph
(21 communications, volumes in Mbit/s) and the two graphs derived from it
(23 and 20 communications), with weights 0.5, 0.3 and 0.2. For each graph
the testbench builds a topology greedily, the way the mapping method does
it. Communications are taken in falling order of volume, and each gets its
cheapest path under the 1/5 cost model. The path may close free switch
pairs or follow pairs that earlier paths already closed. The three
topologies are stored as configurations 0–2, and each graph runs on its
own, so the network switches between them. The host then overwrites
configuration 0 with a plain mesh, and the graphs run again. The same
two-flit packets, in numbers proportional to volume, run on both. From the
design's own handshakes, the testbench counts how many flits left a router
and how many crossed a segment. It checks, for each graph and weighted
over all three, that the built topology needs fewer router traversals and
has a lower weighted cost. The cost ratios are about 0.89, 0.87 and 0.93,
and 0.89 weighted. The evolutionary
refinement step of the mapping method is not modelled.

**`tb_random_workload`** does the same on a 5 × 5 network for two random
graphs of 25 cores, one with 30 communications and one with 20. The
testbench draws the pairs and volumes itself. It draws a graph again if
the greedy method cannot find a path for every communication. Core k sits
on router k. Configuration 0 holds mesh routes for both graphs, and
configurations 1 and 2 hold a topology built for each graph. On a dense
graph the greedy topology can cost more than the mesh, because the long
bypass paths can outweigh the router hops saved. In that case the
testbench keeps the mesh for that graph, as the mapping method would, and
checks that the costs match. With the default seed both built topologies
win: cost ratios of about 0.90 and 0.84. Over 61 seeds, the mesh was kept
for graph 1 four times.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/*.sv \
    tb/tb_reconfig_noc.sv --top-module tb_reconfig_noc -o sim
./obj_dir/sim
```

Use the same command with another testbench file and top module for the
others. Every testbench runs in seconds.

## Sizes of the evaluated workloads

At the defaults, the network holds 16 cores and three applications. That
fits the object plane decoder and the MP3 decoder, which need 4 × 4, and
the MPEG-4 decoder and the multi-window display, which need 4 × 3. The two
25-node random graphs need `ROWS = COLS = 5`. That size gives 72 switch
boxes and 625 flows per routing table, and `tb_random_workload` runs it.

## Departures and open points

* **Pass-gate switches become multiplexers.** The circuit-level switch
  could join three or more links on one wire. With one-way channels, a port
  here joins only one other port, and illegal words are flagged.
* **Router internals are this design's own.** These are the queue depth,
  wormhole switching, round-robin arbitration, the head-flit layout and the
  flow-indexed table. The original description only calls for a typical
  mesh router whose table is set from the chosen paths.
* **Loading is this design's own.** The hold-drain-load sequence, the
  memory organisation and the host write ports are assumptions. The
  original description only says a stored configuration is loaded when its
  application starts.
* **Half-rate links.** Wire links run at half rate because the one-flit
  buffer takes ready from a register (see *Flow control*).
* **Deadlock is the offline tool's job.** Routes on arbitrary topologies
  can form cyclic channel dependencies. The hardware does not prevent
  wormhole deadlock. The offline tool must choose routes that avoid it, for
  example by checking the channel dependency graph.
* **Not in RTL.** The offline mapping flow (core placement, per-edge
  branch-and-bound path search, evolutionary refinement) is software. The
  transmission gates, the 0.5 mm wires and the processing cores are not
  represented beyond their logical function or ports.
