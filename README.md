# PIRATE network-on-chip in SystemVerilog

PIRATE is a configurable network-on-chip (NoC) for systems-on-chip with a
handful to a few tens of masters and slaves. It is built from one
parameterised switch: a crossbar between a set of input FIFO queues and a set
of output FIFO queues, steered by a controller that holds a static routing
table and the arbitration logic. Packets move by wormhole switching and each
switch costs one clock cycle per hop. Switches are wired into a standard
topology: Octagon, Cube, Double-Ring, Mesh, Binary-Tree or Ring. Any link can
carry a low-power encoding. The network was proposed as the hardware half of
a power/performance exploration framework: the same configuration produces
RTL for power characterisation and a cycle-level model for fast simulation.

This repository is the RTL: the switch, its parts, the network that ties 8
switches together in any of the six topologies, and a bus-invert link code.
It follows the architecture of the original PIRATE publication (Palermo and
Silvano). Where that publication leaves a detail open, this design makes its
own choice; each choice is listed under
[What is original and what is chosen here](#what-is-original-and-what-is-chosen-here).

## Structure

```
pirate_noc                      NUM_SWITCHES switches + links (top)
 ├─ pirate_switch  x NUM_SWITCHES
 │   ├─ pirate_fifo            input queue per port   (registered)
 │   ├─ pirate_crossbar        N x N, combinational
 │   ├─ pirate_fifo            output queue per port  (fall-through)
 │   └─ pirate_switch_ctrl     routing table + per-output arbiters + wormhole locks
 │       └─ pirate_rr_arbiter  x N
 ├─ pirate_bi_encoder          per used link, sending side   (LINK_BUS_INVERT)
 └─ pirate_bi_decoder          per used link, receiving side
pirate_pkg                      flit layout, topologies, routing-table functions
```

A switch has `N_PORTS = LOCAL_PORTS + 3` ports. Ports `0 .. LOCAL_PORTS-1`
attach masters/slaves ("nodes"). Ports `LOCAL_PORTS .. LOCAL_PORTS+2` are
link ports 0, 1 and 2 towards other switches. With the default
`LOCAL_PORTS = 1` and `NUM_SWITCHES = 8`, the network has 8 nodes and
4-port switches.

## Flits and packets

Every port and link is a valid/ready stream of `FLIT_W = DATA_W + 2` bit flits:

```
 FLIT_W-1   FLIT_W-2   DATA_W-1 ........................ 0
 [ head ]   [ tail ]   [ payload                           ]
                        head flit: payload[DEST_W-1:0] = destination node
```

A packet is a head flit, any number of body flits, and a tail flit. A
one-flit packet has both `head` and `tail` set. Only the head flit's
destination field is read by the network; the rest of the payload belongs to
the user. Node `m` sits on local port `m % LOCAL_PORTS` of switch
`m / LOCAL_PORTS`. `DEST_W` is `clog2(NUM_SWITCHES * LOCAL_PORTS)`.

A transfer happens on a clock edge where `valid && ready`. Every `ready`
in the network is a queue's "not full" flag, a register output. So no ready
signal depends combinationally on another, and chains of switches have no
combinational ready path.

## One cycle per hop

The switch costs exactly one cycle per hop when the path is free. This timing
decides how the queues are built.

* The **input queue** is a plain registered FIFO. A flit written at edge *t*
  is at the queue head during the cycle after *t*.
* In that cycle the **controller** looks the flit up, arbitrates, and drives
  the **crossbar**. All of this is combinational from the queue heads and the
  registered lock state.
* The **output queue** is a *fall-through* FIFO. When it is empty, the flit
  arriving from the crossbar goes straight to the output port in the same
  cycle. The next switch's input queue captures it at edge *t+1*. The output
  queue stores a flit only when the next switch cannot take it (its input
  queue is full), and it then drains in order.

So a flit injected at edge *t0* into a free network is taken by its
destination node at edge *t0 + h + 1*, where *h* is the number of links on
its route. The `+1` is the pass through the destination switch itself. The
testbenches check this exactly for every source/destination pair.

The price is one combinational path per hop: input-queue head → routing
table → arbiter → crossbar → output-queue bypass → optional bus-invert
encoder/decoder → next switch's input-queue write port.

## Wormhole routing and arbitration (`pirate_switch_ctrl`)

For each input port, the controller works out the output port its head flit
needs:

* For a head flit, this is the routing-table entry for the flit's
  destination node.
* For a body or tail flit, it is the output the packet already holds.

Each output port has a round-robin arbiter (`pirate_rr_arbiter`). Only head
flits from inputs that are not in the middle of a packet compete in it. The
arbiter's priority pointer moves past the winner only when the winner's flit
actually moves. A moment of back-pressure therefore does not cost the winner
its turn.

When a head flit of a packet longer than one flit moves, the output is
**locked** to its input. From then on:

* the output serves only that input;
* the input sends only to that output;
* no routing lookup or arbitration happens for the packet's remaining flits.

The tail flit releases both. A locked output never carries flits of two
packets interleaved. A head flit that wants a locked output waits at the head
of its input queue, and so blocks the packets behind it. That is the usual
wormhole behaviour.

A flit moves from input *i* to output *o* in a cycle when both hold: *o*
selects *i*, and output queue *o* has room. The input queue is popped in the
same cycle. An assertion checks that an input outside a packet only ever
presents a head flit.

## Topologies and routing tables (`pirate_pkg`)

`TOPOLOGY` selects how output link *k* of switch *s* is wired. In this
table, *n* = `NUM_SWITCHES`:

| Topology           | link 0         | link 1         | link 2                    | notes                                   |
|--------------------|----------------|----------------|---------------------------|-----------------------------------------|
| `TOPO_OCTAGON` (default) | s+1      | s−1            | s+n/2 (across)            | diameter 2 for n = 8                    |
| `TOPO_CUBE`        | s xor 1        | s xor 2        | s xor 4                   | n a power of two, up to 8               |
| `TOPO_DOUBLE_RING` | s+1            | s−1            | –                         | two counter-rotating rings              |
| `TOPO_MESH`        | east           | west           | north/south               | 2 rows of n/2 columns                   |
| `TOPO_BINARY_TREE` | parent (s−1)/2 | child 2s+1     | child 2s+2                | switch 0 is the root                    |
| `TOPO_RING`        | s+1            | –              | –                         | unidirectional                          |

Indices wrap modulo *n*. Links are bidirectional except in the Ring.
`pirate_noc` finds, at elaboration, which input link each output link feeds.
Unused links are tied off.

Each switch's static routing table is a parameter, `ROUTE_TABLE`. It has one
8-bit entry per destination node (bits `8d+7 .. 8d` for node *d*), giving
the switch port the packet leaves by. At the network level, all tables are
passed together as `ROUTE_TABLES`, with entry *s* for switch *s*. By default,
`pirate_pkg::route_table()` fills each table with shortest paths:
Floyd–Warshall distances at elaboration, with the lowest-numbered link winning
ties. Given the link numbering above, the tie rule yields dimension-order
routing on the Cube and X-then-Y routing on the Mesh. Routes on the tree are
unique. To balance traffic, a designer can pass other tables through
`ROUTE_TABLES`. `tb_pirate_noc_configs` does this for a Double-Ring, with
tables that never use the two wrap-around links.

**Deadlock.** The network has no virtual channels and no deadlock-avoidance
scheme. The Cube (dimension order), Mesh (X-then-Y) and Binary-Tree routes
are free of cyclic channel dependencies. The Octagon, Double-Ring and Ring
routes are not. In simulation with uniform random traffic:

* the Ring deadlocked at 0.2–0.3 packets/cycle/node;
* the Double-Ring deadlocked at 0.5 packets/cycle/node;
* the Octagon ran to 0.7 without deadlock, which is not a proof that it
  cannot deadlock.

If you need the rings at high load, add virtual channels or a dateline, or
pass routing tables that break the cycles. The Double-Ring routed as a line
(the example in `tb_pirate_noc_configs`) ran to 0.7 without deadlock. It
saturates near 0.5, because its paths are longer.

## Link encoding (`pirate_bi_encoder`, `pirate_bi_decoder`)

With `LINK_BUS_INVERT = 1` (the default), every switch-to-switch link carries
its flit on `FLIT_W` wires plus one invert wire, and `valid`/`ready` are sent
as they are.

* **Encoder:** compares the outgoing flit with the value the wires hold now.
  If more than half of them would toggle, it sends the complement and raises
  the invert wire. While no flit is sent, the wires keep their value. The
  code depends only on the flit and the current wire value. So while a flit
  waits for `ready`, re-encoding gives the same wires: the code is stable.
* **Decoder:** a row of XORs.

Neither adds a cycle. Set `LINK_BUS_INVERT = 0` for plain links.

## Parameters of `pirate_noc`

| Parameter         | Default        | Meaning                                          |
|-------------------|----------------|--------------------------------------------------|
| `DATA_W`          | 32             | payload bits per flit (flit = `DATA_W + 2`)      |
| `IN_DEPTH`        | 4              | input queue length, flits                        |
| `OUT_DEPTH`       | 4              | output queue length, flits                       |
| `LOCAL_PORTS`     | 1              | nodes per switch                                 |
| `NUM_SWITCHES`    | 8              | switches (up to 32; Octagon and Cube need 8)    |
| `TOPOLOGY`        | `TOPO_OCTAGON` | see table above                                  |
| `LINK_BUS_INVERT` | 1              | bus-invert code on switch-to-switch links        |
| `ROUTE_TABLES`    | shortest paths | routing table per switch (`pirate_pkg::route_tables_t`) |

Ports: `clk` and an active-low asynchronous reset `rst_n`. Per node `m`:
`inj_valid[m]`, `inj_ready[m]`, `inj_flit[m]` (into the network) and
`ej_valid[m]`, `ej_ready[m]`, `ej_flit[m]` (out of it). `sw_locked[s]` shows
which outputs of switch `s` are held by a packet, for activity monitoring.
All state resets to empty queues, unlocked outputs and arbiter pointers at 0.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench                  | Checks |
|----------------------------|--------|
| `tb_pirate_fifo`           | Both queue modes against a queue model under random traffic: ready, valid, count, data, and same-cycle bypass. |
| `tb_pirate_rr_arbiter`     | Grants against a reference pointer for 4- and 5-way arbiters; under full load, each line is granted exactly once in every N grants. |
| `tb_pirate_crossbar`       | Random selects and enables on 4×4 and 5×5 crossbars; idle outputs must be zero. |
| `tb_pirate_bi_codec`       | Round trip; the invert decision against an independent toggle count; at most WIDTH/2 toggles per word; the bus holds while idle. |
| `tb_pirate_switch_ctrl`    | Octagon switch 0 against a hand-written routing table. Also: pops match enables, no packet interleaving, no idle output while a head flit waits for it, and all packets delivered. |
| `tb_pirate_switch`         | Zero-load latency of exactly one cycle for every input/destination pair; then 800 random packets with output back-pressure, checking route, payload, order and completeness. |
| `tb_pirate_noc`            | The default network (8-node Octagon, bus-invert links). See below. |
| `tb_pirate_noc_topologies` | All six topologies with 8 nodes and single-flit packets. See below. |
| `tb_pirate_noc_configs`    | A 16-node Octagon with two nodes per switch (1–4-flit packets at 0.05 and 0.15), and a Double-Ring with designer routing tables at 0.1–0.7. |

`tb_pirate_noc` runs every node pair at zero load and checks a latency of
*hops + 1* cycles, with *hops* found by a breadth-first search in the
testbench. It then runs uniform random traffic of 1–4-flit packets at 0.10,
0.22 and 0.34 packets/cycle/node, with random ejection back-pressure. It
checks the destination, payload, order and completeness of every packet.
Finally, it requires each of these mechanisms to have acted at least once:

* multi-hop routes;
* injection back-pressure;
* ejection stalls;
* output-queue buffering;
* arbitration conflicts;
* head flits waiting on a locked output;
* inverted link words.

`tb_pirate_noc_topologies` runs all six topologies at 8 nodes with
single-flit packets. The injection rates are 0.1/0.3/0.5/0.7, except the
Double-Ring (0.1/0.3) and the Ring (0.1), for the deadlock reason above.
Average packet latency in cycles, including source queueing, from that run:

| rate | Octagon | Cube | Mesh 2×4 | Double-Ring | Binary-Tree | Ring |
|------|---------|------|----------|-------------|-------------|------|
| 0.1  | 2.6     | 2.8  | 3.1      | 3.4         | 3.8         | 5.5  |
| 0.3  | 2.9     | 3.0  | 3.3      | 4.0         | 5.6         | –    |
| 0.5  | 3.2     | 3.3  | 4.1      | deadlock    | 165 (saturated) | – |
| 0.7  | 4.1     | 4.3  | 19.4     | –           | 381 (saturated) | – |

Octagon and Cube are best, and the Binary-Tree saturates first. The absolute
numbers depend on the queue depths and packet length chosen here.

Running a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          --top-module tb_pirate_noc rtl/pirate_pkg.sv tb/tb_pirate_noc.sv
./obj_dir/Vtb_pirate_noc
```

Swap in any other testbench name. `pirate_pkg.sv` must come first on the
command line; the other files are found through `-y`. `tb_pirate_noc` uses
the network at its default parameters and runs in well under a minute.

## What is original and what is chosen here

Taken from the original architecture:

* an N×N crossbar between N input and N output FIFO queues;
* configurable queue lengths and interconnection width;
* a Switch Controller with a static routing table and arbitration logic;
* wormhole switching and one cycle per hop;
* routing tables a designer can set per switch;
* the six standard topologies, and 8 nodes for the topology comparison;
* several masters/slaves per switch;
* the option of a standard encoding on the network connections.

Chosen in this design, because the original does not specify them:

* the flit format and the valid/ready handshake;
* the default widths and depths (32-bit payload, 4-flit queues);
* round-robin arbitration;
* the fall-through output queue that meets the one-cycle hop;
* the exact shape of each topology and its link numbering (e.g. the 2×4
  mesh, the tree rooted at switch 0);
* shortest-path default routing tables;
* bus-invert as the link code, on by default;
* the reset behaviour.

Not included:

* **The power models and the characterisation flow.** The original fits a
  per-module power model *P = B0 + B1·TR* (TR is the traffic factor) from
  gate-level power runs. These are software, not hardware.
* **The CryptoSoC case study's IP blocks.** These are the RC4, RSA and SHA
  units, the key, IV and hash-state caches, and the packet in/out buffers to
  the PCI bus. They would attach to the network's local ports. Its nine
  modules need `LOCAL_PORTS = 2` on 8 switches. The original gives neither
  their design nor their traffic.
* **The case study's ad hoc topology.** Its links are not published. Any
  custom routing table can still be passed to the switches, but a new link
  pattern needs a new case in `pirate_pkg::neighbour()`.
