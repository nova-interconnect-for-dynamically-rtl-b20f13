# NOVA: a clustered, self-routing network-on-chip for reconfigurable tiles

NOVA is an on-chip network for FPGA systems whose compute resources are
fixed-size, partially reconfigurable *tiles*. Its idea is an **augmented
star**: eight tiles sit around a central switch, as in a star, but each tile
is also linked to the two tiles beside it. A tile sends to a nearby tile
directly, or through one neighbour, and uses the central switch only for
everything else. That spreads traffic over two kinds of path, so the switch is
not the only bottleneck, and the neighbour links give a second way around a
busy path. Larger systems repeat the pattern one level up: eight such clusters
sit around a cluster switch. Both switches are the same self-routing Banyan
switch, so no routing tables or control state machines are needed anywhere.

This repository holds synthesizable SystemVerilog for the whole network:

* the 64-tile default network (`nova_top`), which scales down to 32 or 8 tiles;
* the cluster;
* the tile-side router;
* the tile switch;
* the 8x8 Banyan switch and its 2x2 queued elements.

Self-checking testbenches for every module are in `tb/`.

## Packets

Every packet is one 32-bit word, sized so that a whole packet crosses a 32-bit
link in one clock. There is no multi-flit framing.

| bits  | field    | meaning                                                  |
|-------|----------|----------------------------------------------------------|
| 31:29 | cluster  | destination cluster, 0..7                                |
| 28:26 | tile     | destination tile inside that cluster, 0..7               |
| 25:24 | aux      | auxiliary bits, carried unchanged by the network         |
| 23:0  | payload  | user data                                                |

The 8-bit header / 24-bit payload split is NOVA's. The placement of the fields
inside the header is this implementation's choice. It is defined once, as
`nova_pkt_t` in `rtl/nova_pkg.sv`. The network never looks at the payload.

## The cluster

```
        +--------+--------+--------+
        | tile 0 | tile 3 | tile 5 |
        +--------+--------+--------+        ring, clockwise:
        | tile 1 |  tile  | tile 6 |        0 -> 3 -> 5 -> 6 -> 7 -> 4 -> 2 -> 1 -> 0
        |        | switch |        |
        +--------+--------+--------+        every tile also has a link to the
        | tile 2 | tile 4 | tile 7 |        tile switch
        +--------+--------+--------+
```

The tile numbering is NOVA's layout. Adjacent squares around the switch form a
ring. Every tile has exactly three link ports:

* CW: a link to its clockwise neighbour;
* CCW: a link to its counter-clockwise neighbour;
* a link to the tile switch.

Each link is a pair of one-way channels, one per direction. Each channel ends
in a FIFO at the receiver. The tile's own logic adds a fourth port, local
inject/eject, on the same router (`nova_tile_router`).

### Routing at a tile (the heart of the design)

Each router knows its own cluster and tile number and the fixed ring order. So
it knows its one-hop neighbours and its two-hop neighbours. For the packet at
the head of each input queue, it picks an output:

| destination                                              | output                          |
|----------------------------------------------------------|---------------------------------|
| this tile                                                | local eject                     |
| another cluster                                          | tile switch                     |
| the CW (CCW) neighbour                                   | CW (CCW) ring link              |
| the CW (CCW) two-hop neighbour, packet injected here     | CW (CCW) ring link              |
| any other tile of the cluster                            | tile switch                     |

A two-hop packet reaches the middle tile, and there it is a one-hop packet, so
the middle tile passes it on. A packet that arrived from a neighbour is never
sent two hops further. For tile 6, for example:

* tiles 7 and 4 are reached clockwise;
* tiles 5 and 3 are reached counter-clockwise;
* tiles 0, 1 and 2 are reached through the switch.

**Diverting around congestion.** A ring link that refused a transfer in the
previous clock is *busy*: the receiving neighbour's queue was full. While a link
is busy, packets that would take it go to the tile switch instead. Each such
diversion pulses the router's `fallback` output. Diversion has two effects:

* it spreads load over both path kinds;
* it makes the ring deadlock-free. Ring links can depend on each other in a
  cycle, but the switch path always ends at an eject port and never feeds a
  ring link. A packet blocked on the ring can therefore always leave through
  the switch.

The busy flag is registered on purpose. A head's route then never depends
combinationally on a ready signal, so there is no combinational path from
ready back to valid.

The exact rule above is this implementation's. NOVA specifies the behaviour:

* direct delivery to neighbours;
* forwarding through a neighbour that knows the final tile;
* the switch for the rest;
* traffic spread over paths to avoid congestion.

It does not give an algorithm.

Each router output has a round-robin arbiter over the four inputs. A head
leaves its queue in the clock when its output is granted and ready. A router
output may withdraw `valid` without a transfer when its packet is diverted.
Every receiver is a FIFO, which accepts or refuses per clock, so this is
harmless. It does mean the links are not AXI-style stable-valid channels.

### Tile switch and uplink

The tile switch (`nova_tile_switch`) is the 8x8 Banyan of the next section. It
steers on the destination *tile* field: port t on both sides belongs to tile t.
All eight Banyan ports are used by tiles, yet the cluster also needs a ninth
connection, to the cluster switch. It is added around the Banyan without an
extra clock:

* **ingress split**: a packet from tile t for another cluster bypasses the
  Banyan. An 8-way round-robin arbiter chooses which tile's packet goes to the
  uplink;
* **egress merge**: a packet arriving from the cluster switch competes with
  Banyan output t, through a 2-way round-robin arbiter, for the port of the
  tile it is addressed to.

This split and merge is this implementation's answer to a connection that NOVA
draws but does not detail.

## The Banyan switch

`nova_banyan` is a self-routing multistage switch. It has three columns of four
2x2 elements (`nova_sw2x2`), with a packet queue in front of every element
input. Column s looks at one bit of the destination, most significant bit
first, and sends the packet to its element's upper (0) or lower (1) output.
Nothing else is consulted.

The column-to-column wiring follows NOVA's switch drawing. With 0-based wire
numbers b2b1b0:

* column 1 -> column 2: wire b2b1b0 goes to wire b0b2b1 (rotate all three bits
  right);
* column 2 -> column 3: wire b2b1b0 goes to wire b2b0b1 (rotate the low two
  bits right).

With MSB-first steering, this wiring delivers every packet to the output whose
number equals its destination. The testbench checks this for all 64
input/output pairs. The module is written for 2**STAGES ports; between column s
and column s+1 it rotates the low STAGES-s bits.

Properties worth knowing:

* **Latency**: one clock per column. A packet accepted at an input leaves the
  output three clocks later when nothing blocks it.
* **Throughput**: every port can move one packet per clock.
* **Blocking**: the Banyan blocks internally. Two packets that need the same
  element output in the same clock are serialised: one waits in its queue and
  the two queues take turns (round-robin). Which permutations pass at full rate
  depends on the wiring. Here, the bit-reversal permutation (input i to output
  bitrev(i)) never conflicts, while the identity permutation collides in the
  first column (inputs 0 and 1 share an element and both want the upper half).
* **Order**: packets from one input to one output stay in order. Across the
  whole network, order is not guaranteed, because a diversion can send one
  packet of a pair through the switch and the next along the ring.

The same module serves as the cluster switch. Only `ROUTE_LSB` changes: 29 for
the cluster field, 26 for the tile field.

## The network

`nova_top` builds `NUM_CLUSTERS` clusters (default 8, giving 64 tiles).
Cluster c's uplink connects to port c of the cluster switch. Traffic between
clusters always takes this path, with no direct links between clusters:

tile -> tile switch -> cluster switch -> tile switch -> tile.

| NUM_CLUSTERS | tiles | cluster switch                                            |
|--------------|-------|-----------------------------------------------------------|
| 1            | 8     | none; the uplink is tied off                              |
| 4            | 32    | 8x8 Banyan, ports 4..7 idle                               |
| 8 (default)  | 64    | 8x8 Banyan, all ports used                                |

A packet addressed to a cluster that is not built is consumed at the idle
cluster switch port and lost.

### Ports of `nova_top`

All ports are arrays indexed by global tile number g = 8*cluster + tile. All use
valid/ready.

| port                          | dir | meaning                                                    |
|-------------------------------|-----|------------------------------------------------------------|
| `clk`, `rst_n`                | in  | clock; asynchronous active-low reset (empties all queues)  |
| `inj_valid/inj_ready/inj_pkt` | in/out/in | tile g's function offers a packet                    |
| `ej_valid/ej_ready/ej_pkt`    | out/in/out | packet delivered to tile g's function              |
| `fallback[g]`                 | out | pulse: tile g diverted a packet from a busy ring link      |

A transfer happens on a rising edge where valid and ready are both high. The
ready of every queue is its registered "not full" signal. A full queue refuses
a write even in a clock where it is read.

### Timing

The table counts clocks from the edge that accepts a packet at `inj_*` to the
edge that takes it at `ej_*`, with no contention. All of these are checked by
the testbenches from every tile.

| path                                             | clocks |
|--------------------------------------------------|--------|
| to the tile itself                               | 1      |
| to a ring neighbour                              | 2      |
| to a two-hop neighbour (forwarded)               | 3      |
| through the tile switch (same cluster)           | 5      |
| to another cluster (through the cluster switch)  | 5      |

The inter-cluster path is no longer than the intra-cluster switch path. The
uplink split and merge are combinational, so the packet crosses three
cluster-switch columns instead of three tile-switch columns.

## What is not in the RTL

* **Tile functions.** A tile is a region of reconfigurable FPGA frames that
  holds whatever accelerator is loaded at run time. Only its network side (the
  router) is logic defined here. Its inject/eject ports are the ports of
  `nova_top`.
* **The coordinator and user processors** manage the tiles and run
  applications. How they attach to the network is not specified; any tile port
  can serve.
* **Partial reconfiguration** itself, that is, rewriting frames while the rest
  runs. It is a property of the FPGA, not of this logic.

## Choices made here, and how far to trust them

The following follow NOVA directly:

* the packet size and header/payload split;
* eight tiles per cluster, eight clusters;
* the tile layout and ring neighbours;
* three link ports per tile, built as FIFO links;
* one- and two-hop neighbour routing, with the switch for the rest;
* switch-only traffic between clusters;
* identical Banyan switches at both levels, with queued 2x2 elements and three
  columns wired as drawn;
* no tables or control FSMs in the switches.

The following are this implementation's own choices:

* the placement of the header fields, and the two aux bits;
* the queue depth of 4 (parameter `FIFO_DEPTH`);
* the valid/ready handshake and reset behaviour;
* round-robin arbitration everywhere;
* the exact routing rule, including the registered busy flag and diversion to
  the switch;
* how the uplink joins the 8-port tile switch (split and merge);
* one clock per queue, which gives the latencies above.

NOVA also claims built-in tolerance of faults in the network. Here that covers
only what diversion gives: a neighbour that stops accepting packets makes its
link busy, and traffic that would cross it goes through the switch instead.
Packets addressed to the failed tile itself still wait for it. No fault
detection or fault reporting logic is included.

NOVA was evaluated with an event-driven network model whose delays are in
abstract time units. This RTL reproduces the qualitative result: the end-to-end
delay rises with the share of traffic that crosses clusters, because every
cluster has a single uplink. The absolute numbers are not comparable.

One run of the network testbenches gave these average end-to-end delays. Each
delay runs from the clock a packet is first offered, so it includes waiting at
a refused inject port. In these runs each tile offers a packet in 20 % of
clocks, and eject ports refuse 10 % of clocks.

| network  | 10 % inter-cluster | 50 % inter-cluster | 90 % inter-cluster |
|----------|--------------------|--------------------|--------------------|
| 8 tiles  | about 3.9 clocks (all traffic stays in the cluster) | - | - |
| 32 tiles | about 4.1 clocks   | about 46 clocks    | about 96 clocks    |
| 64 tiles | about 4.0 clocks   | about 25 clocks    | about 60 clocks    |

Above roughly 10 % the single uplink per cluster saturates at this offered
load, so the delays in those columns mostly measure queueing. They depend on
how long each phase runs: the 32-tile phases are longer, which explains why
their delays exceed the 64-tile ones.

## Files

| file                         | content                                                     |
|------------------------------|-------------------------------------------------------------|
| `rtl/nova_pkg.sv`            | packet types, field widths, ring order, port enum           |
| `rtl/nova_fifo.sv`           | packet FIFO                                                 |
| `rtl/nova_rr_arb.sv`         | round-robin arbiter                                         |
| `rtl/nova_sw2x2.sv`          | 2x2 Banyan element                                          |
| `rtl/nova_banyan.sv`         | 8x8 (2**STAGES) Banyan switch                               |
| `rtl/nova_tile_router.sv`    | tile router                                                 |
| `rtl/nova_tile_switch.sv`    | tile switch with uplink split/merge                         |
| `rtl/nova_cluster.sv`        | eight routers + tile switch                                 |
| `rtl/nova_top.sv`            | clusters + cluster switch                                   |
| `tb/tb_<module>.sv`          | self-checking testbench per module                          |
| `tb/tb_nova_workloads.sv`    | 8- and 32-tile networks under the evaluated traffic mixes   |
| `tb/nova_tb_env.sv`          | traffic driver and scoreboard for the network testbenches   |
| `tb/nova_tb_*probe.sv`, `tb/nova_tb_pkg.sv` | probes bound into the network to count internal events |

## Simulating

Verilator 5 is enough. For example, to run the full 64-tile test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nova_top \
    -y rtl -y tb +libext+.sv rtl/nova_pkg.sv tb/nova_tb_pkg.sv tb/tb_nova_top.sv
./obj_dir/Vtb_nova_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`. For the module
testbenches only `rtl/nova_pkg.sv` and the testbench file need to be named;
`-y` finds the rest.

What the testbenches cover:

* **`tb_nova_top`** runs at the default size, 64 tiles. It sends an isolated
  packet of every path kind from every tile and checks each latency. It then
  runs four traffic phases: an intra-cluster burst with heavy eject
  back-pressure, and random traffic with 10 %, 50 % and 90 % of packets
  crossing clusters. A scoreboard checks that every packet arrives exactly
  once, at the right tile, intact. The test counts each mechanism and fails if
  one never happened: ring one-hop delivery, two-hop forwarding, tile switch
  delivery, cluster switch delivery, diversion from a busy ring link, uplink
  contention, cluster-switch back-pressure, and inject/eject stalls. It prints
  the average end-to-end delay per phase.
* **`tb_nova_workloads`** runs the same traffic on the 8-tile and 32-tile
  networks.
* **The module testbenches** compare against hand-written reference rules. The
  router's rule, for example, is written out as a table for one tile.
