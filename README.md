# Fault-tolerant 4x4 mesh network on chip

A 4x4 mesh of five-port packet routers in which any node can be switched off
to model a faulty router. When the next node on a packet's XY path is off,
the router in front of it sends the packet sideways around the fault and the
packet carries on to its destination. The routers are built for a small area
footprint: instead of input FIFOs or virtual channels, each input has a single
side buffer that holds a packet only when it loses arbitration. Arbitration
uses an iSLIP scheduler.

The RTL follows a published fault-tolerant XY scheme for a 4x4 mesh with a
router made of an input block, an iSLIP scheduler and a crossbar switch. That
description leaves the routing rules partly ambiguous and gives no handshake,
buffer depth or reset behaviour. The choices made here are listed in
[Where this design fills gaps](#where-this-design-fills-gaps).

## Addresses and packets

A packet is 24 bits: `{src[3:0], dst[3:0], data[15:0]}` (`noc_pkg::packet_t`).
A node address is `{x, y}`, where the upper two bits `x` give the **row** and
the lower two bits `y` give the **column**:

```
            column (y) 00    01    10    11
  row (x) 00        0000  0001  0010  0011      north
          01        0100  0101  0110  0111        ^
          10        1000  1001  1010  1011        |
          11        1100  1101  1110  1111      south
                    west  ------------>  east
```

Node number `n` = address value, so node 9 is `1001` (row 2, column 1).
"North" means a smaller row number and "west" a smaller column number.

On the links between routers the packet travels with one extra sideband bit,
`rerouted` (`noc_pkg::flit_t`). It tells later routers to route the packet
Y-first, because it has been sent around a fault. Packets injected by a core
always start with it cleared.

## The routing rules

The whole algorithm lives in `ft_xy_route`, a purely combinational block that
runs in every input of every router. It sees the router's own address, the
packet's source and destination, the `rerouted` bit, and whether each of the
four neighbours is enabled. A neighbour that does not exist, at the mesh edge,
counts as disabled.

**Arrived.** If own address = destination, the packet goes to the core port.

**Normal mode (`rerouted` = 0), plain XY with two detours.**

| situation | preferred move | if that neighbour is disabled |
|---|---|---|
| first leg: own column != destination column | west if own column > dest column, else east | **vertical detour**: north if own row > dest row, south if own row < dest row; in the destination's own row, north (south in row 0). The packet stays in normal mode and resumes XY from its new row. |
| second leg: same column | north if own row > dest row, else south | **sideways detour**: compare the packet's *original source* column with the destination column. Go east if smaller, west if larger. If they are equal, go east, except in the right-most column, where go west. The packet switches to Y-first mode (`rerouted` = 1). |

If the chosen detour neighbour is disabled too, the opposite direction on the
same axis is tried.

**Y-first mode (`rerouted` = 1).** The packet corrects its row first, then its
column. If the row step is blocked, it takes the column step when the column
still differs.

When no permitted neighbour is enabled, `route_valid` is low and the packet
waits in its side buffer. Routing is re-evaluated every cycle, so the packet
leaves as soon as a neighbour comes back.

### Worked example

Take a packet from `1110` to `0001`. With every node enabled it takes the XY
path 1110 → 1101 → 1001 → 0101 → 0001.

With node `1001` disabled:

| at | decision | why |
|---|---|---|
| 1110 | west | columns 10 > 01 |
| 1101 | west, set `rerouted` | north (1001) is disabled; source column 10 > dest column 01 |
| 1100 | north | Y-first: rows 11 > 00 |
| 1000 | north | Y-first |
| 0100 | north | Y-first |
| 0000 | east | rows equal, columns 00 < 01 |
| 0001 | core | arrived |

That gives 6 hops instead of 4. The mesh testbench checks this exact path and
its latency.

### Why the first-leg detour stays in XY mode

The original description says only that the packet is "rerouted until it
reaches a pre-destination node". Switching to Y-first after a vertical detour
would fail whenever the destination lies in the row the packet just left.
For example, take 1000 → 1011 with 1001 disabled. The detour goes north to
0100, Y-first then sends the packet straight back south to 1000, and there
it waits for ever in front of the same fault. Staying in XY mode gives
0100 → 0101 → 0110 → 0111 → 1011 instead.

## Router microarchitecture (`noc_router`)

Port numbering (`noc_pkg::port_e`) is 0 = core, 1 = north, 2 = east,
3 = south, 4 = west.

```
 in[p] ──► input_block[p] ──req_port──► islip_scheduler ──crossbar_select──┐
            (side buffer,    ◄─clear_side_buffer─┘                         │
             ft_xy_route)                                                 ▼
                 └───────────── flit ─────────────────────────► crossbar_switch ──► output_port[o] ──► out[o]
                                                                                   (1-entry register)
```

- **`input_block`** takes the arriving packet, or the packet in its side
  buffer if that is occupied. It splits the packet into
  `packet_src` / `packet_dst` / `packet_data` and routes it in the same cycle.
  It then requests one output. If the request is not granted
  (`clear_side_buffer` low), the packet goes into the side buffer and
  `in_ready` drops until the packet has left. This is the only buffering on
  the input side.
- **`islip_scheduler`** runs one iSLIP iteration per cycle. Each free output
  grants one requesting input, chosen round-robin from the output's grant
  pointer. Each input then accepts one grant, chosen from its accept pointer.
  Pointers move past a match only when the grant is accepted, which gives
  iSLIP its fairness without starvation. Because each input requests a single
  output, one iteration already gives a maximal match. The round-robin choice
  is made by `prog_priority_encoder`: a priority encoder whose
  highest-priority position is the pointer.
- **`crossbar_switch`** is one 5:1 multiplexer per output.
- **`output_port`** is a one-entry register per output. It holds the packet
  until the neighbour's input block is ready. An output is "free" for the
  scheduler when it is empty or being emptied in the same cycle.

**Handshake.** Every link, core ports included, is valid/ready: a packet
moves on a clock edge where both are high. The sender holds the packet
stable while ready is low.

**Timing.** Routing, arbitration and crossbar are combinational, from the
input to the output register. A packet with no contention therefore advances
one router per clock. It reaches the destination core port *h* cycles after
the source router accepts it, where *h* is the hop count. Each input can
accept a new packet every cycle while it is not blocked.

**Faulty node.** `node_enable` = 0 freezes the router: inputs are not ready,
no requests are made, and outputs show no valid. Packets already inside are
kept. Neighbours see the node as disabled and route around it.

## The mesh (`noc_mesh_4x4`)

The top level instantiates 16 routers and wires each N/E/S/W port to the
facing port of the neighbour. It brings out, per node:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `node_enable` | in | 16 | 0 = node is faulty |
| `core_in_valid` / `core_in_pkt` / `core_in_ready` | in / in / out | 16 / 16x24 / 16 | core injects a packet |
| `core_out_valid` / `core_out_pkt` / `core_out_ready` | out / out / in | 16 / 16x24 / 16 | packet delivered to the core |
| `ev_deflect` | out | 16x5 | a packet entered a side buffer (per node, per input) |
| `ev_detour` | out | 16x5 | a packet was sent around a disabled node |

The cores (processing elements or network interfaces) are not part of this
RTL.

## Where this design fills gaps

- Field order inside the 24-bit packet: src, dst, data.
- Orientation: row 00 is north and column 00 is west. This is fixed by the
  worked example above. One step of the original rule list says the opposite
  about north and south; the example was followed.
- The sideways detour compares the packet's original source column with the
  destination column. This reconciles the "east first, except the right-most
  column" rule with the west detour in the example.
- The `rerouted` sideband bit, and staying in XY after a first-leg detour
  (explained above).
- The fallback to the opposite direction, and waiting when no neighbour is
  available.
- The valid/ready links, one-entry output registers, backpressure from a full
  side buffer, pointer reset values, the single iSLIP iteration, and the
  synchronous active-high reset.
- The crossbar takes each input block's (possibly buffered) packet, so the
  scheduler carries no data.

## Limits

- **Deadlock is possible around a fault.** Detoured packets make turns that
  plain XY never makes, and there are no virtual channels to break the
  resulting cycles. With node 1001 disabled and every core offering a packet
  every other cycle, the mesh locks up within a few hundred packets: the
  routers 0100-1000-1100-1101-1110-1010-0110-0101 end up waiting on each
  other. At one packet per core every eight cycles, runs with each of four
  different faulty nodes completed without lock-up. Without faults, routing
  is pure XY and ran over 130,000 packets at the high rate without lock-up.
- Only single faulty nodes were exercised. With several faults, a packet can
  wait indefinitely where the rules give it no way forward. Link faults
  (as opposed to node faults) are not modelled.
- A disabled node's own core cannot send or receive.
- The original implementation was synthesized for an FPGA: about 7,300
  registers and 3,400 LUTs at 201 MHz. This RTL has about 3,800 flip-flop bits
  and has not been mapped to an FPGA, so those numbers do not carry over.

## Files

| file | content |
|---|---|
| `rtl/noc_pkg.sv` | widths, port enum, packet and flit structs |
| `rtl/ft_xy_route.sv` | routing decision |
| `rtl/input_block.sv` | input stage with side buffer |
| `rtl/prog_priority_encoder.sv` | round-robin priority encoder |
| `rtl/islip_scheduler.sv` | iSLIP arbitration |
| `rtl/crossbar_switch.sv` | 5x5 crossbar |
| `rtl/output_port.sv` | output register |
| `rtl/noc_router.sv` | one router |
| `rtl/noc_mesh_4x4.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/noc_pkg.sv tb/tb_noc_mesh_4x4.sv --top-module tb_noc_mesh_4x4
./obj_dir/Vtb_noc_mesh_4x4
```

Replace the testbench name to run another one. What each testbench covers:

- `tb_ft_xy_route` checks every hop of the worked example, the fault-free
  path, and both detour directions. It also compares 4,000 random cases with
  an independent reference model.
- `tb_input_block` checks the side buffer: a packet that is not granted is
  parked and blocks the input, a granted packet bypasses the buffer, and a
  disabled node issues no requests.
- `tb_islip_scheduler` checks the scheduler cycle by cycle against a reference
  iSLIP model, and checks grant rotation under full load.
- `tb_crossbar_switch` and `tb_output_port` compare against reference models
  under random stimulus.
- `tb_noc_router` checks the one-cycle latency, contention between two inputs
  and a detour at a single router. It then sends about 5,600 random packets,
  each of which must leave once on its XY port.
- `tb_noc_mesh_4x4` runs the full mesh at its real size. It checks the
  fault-free and fault-tolerant paths of the worked example hop by hop with
  their latencies, and a first-leg detour. It then runs random traffic with
  core backpressure, taking nodes 9, 6, 10 and 5 out in turn. It counts every
  mechanism (XY hops, Y-first hops, detours, deflections, link and core
  stalls) and fails if one never occurs or if a packet enters a disabled
  node. It takes about 20 s to build and run.
