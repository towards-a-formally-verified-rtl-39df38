# A 2D-mesh packet-switched network-on-chip with two equivalent routing disciplines

This is a network-on-chip in the style of HERMES. Switches sit on a
two-dimensional mesh, and each switch has a Local port to an IP core. Whole
packets move from switch to switch by store-and-forward packet switching, and
XY routing decides the path.

The design can route packets in two ways, which must behave the same:

- **Hop-by-hop routing** is the implementation, and the default. Each switch
  looks at the destination in the packet header and picks its own output port
  with the XY rule.
- **Source routing** is the reference behaviour. When a packet enters the
  network, its complete XY route is computed and attached to it. Each switch
  then takes the first hop of the attached route, and that hop is removed as
  the packet crosses the link. The route is stripped off again when the packet
  is delivered.

A single parameter, `SOURCE_ROUTED`, switches between the two. With identical
traffic, both modes accept and deliver the same messages, at the same nodes,
in the same clock cycles. `tb/tb_noc_equiv.sv` checks this cycle by cycle.

## Mesh, coordinates and ports

- **Node numbering.** Node `(x, y)` has index `y*MESH_W + x`.
- **Directions.** `x` grows towards East and `y` grows towards South.
- **Links.** East of `(x, y)` is linked to West of `(x+1, y)`. South of
  `(x, y)` is linked to North of `(x, y+1)`.
- **Port numbers.** Every switch has five ports, numbered as in
  `noc_pkg::port_e`: Local 0, East 1, West 2, North 3, South 4.
- **Edge ports.** Ports on the edge of the mesh are tied idle, because XY
  routing never selects them.

**XY routing** (`noc_pkg::xy_route`) works as follows:

- If the packet is at its destination, it takes the Local port.
- Otherwise, while the column differs, it goes East if the destination `x` is
  larger, and West if it is smaller.
- Once the column matches, it goes South if the destination `y` is larger, and
  North if it is smaller.

## Packets

| type | fields | meaning |
|---|---|---|
| `msg_t` | `dst` (x,y), `src` (x,y), `data` (32 bits) | what an IP core sends and receives |
| `packet_t` | `route` (15 × 3 bits), `msg` | what travels inside the network |

- **Route field.** `route[0]` is the next hop. In hop-by-hop mode the route is
  always zero, and synthesis removes it.
- **Coordinate width.** Coordinates are 3 bits wide (`COORD_W`). The route
  field therefore has room for any XY route in a mesh of up to 8 × 8 nodes:
  `2*(8-1)+1 = 15` hops.
- **Size.** A packet is the unit of transfer. It is stored whole in one buffer
  entry and crosses a link whole in one handshake. It is not cut into flits.

## The link handshake

Each direction of a link carries three signals:

- a request: `tx` at the sender, `rx` at the receiver;
- a grant: `ack_rx` at the receiver, `ack_tx` at the sender;
- a packet.

The protocol:

1. The sender raises its request and holds the packet.
2. The receiver grants in the same cycle if its input queue has room, and
   denies otherwise.
3. The packet moves on the rising edge where request and grant are both high.
4. A denied sender keeps its request high, with unchanged data, until it is
   granted. The assertion `a_tx_hold` in `output_port` checks this.

The IP side of each node uses the same protocol:

- Messages go in through `inject_valid` / `inject_msg` / `inject_ack`.
- Messages come out through `eject_valid` / `eject_msg` / `eject_ack`.

## Inside a switch (`hermes_router`)

A switch is four kinds of unit in a row:

1. **Input unit, one per port** (`input_port`). It receives packets over the
   handshake and queues them, first in first out, `BUF_DEPTH` packets deep.
2. **Route control, one per port** (`route_control`). It picks the output port
   for the packet at the head of that port's queue: by the XY rule, or by
   `route[0]` in source-routed mode.
3. **Flow control, one per switch** (`flow_control`). Each output port has a
   round-robin arbiter (`rr_arbiter`). The arbiter chooses among the inputs
   whose head packet wants that output. An output accepts a packet only while
   its buffer is empty. The winning packet moves from the input queue to the
   output buffer in one cycle. A losing or blocked input keeps requesting.
4. **Output unit, one per port** (`output_port`). It has a one-place buffer
   and drives the outgoing handshake. In source-routed mode it also drops the
   hop just taken from the route it sends.

### Timing

The following is the part most easily misread.

- **Into a switch.** A packet accepted into an input queue at clock edge `t`
  can be loaded into an output buffer at edge `t+1`. The request to the
  neighbour is then high.
- **Across a link.** The packet crosses the link at edge `t+2` at the
  earliest. Each hop therefore costs two cycles.
- **Corner to corner.** In an idle 4 × 4 mesh, a message from `(0,0)` to
  `(3,3)` is offered to the destination IP `2*6+1 = 13` cycles after it was
  accepted.
- **To its own node.** A message to the injecting node itself is offered after
  1 cycle.
- **Throughput.** An output buffer cannot be reloaded in the cycle it empties.
  Each port therefore passes at most one packet every two cycles.

All registers use a synchronous active-low reset `rst_n`. Reset empties every
queue and buffer and resets the arbiter pointers.

## Source routing at injection (`source_route_gen`)

In source-routed mode, each node's Local input has a `source_route_gen` in
front of it:

- It applies the XY rule repeatedly from the injecting node's coordinates.
- It writes each chosen port into `route`, ending with Local.
- Entries after the Local hop stay zero.

The logic is combinational, unrolled over the 15 route positions.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `MESH_W`, `MESH_H` | `noc_mesh` | 4, 4 | mesh size (at most 8 × 8 with `COORD_W = 3`) |
| `BUF_DEPTH` | `noc_mesh`, `hermes_router`, `input_port` | 4 | input queue depth, in packets |
| `SOURCE_ROUTED` | `noc_mesh`, `hermes_router`, `route_control`, `output_port` | 0 | 0 hop-by-hop, 1 source routing |
| `COORD_W`, `DATA_W` | `noc_pkg` | 3, 32 | coordinate and payload widths |

Changing `COORD_W` in `noc_pkg` allows larger meshes. The route field grows
with it.

## Files

### `rtl/`

| file | contents |
|---|---|
| `noc_pkg.sv` | package with the types, the XY routing function and the route shift |
| `noc_mesh.sv` | top: the mesh |
| `hermes_router.sv` | one switch |
| `input_port.sv` | input unit |
| `output_port.sv` | output unit |
| `route_control.sv` | route control |
| `flow_control.sv` | flow control |
| `rr_arbiter.sv` | round-robin arbiter |
| `source_route_gen.sv` | route computation at injection |

### `tb/`

There is one self-checking testbench per module, plus `tb_noc_equiv.sv`.

| testbench | what it does |
|---|---|
| `tb_noc_mesh.sv` | Runs the default 4 × 4 mesh. It first checks the latencies above. It then runs uniform random traffic and two hot spots, with back-pressure from the IP cores. Every delivery is checked against a scoreboard. It also checks that each mechanism happened at least once: a delivery to the own node, hops in all four directions, a denied link handshake, a denied injection, two inputs competing for one output, and a packet blocked by a busy output buffer. |
| `tb_noc_equiv.sv` | Runs both routing modes side by side on the same traffic and compares every IP-side output in every cycle. It uses an 8 × 8 mesh, so that full-length 15-hop routes occur. It takes about two minutes to build. |
| `tb_hermes_router.sv` | Tests one switch with all five ports in use: the output port of every packet, delivery exactly once, the one-cycle offer latency, contention and denial. |
| unit testbenches | Test the remaining modules against independent reference models written in the testbench. |

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

Replace `tb_noc_mesh` with any other testbench name. The full 4 × 4 mesh
builds in about half a minute and simulates in well under a second.

## Design choices beyond the source description

The source description fixes the following:

- the five-port switch and the mesh;
- XY routing;
- store-and-forward packet switching;
- an input queue per port;
- a one-place output buffer per output port, which accepts a packet only when
  it is empty;
- round-robin access to output ports;
- blocked requests that stay active;
- the request/grant link handshake;
- source routing with hop removal at each link, as the specification, against
  hop-by-hop routing as the implementation.

The following are choices of this design:

- **Mesh size and queue depth.** 4 × 4 and 4 packets. No size is fixed.
- **Widths.** 32-bit payload and 3-bit coordinates. Whole packets move in one
  transfer.
- **Grant timing.** The grant is combinational, given when the queue has room.
  A full queue does not accept a packet in the cycle it pops one.
- **Cycle cost.** The abstract model moves a packet one hop per network step.
  Here one hop takes two clock cycles, because the input queue and the output
  buffer are separate registers.
- **Arbiter.** The round-robin arbiter is a rotating pointer that starts
  after the last winner.
- **Encodings and reset.** The port encoding, the coordinate orientation
  (South = larger `y`) and the synchronous reset.
- **No IP cores.** IP cores and any per-node memory are outside this RTL. The
  Local ports are the top-level ports of `noc_mesh`.
