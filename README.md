# 3x3 mesh network-on-chip with virtual-channel wormhole routers

This is a small packet-switched network for a system on chip. Nine cores sit on
a 3x3 grid, and each has a router. Neighbouring routers are joined by a pair of
opposite links. A core sends a packet by naming the grid coordinates of the
destination core. The packet crosses the grid one router at a time: first along
X, then along Y. On the way, the routers do four jobs:

- **Wormhole switching.** A packet is cut into flits. The header flit reserves a
  path, and the rest of the packet follows it flit by flit. No router ever needs
  room for a whole packet.
- **Virtual channels ("lanes").** Every physical link carries up to `NUM_VC`
  independent lanes, each with its own buffer. A blocked packet on one lane does
  not stop a packet on another lane from using the same wires.
- **Credit-based flow control.** A sender may put a flit on a lane only while
  the receiver's buffer for that lane has room.
- **XY routing.** Routing is deterministic and dimension-ordered, which keeps
  the network free of deadlock.

The router organisation follows the Hermes switch. It has five bidirectional
ports (East, West, North, South, Local), an input buffer per port and lane, and
central control logic that arbitrates among headers and runs XY routing. Three
parameters are the knobs for trading area against performance:

- the number of virtual channels,
- the flit buffer depth,
- the flit width.

All three are parameters of the RTL.

## Packets and addresses

A packet is a sequence of `FDW`-bit flits:

| flit | contents |
|------|----------|
| 0 | header: destination X in bits `[FDW/2-1:FDW/4]`, destination Y in bits `[FDW/4-1:0]`; the upper half is free for the core's use and travels unchanged |
| 1 | size: the number `n` of payload flits that follow (0 allowed) |
| 2 .. n+1 | payload |

With 8-bit flits, each coordinate has 2 bits. For example, `0xFA` addresses
(2,2) and `0xF5` addresses (1,1). Node numbers run row by row, so node
`n = y*3 + x`, and (0,0) is node 0. North is the direction of increasing Y, and
East is the direction of increasing X. The routers never look at a payload
flit. They count payload flits only to know when the packet, and with it the
reserved path, ends.

## The link

Every router port, and the router-side port of the network interface, uses the
same link. Port arrays of the router are indexed East=0, West=1, North=2,
South=3, Local=4.

| signal | dir (sender view) | meaning |
|---|---|---|
| `tx` / `rx` | out / in | a flit is on the wires this cycle |
| `lane_tx` / `lane_rx` | out / in | one-hot lane of that flit |
| `data_out` / `data_in` | out / in | the flit |
| `credit_i` / `credit_o` | in / out | one bit per lane: the receiver's buffer for that lane is not full |

The receiver writes the flit at the clock edge. A credit bit comes straight from
the receiver's registered buffer count. The sender may therefore use the credit
in the same cycle it sends, and the receiver never overflows. Only one flit
crosses a link per cycle. Flits from different lanes interleave freely, but
within one lane the flits of a packet stay in order and are never mixed with
another packet.

## Inside the router

```
             +-------------------- switch_control ---------------------+
 headers --> | rr_arbiter (one of 5*NUM_VC) -> xy_routing -> free lane |
             |           connection table [out port][out lane] = src   |
             +-----------------------------+---------------------------+
                                           |
 rx/lane/data --> input_port x5 --> crossbar muxes --> output_port x5 --> tx/lane/data
 credit_o    <--  (NUM_VC flit_fifo                     (rr over lanes     <-- credit_i
                   + packet tracking)                    with credit)
```

**Input lanes (`input_port`, `flit_fifo`).** Each input port has one
`FBD`-deep buffer per lane. Each lane also runs a four-state tracker:

1. *idle*: the head flit is a header, and the lane requests routing.
2. *connected, header next*.
3. *size next*: popping the size flit loads a down-counter.
4. *payload*.

When the last flit of a packet is popped, the lane pulses `release` in the same
cycle and becomes idle again.

**Control logic (`switch_control`).** Each cycle, a round-robin arbiter picks
one requesting input lane. `xy_routing` compares the header's coordinates with
the router's own `X_ADDR`/`Y_ADDR`. A larger or smaller X gives East or West.
Only when X matches is Y compared, giving North or South. Equal coordinates
mean Local.

If the chosen output port has a free lane, the lowest-numbered free lane is
written into the connection table as owned by that input lane, and the input
lane is granted. If every lane of that port is taken, nothing is granted that
cycle and the arbiter moves on, so the waiting header does not block headers
bound elsewhere. The table entry is cleared by the owner's `release`. A path
therefore lives exactly as long as its packet.

**Crossbar and output ports (`hermes_router`, `output_port`).** Each output lane
sees the head flit of the input lane that owns it. An output port sends, one
per cycle, a flit from any of its lanes that has a flit and downstream credit.
Lanes take turns round robin. The same cycle, the pop travels back through the
connection to the input buffer.

**Timing.** Take a header written into an empty buffer at clock edge 0. The
control logic grants it during the next cycle, and the connection is registered
at edge 1. After edge 1 the header is on the output link, and the next router
stores it at edge 2. That makes **two cycles per hop** when nothing is in the
way. Behind the header, an unblocked packet streams at **one flit per cycle**.
The testbenches check both figures.

**Why XY routing cannot deadlock here.** A packet turns at most once, from the
X dimension into the Y dimension. No cycle of lane dependencies can form. A
header that finds all lanes busy only waits for a packet that is itself making
progress.

**Edge routers.** Every router is built with five ports. The mesh ties the
unused edge ports idle, and XY routing never selects them. Synthesis then drops
their buffers, so a corner router effectively has three ports and an edge
router four.

## Network interface

`network_interface` joins a core's two valid/ready flit streams to the Local
port of its router.

- **Injection.** When the core offers a header, a round-robin choice among the
  lanes that have credit picks the lane for the whole packet. Consecutive
  packets spread over the lanes. `core_in_ready` is the credit of that lane.
- **Ejection.** Each lane arriving from the router has its own `FBD`-deep
  buffer, and `credit_o` reflects the free room. The core is handed one complete
  packet at a time: a lane holding a header is chosen round robin and kept until
  its last payload flit has been taken. Packets that were interleaved on the
  link therefore reach the core whole.

A core must hold `core_in_valid` and `core_in_flit` until they are accepted
(this is asserted).

## Top level: `noc_mesh`

`noc_mesh` instantiates `MESH_X * MESH_Y` routers and interfaces and wires
them up:

- the East output of (x,y) feeds the West input of (x+1,y);
- the North output of (x,y) feeds the South input of (x,y+1);
- credits run the other way.

Its ports are per-node arrays of the core streams: `core_in_valid/flit/ready`
and `core_out_valid/flit/ready`, plus `clock` and an asynchronous active-high
`reset`. The cores themselves are outside this design.

| parameter | default | range exercised | notes |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 3, 3 | 3x3 | at most `2**(FDW/4)` each, so the header can address every node (checked at elaboration) |
| `FDW` flit width | 8 | 8, 16, 32 | also limits the size flit to `2**FDW-1` payload flits |
| `FBD` buffer depth (flits per lane) | 16 | 4, 8, 16, 32 | any value >= 1 |
| `NUM_VC` lanes per link | 2 | 1, 2, 4 | `NUM_VC = 1` gives a plain wormhole router |

At the defaults, a synthesis run without FPGA mapping finds about 2,900
flip-flop bits and 84 flit buffers of 16x8 bits (10,752 memory bits). There are
90 router lane buffers plus 18 interface lane buffers, but the 24 on unused edge
ports are removed.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | port numbering (`port_e`), `NPORTS` |
| `rtl/flit_fifo.sv` | one lane buffer |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/xy_routing.sv` | XY routing decision |
| `rtl/input_port.sv` | lane buffers and packet tracking of one input |
| `rtl/switch_control.sv` | arbitration, routing, lane allocation, connection table |
| `rtl/output_port.sv` | lane multiplexing onto one output link |
| `rtl/hermes_router.sv` | the five-port router |
| `rtl/network_interface.sv` | core-to-router interface |
| `rtl/noc_mesh.sv` | the mesh (top) |
| `tb/tb_<block>.sv` | a self-checking testbench for each block |
| `tb/tb_noc_sweep.sv`, `tb/mesh_sweep_point.sv` | the mesh at four corners of the parameter space |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -Mdir obj_mesh -o sim && obj_mesh/sim
```

Replace `noc_mesh` with any block name. Add `-Wno-fatal` if your Verilator
version turns style warnings into errors.

- `tb_noc_mesh` runs the whole network at its default parameters.
  - First it sends `FA 03 FA A0 A1` from node 0 to node 8. The test checks that
    the header leaves routers 0 and 1 East, routers 2 and 5 North, and router 8
    Local, two cycles apart, and that core 8 receives the packet unchanged.
  - Then all nine cores exchange 180 random packets under random back-pressure.
  - The test requires every mechanism to occur at least once: all five routing
    directions, credit stalls, two lanes active on one link, headers waiting for
    arbitration or a lane, and back-pressure in both directions at the cores.
- `tb_hermes_router` first replays a single router (0,0) receiving
  `F5 08 FF FE FD FC FB FA F9 F8` on Local lane 0. It checks that the packet
  leaves East on lane 0, with the header two cycles later and the ten flits
  back to back. It then drives random traffic into all five inputs of router
  (1,1) against random downstream credit.
- `tb_noc_sweep` builds four meshes with (VC, FDW, FBD) =
  (1,8,4), (2,16,8), (4,32,16) and (2,8,32). Together they cover every value of
  each parameter, and each mesh runs random all-to-all traffic. The C++ build
  of this testbench takes a few minutes.
- The block testbenches check each unit against an independent model:
  - the buffer against a queue;
  - the arbiter against a reference pointer;
  - routing exhaustively over a 4x4 address space;
  - the control logic against a model connection table;
  - the output port for credit, lane and round-robin rules;
  - the interface for lane choice and whole-packet delivery.

Concurrent assertions in the RTL guard the handshakes. They catch writing a
full buffer, popping an empty one, a grant without a request, a flit on a lane
without credit, a `lane_rx` that is not one-hot, and a core that drops
`core_in_valid`. Run with `--assert` to enable them.

## What is this design's own

The overall structure follows the Hermes-style router:

- five bidirectional ports with input buffers;
- central control logic with an arbiter feeding XY routing;
- wormhole switching;
- lanes selected by a one-hot `lane` signal, with a credit bit per lane;
- the header/size/payload packet format;
- the port numbering and the 3x3 mesh.

The following were chosen here and may differ from other implementations of
that architecture:

- round-robin arbitration, with one routing decision per router per cycle;
- lowest-free-lane allocation;
- the per-lane packet tracker;
- the two-cycle hop;
- combinational output multiplexing, registered only by the next buffer;
- the asynchronous reset;
- the whole network interface. Its valid/ready core streams, lane choice and
  ejection buffers are simple choices, not a specified interface.

Corner and edge routers are full five-port routers with their unused ports tied
off, rather than separate three- and four-port designs. Only input buffers
exist: there is no separate output-side buffering.

## Limits

- There is no timing or area characterisation beyond the plain synthesis
  figures above. Slice counts and clock rates on an FPGA depend on the vendor
  flow.
- The size flit caps a packet at `2**FDW - 1` payload flits, and the header caps
  the mesh at `2**(FDW/4)` columns and rows.
- Only one header per router is routed per cycle. Under heavy contention, header
  admission rather than the links can limit throughput.
