# Lasio: a 3D mesh network-on-chip

Lasio is a network-on-chip for a stack of silicon layers. Routers sit on a
three-dimensional grid, 4 x 4 x 4 = 64 of them by default, and each router
serves one processing element (PE). Every router links to its neighbours in
X and Y within its layer. It also links in Z to the routers directly above
and below, through vertical links (through-silicon vias, TSVs). Going 3D
shortens the paths: the longest route in 64 routers is 9 hops instead of
the 14 of an 8 x 8 planar mesh.

The router extends the planar Hermes router to three dimensions. It keeps
the same mechanisms:

- wormhole switching;
- credit-based flow control;
- one input FIFO per port;
- a single shared control unit that does round-robin arbitration and
  dimension-order (XYZ) routing.

It has seven ports instead of five. This repository holds synthesizable
SystemVerilog for the router and the mesh, plus self-checking testbenches.
Two testbenches run the published traffic experiments: *complement* and
*all-to-all*, over a range of packet sizes and buffer depths.

## Topology and addresses

Router (x, y, z) has the address `{x, y, z}`, three 4-bit fields in bits
[11:8], [7:4] and [3:0] of a flit. So router "121" is `16'h0121`. The
top level numbers the Local ports with n = x + 4·(y + 4·z).

| port   | index | leads to        |
|--------|-------|-----------------|
| East   | 0     | (x+1, y, z)     |
| West   | 1     | (x-1, y, z)     |
| North  | 2     | (x, y+1, z)     |
| South  | 3     | (x, y-1, z)     |
| Local  | 4     | the PE          |
| Bottom | 5     | (x, y, z-1)     |
| Top    | 6     | (x, y, z+1)     |

Routers on the faces of the cube have fewer neighbours. The top level builds
them without the missing ports: no buffer is built and no credit is given.
A vertical link is the same link as a horizontal one and costs the same.

## Packets

A packet is a sequence of 16-bit flits:

```
flit 0      flit 1        flit 2 ... flit size+1
target      size          payload
address     (= payload
{x,y,z}      flit count)
```

The size field can count up to 65,535 payload flits. No buffer ever has to
hold a whole packet: a packet is spread over the buffers along its path
(wormhole switching).

## The router

```
           +-------------------- lasio_router ---------------------+
 rx/data ->| lasio_input_buffer x7 --h/ack--> lasio_switch_control |
 credit_o<-|   (circular FIFO,               (rr_arbiter,          |
           |    packet framing)               xyz_routing,         |
           |        |  head flits             switching table)     |
           |        v                             | table          |
           |   lasio_crossbar  <------------------+                |-> tx/data
           |                                                       |<- credit_i
           +-------------------------------------------------------+
```

**Input buffer** (`lasio_input_buffer`). Each port has a circular FIFO of
`BUF_DEPTH` flits. While a header flit waits at the head of the FIFO, the
buffer raises `h` to ask for a route. After the acknowledge it forwards the
header, then the size flit, then the payload, and counts the payload to find
the end of the packet. It then drops `sender`, and the next header may ask
for a route. A packet whose output is taken simply waits in the FIFO, and
its flits back up into the buffers of the routers behind it.

**Control logic** (`lasio_switch_control`). One unit per router serves
routing requests one at a time, four clock cycles each:

1. `S_ARB`: the round-robin arbiter (`lasio_rr_arbiter`) picks one of the
   requesting inputs. The search starts after the input picked last, so no
   input starves.
2. `S_ROUTE`: XYZ routing (`lasio_xyz_routing`) computes the output port
   from the header. It corrects X first, then Y, then Z, and a packet that
   has arrived goes to Local. Dimension-order routing on a mesh cannot
   deadlock.
3. `S_CHECK`: if that output is busy, the request is refused and arbitration
   starts again. The refused input keeps its request raised and is tried
   again when its turn comes round.
4. `S_GRANT`: the switching table is updated and `ack_h` is pulsed.

**Switching table.** It has three vectors with one entry per port:

- `available[o]`: output o is free.
- `in_tbl[i]`: the output that input i's packet goes to.
- `out_tbl[o]`: the input that output o carries.

For example, West→North and North→Top at the same time give:

| vector    | E | W     | N    | S | L | B | T     |
|-----------|---|-------|------|---|---|---|-------|
| available | 1 | 1     | 0    | 1 | 1 | 1 | 0     |
| in        | - | North | Top  | - | - | - | -     |
| out       | - | -     | West | - | - | - | North |

An output becomes available again one cycle after its input drops `sender`.

**Crossbar** (`lasio_crossbar`). It is combinational, with one multiplexer
per output, selected by `out_tbl`. It raises `tx` only when the connected
buffer has a flit and the receiver has a credit. It returns that credit to
the buffer as `data_ack`, so the buffer removes a flit in the same cycle the
flit is taken.

## Links and flow control

Each direction of a link has `clock_tx`/`clock_rx`, `tx`/`rx`, a 16-bit data
bus and `credit_o`/`credit_i` going back. A flit moves on a clock edge where
`tx` is high. `credit_o` is high while the receiving FIFO has a free slot,
and a sender raises `tx` only while it sees that credit. Flits are never
dropped, and assertions check this on both sides. The whole NoC runs from
one clock. `clock_tx` carries that clock, and `clock_rx` is kept for the
link's signal set but not used.

## Timing

- **Header, per router:** 5 cycles when nothing blocks it. That is 1 cycle
  to enter the FIFO plus the 4 cycles of the control logic.
- **Payload:** one flit per cycle behind the header.
- **Zero-load latency:** for h hops, the header reaches the PE
  5·(h+1) cycles after the PE injected it. Corner to corner (9 hops) this
  is 50 cycles.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `X_SIZE`, `Y_SIZE`, `Z_SIZE` | 4 | mesh size, at most 16 each |
| `FLIT_W`    | 16      | flit (and phit) width, at least 12 |
| `BUF_DEPTH` | 16      | input FIFO depth in flits, any value ≥ 1 |

At the default size the NoC has 352 input buffers. With 16-flit buffers
this is about 90 kbit of FIFO storage and 16 k flip-flops.

## Files

| file | content |
|------|---------|
| `rtl/lasio_pkg.sv` | port enum, address struct |
| `rtl/lasio_input_buffer.sv` | FIFO, credit, packet framing |
| `rtl/lasio_rr_arbiter.sv` | round-robin arbiter |
| `rtl/lasio_xyz_routing.sv` | XYZ routing function |
| `rtl/lasio_switch_control.sv` | 4-cycle control unit and switching table |
| `rtl/lasio_crossbar.sv` | 7x7 crossbar |
| `rtl/lasio_router.sv` | 7-port router |
| `rtl/lasio_noc.sv` | the mesh (top level) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/lasio_noc_harness.sv` | NoC with packet sources and sinks on all Local ports |
| `tb/tb_lasio_workloads.sv` | traffic experiments |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a
watchdog that stops it and counts a failure if it hangs.

- **Input buffer:** 300 random packets against a cycle-accurate model, with
  a full FIFO and output stalls.
- **Arbiter:** exact round-robin order, and fairness under full load.
- **XYZ routing:** every address of the mesh, from three router positions.
- **Control logic:** the example switching table above, a 4-cycle
  acknowledge, waiting for a busy output, and 20,000 random cycles.
- **Crossbar:** random connection sets.
- **Router:** a 5-cycle header latency, then 1,050 random packets through
  all seven ports. Each packet must arrive intact, in order and on the XYZ
  port.
- **Mesh (`tb_lasio_noc`), default parameters:**
  - zero-load latency from 000 to 333, which must be exactly 50 cycles;
  - complement traffic, 8-flit packets;
  - all-to-all traffic, 5-flit packets, with sinks that sometimes refuse
    flits.

  It checks all 4,289 packets. It also requires that each of these happens
  at least once: hops in all six directions, a refused routing request, a
  full mesh buffer, a stalled injection and a refused delivery.
- **`tb_lasio_workloads`:** two 4x4x4 meshes, one with 4-flit and one with
  128-flit buffers. They run all-to-all with 5 to 1024-flit packets and
  complement with 8-flit packets. Sources plan one packet every 2·len
  cycles, which is half the link rate. A run with the default seeds gave
  the following (latencies in cycles, throughput in delivered flits per
  cycle across the whole NoC):

| pattern, packet | depth | NoC latency | App latency | throughput |
|-----------------|-------|-------------|-------------|------------|
| all-to-all, 5   | 4     | 109         | 1376        | 5.8        |
| all-to-all, 5   | 128   | 660         | 683         | 10.0       |
| all-to-all, 64  | 4     | 220         | 3913        | 15.0       |
| all-to-all, 64  | 128   | 988         | 2664        | 19.2       |
| complement, 8   | 4     | 122         | 311         | 5.1        |
| complement, 8   | 128   | 186         | 186         | 9.4        |

Network latency runs from the actual injection of a packet; application
latency runs from its planned injection. Deeper buffers take packets in
sooner, which shortens the application latency. Those packets then compete
longer inside the network, which raises the network latency. With deep
buffers the two latencies meet. This is the trade-off the architecture was
evaluated for.

Throughput is where this testbench departs from the published results. The
published evaluation reports the highest network throughput with the
smallest buffers. The figure here counts all flits delivered, divided by the
time from the first injection to the last delivery. Measured that way,
throughput rises with buffer depth. The two use different definitions, so
compare the throughput numbers only with each other, not with the
published curves.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lasio_pkg.sv \
          tb/tb_lasio_noc.sv --top-module tb_lasio_noc
./obj_dir/Vtb_lasio_noc
```

Use the same command for any other testbench. The full mesh takes a few
minutes to compile. The workload testbench builds two meshes and takes
about seven minutes.

## Design choices not fixed by the architecture

- **Address encoding.** The 4-bit coordinate fields, and which neighbour
  counts as +1 (East, North, Top), are this implementation's choice.
- **Reset.** Reset is active-high and asynchronous. After reset all FIFOs
  are empty and all outputs are available.
- **Credit.** The credit is a level meaning "space available" rather than a
  counted token. It is read in the same cycle, with no extra link register.
- **Control-logic cycles.** How the four cycles are split (arbitrate,
  route, check, grant) and the retry of a refused request are this
  implementation's own.
- **Buffer depth.** The published evaluation sweeps depths from 4 to 1024
  flits and names no default. 16 is used here.
- **Clocking.** The NoC is synchronous, with one clock. Each link keeps its
  clock wires, but the receiver does not use them.
- **Not included.** The processing elements are not part of the RTL: the
  Local ports are the top level's ports. The vertical TSV links are plain
  wires; their physical design (and any serialization) is out of scope.
