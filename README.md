# A seven-port router for a 3D mesh network-on-chip

Stacking dies and joining them with through-silicon vias turns a 2D
network-on-chip into a 3D one: every node gets two more neighbours, one in
the layer above and one in the layer below, and packets need fewer hops to
reach a distant core. This RTL implements the router for such a network and
a 3D mesh built from it. It is a wormhole router with seven ports: Local for
the attached core, plus South, North, West, East, Up and Down. Each input has
a four-flit buffer. Flow control is Stall-and-Go. Routing is dimension-order
(X, then Y, then Z) and computed one hop ahead. By default the mesh is
2 x 2 x 4: two by two routers per layer, four layers.

The structure follows a published router design: the pipeline stages, the
flit format, the buffer depth, the port set, the routing rules, round-robin
switch allocation and tail-driven release of outputs. That design prints
the signals of its switch allocator and input port but not the logic
between them. That logic, the link timing and the idle-flit convention are
this implementation's own. They are marked as such below and in each
file's header comment.

## The flit

Every flit is 81 bits. The head, body and tail flits of a packet all use
the same layout and all carry the packet's routing fields:

| bits  | field     | meaning |
|-------|-----------|---------|
| 0     | tail      | 1 on the last flit of a packet |
| 7:1   | Next-Port | one-hot: the output this flit takes at the router that holds it |
| 10:8  | X-dest    | destination X |
| 13:11 | Y-dest    | destination Y |
| 16:14 | Z-dest    | destination Z |
| 80:17 | payload   | 64 data bits |

Next-Port bit `1+p` selects port `p`, in the order L=0, S=1, N=2, W=3, E=4,
U=5, D=6. A link with nothing to send carries all zeros. The format has no
valid bit, so a flit is present exactly when its Next-Port field is non-zero.
`noc3d_pkg` defines this as the packed struct `flit_t`.

## Look-ahead routing: what Next-Port means

This is the least obvious part of the design. The Next-Port field of a
flit arriving at a router is **not** computed at that router. The previous
router computed it, so the new router can request its output as soon as the
flit is at the head of its buffer. While the flit waits there, `route_xyz`
computes the output the flit will need at the *following* router, and the
input port writes that value into the Next-Port field of the outgoing flit:

1. Take the router's own address and step one place in the direction of the
   current Next-Port (East = x+1, North = y+1, Up = z+1, and the reverse for
   West, South and Down). This gives the neighbour the flit is going to.
2. Compare the destination with that neighbour's address, X first: East if
   the destination X is larger, West if smaller. If X is equal, do the same
   with Y (North / South), then with Z (Up / Down). If all three are equal,
   the result is Local.
3. A flit that leaves on Local keeps Local.

As a result, the source must fill in the first Next-Port itself: the output
the packet takes at the source router, found with the same X-Y-Z rule from
the source address. A network interface would normally do this. None is
included, so whatever drives `local_in` has to do it (the mesh testbenches
do). A flit delivered on `local_out` always has Next-Port = Local.

The published routing rules compare the destination with the "present node
address". With look-ahead, the present address of the router that will use
the result is the neighbour's, and that is the comparison made here.

## Inside the router

```
data_in[7] ─► input_port x7 ──data_out──────────────► crossbar ─► data_out[7]
              (FIFO + route_xyz)                        ▲   │
                 │ sw_req, port_req      sw_cntrl (7x7) │   ▼
                 └────────────► switch_allocator ───────┘  tail_sent_detect
                 ◄── sw_grant ──┘    ▲   ▲                  │ data_sent, tail_sent
stop_out[7] ◄── FIFO full            │   └──────────────────┘
stop_in[7] ──────────────────────────┘
```

**Input port** (`input_port`, `flit_fifo`). Any arriving flit is written
into a four-entry first-word-fall-through FIFO. While the FIFO holds a flit,
the port raises `sw_req` and puts the head flit's Next-Port on `port_req`.
`stop_out` is high while the FIFO is full.

**Switch allocator** (`switch_allocator`, seven `rr_arbiter`s). Each output
is either free or held by one input. A free output grants one of the inputs
that want it, chosen round-robin: the pointer moves past each winner, so no
input has a fixed priority. The winner then holds the output until the
packet's tail has gone out. While an output is held, only its owner can be
granted, which keeps packets from interleaving on a link (wormhole
switching). An output is *blocked* in two cases:

- `stop_in` for that output is high (Stall-and-Go from downstream);
- a flit left on the output in the previous cycle (`data_sent`).

The second rule exists because the allocator cannot see the flits. It
learns that a flit was a tail only when `tail_sent` comes back from the
crossbar output, one cycle after the grant. So it waits one cycle after
each flit before granting that output again. **One output therefore carries
at most one flit every second cycle.** Different outputs work in parallel.
The block diagram feeds both stop and data_sent into the allocator's
blocking logic; this is how this implementation combines them.

**Crossbar** (`crossbar`). One 7:1 multiplexer per output, selected by the
49-bit `sw_cntrl` (a one-hot input choice per output), with a register at
the output. The grant also removes the flit from its input FIFO at the same
edge. The published circuit places the register on the control word
instead. Here the selected flit itself is registered, so that data and
control stay together once the FIFO has moved on.

**Tail and Sent** (`tail_sent_detect`). These watch the registered outputs:
`data_sent[o]` means a flit is on output o, and `tail_sent[o]` means that
flit is a tail. `tail_sent` frees the output in the allocator.

### Timing

| event | cycle |
|---|---|
| flit on `data_in` | 0 |
| written into the input FIFO | edge at end of cycle 0 |
| routed, allocated, granted | cycle 1 |
| on `data_out` (crossbar register) | cycle 2 |

A flit crosses an idle router in two cycles. A packet that passes through R
routers, counting source and destination, appears on the destination's
`local_out` 2·R cycles after it was placed on the source's `local_in`. For
example, corner to corner in the 2 x 2 x 4 mesh is 5 hops, so 6 routers and
12 cycles. The mesh testbench checks this figure exactly.

### Stall-and-Go and the buffer depth

`stop_out` is "FIFO full". This is enough to prevent overflow only because
of the blocking rule above. A router grants an output only if no flit is on
that link and the downstream FIFO is not full, so at most one flit is in
flight toward a FIFO that has a free slot. `flit_fifo` asserts that it is
never written while full, and the router asserts that no flit leaves an
output in the cycle after that output's `stop_in` was high.

## The mesh

`noc3d_mesh` places router (x,y,z) at node `n = x + XDIM*(y + YDIM*z)` and
gives it its coordinates as its address. Neighbours are linked as follows:

- East of (x,y,z) connects to West of (x+1,y,z);
- North connects to South of (x,y+1,z);
- Up connects to Down of (x,y,z+1).

Each stop signal runs against its data link. The vertical links stand for
the through-silicon vias. Logically they are the same one-cycle links as
the horizontal ones. Links on the faces of the mesh are tied idle, because
X-Y-Z routing never sends a flit there. Each node's Local port is brought
out as `local_in` / `local_stop_out` (injection) and `local_out` /
`local_stop_in` (ejection).

Parameters: `XDIM`, `YDIM`, `ZDIM` (default 2, 2, 4) and `DEPTH` (default 4).
Coordinates are 3 bits, so each dimension can have up to 8 routers. A
3 x 3 x 3 mesh is reached with `XDIM=YDIM=ZDIM=3`. At the default size, a
coarse synthesis gives about 7.2k flip-flop bits and 24k bits of FIFO
storage (16 routers x 7 ports x 4 x 81 bits).

## Where this departs from the source design, and what is missing

- **Virtual channels.** The source calls its router a virtual-channel
  router but describes only one FIFO per input, no virtual-channel
  allocation stage and no channel field in the flit. This router has no
  virtual channels.
- **Synthesis views with other ports.** The source's synthesis schematics
  show a 32-bit, two-channel buffer, a five-port crossbar and a router with
  a different port list. They contradict its own architecture description,
  which this RTL follows.
- **Network interface and cores.** These are not part of the design, so the
  Local ports are left open for them.
- **Design choices.** These are this implementation's own: the allocator's
  internal logic and the resulting one-flit-per-two-cycles rate per output,
  the all-zero idle flit, the registered crossbar outputs, first-word
  fall-through buffers, the active-low synchronous reset `rst_n` and the
  node numbering.
- **Not reproduced.** The source reports FPGA utilisation and a 33 MHz
  clock on a Virtex-5 device. No timing closure or FPGA mapping has been
  done here.

## Files

| file | contents |
|---|---|
| `rtl/noc3d_pkg.sv` | flit struct, port enum, constants |
| `rtl/noc3d_mesh.sv` | top: the 3D mesh |
| `rtl/noc3d_router.sv` | one router |
| `rtl/input_port.sv` | buffer, request and Next-Port rewrite |
| `rtl/flit_fifo.sv` | four-entry FIFO |
| `rtl/route_xyz.sv` | look-ahead X-Y-Z routing |
| `rtl/switch_allocator.sv` | output holding, blocking, grants |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/crossbar.sv` | registered 7x7 crossbar |
| `rtl/tail_sent_detect.sv` | data_sent / tail_sent |

Each `tb/tb_<module>.sv` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. The tests:

- `tb_noc3d_mesh` runs the default 2 x 2 x 4 mesh end to end. It checks
  exact zero-load latency, then runs random traffic with hot spots, random
  ejection stops and 1-4 flit packets. Every packet must arrive whole, in
  order and uninterleaved. The test also requires that full input buffers,
  ejection stops, layer crossings and contention delays all occurred.
- `tb_noc3d_mesh_3x3x3` runs the same test on a 3 x 3 x 3 mesh.
- `tb_noc3d_router` checks the two-cycle latency and the rate of one flit
  every second cycle for a four-flit packet. It then runs random traffic
  through one router, against a reference model of the look-ahead route,
  and checks that no flit leaves an output whose `stop_in` was high.
- The other testbenches check their block against an independent model:
  FIFO queue, routing function, arbiter pointer, allocator rules in a closed
  loop, crossbar permutations and the Tail/Sent rule.

## Simulating

All testbenches build with plain Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc3d_mesh \
    -y rtl -y tb +libext+.sv -Irtl rtl/noc3d_pkg.sv tb/tb_noc3d_mesh.sv
./obj_dir/Vtb_noc3d_mesh
```

Replace the top module and file with those of any other testbench. Each
test runs in well under a second. Lint with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/noc3d_pkg.sv rtl/noc3d_mesh.sv`.
