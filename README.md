# A superpipelined mesh switch for a 16-node CC-NUMA interconnect

In a cache-coherent NUMA machine most network messages are short, so what a
switch costs a message is its *fall-through latency*: the time from the first
bits of a packet entering the switch to the first bits leaving it when nothing
else is in the way. A conventional switch with 16-bit links and 64-bit flits
collects the four 16-bit phits of a flit, hands the flit over to a core that
runs at a quarter of the link clock, arbitrates, crosses the crossbar and then
serializes the flit onto the outgoing link again. That takes about 40 ns at a
400 MHz link clock.

The switch here takes the other route. Its core runs at the link clock and its
datapath is one phit (16 bits) wide, a quarter of a flit. A packet starts
moving through the switch as soon as its first phit is in, and crossing the
crossbar and going out on the link are the same step. Arbitration is not made
any faster: it still takes four cycles. Without contention the head phit of a
packet takes **7 link cycles per switch, 17.5 ns at 400 MHz**.

Sixteen of these switches form a 4x4 mesh (`sp_mesh`), one per node of the
multiprocessor. The nodes themselves (processor, caches, memory, network
interface) are not part of this RTL: each node appears as a local port on the
mesh boundary.

## The 7-cycle pipeline

For the head phit of a packet that finds its output free, counted in clock
edges from the edge at which the switch's receive register samples it:

| edge  | stage                        | where                               |
|-------|------------------------------|-------------------------------------|
| t     | receive register             | `sp_input_port`                     |
| t+1   | write into the phit buffer; route is computed from the buffer front in the next cycle | `sp_input_port` |
| t+2   | arbitration 1: sample the requests        | `sp_arbiter`           |
| t+3   | arbitration 2: rotate by the round-robin pointer | `sp_arbiter`    |
| t+4   | arbitration 3: priority-encode            | `sp_arbiter`           |
| t+5   | arbitration 4: register the grant         | `sp_arbiter`           |
| t+6   | crossbar into the link transmit register  | `sp_crossbar`          |
| t+7   | next switch's receive register            |                        |

The 2 + 4 + 1 split is this design's own reading of the timing diagram it
follows; only the 17.5 ns total and the four arbitration cycles are given. At
the 285 MHz link clock that a 0.38 um synthesis of this kind of switch is
reported to reach, the same 7 cycles are 24.5 ns.

After the grant, the rest of the packet follows at one phit per cycle, each
phit leaving as soon as it is at the front of its input buffer. Across the mesh
a packet going h hops reaches its destination's ejection register
7*(h+1) - 1 edges after the first switch sampled it. A long packet can
therefore have its head at the destination while its tail is still at the
source; the mesh test counts such packets.

## Packets and phits

Every link carries a `phit_t` (`sp_pkg`): `valid`, `head`, `tail` and 16 data
bits. A packet is a whole number of 64-bit flits, that is a multiple of four
phits, with `head` on the first phit and `tail` on the last (which is always
the fourth phit of a flit; an assertion checks it). The data of the head phit
is an `hdr_t`:

| bits  | 15:12 | 11:8  | 7:4   | 3:0   |
|-------|-------|-------|-------|-------|
| field | src_y | src_x | dst_y | dst_x |

The rest of a packet is payload and is not looked at. The framing bits, the
header layout and the packet length being free are choices of this design. A
coherence request fits in one flit; a 64-byte cache line needs eight flits of
data plus the head flit.

## Routing

Routing is dimension-order: a head phit goes east or west until its x matches,
then south or north, then out of the local port (`sp_pkg::route_xy`). Port
numbers are `P_LOCAL`=0, `P_NORTH`=1 (y-1), `P_EAST`=2 (x+1), `P_SOUTH`=3
(y+1), `P_WEST`=4 (x-1). Node n sits at x = n mod 4, y = n div 4. With XY
routing and packets holding an output until their tail, the mesh cannot
deadlock. Ports on the mesh edge are tied idle, since no route points at them.

## Flow control: flits are counted, phits move

The flit is the unit of flow control and arbitration; the phit is the unit
that moves. Each input port has a buffer of `BUF_FLITS` flits (4 by default,
16 phits). Each output port keeps a credit count for the buffer at the other
end of its link, starting at `BUF_FLITS`:

* the first phit of a flit may only be sent while a credit is held, and spends it;
* the other three phits of that flit need no credit (their space is reserved);
* when the fourth phit of a flit leaves an input buffer, that input sends a
  one-cycle credit pulse back upstream.

Phits of one flit may arrive with gaps; the buffer space was reserved when the
flit started. Credit lines are registered, so there is no combinational path
from one switch to the next. Where a packet waits for credits it stays where it
is, occupying the outputs it holds (wormhole behaviour).

The same rules apply between the mesh and the nodes. A node sends into
`local_in[n]` only with an injection credit (it starts with `BUF_FLITS` and gets
one back on each `local_credit_out[n]` pulse). On the ejection side, the mesh
assumes that node n has `BUF_FLITS` flits of receive buffer, and the node must
pulse `local_credit_in[n]` once for each flit it has drained.

## Arbitration

Each output has its own round-robin arbiter (`sp_arbiter`), four register
stages deep. It samples the requests only while the output is free, or in the
cycle the previous packet's tail goes out, so back-to-back packets lose no
extra cycle. Requests are derived from the buffer fronts alone: an input whose
front phit is a head requests the one output that phit routes to, and keeps
requesting until the head phit has left. The winner holds the output until its
tail phit is sent. After a grant, the round-robin pointer moves to the input
after the winner, so a waiting input cannot be overtaken twice by the same
other input.
Requests that come in during an arbitration wait for the next one.

## Modules

| module           | role |
|------------------|------|
| `sp_pkg`         | widths, `phit_t`, `hdr_t`, `port_e`, XY routing function |
| `sp_input_port`  | receive register, phit buffer, route request, credit return, empty flag |
| `sp_arbiter`     | four-stage round-robin arbiter of one output |
| `sp_output_ctrl` | arbiter plus credit counter and phit-in-flit count: decides each cycle whether the granted input's phit goes out |
| `sp_crossbar`    | 5x5 phit multiplexer into the link transmit registers |
| `sp_switch`      | five input ports, five output controls, crossbar |
| `sp_mesh`        | 4x4 array of switches; top level |

Parameters and their defaults:

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `PHIT_W` | 16 | `sp_pkg` | link and core datapath width |
| `PHITS_PER_FLIT` | 4 | `sp_pkg` | 64-bit flit |
| `ARB_CYCLES` | 4 | `sp_pkg` | arbitration depth (fixed by the structure of `sp_arbiter`; the constant is for testbenches) |
| `NPORTS` | 5 | `sp_pkg` | switch ports |
| `MESH_X`, `MESH_Y` | 4, 4 | `sp_mesh` | mesh size (coordinates are 4 bits, so at most 16x16) |
| `BUF_FLITS` | 4 | `sp_mesh`, `sp_switch`, `sp_input_port` | input buffer depth in flits, and the credits each output starts with |

The top-level ports of `sp_mesh`, all per node n = 0..15 except the clock,
reset and `net_empty`:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | link-rate clock; asynchronous active-low reset |
| `local_in[n]` | in | phit injected by node n |
| `local_credit_out[n]` | out | injection credit returned to node n |
| `local_out[n]` | out | phit delivered to node n |
| `local_credit_in[n]` | in | ejection credit from node n |
| `out_busy[n]` | out | which outputs of switch n are held by a packet |
| `net_empty` | out | no phit anywhere in the network |

`net_empty` lets a system-level model skip network clock cycles while no
packet is in flight. Reset empties every buffer and sets every credit count to
`BUF_FLITS`.

## Choices this design makes

The switch description gives the phit and flit sizes, the phit-wide core at
link clock, processing from the first phit, four-cycle arbitration, crossbar
and link transmission in one step, the 17.5 ns fall-through latency and the
4x4 mesh of 16 nodes. Everything below is this design's own choice:

* five ports per switch and XY routing;
* credit-based flow control counted in flits, and the 4-flit input buffers;
* holding an output for a whole packet, with arbitration only at a head flit;
* round robin as the arbitration policy, and its split into four stages;
* the 2 + 4 + 1 split of the seven cycles;
* one clock domain: the core runs at the link clock, so the synchronizer of
  a two-clock switch is just the receive register;
* the phit framing bits and the head-phit layout;
* the node-side signalling: credit pulses, `out_busy` and `net_empty`.

Not included: the processors, caches, memories and network interfaces of the
nodes, and any link-level serialization or clock-domain crossing. The
flit-switched switch that this one is measured against is not included
either.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog:

* `tb_sp_input_port`: random credit-respecting traffic against a queue model.
  It checks framing, the route request of every head phit against its own XY
  rule, one credit per drained flit and the empty flag. It also checks that a
  phit reaches the buffer front two edges after it arrives.
* `tb_sp_arbiter`: every grant goes to the round-robin winner among the
  requests sampled at the start, exactly four stages later. A releasing owner
  that requests again must get the lowest priority.
* `tb_sp_output_ctrl`: checks the send decision cycle by cycle against a model
  with credits, phases and packet holding. Credit stalls must occur.
* `tb_sp_crossbar`: random selects; checks the registered outputs.
* `tb_sp_switch`: five senders and five slow or fast receivers. It checks a
  7-cycle fall-through on every input, delivery on the right output,
  packets that are not interleaved, and the receiver buffer bound.
  Contention, credit stalls and the empty flag must all be seen.
* `tb_sp_mesh`: the whole 4x4 mesh at its default parameters, in four phases.
  First a 0 -> 15 packet, which must take 49 cycles, and a one-hop packet,
  which must take 14. Then every node sends to each of its neighbours. Then
  uniform random traffic of 1-flit and 9-flit packets, with slow-draining
  nodes for part of the time. Then a drain. It checks that every packet arrives
  once, intact, at its destination, and that `net_empty` behaves. It counts
  contended arbitrations, arbitrations started as a tail left, credit stalls inside the mesh, injection credit
  stalls, cut-through packets and multi-hop packets, and fails if any of them
  never happens.

The applications such a machine would run are not simulated here. Only
synthetic traffic is.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sp_pkg.sv tb/tb_sp_mesh.sv --top-module tb_sp_mesh
./obj_dir/Vtb_sp_mesh
```

Replace `tb_sp_mesh` with any other testbench name to run that one. Each runs
in well under a second. The testbenches use `$urandom` for traffic, so
`+verilator+seed+N` gives a different run. Verilator has two-state
simulation: everything that is read is reset.
