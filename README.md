# DSM network-on-chip for FPGA

SystemVerilog RTL for the DSM ("dimension split-merge") router. The router is
built from two small one-dimensional routers. Around it sit:

- the Priority-Select (PS) round-robin arbiter used for every arbitration;
- a static or dynamic (DVOQR) virtual-channel buffer;
- a network interface that turns a processing element's (PE's) words into
  packets and back.

The top, `dsm_mesh`, is a 4x4 mesh with one router and one network interface
per node. Its defaults are the evaluated configuration:

| Setting | Default |
|---|---|
| Flit width | 32 bits |
| Virtual channels (VCs) | 2 |
| Buffer per port | 32 flits |
| Packet length | 8 flits: one head and up to 7 data flits |
| Pipeline | 2 stages per internal router |

Everything is synchronous to one clock with an asynchronous active-low reset.

## Flit and packet format (`dsm_pkg`)

A flit (`flit_t`) is 36 bits:

- `head` and `tail` bits;
- a 2-bit look-ahead port (`la_port`: Local, Left or Right);
- 32 data bits.

In a head flit, the low data bits carry (`head_t`):

- destination x and y;
- source x and y;
- the number of data flits that follow (1..7).

Coordinates are 2 bits, so one side of the mesh can have at most 4 nodes. A
head flit is never also a tail: every packet has at least one data flit.

## Links and flow control

A link carries `valid`, a VC index and a flit one way, and one `ready` bit per
VC the other way.

- `ready[v]` is high while VC `v` of the receiving queue has room.
- A sender drives `valid` only on a VC whose ready bit is high, so a flit is
  never refused or dropped. Assertions in the buffers check this.
- A packet keeps the VC it was given at injection all the way to its
  destination.

## PS arbiter (`ps_arbiter`, `fixed_prio_arbiter`)

The N requests are split into groups of K. N is padded with idle requests up
to a multiple of K.

Each group has:

- a K-bit fixed-priority arbiter (lowest bit wins);
- a truncated round-robin arbiter, built as K fixed arbiters, each seeing the
  requests from one priority position upward.

A group-level controller chooses the winner in this order:

1. requests at or above the priority position in the priority group;
2. the groups above it;
3. the groups below it, wrapping round;
4. the requests below the priority position in the priority group, through
   that group's fixed arbiter.

When `ack` is high, the priority moves to the bit after the winner. The
output is a one-hot `grant`, its index and `any_grant`. The arbiter is
combinational from `req` to `grant`; only the priority pointer is a register.

## Buffers

- `flit_fifo`: a register FIFO with show-ahead read. One write and one read
  per cycle; a full FIFO cannot be written in the same cycle it is read.
- `voaq`: a virtual output address queue. It is a shift FIFO of slot
  addresses whose front is always at position 0. A one-hot tail vector of
  DEPTH+1 bits marks the fill level: bit 0 means empty, bit DEPTH means full.
- `dvoqr_buffer`: a dynamic buffer with three parts:
  - a unified register buffer of DEPTH slots, with one read port per VC;
  - an allocator: a busy vector plus a fixed-priority arbiter that gives the
    lowest free slot;
  - one VOAQ per VC.

  A write stores the flit in the free slot and pushes the slot's address to
  its VC's queue. A read pops the address and frees the slot. Any VC may use
  any free slot.
- `vc_buffer`: the port buffer used everywhere in the router.
  - `DYNAMIC=0` (default) gives one `flit_fifo` of PORT_DEPTH/NUM_VC per VC.
  - `DYNAMIC=1` gives one `dvoqr_buffer` of PORT_DEPTH slots shared by the
    VCs.

## Internal router (`internal_router`, `split_vc`, `merge_vc`, `lookahead_route`)

An internal router has three ports: Local, Left and Right. It routes in one
dimension.

**Split stage.** Each input port has a `vc_buffer` followed by a `split_vc`.
The split unit:

- uses a PS arbiter to pick one VC whose front flit can move, meaning its
  output queue has room on that VC (a blocked packet never holds up the
  other VCs);
- writes the flit into the output queue for its (input, output) pair;
- takes the output port from the head's look-ahead field and keeps it per VC
  until the tail.

At the same time, `lookahead_route` computes the head's port in the next
internal router and rewrites `la_port`. The next router may be the Y router
of this node or the router of the next node. Routing is XY dimension order.

**Queues.** Output queues exist only for legal turns: 3 into Local, 2 into
Left and 2 into Right. There is no U-turn. Each queue is a `vc_buffer`.

**Merge stage.** Each output port has a `merge_vc`. Arbitration has two
stages:

1. a PS arbiter per input queue picks one of its VCs;
2. a PS arbiter picks among the input queues.

A VC is eligible only if the downstream ready bit for that VC is high, and
either the VC is free and the flit is a head, or the VC is locked to that
input. A head locks its output VC to its input until the tail passes
(wormhole), so packets on one VC never interleave.

**Timing.** Split and merge each take one clock. A flit accepted at clock
edge t leaves at edge t+2 when the router is idle. With every output ready,
each output port sends one flit per cycle.

## DSM router (`dsm_router`)

A node's router is two internal routers:

- The X router's Left and Right ports are the west and east links.
- The Y router's Left and Right ports are the south and north links.
- The PE injects into the X router's Local input.
- The X router's Local output feeds the Y router's Local input. This is the
  single X-to-Y turn.
- The Y router's Local output goes to the PE.

A packet that only moves in one dimension uses one internal router per node.

## Network interface (`network_interface`, `ni_tx`, `ni_rx`)

**PE to network (`ni_tx`).**

- A 32-word buffer takes a word and its destination every cycle while it has
  room.
- The controller starts a packet when one of these holds:
  - 7 buffered words share a destination;
  - the next buffered word goes somewhere else;
  - the PE has paused.

  So long streams travel in full packets and short bursts are not held back.
- A PS arbiter picks a VC whose ready bit is high. The head carries the X
  router's look-ahead port. The data flits follow on the same VC, each sent
  only while that VC is ready.
- An unbroken stream to one destination sends 8 flits per 7 words.

**Network to PE (`ni_rx`).** For each VC it keeps a remaining-length counter
and the packet's source.

- A head is checked. It is an error if:
  - the destination is not this node;
  - the length is zero;
  - the previous packet on that VC is not finished.
- A data flit is an error if its tail bit does not match the counter.
- Errors pulse `hdr_err` and are counted in the saturating 16-bit
  `err_count`. The words are still delivered.
- When the PE is ready and nothing is queued, a data flit's word goes to the
  PE in the cycle it arrives. Otherwise it waits in a 32-word buffer.
- Each word comes with its source, a last-word flag and the VC it used.

## Mesh (`dsm_mesh`)

Node n is at x = n mod 4, y = n div 4. Each node has a router and a network
interface. Each router output is wired to the opposite input of its
neighbour. Links at the mesh edge are tied idle.

The PE-side ports are packed arrays indexed by node:

- transmit: `tx_valid`, `tx_ready`, `tx_data`, `tx_dst_x`, `tx_dst_y`;
- receive: `rx_valid`, `rx_ready`, `rx_data`, `rx_src_x`, `rx_src_y`,
  `rx_last`, `rx_vc`, `rx_err_count`.

Zero-load latency, from the transmit handshake to the receive handshake, is
2R+2 cycles, where R = (|dx|+1) + (|dy|+1) is the number of internal routers
crossed.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| dsm_mesh | MESH_X, MESH_Y | 4, 4 | mesh size (at most 4 per side) |
| all router levels | NUM_VC | 2 | virtual channels |
| all router levels | PORT_DEPTH | 32 | flits per port buffer and per output queue |
| all router levels | DYNAMIC | 0 | 0: static VCs, 1: DVOQR |
| dsm_mesh, NI | PKT_LEN | 8 | flits per packet, head included |
| dsm_mesh | NI_DEPTH | 32 | network interface buffers |
| all | ARB_K | 2 | PS arbiter group size |
| dsm_pkg | FLIT_W | 32 | data bits per flit (package constant) |

## Verification

Each block has a self-checking testbench in `tb/`. Each one:

- ends with a `TB_RESULT` line;
- has a watchdog;
- drives random traffic with random backpressure, and checks it against a
  reference model or scoreboard.

Cycle-level checks include:

- PS arbiter: the grant sequence against a round-robin reference, including
  the 24-bit, 8-per-group example;
- internal router: 2 cycles per hop;
- router: 2 cycles through one internal router, 4 through both;
- network interface: 700 words in 100 full packets in about 800 cycles;
- receive path: same-cycle delivery to the PE;
- mesh: 2R+2 zero-load latency, and a 700-word stream at one flit per cycle;
- mesh saturation: every node injects 7-word runs to random other nodes
  without pause. Delivered throughput is about 0.85 flits/cycle/node, and the
  test requires at least 0.5.

The mesh test runs uniform random traffic from all 16 nodes with a hot spot.
It checks the order and exactly-once delivery of every word, and counts:

- injection stalls;
- link backpressure;
- PE-side backpressure;
- use of both VCs;
- X-to-Y turns;
- full and short packets.

## Not built

- The 4-stage pipeline version of the internal router, where split and merge
  each get an extra buffer stage. Only the 2-stage router exists.
- Width conversion between the PE and the network in the network interface.
  Both sides are 32 bits.
- 128-bit flits. FLIT_W is a package constant; it is set to 32 and only 32
  was tested.
- The other topologies the router can serve (torus, rings, octagon). Only the
  mesh top is provided.
- A load-latency sweep. The mesh test measures one saturation point only.
- A full-mesh simulation with dynamic buffers (`DYNAMIC=1`). The dynamic
  buffer is tested on its own and inside `vc_buffer`.
