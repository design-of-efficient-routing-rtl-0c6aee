# iSLIP-scheduled mesh network-on-chip

When many cores, memories and accelerators on one die share an on-chip
network, the switches become the place where traffic piles up. Several
packets arriving at the same switch often want the same outgoing link. The
switch must then decide, every cycle, which packet may cross its crossbar
to which output. It must decide fairly, so that no input starves. It must
decide fast, so that the decision does not set the clock rate. It must also
keep the crossbar as busy as possible, so that the queues stay short.

This design solves that with an **iSLIP scheduler** inside every switch of
a 2D mesh. Each input keeps one queue per output. The inputs, the outputs
and their round-robin arbiters then negotiate a conflict-free
input-to-output matching within a single clock cycle. The RTL covers:

- the round-robin arbiter and its programmable priority encoder;
- the iSLIP scheduler;
- the five-port switch, which has virtual-output-queue input buffers, XY
  route logic and a crossbar;
- a 4 x 4 mesh of these switches.

## Contents

| File | What it is |
|---|---|
| `rtl/noc_pkg.sv` | Packet type, port numbering, widths |
| `rtl/ppe.sv` | Programmable priority encoder (round-robin pick from a pointer) |
| `rtl/rr_arbiter.sv` | Arbiter: encoder, pointer register with update enable, one-hot decoder |
| `rtl/islip_scheduler.sv` | N x N iSLIP scheduler built from 2N arbiters |
| `rtl/input_block.sv` | Input buffer organised as virtual output queues |
| `rtl/xy_route.sv` | XY route computation |
| `rtl/crossbar.sv` | N x N crossbar |
| `rtl/noc_switch.sv` | Five-port mesh router |
| `rtl/mesh_noc.sv` | Top: COLS x ROWS mesh (4 x 4 by default) |
| `tb/tb_<module>.sv` | One self-checking testbench per module |

## The iSLIP matching, and how it fits in one cycle

Each switch input holds a queue for every output. The scheduler therefore
sees a request matrix `req[i][j]`, which is high when input *i* has a
packet for output *j*. Its task is to pick a set of (input, output) pairs.
Each input and each output may appear in at most one pair. iSLIP builds
that set in iterations, and each iteration has three steps.

1. **Request.** Every input that is still unmatched requests every unmatched
   output it has a packet for.
2. **Grant.** Every unmatched output that received requests grants one of
   them. It picks round-robin: the first requesting input at or after its
   *grant pointer*.
3. **Accept.** Every input that received grants accepts one. It picks
   round-robin too: the first granting output at or after its *accept
   pointer*.

Matched pairs leave the game, and the next iteration works on what remains.
The way the pointers move is what makes iSLIP work:

- Pointers move only on the results of the **first** iteration.
- An accept pointer moves to one past the output it accepted.
- A grant pointer moves to one past the input it granted, **but only if that
  grant was accepted**.

Because of the last rule, an output keeps offering the same input until that
input takes it, so no queue is ever starved. Under heavy uniform load the
pointers quickly point at different places. After that, the first iteration
alone finds a full matching every cycle. The scheduler testbench checks
this. With every input requesting every output, a single-iteration 4 x 4
scheduler matches all four inputs in every cycle after a few cycles (the
testbench requires it within eight).

**Hardware.** `islip_scheduler` holds N grant arbiters and N accept arbiters
(`rr_arbiter`), one per output and one per input. Each arbiter holds its
pointer. All `ITERATIONS` iterations are unrolled into combinational logic,
so the decision appears in the same cycle as the requests. This follows the
aim of finishing arbitration within one clock cycle. Later iterations never
move pointers, so they need no arbiters of their own: each of them adds only
2N priority encoders (`ppe`), which read the existing pointers. Each arbiter's
`update_en` is driven from the first iteration:

- accept arbiter *i*: "some grant reached input *i*";
- grant arbiter *j*: "output *j*'s grant was accepted".

The cost is depth. Each iteration adds two encoder levels to the critical
path. `ITERATIONS` defaults to N, which always gives a maximal matching. If
timing is tight, lower it: the first iteration already gives full throughput
under saturation. The later ones only fill gaps under uneven load.

Outputs:

- `in_match[i]`: one-hot over outputs. It tells input block *i* which queue
  to pop.
- `out_match[j]`: one-hot over inputs. It is the crossbar select.
- `first_iter[i]`: input *i* was matched in iteration 1. This makes
  later-iteration matches visible.

Assertions check that the result is a matching and that it contains only
requested pairs.

## Arbiter and priority encoder

`rr_arbiter` follows the classic arbiter schematic:

- a programmable priority encoder turns `req` and the stored `priority`
  pointer into a winner index;
- a decoder turns that index into the one-hot `gnt`;
- the pointer register is fed by a two-way mux. With `update_en` low it
  holds its value. With `update_en` high it loads the winner index plus one,
  modulo N.

With no request the pointer never moves. The pointer goes to 0 on an
asynchronous active-low reset.

`ppe` implements the round-robin pick with two fixed-priority encoders and a
thermometer mask:

- the thermometer mask keeps only the requests at or above the pointer;
- the first encoder picks the lowest set bit of the masked vector;
- the second encoder picks the lowest set bit of the whole vector.

If the masked vector is non-empty, its result wins. Otherwise the search has
wrapped round, and the second encoder's result is used. The two encoders run
in parallel, which keeps the encoder shallow. `any` reports that some request
was present (the inverse of a "no request" flag).

## The switch

`noc_switch` has five ports, numbered by `noc_pkg::port_e`:

| Number | Port |
|---|---|
| 0 | local resource |
| 1 | north |
| 2 | east |
| 3 | south |
| 4 | west |

Every input line works the same way:

1. `xy_route` compares the arriving packet's destination with the switch
   position (`MY_X`, `MY_Y`). This chooses the output port.
2. `input_block` writes the packet into the FIFO (virtual output queue, VOQ)
   kept for that output. There are `DEPTH` entries per queue, 4 by default.
   A packet waiting for a busy output therefore never blocks packets behind
   it that go elsewhere.
3. Every non-empty queue requests its output. The request is masked by that
   output's `out_ready`, so no match is wasted on a blocked link.
4. In the same cycle, `islip_scheduler` returns the matching. Each matched
   input pops its queue head, and `crossbar` drives it onto the output line
   with `out_valid`.

Outputs have no buffers: at most one input drives each of them.

**Links** use valid/ready. A packet moves at a rising edge where `valid` and
`ready` are both high.

- `out_valid` rises only on an output whose `out_ready` is already high.
  It depends combinationally on `out_ready`.
- `in_ready` is high while **no** VOQ of that input is full. It comes only
  from stored state. That is why chained switches never form a combinational
  loop.
- The price is that a packet may be refused even though its own queue has
  room, because another queue of that input is full.

**Timing.** A packet accepted into a switch at edge *t* can leave it in the
cycle after *t*. It then enters the next switch at edge *t+1*. An
uncontended route of *h* hops therefore delivers a packet to the destination
resource *h + 1* edges after injection. Corner to corner in the 4 x 4 mesh
(6 hops) takes 7 cycles, and the mesh testbench checks this.

## Throughput: scheduler against whole switch

The two levels give different figures, so it is important not to mix them
up.

- **Scheduler alone.** Take any saturated uniform request matrix. iSLIP
  matches every input in every cycle, even with a single iteration.
- **Whole switch.** A switch has finite queues and the flow-control rule
  above. It sustains less: with all five inputs offering a packet every
  cycle to uniformly chosen other ports, the measured output utilisation
  (`tb_switch_uniform_load`) is:

| VOQ depth | Output utilisation |
|---|---|
| 4 | 83 % |
| 8 | 88 % |
| 16 | 89 % |

The loss comes from refusing an input while **any** of its queues is full,
which acts like head-of-line blocking at the switch entrance. A per-queue
ready, for example with credits per VOQ, would remove it, but is not built
here.

## The mesh

`mesh_noc` places `COLS` x `ROWS` switches on a grid (4 x 4 by default).
Switch (x, y) is node `y*COLS + x`, and row 0 is the north edge. Neighbours
are joined by a pair of opposite links. Each node's local port is brought
out of the module as a pair of valid/ready streams:

- `res_in_*` injects packets into the network;
- `res_out_*` delivers the packets addressed to that node.

A packet is one flit:

| Field | Bits |
|---|---|
| `dst_x` | 4 |
| `dst_y` | 4 |
| `payload` | 32 |

Routing is XY: first along the row, then along the column. It is
deadlock-free on a mesh, and it keeps packets between the same two nodes in
order. Links on the mesh boundary go nowhere: their inputs are idle and their
outputs are never ready. Destinations must therefore lie inside the mesh. A
packet addressed outside it would wait at the edge forever.

## What follows the original description, and what was chosen here

The following come from the original description:

- the request-grant-accept algorithm and its pointer rules;
- the arbiter built from a programmable priority encoder, an update-enabled
  pointer with increment, and a one-hot decoder;
- a two-encoder, thermometer-based priority encoder;
- the switch made of buffered input blocks, a scheduler, a crossbar and
  unbuffered outputs;
- virtual output queues;
- a 4 x 4 scheduler as the basic example;
- a 4 x 4 mesh of switches, each with one resource.

The following are this design's own choices, because the description leaves
them open:

- **Iteration count.** It says "multiple iterations". This design uses N, all
  within one cycle.
- **Encoder schematic.** The exact gate-level schematic of the encoder is not
  available. The standard masked/unmasked pair is used.
- **Routing function.** None is given. XY routing is used.
- **Formats and flow control.** Packet format, VOQ depth (4), valid/ready flow
  control, reset (asynchronous, active low) and port numbering are not given.
- **Five-port switch.** The scheduler example is 4 x 4, but a mesh switch
  needs five ports (four neighbours and the resource), so the switch uses a
  5 x 5 scheduler.
- **Buffered switches.** The description also discusses bufferless networks,
  but the switch it describes buffers its inputs, and iSLIP needs queued
  packets. Buffered switches were built.

Not built:

- **Network interface.** The adapter that would turn a resource's own
  transactions into packets is only named in the description, so no
  behaviour can be given for it. The mesh exposes the raw local ports
  instead.
- **Output blocks.** An output "block" holding no buffer has nothing to do
  beyond the crossbar output, so it has no module.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ppe` | Every request/pointer pair for N = 4 and N = 5, against a circular scan. |
| `tb_rr_arbiter` | 2000 random cycles against a pointer model; round-robin service of four always-on requesters. |
| `tb_islip_scheduler` | Three configurations against a software iSLIP model, cycle by cycle: 4 x 4 with 4 iterations, 4 x 4 with 1, and 5 x 5 with 5. Checks exact matchings, maximality for the multi-iteration ones, matches made in later iterations, and full throughput under saturation. It also checks for starvation: a request held up under heavy random competition must be served within N x N cycles (the longest wait seen is about 10). |
| `tb_input_block` | VOQ contents, order, `req` and `in_ready` against per-queue FIFO models; a full queue stops input while other queues still drain. |
| `tb_xy_route` | Every switch/destination pair of a 4 x 4 mesh, including hop-by-hop walks. |
| `tb_crossbar` | Random partial permutations. |
| `tb_noc_switch` | A switch at (1,1) with all five inputs loaded and random output ready: every packet leaves by its XY port, intact and in order; one-cycle switch latency. |
| `tb_switch_uniform_load` | One switch at 100 % uniform offered load: in-order delivery and output utilisation (at least 80 %; about 83 % measured). |
| `tb_mesh_noc` | The full 4 x 4 mesh at default parameters, in four phases: corner-to-corner latency; uniform random load with stalling resources; a hotspot; a drain. A scoreboard requires every packet to arrive exactly once and in order. The testbench also counts refused injections, output contention, later-iteration matches, ejection stalls and link stalls, and fails if any of them never happened. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_mesh_noc.sv \
          --top-module tb_mesh_noc -Mdir obj_mesh -o sim
./obj_mesh/sim
```

Replace `mesh_noc` with any other testbench name. The mesh testbench takes a
few minutes to compile and well under a second to run.

## Changing it

- **Mesh size.** Set `COLS` and `ROWS` on `mesh_noc`. `noc_pkg::COORD_W`
  (4 bits) allows up to 16 x 16.
- **Buffer depth.** Set `DEPTH` on `mesh_noc` or `noc_switch`.
- **Scheduler iterations.** Set `ITERATIONS` on `mesh_noc`, `noc_switch` or
  `islip_scheduler`. 1 gives the shallowest logic.
- **Packet width.** Edit `noc_pkg::DATA_W` or the `packet_t` struct.
  `packet_t` is the only packet format the switch relies on; its
  destination fields are the only ones the switch reads.
- **Another switch size.** `islip_scheduler`, `rr_arbiter` and `ppe` take any
  N, and `input_block` and `crossbar` are parameterised too. `noc_switch`
  fixes five ports because it is a mesh router.
