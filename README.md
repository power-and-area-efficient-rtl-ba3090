# BiNoC virtual-channel router with runtime-sized VC buffers

In a network-on-chip the router buffers take most of the area and power, and
much of that buffer space sits idle: an input port's virtual channels (VCs) are
sized once, and a quiet VC cannot lend its slots to a busy one. This router
attacks the waste from two sides:

* **Unified, runtime-sized VC buffers.** Each input port has one flit store.
  Every VC owns a private region of it, but the split between the VCs is a
  runtime setting, not a synthesis constant: a system can give 7 slots to one
  VC and 1 to another without rebuilding the hardware.
* **Bidirectional channels (BiNoC).** The link to each mesh neighbour is not a
  fixed pair of one-way channels. A small FSM at each end hands the right to
  drive the link back and forth, so the wires follow the traffic.

Around these sits a conventional four-stage virtual-channel router: route
computation, VC allocation, switch allocation, switch traversal, with
separable round-robin allocators and credit flow control.

Default configuration: 5 ports (local, north, east, south, west), 4 VCs per
input port, 4 flit slots per VC (80 flit slots per router), 128-bit flits,
16-flit packets.

## Block structure

```
                     binoc_router
   in_flit[p] ──► vc_buffer[p] ──► RC (route_compute per VC)
                   (4 VCs,            │
                    bypass)           ▼
                     ▲           vc_allocator ──► switch_allocator
      credit_out ◄───┘                                  │
                                                        ▼
                         ST register ──► crossbar ──► output register ──► out_flit[p]
   channel_dir_ctrl[1..4] ◄──► neighbour's FSM   (gates which outputs may send)
```

| Module | Role |
|---|---|
| `noc_pkg` | sizes, flit struct, port and flit-type enums |
| `vc_buffer` | one input port: shared flit store, per-VC circular FIFOs, bypass, runtime split |
| `route_compute` | XY routing of a head flit |
| `vc_allocator` | separable two-stage VC allocation, output-VC busy tracking |
| `switch_allocator` | separable two-stage switch allocation |
| `rr_arbiter` | round-robin arbiter used by both allocators |
| `crossbar` | 5x5 flit multiplexer, one input per physical port |
| `channel_dir_ctrl` | one end of the direction-control FSM pair of a bidirectional link |
| `binoc_router` | the router (top) |

## A packet's path and its timing

Each input VC runs a three-state machine: `IDLE → VA → ACTIVE → IDLE`.

| Cycle | Head flit | Body / tail flit |
|---|---|---|
| t | arrives, is written into its VC (BW); if it is at the VC front, its route is computed and registered (RC) | arrives; if the packet holds an output VC and the VC is empty, it can win SA in this same cycle (bypass) |
| t+1 | VC allocation (VA) | — |
| t+2 | switch allocation (SA): leaves the buffer, credit goes upstream | (SA in t if bypassed) |
| t+3 | switch traversal (ST) through the crossbar into the output register | t+1 |
| t+4 | on `out_flit` / `out_valid` (link traversal) | t+2 |

So an unblocked head flit appears at the output 4 cycles after it arrives,
and the rest of a 16-flit packet follows at one flit per cycle. The tail flit
frees the output VC when it wins SA; the input VC then goes back to `IDLE` and
the next packet's head, queued behind the tail in the same FIFO, is routed in
the following cycle. Only the head goes through RC and VA; the others inherit
the output VC and rewrite the flit's `vc` field with it as they leave.

## Input buffer: private regions in a shared store

`vc_buffer` holds `NV*DEPTH` flit slots (16 by default). VC `v` owns the
contiguous slots `base[v] .. base[v]+size[v]-1` and uses them as a circular
FIFO (`rptr`, `wptr`, `count` per VC). The flit's own `vc` field picks the VC
to write, as every upstream stage appends the VC id to the flit.

**Bypass.** When VC `v` is empty, a flit arriving for it is shown on the
VC's read port in the same cycle. If the switch allocator takes it, it is
never written into the store. This is what lets body flits of a streaming
packet cross the router in 2 cycles.

**Runtime split.** `cfg_we` with `cfg_depth[v]` (1..16 slots per VC, sum at
most 16) sets a new split. It is taken only while the router is idle: all
buffers empty, every VC `IDLE`, nothing in the crossbar stage, no flit
arriving. `cfg_done` pulses when it is taken, and `cfg_err` pulses when it is
refused (sizes do not fit, or the router is busy). The same split goes to all
five input ports, and the router reloads its output credit counters with it,
which assumes every router in the network uses the same split. The network
must therefore be quiescent, with all credits home, when the split changes.
After reset every VC has 4 slots.

Nothing in the hardware chooses a split from the traffic. A controller outside
the router has to decide it.

## Allocation

Both allocators are *separable*: each is made of two layers of round-robin
arbiters (`rr_arbiter`), which is fast and small but does not look for the
best matching.

**VC allocation.** Routing returns one output port. Stage 1, per input VC,
picks one *free* VC of that port with a 4-input arbiter. Stage 2, per output
VC, picks one of the input VCs that chose it with a 20-input arbiter. A loser
retries next cycle. Since all stage-1 arbiters of waiting packets may pick the
same free VC, several free VCs can go unused in one cycle; this costs little,
because an output channel carries only one flit per cycle anyway. Output VCs
stay `busy` from grant until the tail leaves.

**Switch allocation.** The VCs of one input port share one crossbar input.
Stage 1, per input port, picks one VC that is `ACTIVE`, has a flit, has a
credit for its output VC, and whose output channel this router may drive.
Stage 2, per output port, picks one of the input ports. A stage-1 arbiter
moves its priority only when its winner also wins stage 2, so a VC that keeps
losing at the output is not skipped over. The cost is that an input port whose
stage-1 winner loses sends nothing that cycle, even if another of its VCs
wanted a free output.

## Bidirectional channels and the direction-control FSM pair

This is the least conventional part of the design.

Each mesh port (north, east, south, west) connects to its neighbour through
one bidirectional channel. At any moment exactly one of the two routers owns
it and may send on it. Ownership moves like a token between two
`channel_dir_ctrl` instances, one in each router:

```
           S_OUT (owner)  ── rel_out ──►  other end: S_IN_* → S_OUT
             ▲     │
    peer_rel │     │ rel_out (peer asks and: nothing to send, or held ≥ HOLD_MAX cycles)
             │     ▼
   S_IN_WAIT ◄── local_req ── S_IN_IDLE
   (req_out=1) ── !local_req ──►
```

* A non-owner with flits waiting for that port (`local_req`) raises `req_out`.
* The owner releases (`rel_out`, one cycle) when the other end requests and
  either it has nothing waiting, or it has owned the channel for `HOLD_MAX`
  cycles (16 by default, one packet). The cap keeps a busy router from
  starving its neighbour. Handing over in the middle of a packet is safe
  because flits carry their VC id and interleave freely.
* In the release cycle `may_send` is already low, so the switch allocator
  grants nothing more to that output. The other end owns the channel from
  the next cycle.

*Turnaround.* The releasing router's last flit, granted in the cycle before
the release, is on the wire one cycle after the release. The new owner's
first flit needs SA and ST after it takes over, so it is on the wire two
cycles after it takes over, which is three cycles after the release. The two
directions therefore never carry data in the same cycle. An assertion in the
router checks this on every mesh port.

*Reset owners.* With `BIDIR_OWNER = 5'b00110`, the north and east ports own
their links after reset and the south and west ports do not. In a mesh of
identical routers each link thus has exactly one owner.

*Representation.* In silicon the data wires of a channel are shared. Here, and
in simulation, which has no tri-state, each port has separate `in_*` and
`out_*` buses, and the handshake keeps only one of them active at a time.
`cdc_req_out/cdc_rel_out` of one router connect to `cdc_req_in/cdc_rel_in` of
its neighbour's facing port. The local port is an ordinary pair of one-way
channels and its CDC outputs are tied low.

## Flow control and flit format

Credit based: the router keeps one counter per output port and downstream VC,
initialised to the VC size. A flit that wins SA takes a credit. A
`credit_in`/`credit_in_vc` pulse from downstream gives one back. Upstream
credits leave on `credit_out`/`credit_out_vc` one cycle after a flit leaves
an input buffer. Credit wires are always present, in both directions, on
every port.

`flit_t` (128 bits, MSB first): `ftype` (2: body, head, tail, single),
`vc` (2), `dst_x` (4), `dst_y` (4), `payload` (116).

Routing is dimension-ordered XY on a 2-D mesh with Y growing northwards. The
router's own position is given by the `X`, `Y` parameters.

## Relation to the original BiNoC VC router description

Taken from it: 5 ports with 4 VCs of 4 flits, 128-bit flits and 16-flit
packets; private per-VC buffers whose size is set at runtime; buffer write and
route computation in the arrival cycle; the RC, VA, SA and ST stages; body and
tail flits inheriting the head's VC; the tail freeing the VC; the bypass for
an empty VC; separable VC and switch allocators made of round-robin
arbiters, with the stage sizes above; one crossbar input per input port; a
channel-direction-control protocol run by a pair of FSMs.

This design's own choices: XY routing; the flit layout; credit flow control;
the contiguous-region buffer layout and the idle-only re-split; the FSM
states, handshake signals, `HOLD_MAX` cap and reset owners of the direction
control; one bidirectional channel per neighbour; the 4-cycle head latency.

Not built:
* A policy that re-splits the buffers automatically from traffic. The
  original speaks of buffers allocated "according to traffic conditions" but
  describes only the runtime-settable size.
* Look-ahead routing (route computed one router early), which the original
  mentions as an option beside its four-stage pipeline.
* VC classes, reserved high-priority VCs and other quality-of-service
  policies, which the original names as motivation only.
* Power and area characterisation. These are properties of a technology
  mapping, not of the RTL.

Known departures:
* The original calls the buffers single-ported. Here the store is a register
  array: one write per cycle and one flit removed per cycle, but the front
  flit of every VC is visible at once, because routing and the switch
  allocator look at all of them.
* The original's FPGA prototype figures (about 275 flip-flops and 95 I/O
  pins) cannot hold this router at the stated sizes. Its buffers alone are
  10,240 bits and its flit ports 1,280 pins. The RTL keeps the stated sizes.

A generic synthesis of `binoc_router` at the defaults gives about 10.7k
word-level cells, 2.2k flip-flop bits and 10,240 bits of buffer memory. Most
of the logic is in the VC allocator's twenty 20-input stage-2 arbiters.

## Simulation

All testbenches are self-checking, print `TB_RESULT checks=N failures=M`, and
have a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv \
    tb/tb_binoc_router.sv --top-module tb_binoc_router
./obj_dir/Vtb_binoc_router
```

(replace the testbench name for the others; each finishes in well under a
second).

| Testbench | What it checks |
|---|---|
| `tb_binoc_router` | the router at its default size; every port driven by a neighbour model with its own direction FSM and a two-register output delay, and a sink with credit return and random stalls. Checks 4-cycle head latency and a 16-cycle packet stream, the XY port, per-VC order and every payload bit of 301 packets, no credit overrun, one owner per channel, refusal of a re-split under traffic, and a runtime re-split to 7/1/4/4. Fails unless each of these happened: bypass, VA conflict, SA conflict, credit stall, hand-over in both directions, hand-over forced by the hold cap, VC interleaving on a link, full input VC, re-split |
| `tb_binoc_pair` | two routers joined by one bidirectional channel, both sending across it: all packets delivered intact and in order, never both ends driving, direction changed both ways |
| `tb_binoc_mesh` | a 2x2 mesh of default-size routers joined by four bidirectional channels, random all-to-all traffic of 160 packets: delivery to the right router, order and payload, no channel driven or owned from both ends, two-hop packets, every channel handed over by both of its ends |
| `tb_vc_buffer` | against per-VC reference queues: front flits, counts, bypass, re-split, refusal of an oversized split |
| `tb_vc_allocator`, `tb_switch_allocator` | cycle-exact against reference models with their own arbiter pointers |
| `tb_channel_dir_ctrl` | two FSMs back to back: single owner, prompt hand-over, hold cap, bounded waiting |
| `tb_rr_arbiter`, `tb_route_compute`, `tb_crossbar` | reference comparisons; exhaustive for routing on an 8x8 mesh |

Assertions in the RTL check that no VC region overflows, no output VC is
granted twice, an idle input VC only sees head flits, and both ends never drive
a channel together. Run with `--assert` to enable them.

## Changing it

`NV` and `DEPTH` are router parameters. Port count, flit width and packet
length live in `noc_pkg`. The port numbering and XY routing assume the 5-port
mesh router. `HOLD_MAX` trades hand-over latency against link efficiency.
`X`, `Y` and `BIDIR_OWNER` place a router in a mesh.
