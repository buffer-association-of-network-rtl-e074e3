# An 8-port virtual-channel router with link-listed shared input buffers

A router for a network on chip has to buffer flits at every input, and each input
serves several virtual channels (VCs). If every VC gets a fixed FIFO of its own, one
busy VC can stall while the FIFOs of idle VCs sit empty. This router uses a
**dynamically allocated multi-queue (DAMQ)** at each input instead. The input has one
shared flit memory, and every VC is a linked list threaded through it. A VC takes
slots only while it holds flits, so a single VC may fill the whole buffer. Around these
buffers sits a conventional single-cycle router:

- round-robin arbiters, one per output;
- a non-blocking crossbar;
- output holding registers;
- credit-based flow control;
- a latch-based clock gate that can freeze the whole router.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from the
assertions, which are left out when `SYNTHESIS` is defined.

## Data path at a glance

```
            +-------------------- input_port (x NUM_PORTS) ---------------------+
 in_valid   |  damq_buffer             VC choice      ltr_delay    route_decode |  req / req_dest
 in_data -->|  (SRAM, slot state,  --> (round robin, -> (hold-off -> (dest field |------------+
 in_vc      |   VC ID table, links)     held till       cycles)      -> one-hot) |            |
            +------------------------------ gnt ----------------------------------+            v
 credit_out <-- one pulse per freed slot                              rr_arbiter per output (x NUM_PORTS)
                                                                      (masked by has_credit)   |
                                                                                  grant (one-hot)
                                                                                       v
                                                                crossbar -> output_port (x NUM_PORTS)
                                                                             out_data / out_vc / out_avail
                                                                             credit counter <- credit_in
 noc_top = clock_gate (en_i, latch_en, gated_clk) + noc_router running on gated_clk
```

A flit goes through the router in two clock edges:

1. **Write edge.** The flit on `in_data[p]` (with `in_valid[p]` and its VC number on
   `in_vc[p]`) is stored in a free slot of input `p`'s buffer and linked to its VC.
2. **Switch cycle.** In the next cycle the input offers the head flit of one VC:
   - the destination field goes through the decode logic and requests an output;
   - that output's arbiter grants one requesting input;
   - the grant pops the flit and steers the crossbar;
   - at the following edge the flit is in the output register, and `out_avail[o]`
     is high for one cycle.

So a flit presented before edge *t* is on the output after edge *t+1*, when it meets
no contention and has no hold-off. Each input takes one flit per cycle, and each output
sends one per cycle. Traffic without output conflicts, such as a permutation, therefore
runs at full throughput on every port.

## The DAMQ input buffer (`damq_buffer`, `slot_state_table`)

Each input has four tables:

| table | contents | size |
|---|---|---|
| flit SRAM | the flits | `SLOTS` x `DATA_W` |
| slot state table | one occupied flag per slot | `SLOTS` bits |
| VC ID table | per VC: valid bit, head pointer, tail pointer | `NUM_VC` x (1 + 2 log2 `SLOTS`) |
| next-pointer table | per slot: the slot of the next flit of the same VC | `SLOTS` x log2 `SLOTS` |

**Write.** The slot state table offers the lowest free slot. The flit is written there
and the slot is marked occupied. What happens next depends on the VC:

- If the VC was empty (a *new* VC), its head and tail pointers both point to the new
  slot.
- Otherwise, the old tail's next pointer is set to the new slot, and only the tail
  pointer moves.

**Read.** The slot at the VC's head is freed. What happens next depends on the
pointers:

- If head equals tail, that was the VC's last flit. The list ends, and the VC ID table
  marks the VC empty.
- Otherwise, only the head pointer moves, to the next pointer of the old head.

A write and a read may happen in the same cycle, even on the same VC. The VC ID table
update covers every case:

| read this VC | write this VC | head == tail | new head | new tail | valid |
|---|---|---|---|---|---|
| yes | yes | yes | new slot | new slot | stays 1 |
| yes | yes | no  | next[head] | new slot | stays 1 |
| yes | no  | yes | - | - | 0 |
| yes | no  | no  | next[head] | - | stays 1 |
| no  | yes | (VC empty) | new slot | new slot | 1 |
| no  | yes | (VC not empty) | - | new slot | stays 1 |

The SRAM is read asynchronously, so `head_data[v]` always shows the head flit of every
VC. A slot freed at an edge is offered again from the next cycle. The flit SRAM and the
next-pointer table are never reset; only the occupied flags and the VC ID table are.
Each array is written as a plain register array, and synthesis tools map it to memory.

A write into a full buffer is ignored, and an assertion flags it. The sender is expected
to keep credits (see below) so that this never happens. `in_full[p]` shows when the
buffer is full. A full buffer cannot take a flit in the same cycle in which it frees a
slot. The credit for that slot is returned in that cycle, so a sender that counts
credits never tries.

## Choosing a VC and holding it off (`input_port`, `ltr_delay`)

Each input offers one flit at a time:

- **VC choice.** Among the non-empty VCs, the next one in round-robin order after the
  last one granted is chosen. Once offered, the choice is held until the flit is
  granted, so an ungranted offer never changes under the arbiter.
- **LTR hold-off.** When a new head flit becomes available, the port's `ltr_value` is
  sampled. The request is raised exactly `ltr_value` cycles later; with 0 it is raised
  at once.
  - The counter shows `ltr_count`.
  - `ltr_zero` says the wait is over, and stays high until the grant (`ltr_gnt`).
  - A change of `ltr_value` never delays a flit that is already waiting.
  - The port's offered flit is exposed as `req_data`.

  This programmable delay per input port is how the design lets a port's data reach
  its destination later than it could.
- **Decode logic.** The destination output is the top log2(`NUM_PORTS`) bits of the
  flit. It becomes a one-hot request. A destination number that does not exist (for
  example 5 to 7 in a 5-port router) requests nothing. The flit then stays at the head
  and blocks its input port, so senders must only use existing port numbers.

`credit_out[p]` pulses once for every flit granted out of input `p`, that is, once per
freed slot.

## Arbitration, crossbar and outputs (`rr_arbiter`, `crossbar`, `output_port`)

There is one arbiter per output. It grants one request per cycle:

- After reset, input 0 has the highest priority.
- After each grant, the priority moves to the input just after the one granted.
- An input that does not request is skipped, and the next one in order gets the grant.

Requests reach an arbiter only while its output has a credit. Because every input
offers one flit to one output, a grant is always used. It pops the flit and steers the
crossbar in the same cycle. This is a separable allocation: inputs pick first, outputs
pick second.

The crossbar has an independent multiplexer per output, so a blocked output never
blocks another output. The VC number travels through it beside the flit and comes out
unchanged on `out_vc`.

Each `output_port` has two parts:

- **Holding register.** It keeps the last flit on `out_data`/`out_vc`. `out_avail`
  marks a new flit for one cycle.
- **Credit counter.** It starts at `SLOTS`, the downstream buffer size. It goes down by
  one per flit sent, and up by one per pulse on `credit_in`. When it is zero, no flit
  is sent to that output.

## Clock gating (`clock_gate`, `noc_top`)

`noc_top` runs the whole router on `gated_clk`. The gate works like this:

- A latch is transparent while `clk` is low and captures the enable (`latch_en`).
- `gated_clk = clk & latch_en`. Because the enable can only change in the low phase,
  the gated clock has no glitches.
- While `en_i` is low, the router gets no clock edges. It holds every buffered flit,
  and its outputs are frozen.
- Inputs presented in a gated cycle are not seen, so senders must hold flits and
  credits back while `en_i` is low.
- The gate's enable is `en_i | rst`, so a reset works even while the router is
  disabled.

The latch is intentional: it is the standard glitch-free gating cell, and lint tools
will report it as a latch.

## Interface of `noc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `en_i` | in | 1 | clock enable of the router |
| `latch_en`, `gated_clk` | out | 1 | latched enable and gated clock, for observation |
| `in_valid[p]` | in | 1 | flit present at input p |
| `in_data[p]` | in | `DATA_W` | flit, destination in the top bits |
| `in_vc[p]` | in | log2 `NUM_VC` | VC of the flit |
| `ltr_value[p]` | in | `LTR_W` | hold-off of input p in cycles |
| `credit_out[p]` | out | 1 | one pulse per slot freed at input p |
| `in_full[p]` | out | 1 | input p has no free slot |
| `out_data[o]`, `out_vc[o]` | out | `DATA_W`, log2 `NUM_VC` | last flit sent on output o |
| `out_avail[o]` | out | 1 | new flit on output o this cycle |
| `credit_in[o]` | in | 1 | one credit returned to output o |

Port arrays are packed, indexed by port number. Drive inputs away from the rising edge
of `clk`. A sender keeps one credit counter per input, starting at `SLOTS`: it spends
one per flit and gets one back per `credit_out` pulse.

## Parameters

The parameters are set in `noc_pkg` and passed down by every module:

| parameter | default | origin |
|---|---|---|
| `NUM_PORTS` | 8 | the 8x8 router the design is built around; 5 gives the N/E/W/S/L router of its simulations |
| `DATA_W` | 32 | matches the 32-bit flits in the design's simulations |
| `NUM_VC` | 4 | VC numbers up to 3 appear in the design's simulations; the count is this design's choice |
| `SLOTS` | 16 | one of the buffer sizes (4, 8, 16, 32) the input port was evaluated with; this design's choice |
| `LTR_W` | 4 | this design's choice (hold-off of up to 15 cycles) |

Any `NUM_PORTS` of 2 or more, any power-of-two `NUM_VC`, and any `SLOTS` of 2 or more
elaborate. The default router has about 4,000 word-level cells, 584 flip-flop bits
and 4,864 memory bits (8 inputs x 16 slots x 32 bits of flits, plus next pointers).

## What follows the design and what is this implementation's own

These parts come from the design:

- an 8x8 router made of decode logic, VC queues, arbiters, a crossbar and output
  latches;
- link-listed DAMQ buffers with a slot state table, a VC ID table, and head and tail
  pointers;
- the write flow (new VC: set head and tail; otherwise: set the tail only);
- the read flow (head equals tail ends the list and updates the VC ID table);
- the rotating arbiter priority that starts at the first port after reset;
- the non-blocking crossbar;
- the LTR hold-off;
- the latch-based clock gate with `en_i`, `latch_en` and `gated_clk`;
- one flit per port per cycle.

These are choices made here, where the design leaves the point open:

- the flit format (destination in the top bits) and the 32-bit width;
- four VCs and 16 slots;
- lowest-free-slot allocation;
- the round-robin VC choice at each input, held until the grant;
- the meaning of `credit_in`, taken as credit returns, with a counter starting at
  `SLOTS`;
- `credit_out` pulses;
- the exact LTR counting;
- synchronous active-high reset;
- `en_i | rst` as the gate enable.

Departures to be aware of:

- The design describes its output stage as a level-sensitive latch and its arbiter as
  asynchronous. Here both are synchronous: the output stage is an edge-triggered
  holding register, and the arbiter is clocked logic with a registered priority.
- The VC number of a flit is kept from input to output. No VC is reassigned at the
  output, because no rule for doing so is given.
- Routing uses an explicit destination field in every flit. There is no XY or other
  routing algorithm, and no multi-flit packets: every flit is routed on its own.
- Only one router is built. Networks of routers (mesh, torus, tree) and the other
  input-port organisations it was compared with (conventional dynamic VCs, ViChaR,
  fast-read/fast-write buffers) are not part of this RTL.
- With 32 slots per input, the largest configuration evaluated for the input port,
  set `SLOTS = 32`. The default is 16.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_route_decode` | every destination value, 8- and 5-port decoders, invalid destinations |
| `tb_rr_arbiter` | port 0 first after reset, strict rotation, random requests against a model |
| `tb_crossbar` | random connection patterns, idle outputs |
| `tb_slot_state_table` | lowest-free choice, counts, filling to full, against a model |
| `tb_ltr_delay` | delay equals `ltr_value` for 0..15, hold until grant |
| `tb_damq_buffer` | per-VC order against queue models; one VC filling every slot; push and pop on one VC in one cycle |
| `tb_input_port` | next-cycle request, LTR delay, VC round robin, held offers, credit pulses, random traffic |
| `tb_output_port` | one-edge capture, data hold, credit count, stall at zero credits |
| `tb_clock_gate` | gated pulses only when enabled in the low phase, no glitches from enable changes in the high phase |
| `tb_damq_slot_sizes` | the buffer at 4, 8, 16 and 32 slots: one VC filling every slot, then draining while other VCs refill |
| `tb_noc_router` | 5-port router, 4 slots: scoreboard of every flit (right output, VC, order, none lost); two-edge latency on every output; downstream never overrun |
| `tb_noc_top` | default 8-port router, unchanged parameters, with clock gating (see below) |

`tb_noc_router` and `tb_noc_top` count each mechanism and fail if one never happens:

- output contention;
- credit stalls;
- full input buffers;
- LTR hold-offs;
- several outputs busy in one cycle;
- gated cycles (`tb_noc_top` only).

`tb_noc_top` also checks:

- that a reset works with `en_i` low;
- that everything is frozen while the clock is gated;
- 80 flits in 10 cycles on a permutation pattern (full throughput).

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top -o sim
./obj_dir/sim
```

Replace `tb_noc_top` with any other testbench name. The simulator is two-state, and
every register that is read is reset or written before use. The assertions in the RTL
cover:

- one-hot grants;
- no push into a full buffer;
- no pop from an empty VC;
- no send without a credit;
- no grant without a request.

They stop the simulation when violated.
