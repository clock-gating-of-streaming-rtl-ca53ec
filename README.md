# Clock-gated streaming stage

In a streaming (dataflow) design, actors pass tokens to each other through
FIFO queues. An actor whose output queue is full cannot fire. Its flip-flops
still toggle on every clock edge, though, and that costs dynamic power for
nothing. This RTL stops the actor's clock in that case. A small controller
watches the *full* (F) and *almost-full* (AF) flags of the actor's output
queue. It switches the actor's clock off shortly before the queue fills up,
and on again as soon as a consumer frees a place. The mechanism does not
depend on what the actor computes. Because a clock only stops while the actor
could not make progress anyway, data throughput is not reduced.

The unit that is built here is one **gated stream stage**:

```
                 in_full / in_afull (to the upstream stage's enabler)
                        ^
 in_wr_en  -->  +-------------+   act_rd_*   +---------+   act_wr_*   +--------------+  --> out_rd_data
 in_wr_data -->  | input queue |  ---------> |  actor  | ----------> | output queue |  <-- out_rd_en
                 +-------------+             | (outside|             +--------------+
                                             |  this   |                 |  F   | AF
                                             |  RTL)   |                 v      v
                                             +---------+           +---------------------------+
                                                  ^                | clock enabler             |
                                                  |  act_clk       |  controller -> D FF -> CE |
                                                  +----------------|  clock buffer with enable |
                                     clk ------------------------->+---------------------------+
```

The actor itself is not part of the RTL. In the reference arrangement it is a
video de-blocking filter, but the stage works with any actor that follows the
rules in *Connecting an actor* below. Its ports are brought out of the top
module with the prefix `act_`.

## Files

| file | module | role |
|---|---|---|
| `rtl/cg_pkg.sv` | `cg_pkg` | state type `cg_state_e` |
| `rtl/clock_enable_controller.sv` | `clock_enable_controller` | five-state FSM: F, AF in, EN out |
| `rtl/clock_buffer_ce.sv` | `clock_buffer_ce` | glitch-free clock buffer with enable (latch + AND) |
| `rtl/clock_enabler.sv` | `clock_enabler` | controller, re-timing flip-flop, clock buffer |
| `rtl/stream_queue.sv` | `stream_queue` | FIFO queue with empty, F and AF flags |
| `rtl/gated_stream_stage.sv` | `gated_stream_stage` | **top**: input queue, output queue, clock enabler |
| `tb/stand_in_actor.sv` | `stand_in_actor` | testbench-only actor, computes `3*x+1` |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## The clock enabling controller

This is the heart of the design. It is a Moore machine with five states.
EN depends only on the state:

| state | EN | flags (F, AF) seen at a clock edge → next state |
|---|---|---|
| `INIT` | 1 | (0,0) → `SPACE`; anything else → stay |
| `SPACE` | 1 | (0,1) → `AFULL_DISABLE`; (0,0) → stay |
| `AFULL_DISABLE` | 0 | (0,0) → `SPACE`; (1,1) → `FULL`; (0,1) → stay |
| `FULL` | 0 | (0,1) → `AFULL_ENABLE`; (1,1) → stay |
| `AFULL_ENABLE` | 1 | (0,0) → `SPACE`; (1,1) → `FULL`; (0,1) → stay |

A flag pair that the table does not list for a state keeps the state. One
example is (1,0), which a queue never produces.

Two things are easy to misread:

* **The clock is switched off at *almost* full, not at full.** The enable
  passes through a flip-flop and the clock buffer before it acts. The actor
  therefore still sees a couple of clock edges after the controller
  decides. Switching off when one place is left is the conservative choice.
* **The machine is asymmetric.** On the way up it goes through
  `AFULL_DISABLE` with EN=0. On the way down, from `FULL`, it goes through
  `AFULL_ENABLE` with EN=1. In both states the flags read (0,1). What differs
  is the direction: a queue that has just freed a place gets its producer's
  clock back at once. From `AFULL_ENABLE` a new write that fills the queue
  leads straight back to `FULL`.

## Timing of a stop and a restart

Everything except the actor runs on the free-running clock `clk`. The queue
flags are registered, so they change one clock after the transfer that
changes them. Counting clock edges:

* **Stop.** The output queue reaches one free place at edge *t*, so AF=1
  after *t*. At edge *t+1* the controller moves to `AFULL_DISABLE`. At edge
  *t+2* the flip-flop makes `act_ce` low. Edge *t+3* is the first edge that
  does not reach `act_clk`. The actor still sees edges *t+1* and *t+2*. In
  them it may write the last free place, but it never writes into a full
  queue (see below).
* **Restart.** A consumer read at edge *r* clears F. The controller moves to
  `AFULL_ENABLE` at *r+1*, and `act_ce` rises at *r+2*. Edge *r+3* is the
  first edge that reaches the actor again.

The clock buffer lets edge *k* through exactly when `act_ce` was high in the
cycle before *k*. So `act_ce` tells logic on `clk`, cycle by cycle, whether
the actor will see the coming edge.

### Transfers across a stopped clock

An actor whose clock has stopped keeps its outputs. A write request
(`act_wr_en`) that was high when the clock stopped stays high. The queues
sit on `clk`, so without precautions they would take that request on every
edge. For that reason the stage takes an actor's read from the input queue
and its write into the output queue only when `act_ce` is high. Those are
exactly the edges the actor sees. A held request is taken once, at the first
edge after the restart. This qualification is a choice made for this RTL.
The testbench shows that without it tokens are duplicated.

## The queues

`stream_queue` is a circular buffer in a memory array. It has a read
pointer, a write pointer and an occupancy counter. The head word is visible
on `rd_data` while `empty` is low (first-word fall-through).

* `full` (F) is high when all `DEPTH` places are used.
* `afull` (AF) is high when at most one place is free. AF therefore stays
  high while the queue is full. The controller relies on this, because it
  treats "full" as F=1 together with AF=1.
* A write and a read may happen in the same cycle.
* A write while full is a protocol error. The queue ignores it, and an
  assertion reports it.

The input queue's F and AF are brought out (`in_full`, `in_afull`). They can
drive the clock enabler of the upstream actor, the same way the output
queue's flags drive this stage's enabler.

## The clock buffer

On an FPGA this role belongs to a global clock buffer with a clock-enable
input. `clock_buffer_ce` is a portable equivalent: a latch that is
transparent while the clock is low, and an AND gate. The enable can only
change the output while the clock is low. As a result, a stop always takes
effect after a falling edge, and no high pulse is ever shortened. Lint and
synthesis report the latch. It is intended. On an FPGA, replace this module
with the vendor's buffer primitive. The number of such buffers on a device
limits how many separately gated stages a design can have.

## Connecting an actor

The actor must:

* run on `act_clk` and nothing else;
* read the input queue (`act_rd_en`) only while `act_in_empty` is low;
  `act_rd_data` shows the head;
* write (`act_wr_en`, `act_wr_data`) only while `act_out_full` is low;
* keep a request steady until it is taken. A request counts as taken at the
  next edge of `act_clk`, which is the natural behaviour of logic clocked
  by `act_clk`.

`tb/stand_in_actor.sv` is a minimal example. It has one holding register,
and it passes one token per clock when nothing blocks it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | token width of both queues (chosen to match byte-wide streams) |
| `DEPTH` | 16 | places in each queue (own choice; must be at least 2) |

At the defaults, generic synthesis gives about 96 word-level cells,
30 flip-flop bits, 1 latch bit and 256 memory bits for the whole stage.

## Reset

`rst` is synchronous and active high, and it resets everything. The queues
become empty. The controller goes to `INIT` with EN=1, and the re-timing
flip-flop goes to 1, so the actor's clock runs during reset and the actor can
reset too. The stage leaves `INIT` at the first edge after reset at which
the output queue shows F=0 and AF=0.

## Simulation

The testbenches are self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M` and needs `--timing`. From the project root,
for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/cg_pkg.sv tb/tb_gated_stream_stage.sv --top-module tb_gated_stream_stage
./obj_dir/Vtb_gated_stream_stage
```

Replace the testbench name to run another one.

| testbench | what it checks |
|---|---|
| `tb_clock_enable_controller` | every arc of the state table, then 2000 random flag pairs, against a table model; EN one clock after the flags; reset |
| `tb_clock_buffer_ce` | an output edge exactly when the enable was high; no glitches; enable toggles in the high phase have no effect |
| `tb_stream_queue` | default queue and a depth-3 queue against a reference FIFO: data, count, empty, F, AF |
| `tb_clock_enabler` | gated edges per clock period against the model; stop latency; all states reached |
| `tb_gated_stream_stage` | the top at its default parameters, end to end (3000 tokens, see below) |

In the end-to-end test, a producer, the stand-in actor and a consumer run
through several phases: free flow, heavy back-pressure, a full stop of the
consumer, random traffic, and a drain. The test checks:

* every token arrives once, in order and transformed;
* `act_clk` has an edge in a clock period exactly when `act_ce` was high;
* the clock is off whenever the output queue has been full for three
  cycles;
* with a free-flowing consumer the stage passes one token per clock and
  never stops its clock.

It also counts clock stops and restarts, each controller state, returns from
`AFULL_DISABLE` to `SPACE`, requests held across a stopped clock, and full
input and output queues. It fails if any of these never happened.

## What is not included, and where this RTL makes its own choices

* **The actor.** The de-blocking filter's algorithm is not specified, so no
  actor is included. The top brings out the actor's ports.
* **A whole application.** A complete decoder would be built from many such
  stages: an intra MPEG-4 Simple Profile decoder of 32 actors in eight
  processing blocks. Its actors are not specified and are not included.
* **Sizes.** Queue depth (16) and token width (8) are own choices.
* **Entry into `AFULL_DISABLE`.** The controller enters it when AF rises
  with F low, one place before the queue is full, not once the queue is
  already full. This early switch-off is deliberate (see the timing above).
* **Own choices elsewhere.** These are the transfer qualification with
  `act_ce`, the latch-based clock buffer, the behaviour for unlisted flag
  pairs, the synchronous reset and the state encoding.
