# Clock-gated streaming de-blocking filter

A streaming application is a chain of actors joined by queues. When the
consumer at the end of a queue is slower than the actor feeding it, the queue
fills up and the actor has nothing useful to do, yet its clock keeps toggling
every flip-flop and memory inside it. This design stops that clock. A small
state machine watches the FULL and ALMOST-FULL flags of the actor's output
queue, and while either is raised it turns off a clock gate in front of the
actor. When the consumer has drained the queue below the almost-full level the
clock comes back. The actors used here are 8x8-block video de-blocking
filters, one for luma and one for chroma, running side by side. Each has two
horizontal and two vertical edge filters working in parallel. One enable
gates both.

Because the actor's state is only frozen, never reset or skipped, gating
changes nothing in the data stream: the same words leave in the same order,
and the output rate is set by the consumer as before. What it saves is the
dynamic power of the actor while it would otherwise be stalled.

A second, independent part is a double-edge-triggered flip-flop, which stores
on both clock edges and so carries a given data rate at half the clock
frequency.

```
 in_*   --> [queue 1] --> [luma actor, CHROMA=0]   --> [queue 2] --> out_*
 c_in_* --> [queue 1] --> [chroma actor, CHROMA=1] --> [queue 2] --> c_out_*
            wclk rclk          clk = gclk              wclk rclk
             |    |               |                     |    |
            clk  gclk            gclk                 gclk  clk

 F, AF of both queues 2 (ORed) --> [clock enabler] --EN--> [clock gate] --> gclk
```

## Clock domains and the gating loop

There is one clock source, `clk`. The clock gate (`clock_gate`) makes `gclk`
from it by dropping pulses, so the two clocks have aligned edges and signals
can pass between them without synchronisers.

`gclk` drives everything whose work depends on the actors making progress:
the read side of each queue 1, both actors, and the write side of each
queue 2. The
write side of queue 1, the read side of queue 2, the clock enabler and the
cycle counters stay on `clk`. This split is what makes the loop work: while
the actor is stopped, the consumer still reads queue 2, its fill level falls,
and the enabler, still clocked, sees the flags drop and restarts the actor.
If queue 2's read side were gated too, the design would deadlock at the first
full queue.

The queue pointers are plain binary counters. Each side updates its own
pointer on its own clock, and FULL, ALMOST-FULL, empty and the count are
combinational functions of both pointers.

### Clock enabler

Its F and AF inputs are the OR of the two lanes' output-queue flags, so a
slow consumer on either lane stops both actors. That is the simple,
coarse-grained form of the scheme. Giving each actor its own enabler and
gate would be finer, and would take only a second `clock_enabler` and
`clock_gate`.

`clock_enabler` has two states:

| state | enable | leaves when | next state |
|-------|--------|-------------|------------|
| ON    | 1      | F = 1 or AF = 1 | OFF |
| OFF   | 0      | F = 0 and AF = 0 | ON |

It comes out of reset in ON. Its output is registered. The latch in the gate
is transparent while `clk` is low. So if queue 2 reaches the almost-full
level after rising edge *t*, the actor still gets the pulse at *t+1* and loses
the one at *t+2*. At most one more word can enter queue 2 after AF rises.
The default almost-full level is therefore `Q2_DEPTH - 1` (15): that last
word just fits. In any case the actor obeys queue 2's `wr_ready`, so no word
is lost at any level. Gating saves power; it is not needed for correctness.

Restarting takes the same path: the flags fall, the state goes to ON on the
next edge, and the actor runs again from the edge after that.

### What gating costs in throughput

A stopped actor does nothing at all, including work that does not need queue
2: loading the next block from queue 1, or filtering it. An ungated actor
would do that work while it waits, and it can also fill queue 2 to the top.
So gating costs nothing while the consumer is clearly the bottleneck. It costs
a little when the consumer is only just slower than the filter, because then
queue 2 must cover the actor's load and filter phases, and gating leaves it
less full. `tb_cg_throughput` runs a gated and a never-gated copy side by
side on the same 30 blocks:

| consumer rate | clock stopped | finish, gated vs ungated |
|---------------|--------------:|--------------------------|
| 1 word in 10 cycles | 62 % of cycles | same cycle |
| 1 word in 4 cycles (filter: 32 words in 113 cycles) | 11 % | 0.5 % later |

With the almost-full level at 14 the second case costs about 4 %, and at 12
about 7 %. That is why the default is 15.

### Clock gate

`clock_gate` is the usual latch-and-AND clock gate. The enable is latched
while `clk` is low and ANDed with `clk`. A change of enable during the high
phase therefore cannot cut a pulse short or start a new one. `test_en` forces
the clock on, as scan test needs. With `test_en` high the actor runs into a
full queue 2 and simply waits on `wr_ready`. The latch is intended; a
synthesis flow should map `clock_gate` to the library's clock-gating cell.

## The de-blocking filter actor

Block-based video coding leaves visible steps at block borders. A de-blocking
filter smooths the pixels on either side of each border. It does so only
where the step is small enough to be a coding artefact rather than a real
edge in the picture, with limits set by the quantisation parameter QP.

### Stream format

Words are 32 bits, four 8-bit pixels each. The chroma lane takes 8x8 blocks
of one chroma component (4:2:0) in the same format. For every 8x8 block the actor
takes 33 words and returns 32:

| words in | words out | content |
|---------:|----------:|---------|
| 1 | - | header: `[5:0]` QP (0..51), `[9:8]` boundary strength bS (0 = leave the block alone, 1, 2) |
| 8 | 8 | left-edge lines: word *r* holds the 4 pixels left of the block in row *r*; byte 0 is the pixel next to the edge |
| 8 | 8 | top-edge lines: word *c* holds the 4 pixels above the block in column *c*; byte 0 is the pixel next to the edge |
| 16 | 16 | the block in raster order, two words per row; byte 0 is the leftmost pixel |

The neighbour pixels come back filtered as well, because the filter changes
up to three pixels on each side of an edge. Whatever feeds and drains the
stream (normally a frame-memory controller) reads them from the frame and
writes them back.

### Schedule

`dbf_actor` is a single state machine:

1. **Load**, 33 cycles. The header sets the thresholds. The left lines go to
   Block Memory 1, the top lines to Block Memory 2, and the block to the RAM
   transposer.
2. **Left edge**, 8 cycles. In each of four steps, HF1 filters row *k* and
   HF2 filters row *k+4*. Their p sides are read through ports A and B of
   Block Memory 1, their q sides from the transposer in row mode. One cycle
   reads the memory; the next filters and writes both sides back.
3. **Top edge**, 8 cycles. The same with VF3 and VF4 on columns *k* and
   *k+4*. The p sides come from Block Memory 2 and the q sides from the
   transposer in column mode. The vertical filters therefore see pixels the
   horizontal filters have already changed, which is the usual order:
   vertical edges first, then horizontal edges.
4. **Output**, 64 cycles. Each of the 32 words takes one cycle to read and
   one cycle to send.

That is 113 cycles per block when neither stream stalls. Either stream may
stall at any point.

The transposer (`ram_transposer`) is what lets the vertical filters reuse the
horizontal filters' results. It holds the block as 8x8 registers. It can hand
out and take back the first four pixels of any two rows, or of any two
columns, in one cycle, so the block never goes back to a memory between the
two passes.

### Filter arithmetic

The filter units (`dbf_filter_unit`) and the threshold derivation
(`dbf_threshold`) use the HEVC luma rules at 8-bit depth with zero offsets:

* `beta` = 0 for QP < 16, QP - 10 up to 28, 2*QP - 38 above.
* `tC` comes from the 54-entry HEVC table, at QP + 2 when bS = 2.
* For one line, dp = |p2 - 2p1 + p0| and dq = |q2 - 2q1 + q0|.
  The line is filtered only if 2(dp+dq) < beta.
* The **strong** filter is used if also 4(dp+dq) < beta/4,
  |p3-p0| + |q0-q3| < beta/8 and |p0-q0| < (5tC+1)/2. It rewrites p0..p2
  and q0..q2 as low-pass averages, each kept within ±2tC of its old value.
* Otherwise the **normal** filter is used. It computes
  delta = (9(q0-p0) - 3(q1-p1) + 8) >> 4. If |delta| < 10tC, delta is
  clipped to ±tC and moves p0 and q0. p1 (q1) is corrected too when
  2dp (2dq) < (beta + beta/2)/8.

The chroma actor (`CHROMA = 1`) uses the HEVC chroma filter. Only edges
with bS = 2 are filtered. delta = (4(q0-p0) + p1 - q1 + 4) >> 3, clipped to
±tC, moves p0 and q0 only. tC is looked up at QpC + 2, where QpC is the 4:2:0
chroma QP: QP below 30, QP - 6 above 43, and a short table in between.

HEVC takes the filter-on and side decisions once per four-line segment, from
lines 0 and 3. Here each line decides for itself, with its own value counted
twice in place of the two-line sum. The result is therefore close to HEVC
but not bit-exact with it.

## Double-edge-triggered flip-flop

`det_ff` places two complementary latches side by side on the input. One is
transparent while `clk` is high, the other while it is low. A multiplexer
always takes the output from the latch that is currently holding. After a
rising edge, q shows what d was just before that edge; after a falling edge
likewise. q never follows d between edges. In the top it is a separate
`DET_WIDTH`-bit register with its own clock and data ports, next to the
filter.

## Modules

| file | role |
|------|------|
| `rtl/dbf_pkg.sv` | widths, pixel and line types, header and threshold structs |
| `rtl/stream_fifo.sv` | queue with FULL, ALMOST-FULL and separate write and read clocks |
| `rtl/clock_enabler.sv` | two-state enable FSM |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/block_ram.sv` | 32x32-bit true dual-port RAM (Block Memories 1 and 2) |
| `rtl/dbf_threshold.sv` | QP, bS to beta, tC |
| `rtl/dbf_filter_unit.sv` | one edge filter (HF1, HF2, VF3, VF4 are four instances) |
| `rtl/ram_transposer.sv` | 8x8 block buffer with row and column access |
| `rtl/dbf_actor.sv` | the parallel de-blocking filter actor (luma, or chroma with `CHROMA = 1`) |
| `rtl/det_ff.sv` | double-edge-triggered flip-flop |
| `rtl/cg_deblock_top.sv` | two lanes of queues and actors, enabler, gate and counters, with the DET flip-flop beside them |

Top-level parameters and their defaults: `Q1_DEPTH = 16`, `Q2_DEPTH = 16`,
`Q2_AF_LEVEL = 15`, `BM_DEPTH = 32`, `DET_WIDTH = 8`. The queue depths must be
powers of two. Of the 32 words in each block memory, one block uses 8. The
32-word size is kept so the memories match a 32x32 dual-port SRAM macro.

Status outputs of the top: `clk_en`, `gated_cycles` and `active_cycles` (clk
cycles with the actor clock stopped or running), `q2_count` and `c_q2_count`, the luma actor's
`blocks_done`, `lines_filtered` and `lines_strong`, and the chroma actor's
`c_blocks_done` and `c_lines_filtered`. The ratio of gated to
total cycles bounds how much of the actor's clock power was saved.

## Simulation

Every testbench in `tb/` checks its results against a model of its own and
ends by printing `TB_RESULT checks=N failures=M`. `tb/dbf_ref_pkg.sv` holds
the reference: the HEVC tables as literal lists, the line filter and a
whole-block model. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_cg_deblock_top.sv --top-module tb_cg_deblock_top
./obj_dir/Vtb_cg_deblock_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_stream_fifo` | data order, count, FULL, ALMOST-FULL against a software queue under random traffic |
| `tb_clock_enabler` | enable against a reference FSM for all F/AF combinations |
| `tb_clock_gate` | one pulse exactly per enabled cycle, no pulse cut or created by enable changes in the high phase, `test_en` |
| `tb_block_ram` | both ports, one-cycle read latency, shared storage |
| `tb_dbf_threshold` | every QP and bS against the HEVC tables, luma and chroma |
| `tb_dbf_filter_unit` | 20,000 random edge lines, all three luma outcomes (none, normal, strong), and the chroma filter |
| `tb_ram_transposer` | row and column reads and write-backs, word read-out |
| `tb_dbf_actor` | 60 random luma blocks against the block model, the 113-cycle block period, random stalls on both streams |
| `tb_dbf_actor_chroma` | the same for the chroma variant (`CHROMA = 1`) |
| `tb_det_ff` | capture on both edges, no transparency |
| `tb_cg_deblock_top` | 40 luma and 40 chroma blocks end to end at the default sizes |
| `tb_cg_throughput` | gated against never-gated copy, identical output, finishing time at two consumer rates |

The end-to-end test runs the two consumers in alternating fast and slow
phases: when one is slow the other is fast. In one slow phase it forces the
clock with `test_en`. It counts and requires
each of these: the clock stopped and restarted (over 100 times each), queue 2
full and almost full, queue 1 full (input back-pressure), the actor blocked
on a full queue 2 under `test_en`, normal and strong filtering, chroma filtering,
stops caused by the chroma queue alone, and DET captures. It also checks that the gated and active cycle counters match the
enable seen from outside.

## How far to trust it, and where it is this design's own

The gating scheme follows the source description closely:

* queues on both sides of the actor;
* an enabler driven by the output queue's FULL and ALMOST-FULL;
* ON/OFF behaviour for F = AF = 0 and F = AF = 1;
* a gate driven by EN.

The following are this design's own choices:

* ALMOST-FULL alone also stops the clock.
* The enable is registered.
* The gate is a latch-based ICG with a `test_en` input.
* Queue depths and the almost-full level are this design's.
* Only the queue ends next to the actor are gated. The scheme as described
  stops the clock of both queues too, which as noted above would leave no
  way to restart.

The filter's structure follows the description: two 32x32 dual-port block
memories for the left and top neighbours, two horizontal and two vertical
filter units, a threshold unit fed by QP, and a row-to-column transposer for
8x8 blocks. The following are this design's own:

* the stream format;
* the pairing of rows and columns onto the filter units;
* the 113-cycle schedule;
* the HEVC-based arithmetic with per-line decisions, for luma and chroma;
* one enable shared by both lanes.

Not built:

* **Surrounding system.** Other actors of a codec, and the frame memory that
  supplies blocks and takes results back, are outside the design. Their side
  is the two streams.
* **DET flip-flops inside the filter.** The low-clock-rate extension would
  use DET flip-flops in the filter's registers; here the flip-flop is
  provided as a separate block only.

Only simulation has tested the design. Power has not been measured. The
clock-gating counters give the fraction of cycles in which the actor's clock
was stopped, and that fraction is the quantity gating turns into savings.
