# Asynchronous interconnect for a GALS system-on-chip

Several synchronous processing elements, each running on its own clock, exchange
9-bit words over a network that has no clock at all. The network is a binary tree
of three-port "T" routers. Each router steers every word by its most significant
bit. Handshakes pace all transfers, and a word is stored only where a stage's data
latch holds it. Asynchronous FIFOs sit between the network and the clocked parts.
They come in four shapes: linear, parallel, tree and square. The shapes trade
latency against area and layout.

This RTL contains the router (switch, join, mutual exclusion), the four FIFO
styles with their building stages, and a top level. The top level is one router
with a FIFO on each of its three inputs and three outputs.

## Handshake and timing model

Every channel uses the four-phase bundled-data protocol:

1. The sender puts a word on the data lines.
2. The sender raises the request (`lv` on a stage's left side, `rv` on its right side).
3. The receiver raises the acknowledge (`la` or `ra`).
4. The request falls, then the acknowledge falls.

The data must be stable before the request rises, and must stay stable until
the acknowledge rises.

The controllers are speed-independent circuits made of *set/reset gates*
(generalised C-elements, `anoc_gc`). The output of such a gate rises when its
set function is true and falls when its reset function is true. Otherwise the
gate holds its value through its own feedback.

Each gate carries a simulation delay `GD` (default 1 time unit). The delay is
modelled with a nonblocking assignment after an explicit event list. Synthesis
ignores the delay, and correctness does not depend on its value.

The data latches have no delay. A word is therefore already in the latch when
the request that goes with it rises.

Every controller has an active-high `rst` that clears it to the empty state.
The original circuits have no reset. After power-up, pulse `rst` low, then high,
then low, and keep every input request low while `rst` is high.

## The router (`anoc_router`, `anoc_switch`, `anoc_join`, `anoc_mutex`)

Each port p (0, 1, 2) has one **switch** on its input and one **join** on its
output.

- **Routing.** A word entering port p with MSB 0 leaves by port (p+1) mod 3.
  With MSB 1 it leaves by port (p+2) mod 3.
- **Rotation.** The word leaves rotated left by one bit, so the next router on
  the path sees the next routing bit.

**Switch.** The switch has no data latch; it only steers the request. `rv1`
serves MSB 1 and `rv2` serves MSB 0. The switch copies the acknowledge of the
chosen side back as `la`. The MSB must be stable before `lv` rises. If it
changes while `lv` is high, both requests can rise, and an assertion reports
this.

**Join.** The join takes the two switches that lead to its port. A mutual
exclusion element lets one of the two requests through at a time.

- A grant is held until that input's handshake is completely over. The mutex
  request is `mlv | la` for that input.
- On a tie, input 1 wins.
- The mutex is behavioural. A real mutex contains an analogue filter against
  metastability; this model does not.

Behind the mutex the join works like one FIFO stage, with a 2:1 multiplexer in
front of its data latch. That latch is the only storage on a path through the
router.

## FIFO stages

All FIFOs are built from five stages. Each stage has a controller and a 9-bit
*normally open* data latch. The latch is transparent while the stage is empty,
and closes as soon as the stage accepts or offers a word.

| stage | module | behaviour |
|---|---|---|
| linear | `fifo_linear_cell` | `la` and `rv` rise together: the stage takes the word and passes it on at once |
| toggle-1x | `fifo_toggle_1x` | sends words alternately to output 0 and output 1 |
| toggle-2x | `fifo_toggle_2x` | one word to output 0, then two to output 1 (first position set by `START`) |
| merge-1x | `fifo_merge_1x` | takes words alternately from input 0 and input 1, with a multiplexer before the latch |
| merge-2x | `fifo_merge_2x` | one word from input 0, then two from input 1 |

**Linear stage.** The controller has an internal event `t`. It fires when a
request is waiting on the left and the previous output cycle is finished (both
`rv` and `ra` low). `t` sets `la` and `rv`, then clears once both are up.
The latch is closed while either `la` or `rv` is high.

**Toggle and merge stages.** These also keep a position. The position lives in
a master-slave latch pair driven by `la`:

- while `la` is high, the master latches the next position;
- while `la` is low, the slave copies the master.

The stage fires again only when master and slave agree.

A toggle or merge acknowledges its input only after the chosen output has
acknowledged. Such a stage therefore passes a word on, but does not hold it
while its output waits. This affects the capacities given below.

## The four FIFOs

Each FIFO is ten stages deep and 9 bits wide. Words always leave in the order
they entered, because each merge collects words in the same pattern as the
matching toggle distributed them.

| FIFO | module | structure (default parameters) | words held with the output stalled |
|---|---|---|---|
| linear | `fifo_linear` | `DEPTH` = 10 linear stages | 10 |
| parallel | `fifo_parallel` | toggle-1x, two branches of `BRANCH_DEPTH` = 4 stages, merge-1x | 8 |
| tree | `fifo_tree` | toggle-1x feeding two toggle-1x, four linear stages, two merge-1x feeding a merge-1x | 4 |
| square | `fifo_square` | top row toggle-2x, toggle-1x, stage; columns of 1, 2, 1 stages; bottom row stage, merge-1x, merge-2x | 6 |

A word entering an empty FIFO passes through:

| FIFO | stages on the way through |
|---|---|
| linear | 10 |
| parallel | 6 |
| tree | 5 |
| square | 5 or 6 |

**Square FIFO.**

- Column 1 receives one word in three. Columns 2 and 3 receive the others in turn.
- The bottom row collects the columns in the order 1, 2, 3.
- The column depths `V1_DEPTH`, `V2_DEPTH` and `V3_DEPTH` are this design's own
  choice. They fill the square to ten stages.

## Top level (`anoc_top`)

`anoc_top` is one router. Its port inputs are buffered as follows:

| port | input FIFO |
|---|---|
| 0 | linear FIFO |
| 1 | parallel FIFO |
| 2 | square FIFO |

Each router output goes through a tree FIFO. All six channels are brought out
as plain arrays (`in_lv`, `in_la`, `in_data`, `out_rv`, `out_ra`, `out_data`).

The processing elements, their clocked interfaces and the synchronisers are not
part of this RTL. A system with several routers is built by instantiating
`anoc_router` again and connecting ports router to router.

## Departures from the original design

- The controllers' set and reset functions are derived here from the stage
  behaviour. They are not the original gate equations.
- A reset is added.
- The one-bit rotation of each word in the router is this design's own choice,
  and so is routing ports B and C with the same rotation as port A.
- The toggle-2x and merge-2x patterns, the square FIFO's layout, and the choice
  of which FIFO sits on which port of the top level are this design's own.
- Toggles and merges acknowledge only after the next stage has acknowledged.
  For that reason the parallel, tree and square FIFOs hold fewer than ten words
  when their output is stalled, even though each is ten stages long.
- Latency, power and area were measured in a 130 nm process. None of these
  figures can be checked here. The testbenches check order, data, routing and
  capacity only.

## Simulation

Every block has a self-checking testbench in `tb/`:

| testbench | block |
|---|---|
| `tb_anoc_switch`, `tb_anoc_join`, `tb_anoc_router` | router and its parts |
| `tb_fifo_linear_cell`, `tb_fifo_toggle_1x`, `tb_fifo_toggle_2x`, `tb_fifo_merge_1x`, `tb_fifo_merge_2x` | FIFO stages |
| `tb_fifo_linear`, `tb_fifo_parallel`, `tb_fifo_tree`, `tb_fifo_square` | FIFOs |
| `tb_anoc_top` | whole design |

**What the testbenches drive and check.**

- Random sources and sinks with random handshake delays.
- Every word against a reference queue.
- For the FIFOs: they stall the output and count how many words are taken.
- Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end.

**The end-to-end test.** `tb_anoc_top` runs the top level at its default
parameters. It sends 400 words from each port, and each sink sometimes pauses
for a long time. The test fails if any of these never happens:

- one of the six routes is not used;
- a join never sees both of its inputs requesting at once;
- a source never waits on a full FIFO;
- a toggle or merge side is never used.

Example, with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb rtl/anoc_pkg.sv tb/tb_anoc_top.sv --top-module tb_anoc_top
    ./obj_dir/Vtb_anoc_top +verilator+rand+reset+2

Starting from random register values (`+verilator+rand+reset+2`) is deliberate.
The testbenches apply the reset pulse that brings every controller to its empty
state.

**Lint note.** Verilator's lint reports `NOLATCH` on the `always_latch` data
latches of the stages and the join. Synthesis does infer a transparent latch for
each of them (one `$dlatch` per bit). In simulation the latch holds its word
while its enable is low, which the FIFO tests check. The warning is left
standing.
