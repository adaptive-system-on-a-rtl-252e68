# aSoC: a tiled system-on-chip with a statically scheduled interconnect

aSoC (adaptive System on a Chip) places heterogeneous signal-processing cores
(motion estimation, DCT, filters, ...) on a grid of tiles. Each tile pairs a
core with a small **communication interface** that moves 32-bit words to and
from its four neighbours. Which word goes where is not decided by packets or
arbitration: every interface steps through a short, precomputed **schedule**
of crossbar settings, one per interconnect cycle, and repeats it forever. A
stream between two cores is therefore a fixed set of slots in the schedules
of the tiles it passes through.

Three things make the arrangement frugal with power and adaptable at run time:

* every word carries a **valid bit**; a slot whose stream has nothing to send
  leaves the link register unchanged, so the wires do not switch;
* each tile derives its **core clock** from the interconnect clock by a
  run-time selectable factor 2^n, so each core runs only as fast as its
  workload needs and exchanges data with the interconnect through small
  dual-clock FIFOs (**coreports**);
* the schedule itself can be changed while running: **jump** moves a tile to
  another schedule already in its memory, **load** writes new instructions.
  Cores can be reconfigured the same way, through configuration streams that
  share the interconnect with the data.

This repository holds the tile interface and a three-tile MPEG encoder
fragment built on it: a motion estimation & compensation (ME&C) core spread
over two tiles, followed by a DCT tile. The fragment switches between a
P-frame schedule (ME, MC and DCT all in use) and an I-frame schedule (the
input frame bypasses ME and MC and goes straight to the DCT).

## The communication interface (one per tile)

`comm_interface` is built from:

| module | job |
|---|---|
| `instr_mem` | 32 instructions of 21 bits; read asynchronously at the PC; written by LOAD |
| `tile_controller` | PC = base + offset, wraps after `len` instructions; executes JUMP, LOAD, CLOCK |
| `sched_decoder` | turns an instruction into one-hot crossbar selects |
| `crossbar` | routes sources to destinations; neighbour outputs are registered link stages |
| `coreport` | dual-clock FIFO between crossbar and core, two inputs and one output per tile by default |
| `clock_ref_gen` | core clock = interconnect clock / 2^n |

**Instruction format.** An instruction has one 3-bit source field per
destination, `{cfg, ip2, ip1, w, e, s, n}` (field 0 in the low bits). Sources
are `NONE, N, S, E, W, OP1, OP2`; destinations are the four neighbour outputs,
the two input coreports and the local configuration line. One source may feed
several destinations in the same cycle (multicast). `asoc_pkg::mk_instr`
builds an instruction.

**Pipeline timing.** A word selected from a neighbour input or from an output
coreport in cycle *t* appears on the neighbour output in cycle *t+1*: each
hop between tiles is one cycle, so a schedule routes a stream across a tile in
consecutive slots (for example, MV leaves the ME tile in slot 1, passes the
MC tile in slot 2 and the DCT tile in slot 3). Destinations inside the tile
(input coreports, configuration line) receive the word in the same cycle.

**Valid bit.** A transfer is `{valid, data[31:0]}` (`flit_t`). An output
coreport that is empty in its slot sends `valid = 0`. The link register's
valid bit follows every cycle, but its 32 data bits are only loaded for a
valid word, so an idle slot costs no data-wire switching. `link_toggles`
shows which link registers loaded data in a cycle. An input coreport is only
written by valid words. In power terms a valid transfer switches up to 33
link bits and an invalid one at most the valid bit.

**Configuration commands** arrive as ordinary words routed to the `cfg`
destination. Opcode in bits [31:28]:

| command | fields | effect |
|---|---|---|
| JUMP `1` | [20:16] base, [4:0] length-1 | new schedule, taken at the end of the current pass |
| LOAD `2` | [27:23] address, [20:0] instruction | writes one instruction word |
| CLOCK `3` | [3] multiply, [2:0] n | core clock factor 2^n |

JUMP waits for the current pass to finish so that tiles that receive the jump
in different slots of the same pass still switch together; streams that keep
their slots in the new schedule are not disturbed. After reset each tile runs
instructions 0..9 (base 0, length 10) with core clock factor 1.

**Coreports** are Gray-coded dual-clock FIFOs, 4 words deep by default. Since
a static schedule cannot stall a sender, a word pushed into a full input
coreport is dropped and a sticky `overflow` flag is set; schedules and core
speeds must be chosen so that this never happens. A core sees an input
coreport as `empty/data/pop` and an output coreport as `full/data/push`.

**Clock reference.** `clock_ref_gen` divides the interconnect clock by 2^n
(n = 0..7) with a counter; a new n is taken when the divided clock next
restarts low. Multiplication by 2^n needs a PLL or DLL and is not built: a
CLOCK command with the multiply bit set selects factor 1. The generated clock
is a logic-derived clock; a production version would use a clock-gating cell
or a proper clock generator, and switching from n = 0 to another value can
shorten one high phase.

## The three-tile encoder fragment (`asoc_top`)

```
            south: saved frame + config    south: config
                  |                              |
 frame in -> [ ME tile ] --> [ MC tile ] --> [ DCT tile ] --> transform, MV
   (west)    \____ ME&C core ____/            DCT core         (east)
```

The ME&C core reads the current macroblock from the ME tile's input coreport 1
and the reference search window from the MC tile's input coreport 1; it sends
its motion vector through the ME tile's output coreport and the compensated
difference through the MC tile's. It runs on the ME tile's generated clock.
The DCT core reads difference (or, in I-frames, pixel) words from the DCT
tile's input coreport 1 and sends coefficient words east. Input coreport 2 of
each tile carries that core's configuration word.

**P-frame schedule (instructions 0..9)**

| slot | ME tile | MC tile | DCT tile |
|---|---|---|---|
| 0 | frame in: w -> ip1 | saved frame: s -> ip1 | DCT output: op1 -> e |
| 1 | MV: op1 -> e; config: s -> ip2 | MC difference: op1 -> e; config: s -> ip2 | config: s -> ip2 |
| 2 | config: s -> interface | MV: w -> e; config: s -> interface | MC difference: w -> ip1; config: s -> interface |
| 3 | - | - | MV: w -> e |
| 4..9 | free | free | free |

**I-frame schedule (instructions 10..19)**

| slot | ME tile | MC tile | DCT tile |
|---|---|---|---|
| 10 | frame in: w -> e | saved frame: s -> ip1 | DCT output: op1 -> e |
| 11 | config: s -> ip2 | frame in: w -> e; config: s -> ip2 | config: s -> ip2 |
| 12 | config: s -> interface | config: s -> interface | frame in: w -> ip1; config: s -> interface |

The bypass needs the ME-to-MC wire in the first slot, which the P-frame
schedule leaves unused, so a JUMP to base 10 in all three tiles moves the
input frame around the ME&C core while the saved-frame, output and
configuration streams keep their slots. The slots 4..9 are
left empty to stand for the rest of a larger array; edge links of all tiles
are ports of `asoc_top`. The control tile that decides the modes is not
part of this fragment: its configuration streams are driven on the south
inputs.

**Throughput.** One word per stream per 10-cycle pass. With four 8-bit pixels
per word a 352x240 frame at 30 frames/s needs 633,600 words/s on each pixel
stream, which a 6.34 MHz interconnect clock supplies (634,000 slots/s).

## Motion estimation and compensation core (`mec_core`)

`mec_core` buffers a 16x16 current macroblock (64 words, raster order, pixel
0 in bits [7:0]) and a 30x30 search window (225 words, the block position
±7 in both directions), then runs `me_engine` and `mc_unit`.

`me_engine` computes the sum of absolute differences, one pixel pair per core
clock, for candidate displacements chosen by one of three methods:

* **full search**: every displacement within ±range, row by row;
  `(2r+1)^2 x 257 + 2` cycles;
* **spiral search**: displacements ring by ring from (0,0) outwards, stopping
  as soon as a candidate's SAD is at or below the threshold;
* **three step search**: start with a step equal to the largest power of two
  not above the range, test the eight neighbours at that step, move to the
  best, halve the step, repeat down to step 1.

Ties keep the earlier candidate. The result word is
`{dx[31:24], dy[23:16], SAD[15:0]}` (SAD saturated to 16 bits), one word per
macroblock. The ME configuration word is `[1:0]` method (0 full, 1 spiral,
2 three-step), `[7:4]` range (clipped to 7), `[31:16]` spiral threshold. A
configuration word is accepted whenever it arrives and applies from the next
search; after reset the core does full search at range 7. The MC configuration word's bit 0
enables compensation.

`mc_unit` then forms `current - reference(displaced)` for each pixel,
saturates it to a signed byte and sends 64 words, four pixels each, in
8x8-block order (four blocks, each in raster order) so that the DCT can start
on the first block at once.

## DCT core (`dct_core`, `dct_rac`)

The 8x8 two-dimensional DCT is done as eight 1-D transforms of rows followed
by eight of columns. Each 1-D transform uses **distributed arithmetic**: eight
`dct_rac` units, one per output coefficient k, each hold a 256-entry ROM with
the sums of the coefficients `C[k][n] = round(256 * s_k * cos((2n+1)k*pi/16))`
selected by the eight bits of one bit plane of the eight inputs
(`s_0 = 1/sqrt(8)`, otherwise `1/2`). Fed the sign plane first (subtracted)
and then the remaining planes most significant first (`acc = 2*acc + ROM`),
each RAC finishes the dot product of the vector with its row of the DCT
matrix, one bit plane per cycle, all eight outputs in parallel.

Two mechanisms cut activity without changing the result:

* **MSB rejection**: before a vector is processed the core finds the
  smallest two's-complement width holding all eight inputs and feeds only
  that many planes (instead of 8 for rows, 12 for columns). Upper planes that
  are only sign extension add nothing.
* **Row/column classification (RCC)**: a vector whose eight inputs are all
  zero is skipped and its outputs written as zero. Motion compensated
  differences are often zero.

Row results are rounded to 12 bits with 2 fraction bits
(`Y = round(sum/64)`), final coefficients to integers
(`Z = round(sum/1024)`, the orthonormal DCT-II). For output, each
coefficient is divided by 2^q with rounding and saturated to a signed byte,
and four are packed per word, so a block leaves in 16 words, the same
number as it arrived in. The DCT configuration word holds `[0]` intra
(inputs are pixels and are level-shifted by -128; otherwise signed
differences), `[1]` MSB rejection, `[2]` RCC and `[5:3]` q; it is taken only
between blocks. After reset: inter, both mechanisms on, q = 3. A block takes
16 load cycles, 8 x (planes + 2) cycles per pass and 16 output cycles: 224
cycles at worst. Counters report blocks done, vectors skipped by RCC and
bit planes saved by MSB rejection.

## Where this design makes its own choices

The architecture (tiles, schedule memory, PC, decoder, crossbar, coreports,
valid bit, jump/load/clock commands, the 2^n clock factor with a 3-bit n), the
two schedules, the three ME search methods with selectable range, and a DCT
built from replicated RACs with MSB rejection and RCC are the published
design. The following are choices of this implementation:

* instruction format, command encodings, memory depth (32), coreport depth (4)
  and the overflow behaviour;
* JUMP taking effect at the end of a pass;
* the ME&C and DCT insides (the published cores are described only by what
  they do), 16x16 blocks, range 7, word layouts of MV and configuration
  words, and the search window being streamed in with each macroblock;
* the DCT output quantiser that makes coefficients fit four to a word;
* the ME&C core sharing one clock (the ME tile's) across its two tiles;
* the DCT tile's input coreports are 32 words deep. This DCT core running at
  the interconnect clock needs up to 224 cycles per 16-word block while
  words arrive every 10 cycles (160 cycles per block), so it falls behind
  within a macroblock and catches up afterwards. The published system runs
  the DCT faster than the interconnect (about 9.6 MHz against 6.34 MHz),
  which needs the clock multiplier not built here;
* in the I-frame schedule the ME tile routes the input frame west-to-east in
  slot 10 (the bypass); its input coreport gets nothing in that schedule.

Not built: clock multiplication, the control tile's decision logic, the
other example cores of a full aSoC array, per-tile voltage scaling.

**Real-time limits of these cores.** The ME engine computes one absolute
difference per cycle, so full search at ±7 needs about 57,800 cycles per
macroblock, 572 M cycles/s for 352x240 at 30 frames/s (330 macroblocks per
frame), and the three step search about 64 M cycles/s. Cores meant for that rate would evaluate many
pixels per cycle; the interfaces to them would not change.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<m>` and stops itself after a timeout.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl \
    rtl/asoc_pkg.sv tb/tb_asoc_top.sv --top-module tb_asoc_top
./obj_dir/Vtb_asoc_top
```

Replace `asoc_top` by any module name to run its unit test.

`tb_asoc_top` runs the full-size system (16x16 blocks, range 7): a P-frame
macroblock with full search, a second with three step search and the ME core
clock divided by 2, then a JUMP of all three tiles to the I-frame schedule, a
LOAD into one tile's schedule and an intra 8x8 block that bypasses the ME&C
core. Motion vectors and DCT outputs leaving the east edge are compared with
models in the testbench, and it checks that each mechanism (idle slots, clock
division, two search methods, jump, load, bypass, MSB rejection, RCC)
occurred. It runs in well under a second.

`tb_asoc_frame` runs a whole 352x240 P-frame (330 macroblocks) through the
same system: a smooth test pattern with fine texture, moved by (+2, -1)
pixels, full, spiral and three step search taking turns per macroblock,
every motion vector and DCT word checked, and the global motion required
away from the frame edges. It takes about 10 s with Verilator. Full search
evaluates 225 candidates per macroblock, the spiral search 15 on average
(threshold 600) and three step search 25. The frame needs 8.5 M
interconnect cycles here, because the ME and DCT cores of this design
process one pixel or one bit plane per cycle; see the real-time limits above.

The unit tests compare against independent models: the DCT against a
floating-point DCT-II with the same rounding, the ME engine against
exhaustive and step-by-step reference searches, the coreport with unrelated
read and write clocks, the crossbar and decoder with random instructions.

## Files

* `rtl/asoc_pkg.sv`: word and instruction types, command encodings, the two
  schedules of the three-tile system.
* `rtl/comm_interface.sv` and its parts `instr_mem`, `tile_controller`,
  `sched_decoder`, `crossbar`, `coreport`, `clock_ref_gen`.
* `rtl/mec_core.sv` with `me_engine`, `mc_unit`.
* `rtl/dct_core.sv` with `dct_rac`.
* `rtl/asoc_top.sv`: the three-tile fragment.
* `tb/`: one testbench per module.
