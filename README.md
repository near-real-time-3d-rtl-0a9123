# SAD correspondence search for 3D reconstruction from Integral Images

An Integral Image (InIm) is taken through a lens array placed in front of an
image sensor. Every lens produces a small *elemental image* (EI) of the scene
from a slightly different viewpoint. To rebuild the 3D surface, each EI's
central pixel (and, when the vertex grid is refined, a few more pixels) has to
be found again in the neighbouring EIs. The position of the best match along
the line joining two lenses gives the depth.

The match is the block that minimises a sum of absolute differences (SAD) over
an 11x11 window, summed over all neighbours that are searched. This search is
the inner loop of the reconstruction and costs most of its time. The RTL here
is a hardware engine for exactly that search. Everything around it runs on a
host: choosing the blocks to compare, turning the best candidate into a 3D
vertex, triangulation and filtering.

The default configuration is a practical dynamic acquisition system:

- a 4096x4096 sensor behind a 64x64 lens array, so each EI is 64x64 pixels of 8 bits;
- an 11x11 window (W = 5);
- a search area of M = 30 candidate positions per neighbour.

The neighbourhood radius N (how many EIs away neighbours are searched) is a
matter of how the engine is programmed, not of its hardware.

## The search in one picture

```
 UpMem  --\                                   '0' --\
 LMem   ---+-> 4:1 --\                               +-> mux --\
 RMem   ---+          +-> SAD array (M units) --> + <-----------/ <-- temp results (M cells)
 DnMem  --/           |                           |                   ^
 CMem-hor --\         |                           +-------------------+ (not in the final pass)
 CMem-ver ---+-> 2:1 -/                           +--> sequential comparator --> best (sum, index)
```

One **pass** compares one 11x11 block of the central EI with M = 30 blocks of
one neighbour EI. The 30 blocks lie at 30 consecutive positions along the
search direction: horizontal for the left and right neighbours, vertical for
the up and down ones. Candidate *m* is the block at offset *m* from the start
position. A **command** is a run of passes over neighbours. The 30 block SADs
of each pass are added, candidate by candidate, into a 30-cell
temporary-results memory. In the last pass the sums go to the comparator
instead, which reports the smallest total and its candidate index.

## Memory organisation: any block in one cycle per line

Every EI is held in K = 2W+1 = 11 memory modules. Module *j* holds lines *j*,
*j*+11, *j*+22, ... of the EI:

| module | 0 | 1 | ... | 8 | 9 | 10 |
|---|---|---|---|---|---|---|
| lines | 0 11 22 33 44 55 | 1 12 23 34 45 56 | | 8 19 30 41 52 63 | 9 20 31 42 53 | 10 21 32 43 54 |

Any 11 consecutive lines therefore lie in 11 different modules. A whole block
line of 11 pixels, perpendicular to the search direction, can thus be read in
one cycle wherever the block is. `ei_mem_bank` computes each module's address
as (line div 11)·64 + position, where *line* is the one line of the wanted 11
that is congruent to *j* mod 11. It then rotates the 11 outputs back into line
order.

What a "line" is depends on the search direction. A horizontal search feeds
block *columns* to the array, so the left and right neighbours are stored
row-wise (line = row): a column of 11 pixels is then 11 rows at one position.
A vertical search feeds block *rows*, so the up and down neighbours are stored
column-wise. The central EI takes part in both kinds of search, so it is
stored twice: CMem-hor (row-wise) and CMem-ver (column-wise). That makes 66
modules in all. Each module has 6·64 = 384 one-pixel cells.

## The SAD array: central pixels travel, neighbour pixels are broadcast

A `sad_unit` takes 11 pixel pairs per cycle. It adds their absolute
differences in a combinational tree and accumulates the sum in a register. So
after 11 cycles it holds the SAD of one 11x11 block pair.

`sad_array` has M = 30 of these units. In each cycle of a pass:

- one neighbour line (an 11-pixel segment) is **broadcast** to all units;
- the 11 lines of the central block enter a register chain, so unit *m* sees
  them *m* cycles later than unit 0.

A pass lasts M+2W = 40 cycles, with neighbour lines *s*, *s*+1, ..., *s*+39.
Unit *m* pairs central line *i* with neighbour line *s*+*m*+*i*, which is
exactly candidate *m*. The units finish one cycle apart, in order *m* = 0..29.
One output bus therefore carries all 30 results. Passes follow each other
without a gap: unit *m* of the next pass starts 40 cycles after unit *m* of
the previous one, and by then it is idle again.

A pass can also scan in **reverse**. The neighbour positions then run
*s*+10, *s*+9, ... and the central lines run from last to first, so candidate
*m* is the block at offset −*m*. With this, candidate *m* stands for the same
depth in the left neighbour as in the right one (and in up as in down). The
mirrored disparity of opposite neighbours can then be summed directly.

## Accumulating over neighbours and radii

`temp_accum` forms `sum = (clear ? 0 : temp[m]) + sad` for each result, where
`temp` is the 30-cell memory. It writes `sum` back unless the pass is the final
one; in the final pass `sum` goes to `seq_min_comp`. Each block comparison
carries a tag through the array, so these decisions are made per pass without
a side channel. The tag has three bits:

- `clear`: the first pass of a search;
- `final_pass`: the last pass of a search;
- `stage_end`: the last pass of a command.

For radius N = 1 one command of four passes (right, left, up, down) does the
whole search. For N > 1 there is one command per radius. The partial sums stay
in `temp` between commands, and the host reloads only the four neighbour
memories before each command. Only the last command is flagged final.

## Programming the engine

1. **Load EIs** through the six load ports of `inim_recon_top`:

   | index | memory | stored |
   |---|---|---|
   | 0 | UpMem | column-wise |
   | 1 | LMem | row-wise |
   | 2 | RMem | row-wise |
   | 3 | DnMem | column-wise |
   | 4 | CMem-hor | row-wise |
   | 5 | CMem-ver | column-wise |

   In each cycle a port takes a line group *g* (0..5) and a position *p*, with
   11 pixels: pixel *j* belongs to line 11*g*+*j* at position *p*. Pixels of
   lines above 63 are ignored. One EI takes 6·64 = 384 cycles, and all six
   ports can be loaded at the same time.
2. **Write the position table** (`block_pos_lut`, 16 entries of
   `inim_pkg::pos_entry_t`). Each entry describes one pass:
   - the neighbour (`NB_UP`, `NB_LEFT`, `NB_RIGHT`, `NB_DOWN`);
   - the reverse flag;
   - the top-left corner of the central block (`c_row`, `c_col`);
   - the top-left corner of candidate 0 in the neighbour (`s_row`, `s_col`).

   Every block touched must lie inside the EI. A forward scan needs
   start + 29 + 10 ≤ 63. A reverse scan needs start ≥ 29 and start + 10 ≤ 63.
3. **Start a command**: pulse `start` for one cycle while `busy` is low, with
   - `cmd_first`: the first table entry;
   - `cmd_count`: the number of passes;
   - `cmd_clear`: the first pass starts from zero;
   - `cmd_final`: the last pass goes to the comparator.
4. **Wait for `done`**. For a final command, `res_valid` pulses in the same
   cycle, with `res_sad` (the smallest total SAD) and `res_idx` (its candidate
   *m*).

Timing: a command of P passes raises `done` P·40+4 clock edges after the edge
that takes `start`. That is 164 cycles for the four passes of N = 1. The four
extra cycles are:

- the memory read;
- the last unit's accumulator register;
- the temporary-results adder;
- the comparator.

Leaving the memory read aside, one pass from its first line to its result
takes (2W+1)+M+1 = 42 cycles.

## Throughput estimate

This estimate uses the cycle counts above, the 43 MHz clock reported for the
original FPGA implementation (a Virtex-E 2000), and 4 searched pixels per EI:
the central pixel plus 3 refinement pixels.

- **N = 1.** Load all six memories once (384 cycles), then run four commands
  (4·164). That is 1040 cycles per EI. (64−2)² = 3844 EIs give 4.0 M cycles,
  about 10.7 frames/s.
- **N > 1.** The 30-cell memory holds the partial sums of only one block. So
  each of the 4 blocks needs its own N neighbour loads: about 4·N·(384+164)
  cycles per EI. N = 3 gives 6576 cycles × 58² EIs, about 1.9 frames/s. N = 10
  gives 21920 × 44², about 1.0 frame/s.

The original implementation reported about 6.5, 3.1 and 1.75 frames/s for
N = 1, 3 and 10. The gap at large N comes from the load interface here, which
does not overlap loading with computing. Double-buffered neighbour memories,
or a load port wider than 11 pixels per cycle, would close it.

## Parameters

`inim_pkg` holds the sizes:

| name | default | meaning |
|---|---|---|
| `PIX_W` | 8 | pixel width |
| `W` | 5 | window radius |
| `K` | 11 | window side, and memory modules per EI |
| `EI_SIZE` | 64 | EI side |
| `M` | 30 | SAD units = candidates per pass |
| `SAD_W` | 15 | bits of one block SAD |
| `ACC_W` | 22 | bits of a total; enough for 135 block SADs, N ≤ 33 with four neighbours per radius |
| `LUT_DEPTH` | 16 | position table entries |

`sad_array`, `temp_accum`, `seq_min_comp` and `recon_ctrl` also take the number
of candidates as a module parameter. The top uses `M`.

## Design choices beyond the original description

The original work describes the data path (memories, array, temporary memory,
comparator) and its sizes. These parts are this design's own:

- **Memory cells.** The original states 378 cells per module. 384 are built:
  six 64-pixel lines for the largest module.
- **Load interface.** Six parallel ports taking 11 pixels per cycle, so an EI
  loads in 384 cycles. The original quotes 256 cycles per four EIs but does not
  describe its interface.
- **Controller and table.** The command protocol, the 16-entry table format,
  the reverse scan and the per-pass tag.
- **Temporary memory.** It is read asynchronously (distributed RAM), so a cell
  can be read and written back in the same cycle.
- **Comparator ties.** The lower candidate index wins.
- **Reset.** An asynchronous active-low reset clears control state and the
  table, but not the image memories or the temporary results. The first pass
  of a search must have `clear` set.
- **Consecutive candidates.** Every pass compares consecutive positions, as the
  array structure requires. A neighbour two lenses away sees twice the
  disparity, but its search still advances one pixel per candidate. The table
  can only shift where that range starts.
- **No double-buffered neighbour memories.** The original overlaps its
  neighbour transfers in an unspecified way. Here the memories are reloaded
  between commands.

What is not here:

- the host and board that move images into the memories;
- the lens array and sensor;
- computing 3D vertices from the best candidates, grid subdivision,
  triangulation and post-filtering. These run in software in the described
  system.

## Files

| file | contents |
|---|---|
| `rtl/inim_pkg.sv` | sizes, neighbour enum, pass tag, table entry and read-request structs |
| `rtl/sad_unit.sv` | one 11x1 SAD unit with accumulator |
| `rtl/sad_array.sv` | M units, central-line delay chain, single output bus |
| `rtl/ei_line_mem.sv` | one memory module (block-RAM style, 1-cycle read) |
| `rtl/ei_mem_bank.sv` | 11 modules + address translation and output rotation |
| `rtl/input_memories.sv` | the six EI memories and the neighbour/central multiplexers |
| `rtl/temp_accum.sv` | temporary-results memory, '0' multiplexer and adder |
| `rtl/seq_min_comp.sv` | sequential minimum comparator |
| `rtl/block_pos_lut.sv` | block-position table |
| `rtl/recon_ctrl.sv` | command sequencer and address generator |
| `rtl/inim_recon_top.sv` | the whole engine |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and stops by itself,
with a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/inim_pkg.sv tb/tb_inim_recon_top.sv --top-module tb_inim_recon_top
./obj_dir/Vtb_inim_recon_top
```

`tb_inim_recon_top` runs the engine at its default size, end to end, on
synthetic EIs. A random central EI is copied, with noise, into four random
neighbours at a chosen candidate. The testbench then runs:

- an N = 1 central-pixel search;
- an N = 1 refinement search of an off-centre block;
- an N = 2 search with a neighbour reload between its two commands.

It checks each minimum and index against SADs computed directly from the
images, checks the 164-cycle command time, and counts that every mechanism
(zero start, accumulation, final compare, horizontal/vertical, forward/reverse,
reload) occurred. `tb_inim_workload` processes a row of EIs of a synthetic
integral image with N = 3, a central pixel and three refinement blocks per EI,
and reports the cycles per EI. The module testbenches check their blocks
against reference models: exact SAD values, one result per cycle in order,
latencies, memory contents for every legal block position, and the
accumulate/compare sequence.
