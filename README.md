# PPED edge-vector generator

This is RTL for a pipelined image filter that turns a 64x64 gray-scale image into
a 64-element *Projected Principal-Edge Distribution* (PPED) vector. The vector is
an edge-based image descriptor for template matching. For every pixel, the filter
decides whether it lies on an edge and in which of four directions:
horizontal, +45 degrees, vertical or -45 degrees. Four 16-bin histograms of
those decisions form the vector.

The hard part is the edge threshold. It is not a fixed number. For every pixel
it is the **median of the 40 absolute luminance differences between neighbouring
pixels** in the 5x5 block around it. A median adapts to faint images, such as
soft tissue on X-ray film, where a fixed threshold would find nothing. A median
costs far more than a filter in software. In hardware it is computed by a
bit-serial binary search driven by majority votes. This design produces one
median and one edge decision per clock, so the threshold is ready exactly when
the edge filter needs it.

The architecture follows a published mixed-signal chip (0.35 um CMOS, 50 MHz,
one vector every 80 us). That chip builds its majority voters as analog
circuits. Here they are plain logic, so this RTL computes the exact median
where the silicon occasionally erred.

## Data flow

```
 in_col (5 x 8 bit, one column per clock)
    |
    v
 +---------------------------+       columns 5 and 6
 | image buffer 5 x 6        |-----------------------+
 | col 6 -> 5 -> ... -> 1    |                       v
 +---------------------------+              +------------------+
    | 5x5 block (columns 1..5)              | AVC: 4 vertical, |
    v                                       | 5 horizontal |d| |
 +---------------------------+              +------------------+
 | EFC: 4-stage pipeline     |                       v
 |  1 tap sums               |              +------------------+
 |  2 |gradient| x 4         |   threshold  | MFC: 40 MDUs,    |
 |  3 largest  <-------------+--------------| 8 majority voters|
 |  4 compare  -> flags      |              | 2-stage pipeline |
 +---------------------------+              +------------------+
    | 4 flags per pixel
    v
 vector generator: 4 x 16 bins  ->  pped_vec (64 x 10 bit)
```

| module | role |
|---|---|
| `pped_pkg` | shared constants, pixel and gradient types, direction enum, edge kernels |
| `image_buffer` | 5x6 pixel window, shifts right every clock |
| `avc` | nine absolute-difference circuits on buffer columns 5 and 6 |
| `mdu` | one cell of the difference array, with the loser logic of the median search |
| `mvc` | 41-input majority voter |
| `mfc` | median filter circuit: 40 MDUs, 8 MVCs, median register |
| `efc` | edge filtering circuit: gradients, largest gradient, threshold compare |
| `vector_generator` | histogram accumulator producing the PPED vector |
| `pped_top` | the whole generator with scan sequencing |

## Input format

The image is sent as horizontal strips five rows high. Strip `s` covers rows
`s..s+4`, and there are `IMG_H-4` strips (60 for 64 rows). Within a strip,
columns 0 to `IMG_W-1` arrive left to right, one per clock.
`in_col[0]` is the top row of the strip.

Only pixels with a complete 5x5 block get a decision: rows and columns 2 to
`IMG_W-3`, which is 60x60 at the default size. Border pixels are never
flagged.

A frame starts with a one-clock `frame_start` pulse. That pulse clears the
histograms, and no column may be sent in the same clock. Columns are then sent
with `in_valid` high. Idle clocks between strips are harmless. An idle clock
*inside* a strip still shifts the pipeline, so the pixels whose blocks span the
gap get no decision. `vec_done` rises six clock edges after the edge that takes
the last column. `pped_vec` then holds the vector until the next
`frame_start`.

A continuous frame takes 60 x 64 = 3840 clocks, plus 6 clocks of latency. That
is 76.9 us at 50 MHz, in line with the 80 us per vector of the original chip.

Flag words come out in scan order on `map_valid`, `map_flags`, `map_row` and
`map_col`, one per clock while a strip streams. `map_flags` bit 0 is
horizontal, bit 1 is +45, bit 2 is vertical and bit 3 is -45. At most one bit
is set.

## Keeping threshold and filter in step

The median of a block needs its 40 differences. The edge filter needs its 25
pixels. Both must refer to the same block when the threshold meets the largest
gradient. The trick is to take the differences **one column early**, from the
two newest buffer columns. These are the four vertical differences inside
column 6 and the five horizontal differences between columns 6 and 5.

The difference array is nine shift chains:
- four vertical chains, five cells deep (one cell per block column);
- five horizontal chains, four cells deep (one cell per column pair).

On the clock edge at which a column moves from buffer column 6 to column 5,
its differences enter the tops of the chains. After that edge, buffer columns
1 to 5 hold a block and the array holds exactly that block's 40 differences.

Pipeline of one block, counted from edge E, the edge at which it reaches
columns 1 to 5:

| edge | median filter (MFC) | edge filter (EFC) |
|---|---|---|
| E | differences enter the array | block in columns 1..5 |
| E+1 | upper median nibble stored | stage 1: tap sums |
| E+2 | full median stored | stage 2: absolute gradients |
| E+3 | - | stage 3: largest gradient, threshold sampled |
| E+4 | - | stage 4: flags |

The median arrives on the same clock that stage 3 samples it, so neither path
needs extra delay registers. A new block enters every clock.

## Median by majority vote

The search finds the median bit by bit, MSB first:

1. All values vote with their current bit. The majority value becomes that bit
   of the median.
2. Every value whose bit differs from the majority is a *loser*. From then on
   it votes with the bit it lost with, at every lower position. A value that
   lost because it was too large keeps voting 1 and stays on the "above" side.
   A value that was too small keeps voting 0.

Example with five 4-bit values, 3, 9, 6, 5 and 11 (median 6 = `0110`):

| bit | votes (3, 9, 6, 5, 11) | majority | new losers |
|---|---|---|---|
| 3 | 0 1 0 0 1 | 0 | 9 and 11 now vote 1 |
| 2 | 0 1 1 1 1 | 1 | 3 now votes 0 |
| 1 | 0 1 1 0 1 | 1 | 5 now votes 0 |
| 0 | 0 1 0 0 1 | 0 | - |

There are 40 values, an even count. Each majority voter therefore has a 41st
input tied to 0, so a 20/20 tie resolves to 0. That is equivalent to adding
one extra value of zero. The result is the **lower median**, the 20th smallest
of the 40 differences.

Eight voters split the search into two clock cycles:
- **Cycle 1.** MVC7 to MVC4 resolve bits 7 to 4. This is a combinational
  ripple: each voter's result sets the loser state that the next bit's votes
  depend on.
- **At the clock edge.** Each MDU stores its lower nibble in a private pipeline
  register. If the value already lost, the nibble is first replaced by the
  loser bit.
- **Cycle 2.** MVC3 to MVC0 search those stored nibbles, while the array
  already serves the next block.

Replacing the nibble carries the loser state over completely. A loser's
remaining bits all equal the bit it lost with, and that is all the later votes
need.

Every MDU has scalar vote and flag ports (`v7`..`v0`, `m7`..`m1`). A packed
vector there would make the ripple look like a combinational loop to
simulators, although no real loop exists.

## Edge filter and decision rule

Each direction has a 5x5 kernel with five +1 taps and five -1 taps. Row 0 is
the top of the block and column 0 the leftmost (oldest) column:

```
 horizontal        +45 degrees        vertical          -45 degrees
 0  0  0  0  0     0  0  0  1  0      0  1  0 -1  0     0 -1  0  0  0
 1  1  1  1  1     0  1  1  0 -1      0  1  0 -1  0     1  0 -1 -1  0
 0  0  0  0  0     0  1  0 -1  0      0  1  0 -1  0     0  1  0 -1  0
-1 -1 -1 -1 -1     1  0 -1 -1  0      0  1  0 -1  0     0  1  1  0 -1
 0  0  0  0  0     0 -1  0  0  0      0  1  0 -1  0     0  0  0  1  0
```

A gradient is `|sum(+1 taps) - sum(-1 taps)|`, at most 1275 (11 bits). The
decision rule, including three choices of this design:
- The largest of the four gradients is compared with the median.
- If it is **strictly greater**, its direction's flag is set. Otherwise no
  flag is set.
- Neither the gradient nor the median is scaled (design choice).
- Equal largest gradients go to the earlier direction in the order H, +45, V,
  -45 (design choice).
- A flat block has median 0 and gradient 0, so it gets no flag (follows from
  the strict comparison).

## The PPED vector

Each direction's map is projected along its own edge direction into 16 bins.
Each bin counts that direction's flags:

| direction | bin of pixel (row, col) at 64x64 |
|---|---|
| horizontal | `row / 4` |
| +45 | `(row + col) / 8` |
| vertical | `col / 4` |
| -45 | `(row - col + 63) / 8` |

In general the diagonal bins are `(row+col)*16/(IMG_H+IMG_W-1)` and
`(row-col+IMG_W-1)*16/(IMG_H+IMG_W-1)`. The 127 diagonals fall into bins of 8,
with 7 in the last bin. The vector is ordered H, +45, V, -45:
`pped_vec[16*d + b]`.

The original description gives the row projection of the horizontal map and
says the other maps are treated similarly. The column and diagonal projections
are this design's reading of that. Counters are 10 bits and saturate. At 60x60
a bin can reach at most 480.

## Where this departs from the original chip

- **Majority voters are digital.** Each one is a population count compared
  with half its inputs. The original uses inverter preamplifiers and a
  differential amplifier, which made about 0.6 % of the flags differ from a
  software model. This RTL matches the software model exactly. Analog timing
  (a few ns per vote) is not modelled.
- **Choices the original does not specify.** The strip scan order, the frame
  protocol, border handling, the comparison rule, tie-breaking, bin edges,
  counter width, resets (asynchronous, active low) and the voters' output when
  disabled (0).
- **Not included.** Template matching of the vectors (Manhattan distance
  against stored templates) is done by separate hardware or software. The
  vector is a port of `pped_top`.

## Parameters

`pped_top` has the parameters `IMG_W` and `IMG_H` (default 64) and `CNT_W`
(default 10). The kernel size, the 40-difference array, the 8-bit pixel width
and the nibble split are fixed by the architecture and live in `pped_pkg`.
With another image size, the number of strips becomes `IMG_H-4`, and the bins
are rescaled by the formulas above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Two assertions
guard the rules a user could break or a change could violate: at most one
flag per pixel (`efc`) and no column in the `frame_start` clock (`pped_top`).

| testbench | what it checks |
|---|---|
| `mvc_tb` | ties (20/20 gives 0), the 21-vs-20 worst case, random vote counts |
| `mdu_tb` | vote bits against an independent prefix rule, the lower-nibble hand-over one clock later |
| `mfc_tb` | the median against a sort of the 40 values, two-clock latency, tied votes |
| `avc_tb` | differences against integer arithmetic |
| `image_buffer_tb` | shift direction and column positions |
| `efc_tb` | flags against the kernels above, four-clock latency, all directions, ties at the threshold |
| `vector_generator_tb` | bins, `done` timing, clear, saturation |
| `pped_top_tb` | three full 64x64 frames at default parameters: continuous, with idle clocks between strips, and with one idle clock inside a strip |

`pped_top_tb` compares every flag word with a reference model and checks the
vector. It also checks the frame time of 3846 clocks, well within 4000 clocks
(80 us at 50 MHz). It counts flags in every direction, suppressed edges, tied
votes, back-to-back output, and the four pixels skipped at the idle clock.
The reference model, with its own copy of the kernels, is written
independently of the RTL.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pped_pkg.sv \
    rtl/image_buffer.sv rtl/avc.sv rtl/mdu.sv rtl/mvc.sv rtl/mfc.sv \
    rtl/efc.sv rtl/vector_generator.sv rtl/pped_top.sv \
    tb/pped_top_tb.sv --top-module pped_top_tb
./obj_dir/Vpped_top_tb
```

For a block testbench, replace the last file and `--top-module`. The full-size
frame test runs in well under a second.
