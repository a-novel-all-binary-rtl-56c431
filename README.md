# All-binary motion estimation (ABME) in SystemVerilog

A video encoder spends most of its effort on motion estimation. For every
16x16 macroblock of the current frame it has to find where that block came
from in the previous frame. The usual cost is the sum of absolute differences
of 8-bit pixels. ABME does the whole search on **1-bit pictures** instead:

- Each pixel becomes 1 if it is at least as bright as the average of its four
  neighbours, and 0 otherwise. This keeps the edges and texture of the
  picture and drops its brightness.
- The distance between two blocks is the **sum of differences (SoD)**: XOR the
  bits and count the ones. No subtractors and no 8-bit storage are needed.
- The search runs coarse to fine over a three-level binary pyramid (full,
  half and quarter size). A small search at the coarsest level covers a
  large range at full resolution.

This repository holds a synthesizable implementation of the complete
estimator. It takes 8-bit luminance pixels in raster order. For every
macroblock it returns a motion vector, the vector's SoD and two flags that
show which search path was taken. The defaults are CIF pictures (352x288)
and a search range of +-16 pixels.

## The three-level binary pyramid

A level is built in three steps (`ha_binarizer`):

1. **Low-pass filter.** The threshold is the rounded average of the four
   direct neighbours, `Fbar(x,y) = (F(x-1,y) + F(x+1,y) + F(x,y-1) + F(x,y+1) + 4) >> 2`.
   Pixels outside the frame count as 0. Note that the centre pixel itself is
   not part of the average.
2. **Binarization.** `S(x,y) = F(x,y) >= Fbar(x,y)`.
3. **Decimation.** The filtered picture `Fbar`, sampled at even x and even y,
   is the 8-bit input of the next, half-size level.

Three binarizers are chained: full resolution (Level 3, 352x288), half
(Level 2, 176x144) and quarter (Level 1, 88x72). Each one streams its pixels
using two line buffers. A pixel's binary value is known when the pixel below
it arrives. After the last row, the block feeds itself one row of zeros to
finish the bottom line. Building a whole frame therefore takes `W*(H+1)`
cycles at one pixel per cycle.

Each level is stored one bit per pixel, one W-bit word per row
(`bin_layer_mem`). A memory has two banks: the frame being searched
("current") and the frame before it ("reference"). The banks swap roles when
a frame is finished. All three levels of a CIF frame pair take 266,112 bits.
This compactness is the point of going binary: the stores are small enough
to sit on chip.

## Searching a macroblock, level by level

Vectors are in full-resolution pixels and point from the current block to
the matching reference block. The macroblock at (mx, my) uses the 4x4 block
at (4mx, 4my) on Level 1, the 8x8 block at (8mx, 8my) on Level 2 and the
16x16 block at (16mx, 16my) on Level 3.

**Level 1 (quarter size, 4x4 blocks).** A full search over +-R1 with
R1 = SR/4 - 1, which is +-3 for SR = 16. After scaling back up, this small
window covers most of the full search range.

**Level 2 (half size, 8x8 blocks).** No full search here. Only a few check
points are tried, built from six candidate vectors, all scaled to Level-2
pixels:

| Candidate | Meaning |
|---|---|
| C   | zero vector (centre) |
| Lv1 | twice the Level-1 result of this macroblock |
| UR  | final vector of the upper-right macroblock, this frame |
| U   | final vector of the upper macroblock, this frame |
| L   | final vector of the left macroblock, this frame |
| P   | final vector of the same macroblock in the previous frame |

What happens next depends on the candidates:

- **Coarse selection, then tuning.** If any candidate is non-zero, the one
  with the smallest SoD is chosen. Then the four points one pixel up, left,
  right and down of it are tried.
- **Zero tuning.** If all six candidates are zero, the zero vector is tried,
  and so are the eight points one and two pixels up, left, right and down of
  it.

**Level 3 (full size, 16x16 blocks).** A full search over +-2 around twice
the Level-2 vector.

**Static macroblocks.** A macroblock whose vector has stayed the same long
enough is called static. The design counts how often each macroblock's
vector repeated the previous frame's value. After three repeats (four equal
vectors in a row), Levels 1 and 2 are skipped when `static_skip_en` is high.
Level 3 then only refines +-1 around the previous vector. The counter
saturates at 7 and restarts at 0 whenever the vector changes.

The sequencing lives in `abme_mb_ctrl`. It keeps two vector fields: this
frame's and the previous frame's. It also keeps the repeat counters, builds
the candidate list and walks the macroblocks in raster order.

## The 2-D systolic XOR array

Levels 1 and 3 run on `fs_level_search`. Its core is `sa2d_xor_array`, the
part of the design that takes the most care to follow.

For an N x N block and a +-R window there are (2R+1)^2 check points. The
array has one processing element (PE) per check point (`xor_pe`). Each PE
takes N current bits and N reference bits per step. It XORs them, counts the
ones (the "decoder") and adds the count to its accumulator. On the first row
of a block the accumulator starts from zero instead of its old value.

The reference window is (2R+N) rows of (2R+N) bits. It is read **once**, one
row per step:

- **Horizontal offsets** come from a demultiplexer. PE column i (offset
  dx = i-R) gets bits `[i +: N]` of the window row.
- **Vertical offsets** come from delay registers. Inside PE column i, the
  reference slice moves one PE further per step. PE (i, j) therefore sees
  the window row that entered 2R-j steps ago (offset dy = j-R).
- **The current block row** is broadcast to every PE through one delay
  register. Each PE is thus matched against its own reference row.

Timing, on step k (k = 0 .. 2R+N-1):

- `ref_row` carries window row k.
- `cur_row` carries current row k-2R+1.
- The PEs accumulate on steps 2R .. 2R+N-1.
- All (2R+1)^2 SoDs are ready one cycle after the last step. `sod[j*(2R+1)+i]`
  belongs to offset (i-R, j-R).

So a block costs **2R+N steps** for the whole window: 10 for Level 1
(N=4, R=3) and 20 for Level 3 (N=16, R=2).

Around the array, `fs_level_search` adds the rest of the chain:

- a loader that reads one current row and one reference row per cycle from
  the layer memory;
- `bit_align`, which cuts the window and block bits out of a stored row and
  reads zeros past the frame edge;
- `sod_min_cmp`, which picks the smallest SoD among the allowed points. Ties
  go to the first point in raster order, dy outer and dx inner.

A point is allowed if it lies within `rng` of the centre and its reference
block lies wholly inside the frame. A search takes exactly **2R+N+3 cycles**
from `start` to `done`: 13 for Level 1 and 23 for Level 3.

Level 2 has few points, so `level2_search` uses a single PE and evaluates the
points one after another. A point takes 11 cycles: 8 rows plus 3 of latency.
A point whose block leaves the frame takes 1 cycle and is skipped.

## Top level: `abme_top`

The top wires up three binarizers, three layer memories, the Level-1 search
(N=4), the Level-2 search and the Level-3 search (N=16), and the
controller. It works in two phases:

1. **Build.** `pix_ready` is high and one pixel per cycle is accepted. This
   takes 352*289 = 101,728 cycles for CIF.
2. **Search.** `pix_ready` is low while every macroblock is searched. This
   took about 49,000 cycles per CIF frame in simulation.

The first frame after reset only becomes the reference. Every later frame
yields one `mv_valid` pulse per macroblock, in raster order, with these
outputs:

| Port | Width | Meaning |
|---|---|---|
| `mv_mbx`, `mv_mby` | 5, 5 | macroblock column and row |
| `mv` | 2 x 8 | signed `{dx, dy}` (struct `abme_pkg::mv_t`), within +-SR |
| `mv_sod` | 9 | Level-3 SoD of the chosen vector (0..256) |
| `mv_static` | 1 | the static +-1 path was used |
| `mv_zero_tuned` | 1 | Level 2 used zero tuning |
| `frame_done` | 1 | pulses after the last macroblock of a frame |

The parameters are `W`, `H` (multiples of 16) and `SR` (a multiple of 4,
at least 8). They are passed down everywhere, and QCIF, CCIR601 or larger
ranges only need new values. The top's assertions check three things: no
binarizer overflows its successor, no frame is built while a search runs,
and every Level-1 and Level-3 search finds at least one point in the frame.

A CIF build synthesizes to roughly 4,300 cells and 17,000 flip-flops, plus
the layer memories and line buffers (about 277,000 memory bits).

## Where this design follows the published algorithm and where it chooses

These parts follow the published algorithm:

- the H_A four-neighbour filter with rounding constant 4 and zero border;
- the `>=` binarization and the decimation by two;
- the three block sizes and the Level-1 range SR/4 - 1;
- the six Level-2 candidates, the four-point tuning and the zero-tuning
  pattern;
- the +-2 Level-3 refinement and the optional static skip with its +-1
  refinement;
- the XOR / ones-count PE with clear-or-accumulate, and the 2-D systolic
  array that reads each reference row once in 2R+N steps.

These are this design's own choices, where the algorithm says nothing:

- The pixel handshake, the build-then-search schedule, and dropping the
  first frame after reset.
- Two-bank row-word memories with synchronous reads.
- The tie-break order. Full search uses raster order. Level 2 uses the
  candidate order C, Lv1, UR, U, L, P, then the tuning points up, left,
  right, down. Zero tuning uses centre, then (0,-1), (0,-2), (-1,0), (-2,0),
  (1,0), (2,0), (0,1), (0,2).
- Check points whose reference block leaves the frame are not evaluated.
- Neighbour vectors missing at the frame edge count as zero.
- Full-resolution vectors are halved with an arithmetic shift for Level 2.
- Level-2 candidates are clamped to +-(SR/2 - 2) and the static centre to
  +-(SR - 1). This keeps every result within +-SR.
- The static rule counts three repeats of the previous frame's vector.
- PE accumulators are clog2(N*N+1) bits wide, so an all-different 16x16
  block (256) still fits.
- Coarse selection runs whenever not every candidate is zero, even if some
  candidates repeat. Repeated candidates are simply evaluated again.
- Each Level-2 point is evaluated by one PE, one at a time. There is no
  array at Level 2.

Left out on purpose:

- The 1-D (one PE column) array is a lower-cost alternative to the 2-D
  array, not part of this design.
- The software forms for general-purpose and SIMD processors (packing pixels
  into registers, table lookup for the ones count) are not hardware.
- The alternative 13-tap Hamming filters are not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs against results computed independently and prints
`TB_RESULT checks=<n> failures=<m>`. `tb/abme_ref_pkg.sv` is a plain
behavioural model of the algorithm, with the same choices as above. It
provides binarization, SoD, full search and Level-2 search, and the block
and top-level tests use it.

- `xor_pe_tb`, `bit_align_tb`, `sod_min_cmp_tb`, `bin_layer_mem_tb`: random
  stimulus against direct formulas.
- `sa2d_xor_array_tb`: every SoD of the array for random blocks at the
  Level-1 and Level-3 sizes, plus the 2R+N step count, with and without idle
  cycles between steps.
- `ha_binarizer_tb`: binary rows and decimated pixels of random frames with
  input gaps, plus the `W*(H+1)` frame time.
- `fs_level_search_tb`, `level2_search_tb`: random blocks near and away from
  the frame edge. They check the vector, the SoD and the exact latency.
- `abme_mb_ctrl_tb`: the controller with modelled search units. It checks
  the candidate list, the static counting and the level sequence.
- `abme_top_tb` (64x48, 14 frames): a still scene followed by two pans.
  Every macroblock result is checked against the model. The test also counts
  zero tuning, coarse selection, static refinement, input stalls and found
  pan vectors, and fails if any count is zero.
- `abme_top_full_tb`: the same test at the default CIF size and parameters,
  over 8 frames (2,778 checks, about 10 s of simulation).
- `abme_workloads_tb`: the other formats and ranges the design targets, side
  by side: QCIF (176x144) and CCIR601 (720x480) at +-16, and CIF at +-32
  (pan 21,-13) and +-64 (pan 37,-27). It checks every result against the
  model, about 45 s of simulation. The helper module `abme_workload_run`
  holds the shared body.

## Simulating

With Verilator 5 (a binary simulation with timing and assertions), from the
repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module abme_top_full_tb rtl/abme_pkg.sv tb/abme_ref_pkg.sv tb/abme_top_full_tb.sv
    ./obj_dir/Vabme_top_full_tb

Replace the top module and file to run any other testbench. `abme_ref_pkg.sv`
is needed only by the testbenches that import it; listing it always is
harmless. Each testbench ends with the `TB_RESULT` line. A watchdog ends a
hung simulation with a failure.

To change the picture size or search range, override `W`, `H` and `SR` on
`abme_top`. The test pictures in `abme_top_tb` are windows of a synthetic
texture: change the pan vectors or the frame count there to try other
motion.
