# B-spline free-form deformation in pipelined hardware

Non-rigid image registration deforms an image by moving a coarse, regular
mesh of control points. Each pixel moves by a weighted sum of the 4x4
(in 3D, 4x4x4) control points around it. The weights are cubic B-spline
basis functions of the pixel's position within its lattice cell. For a
pixel at lattice coordinate (x, y, z), with integer parts (l, m, n) and
fractions (u, v, w), the displacement is

    T_c(x,y,z) = sum over k,j,i = 0..3 of  Bi(u) * Bj(v) * Bk(w) * Phi_c[n+k][m+j][l+i]

for each component c in {x, y, z}. The basis functions are:

    B0(u) = (1-u)^3/6             B1(u) = (3u^3 - 6u^2 + 4)/6
    B2(u) = (-3u^3+3u^2+3u+1)/6   B3(u) = u^3/6

Software computes this sum for every pixel, in every iteration of the
registration optimiser, so it dominates the run time. This RTL evaluates the
sum in fully pipelined hardware at one product term per clock cycle. It
follows the architecture of Jiang, Luk and Rueckert, "FPGA-based computation
of Free-Form Deformations in Medical Image Registration". Its ideas are:

* **No range tests.** The lattice in memory carries one extra control point of
  value zero on each side of every axis. The loop therefore never has to
  check whether `l+i` falls outside the lattice, and it pipelines with no
  branches.
* **Table lookups.** The basis functions are precomputed into tables with 1024
  entries each, addressed by the 10-bit fraction. The tables are copied three
  times so that Bi(u), Bj(v) and Bk(w) can be read in the same cycle.
* **A narrow floating-point format.** The arithmetic uses an 8-bit exponent
  and a 12-bit mantissa. A fixed-point datapath of the same width can be
  chosen instead with one parameter (`FIXED`).
* **Deep pipelines, and more than one of them.** Each pipeline covers a
  different sub-image.

The top level `ffd_top` holds two processor organisations side by side:

| | `g_pipe[*]` (ffd_pipeline) | `u_grid` (ffd_grid_pipeline) |
|---|---|---|
| role | main configuration, 2 copies | faster organisation, needs more memory banks |
| pixels handled | any order | batches of 16 from one lattice cell |
| cycles per pixel | 48 (2D), 192 (3D), per pipeline | 16 (2D), 64 (3D) |
| memory ports | coordinates, results, control points: 3 per pipeline | per channel: coordinates, results, control points |
| multipliers / adders | 3 / 1 per pipeline | 3 / 2 (2D), 5 / 3 (3D) |
| 256x256 image | 1,572,864 cycles, 23.5 ms at 67 MHz (2 pipelines) | 1,048,576 cycles, 15.6 ms at 67 MHz |

## Number formats

* **Floating point** (`EXP_W` = 8, `MAN_W` = 12): a 21-bit word
  `{sign, exponent, mantissa}`. The leading one of the mantissa is hidden and
  the exponent bias is 127. An exponent of 0 means zero. There are no
  denormals, infinities or NaNs: overflow saturates to the largest finite
  value and underflow flushes to zero. Both units round to nearest, with
  ties away from zero. The adder keeps three guard bits but no sticky bit.
* **Fixed point** (`FIXED` = 1; default 0): the same 21 bits read as a
  two's-complement number with 8 integer and 12 fraction bits. The units are
  `fx_mult` (rounds to nearest, ties upwards) and `fx_add`, and both saturate
  at the ends of the range. The B-spline tables then hold fixed-point words,
  and the latencies stay 6 and 3 cycles, so every schedule below holds for
  both formats. With values of the size used in the tests, fixed point is
  about five times less accurate than floating point (see Accuracy).
* **Coordinates** (`INT_W` = 8, `FRAC_W` = 10): unsigned fixed point, given
  in lattice units, not pixels. The host divides pixel position by lattice
  spacing; for example, with a spacing of 4 pixels, pixel 13 is 3.25. The
  integer part is the cell index, and the fraction addresses the B-spline
  tables directly.
* **Control-point addresses**: `{component[1:0], K, J, I}`. Each index is
  `INT_W+1` = 9 bits, which covers cell index + 3. Lattice point `(I, J, K)`
  in memory is original point `(I-1, J-1, K-1)`. Index 0 and the last index
  of every axis must hold zero.

## The single-channel pipeline (`ffd_pipeline`)

```
 in_data ──► ffd_stage1 ──────────────── bu ─┐
 (x,y,z     │ split int/frac             bv ─┴─► MUL (6) ─┐
  interl.)  │ loop k,j,i,c               bw ─┐            ├─► MUL (6) ─► ADD (3) ──┬─► out_data
            │ 3 B-spline tables              ├─► MUL (6) ─┘             ▲          │
            └─► cp_addr ──► SRAM ──► cp_data ┘                          └─ 0 / fb ─┘
```

**Stage 1 (`ffd_stage1`).** Coordinates arrive on a single input channel,
interleaved: x, then y, then (in 3D) z. Their integer and fraction parts go
into a pending register set, so the next pixel can load while the current one
runs. The current pixel then runs a loop of `4^DIM` terms, i innermost. Each
term takes three consecutive cycles, one per component (x, y, z). In each
cycle stage 1 does three things:

* It issues a read of `Phi_c[n+k][m+j][l+i]` to the control-point memory.
* It reads `Bi(u)`, `Bj(v)` and `Bk(w)` from the three table copies
  (`bspline_lut`).
* It sends a tag `{valid, first, last, component}` down the pipeline.

The memory answers `CP_LAT` = 2 cycles later. The table values and the tag
are delayed to arrive in that same cycle. In 2D, `Bk(w)` is the constant 1.0
and K is 0.

**Stages 2 and 3** have three multipliers, each with a 6-cycle latency
(`fp_mult`):

* Stage 2 computes `Bi*Bj` and `Bk*Phi` in parallel.
* Stage 3 multiplies the two results.

**Stage 4: one adder closed into a loop.** This is the least obvious part of
the design. The adder (`fp_add`) has a latency of exactly three cycles, and
consecutive cycles carry the x, y and z terms in turn. The adder's output in
any cycle is therefore the running sum of the component whose next term is
entering at that moment. Feeding the output straight back as the second
operand keeps three independent sums in flight with no storage beyond the
adder's own pipeline registers. On a pixel's first term, the feedback is
replaced by zero. After the last term, the three finished sums leave on
`out_data` in three consecutive cycles, marked x, y, z by `out_comp`. An
assertion in `ffd_pipeline` checks that the loop stays in step: every
non-first term must meet the same component's previous term at the adder.

This interleaving is why a pixel costs `3 * 4^DIM` cycles. In 2D the third
slot still runs: it reads the Z plane of the lattice, which a 2D lattice
leaves zero. Successive pixels follow each other with no bubble as long as
the input keeps up: in 2D that means two coordinate words in every 48 cycles.

**Latency.** The x result of a pixel appears
`CP_LAT + 2*MUL_LAT + 3*(4^DIM - 1) + 3` cycles after the pixel's first
memory read: 62 cycles in 2D and 206 in 3D. The z result follows two cycles
later.

## Several pipelines (`ffd_top`, `g_pipe`)

`NPIPE` = 2 pipelines work on different sub-images; the test splits a
256x256 image into top and bottom halves. Each pipeline has its own input
channel, output channel and control-point memory. This matches a board with
six external SRAM banks. The pipelines share only the clock and the reset.
Each keeps its own copy of the tables and needs its own copy of the lattice
data, because the memories are separate. For larger images the same
structure scales by `NPIPE`: a 1024x1024 image cut into 3x3 sub-images
would use `NPIPE` = 9, ideally with `FIXED` = 1 (about 5.6 million cycles
per frame). Only two pipelines are tested.

## The batch processor (`ffd_grid_pipeline`)

All pixels of one lattice cell use the same 16 control points (64 in 3D). This
processor takes a batch of `NPIX` = 16 pixels from one cell; with a lattice
spacing of 4 pixels, that is a 4x4 block of pixels. It stores their
coordinates, then streams the 16 pixels through the datapath once for each
of the control points of its cell. The channels run side by side:

* Each control point is read from its memory banks (Phi_X, Phi_Y, and Phi_Z
  in 3D) once per batch, not once per pixel. The value is held for the 16
  cycles it is used.
* One multiplier forms `Bi(u_p)*Bj(v_p)`; in 3D a second one multiplies that
  by `Bk(w_p)`. One more multiplier per channel multiplies the product by
  that channel's control point.
* Each channel's adder keeps 16 partial sums circulating: 3 stages in the
  adder plus a 13-stage delay line. Each sum meets its pixel's next term
  exactly 16 cycles later.

In 2D a batch takes 256 cycles, which is 16 cycles per pixel. Results leave
one pixel (`out_data[0..2]`, the z entry zero in 2D) per cycle. The first
result comes 256 cycles after the batch's first issue cycle. With `DIM = 3`
the lattice cell has 64 control points, a batch takes 1024 cycles (64 per
pixel) and the first result comes 1030 cycles after the first issue cycle.
Coordinates enter as `in_coord[0..2]`, control points as `cp_data[0..2]`,
addressed by `cp_addr = {K, J, I}`.

The host must group the pixels by cell. The cell is taken from the first
pixel of the batch, and an assertion flags any pixel outside that cell.
The default is 2D, as in the document's own timing; 3D is tested
separately. As in the main pipeline, the tables are on chip and the
arithmetic is floating point.

## Interfaces and timing rules

* **Clock and reset.** One clock. `rst_n` is active low and asynchronous; it
  clears the control state only. Hold `rst_n` low for at least 20 cycles so
  that the tag pipelines flush (`CP_LAT + 2*MUL_LAT + 3` cycles is enough).
* **Inputs.** A `valid`/`ready` handshake: a word moves on a clock edge where
  both are high.
* **Outputs.** There is no back-pressure on the results. The consumer, for
  example an SRAM write port, must accept a word in every cycle that
  `out_valid` is high.
* **Control-point memory.** Read-only from the processor side. Data must be
  returned exactly `CP_LAT` cycles after `cp_rd`, with no stalls. The host
  loads the lattice, including the zero border, before it starts.
* **Parameters.** `FIXED` (0 floating, 1 fixed point), `DIM` (2 or 3), `NPIPE`, `INT_W`, `FRAC_W`, `EXP_W`,
  `MAN_W`, `CP_LAT`, `MUL_LAT` (at least 3) and `NPIX` (a power of two, at
  least 4) can be changed. The accumulator latency of 3 is structural, and
  so is the count of three interleaved components.

## Accuracy

The full-size test deforms a 256x256 image with a 4x4 lattice. Control-point
values are between 0.25 and 2 in magnitude. Compared against double
precision, the average absolute error is 4.9e-5 and the maximum is 4.9e-4.
The original work reports 0.0009 and 0.0021 for the same image and lattice
size, but does not state its control-point magnitudes. The error has three
sources:

* rounding of the table entries (half an ulp of a 12-bit mantissa);
* three rounded multiplications;
* the rounded additions of 16 (or 64) terms.

The tests allow `2^-9` times the sum of the term magnitudes.

Built in fixed point (`FIXED` = 1), the same full-size run gives an average
error of 2.5e-4 and a maximum of 1.5e-3, still inside the bounds above. The
fixed-point error does not shrink with the size of the value, so the
fixed-point tests allow an absolute 6 half-units of the last place (`2^-13`)
per term instead.

## Where this RTL departs from, or adds to, the original design

* **Arithmetic units.** The original built its units from a vendor
  floating-point library. Here they are written from scratch, including the
  encoding, rounding and overflow rules above. The multiplier does its work
  in 3 stages; the remaining 3 of its 6 stages are plain registers, which a
  synthesis tool can use for retiming.
* **Fixed point.** The original offers fixed point as the alternative to
  floating point and rates the batch processor with it. Here both formats
  are built and `FIXED` selects one for the whole design; the default is
  floating point, the main configuration. The sign bit on top of the 8
  integer bits is this design's reading.
* **Choices this design makes on its own.** The following are this design's
  choices where the original says nothing:
  * the handshakes;
  * the double buffering of input coordinates;
  * the memory latency and address layout;
  * the output channel format;
  * the pairing of operands in stage 2;
  * the width of the coordinate integer part.
* **Table storage.** The tables store full 21-bit floating-point words. They
  are computed at elaboration from the formulas, with exact integer
  arithmetic and rounding to nearest, so no data file is needed.
* **Batch buffering.** The batch processor buffers a batch's coordinates on
  chip and replays them, rather than reading them again from memory for
  each control point.
* **Not modelled.** The clock rate (67 MHz on a Virtex-II in the original)
  and FPGA resource use are not modelled. The external SRAMs exist only as a
  behavioural model in the testbenches.

## Files

| file | contents |
|---|---|
| `rtl/ffd_pkg.sv` | formats, `comp_e`, `term_tag_t`, the table-generating function |
| `rtl/fp_mult.sv`, `rtl/fp_add.sv` | pipelined floating-point multiplier (6 cycles) and adder (3 cycles) |
| `rtl/bspline_lut.sv` | the four basis-function tables, one read per cycle |
| `rtl/delay_line.sv` | alignment shift register |
| `rtl/ffd_stage1.sv` | input split, loop control, table and memory reads |
| `rtl/ffd_pipeline.sv` | one single-channel pipeline |
| `rtl/ffd_grid_pipeline.sv` | the batch processor, one channel per displacement component |
| `rtl/ffd_top.sv` | two pipelines plus the batch processor |
| `tb/ffd_tb_pkg.sv` | double-precision reference functions, pseudo-random lattice |
| `tb/cp_sram_model.sv` | behavioural control-point SRAM (contents generated from the address) |
| `rtl/fx_mult.sv`, `rtl/fx_add.sv` | fixed-point multiplier (6 cycles) and adder (3 cycles) |
| `rtl/arith_mult.sv`, `rtl/arith_add.sv` | pick the floating- or fixed-point unit by `FIXED` |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/*_fx_tb.sv` | the pipeline, the batch processor and the whole design rebuilt in fixed point |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The following command builds and runs one,
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module ffd_top_tb rtl/ffd_pkg.sv tb/ffd_tb_pkg.sv tb/ffd_top_tb.sv
./obj_dir/Vffd_top_tb
```

Replace `ffd_top_tb` with `fp_mult_tb`, `fp_add_tb`, `bspline_lut_tb`,
`fx_mult_tb`, `fx_add_tb`, `ffd_stage1_tb` (3D), `ffd_pipeline_tb` (3D),
`ffd_pipeline_fx_tb` (3D, fixed point), `ffd_grid_pipeline_tb` (3D) or
`ffd_grid_pipeline_fx_tb` (3D, fixed point) or `ffd_top_fx_tb` (the full-size
test in fixed point).

`ffd_top_tb` runs the whole design at its default parameters and takes about
two seconds. It pushes every pixel of a 256x256 image through both
organisations and checks every result, each processor's total cycle count
(1,572,881 and 1,048,592 cycles from first memory read to last result), and
the accuracy bounds above. It also counts the events that the design depends
on, and fails if any of them never happens:

* input held off by a busy pipeline;
* pixels and batches following each other with no bubble;
* reads of the zero border;
* both pipelines delivering results in the same cycle.
