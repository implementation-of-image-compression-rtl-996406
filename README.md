# DCTQ: a pipelined 8x8 DCT and quantisation processor

This is the front end of a JPEG-style image compressor. An image is cut
into 8x8 blocks of 8-bit pixels. For each block, the processor computes the 64
two-dimensional DCT coefficients and quantises them. It delivers one 9-bit
quantised coefficient every 8 clock cycles. The first coefficient of a
block appears 45 cycles after work on the block starts.

The architecture follows the one in S. A. Gore and S. N. Kore,
*Implementation of Image Compression algorithm on FPGA* (a Virtex-E
design reported at 171 MHz). Where that description leaves something open,
this RTL makes its own choice. Those choices are listed in
[Departures and open points](#departures-and-open-points).

## The idea: one coefficient at a time, eight multipliers wide

The textbook way to compute the 2-D DCT is two 1-D passes with a
transpose memory in between: first `C * I`, then `(C * I) * C^T`. This design
avoids the transpose memory. Instead it computes each coefficient directly
from the nested sum

    DCT(u,v) = sum_i C[u][i] * S_i(v),     S_i(v) = sum_j C[v][j] * I[i][j]

Here `I` is the pixel block, `i, j` are its row and column, and `C` is the 8x8
DCT cosine matrix.

For one coefficient `(u,v)` the controller walks `i = 0..7`, one row per
cycle:

* **Stage I.** Eight multipliers form `C[v][j] * I[i][j]` for the whole
  pixel row `i` at once.
* **Stage II.** An 8-input adder sums these products into `S_i(v)`.
* **Stage III.** A single multiplier forms `C[u][i] * S_i(v)`.
* **Stack.** A small stack gathers the eight products for `i = 0..7`.
* **Stage IV.** A second 8-input adder sums them into `DCT(u,v)`.

Finally a multiplier with a stored reciprocal of the quantisation step
turns `DCT(u,v)` into the quantised value.

Each coefficient takes 8 cycles, and a new one enters the pipeline every
8 cycles, so a block takes 64 x 8 = 512 cycles. The row sums `S_i(v)` are
recomputed for every `u`. This repeats work but costs only 10
multipliers in total.

Coefficients leave in row-major order: `u` is the slow index (vertical
frequency) and `v` the fast one (horizontal frequency).

## Pipeline and timing

All units have fixed latency and never stall, so the whole datapath is one
pipeline. A block starts at cycle 0. In cycle `t = 0..511` the controller
reads pixel row `i = t mod 8` and cosine row `v = (t / 8) mod 8`. The
coefficient it is working on is `(u,v)` with `u = t / 64`.

| cycle (for the read issued at 0) | event | unit |
|---|---|---|
| 0 | pixel row and cosine row addressed | `dctq_ctrl`, `dual_ram`, `cosine_rom` |
| 2 | 8 pixels (`rd_data`, 64 bits) and `C[v][0..7]` at the multipliers | 2-cycle memories |
| 10 | eight 16-bit products, cut to 12 bits | `vedic_mult` 8u x 8s, 8 stages |
| 15 | 15-bit row sum `S_i(v)`, cut to 11 bits | `csa_adder8` "Adder12s", 5 stages |
| 15 | `C[u][i]` at the stage-III multiplier (addressed at 13) | `cosine_rom` |
| 23 | 19-bit product, cut to 14 bits | `vedic_mult` 11s x 8s, 8 stages |
| 31 | eight products burst out (the `i = 7` product went in at 30) | `stack_reg`, 8 cycles |
| 37 | 17-bit sum, cut to the 12-bit DCT coefficient (`dct_valid`) | `csa_adder8` "Adder14s", 6 stages |
| 37 | `IQ[u][v]` at the quantiser (addressed at 35) | `quant_rom` |
| 45 | 20-bit product, cut to the 9-bit DCTQ value (`dctq_valid`) | `vedic_mult` 12s x 8s, 8 stages |

That is 2 + 8 + 5 + 8 + 8 + 6 + 8 = 45 cycles. These latencies are the
published ones.

The cosine ROM of stage III and the quantisation ROM must be addressed
exactly when their data is needed. The controller therefore carries its
count `{u, v, i}` down a 45-deep delay line. The stage-III cosine
address is the tap at 13, the quantiser address the tap at 35, and the
output index `dctq_u/dctq_v` the tap at 45. If you change any latency,
change `dctq_pkg`: the taps are derived from its constants.

Valid bits travel with the data through every unit (`in_valid` to
`out_valid`). The stack counts eight valid inputs per group. It is kept in step
because groups always arrive as 8 consecutive products.

## Block buffering: the decked RAM

`dual_ram` has two banks, each holding one 8x8 block. Pixels are written one
per cycle into the *write bank* at address `8*row + col`. Writing address 63
marks the bank full and moves writing to the other bank. So a block must
be written in raster order, or at least with address 63 last. The
processor reads the other bank, the *read bank*, a whole row of 8 pixels per
cycle.

On the last of its 512 cycles the controller releases the read bank.
If the other bank is already full, the next block starts in the very
next cycle, so coefficients keep coming every 8 cycles across block
boundaries. If both banks are full, `pix_ready` is low. A write offered
then is not taken, and the source must hold it until `pix_ready` returns.

Loading a block takes at least 64 cycles and processing one takes 512. At
full input rate the processor is therefore the bottleneck and the writer is
held off most of the time. A 256x256 image (1024 blocks) takes
1024 x 512 + 45 cycles, about 3.1 ms at 171 MHz.

## Number formats

Pixels are unsigned 8-bit. Cosines are signed 8-bit values
`round(256 * a(u) * cos((2x+1) u pi/16))`, with `a(u>0) = 1/2`. Their
largest magnitude is 126, so they fit in 8 bits. Row 0 is the exception:
`a(0) = 1/sqrt(8)` gives 90.5 after scaling, which is rounded down to 90.
Rounding it up to 91 would push the DC term of a white block (2040) past
the 12-bit limit. The matrix is generated from its eight distinct
magnitudes in `dctq_pkg::cos_coef`.

Each unit has the published width. Between units the value is cut to the
next unit's width by dropping low bits:

| cut | bits | dropped | scale after the cut |
|---|---|---|---|
| stage-I product | 16 -> 12 | 4 | pixel x 16 |
| row sum | 15 -> 11 | 4 | pixel x 1 |
| stage-III product | 19 -> 14 | 5 | pixel x 8 |
| coefficient | 17 -> 12 | 3 | exact DCT scale |
| quantiser | 20 -> 9 | 10 | DCT / Q |

The two cosine factors bring in 2^16, and the first four cuts remove 2^16.
So `dct` is the orthonormal DCT coefficient itself, up to rounding. A flat
white block gives DC = 2016 (exact: 2040). Its AC terms come out at -1 to -3
rather than 0, and all of them quantise to 0.

The first four cuts round towards minus infinity (a plain arithmetic shift).
The quantiser cut rounds towards zero, like a sign-magnitude truncation.
Small coefficients of either sign then become 0 instead of -1, which matters
for compression. Every cut also clamps to its output range. For 8-bit pixels
the clamp never acts.

How many bits each cut drops is this design's choice. The published
design fixed them by simulation but does not give them. The error of
`dct` against the exact DCT comes from two sources:

* Row 0 being 90/256 makes DC terms about 1.1% low, at most 24.
* Rounding the other cosines and the cuts add up to about 20 in the
  worst case, and about 17 on the test images.

Quantisation multiplies by `IQ[u][v] = round(1024 / Q[u][v])`, a signed
8-bit value, and divides by 1024. `Q` is the standard JPEG luminance
table. The largest reciprocal, 102 for `Q = 10`, fits in 8 bits. To use
another table, edit `QTAB` in `dctq_pkg`. Steps below 9 do not fit the
8-bit reciprocal.

## The arithmetic units

* **`vedic_mult`** is a multiplier in the Vedic "vertically and crosswise"
  (Urdhva Tiryagbhyam) form, pipelined over 8 stages:
  1. Signed operands become sign and magnitude. Each operand's
     signedness is a parameter, to cover 8u x 8s, 11s x 8s and 12s x 8s.
  2. For every output column k, it counts the bit products `a[i] & b[j]`
     with `i + j = k`.
  3. It adds up the column counts, each weighted by its column.
  4. It applies the sign.

  Four more register stages bring the latency to the published 8. How the
  work is split over the stages is this design's choice. A synthesis tool
  is free to retime it.
* **`csa_adder8`** adds eight signed operands with a tree of 3:2
  carry-save compressors. It reduces 8 -> 6 -> 4 -> 3 -> 2 operands, one
  register level each, and ends with a carry-propagate add: 5 stages. Adder14s has
  one extra input register, for the published 6 stages.
* **`stack_reg`** stores the eight 14-bit stage-III products and
  presents them together one cycle after the eighth arrives.
* **`trunc_sat`** is the combinational cut described above.

## Ports of `dctq_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (control state only) |
| `pix_valid`, `pix_addr`, `pix_data` | in | 1, 6, 8 | pixel write, address `8*row+col` |
| `pix_ready` | out | 1 | the write offered in this cycle is taken at the next edge |
| `busy` | out | 1 | a block is being read |
| `dct_valid`, `dct` | out | 1, 12 | unquantised coefficient, signed, 8 cycles ahead of `dctq` |
| `dctq_valid`, `dctq` | out | 1, 9 | quantised coefficient, signed |
| `dctq_u`, `dctq_v` | out | 3, 3 | position of `dctq` in the block |

The design has one clock domain. All parameters in `dctq_pkg` default to the
published values.

## Files

`rtl/`:

* `dctq_pkg.sv`: widths, cuts, latencies, cosine and quantisation tables
* `dctq_top.sv`: the processor
* `dctq_ctrl.sv`: the controller
* `dual_ram.sv`: the decked pixel RAM
* `cosine_rom.sv` and `quant_rom.sv`: the ROMs
* `vedic_mult.sv`, `csa_adder8.sv`, `stack_reg.sv` and `trunc_sat.sv`: the arithmetic units

`tb/`:

* one self-checking testbench per unit: `tb_vedic_mult`, `tb_csa_adder8`,
  `tb_stack_reg`, `tb_dual_ram`, `tb_cosine_rom`, `tb_quant_rom` and
  `tb_dctq_ctrl`
* `tb_dctq_top`: ten blocks end to end
* `tb_dctq_image`: a full 256x256 image
* `dctq_ref_pkg.sv`: the reference models they share

## Verification

`dctq_ref_pkg::ref_block` is a bit-exact integer model of the arithmetic
above. It computes its own cosines in floating point and keeps its own copy
of the quantisation table. The testbenches check against it and against the
exact floating-point DCT.

* `tb_dctq_top` writes ten blocks. The blocks are flat white, flat black, a
  checkerboard, ramps, a step and random noise.
  * The first three arrive slowly, so the processor idles between blocks.
  * The rest arrive at full rate. Both banks fill, the writer is held
    off, and blocks run back to back.
  * Every `dct` and `dctq` must match the model, including the `(u,v)`
    index. Every `dct` must also lie within 32 of the exact DCT.
  * The first coefficient of each block must come 45 cycles after the
    block starts, and the others 8 cycles apart.
  * Idling, writer hold-off, back-to-back blocks and bank switching must
    each happen at least once.
* `tb_dctq_image` sends a generated 256x256 image (1024 blocks) through the
  default configuration.
  * It checks all 65,536 quantised coefficients.
  * It checks the total time: 45 + 1024 x 512 - 8 cycles from the first
    block's start to the last coefficient.
  * It rebuilds the image in floating point, placing each nonzero
    coefficient at the centre of its quantisation interval.
  * On its image, about 94% of the coefficients are zero, the worst DCT
    error is 24, and the PSNR is about 31.4 dB. These figures come from
    the generated image, not from a photograph. The test prints them but
    only checks the error bound.
* Each unit testbench checks its unit against an independent computation,
  with random and corner-case inputs, and checks its latency.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/dctq_pkg.sv tb/dctq_ref_pkg.sv tb/tb_dctq_top.sv --top tb_dctq_top
    ./obj_dir/Vtb_dctq_top

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The full
image test runs in a few seconds once compiled.

## Departures and open points

These points differ from the published architecture or are not specified by
it:

* **Stack position.** The published block diagram draws the register
  between the first adder and the 11s x 8s multiplier, and draws that
  multiplier as a bank of units. Its text places the stack after a
  *single* stage-III multiplier, and the one-coefficient-per-8-cycles
  rate needs exactly that. This design follows the text.
* **Widths where the sources disagree.** The diagram prints 14 bits on
  the first adder's output, while the text gives 15 (`sum1[14:0]`). The
  text names the stack outputs with 11 bits, while it stores 14-bit values.
  This design uses 15 and 14.
* **Stage-I multiplier signedness.** The text calls these multipliers
  "8x8 unsigned", and the diagram labels them 8u x 8s. The cosine
  terms are signed, so 8u x 8s is used.
* **Unspecified choices.** The cut amounts, the rounding direction, the
  cosine scaling and the quantisation table are not specified. The
  choices here are explained above.
* **Separate ROMs.** The published design keeps cosine and quantisation
  values in one program ROM. Here they are separate ROMs, as the block
  diagram draws them.
* **Memory latency.** The 2-cycle "memory" term of the 45-cycle latency
  is taken to be the RAM/ROM read latency.
* **Pixel interface and bank switching.** The pixel interface (address,
  valid, ready) and the rule "address 63 completes a block" are this
  design's own. So is starting the next block with no gap.
* **Not included.** The host link that fed the FPGA (a PCI clock appears
  in the published waveforms) and the inverse processor (dequantiser and
  IDCT) used to rebuild images are not described in enough detail to
  build.
* **FPGA results not reproduced.** The published figures are 5,418
  four-input LUTs and 171 MHz on Virtex-E. They depend on the original
  netlist and device and were not reproduced.
