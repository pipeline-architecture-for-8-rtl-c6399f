# Sequential pipelined 8×8 IDCT

This is a two-dimensional 8×8 inverse discrete cosine transform that takes one
coefficient per clock and delivers one pixel per clock. The arithmetic is small:
six constant-coefficient multipliers, six adder/subtractors and four subtractors
in total. No memory is needed. The transform is built by row-column decomposition
from a *sequential* 1-D kernel. The kernel comes from taking the signal-flow
graph of a fast 8-point IDCT and collapsing each operational stage into one
processing unit that handles one sample per cycle. The kernels are joined by an
8×8 transposer built from 49 shift registers and three multiplexer pairs. Nothing
in the datapath feeds back, so every arithmetic unit can be followed by a
pipeline register. With that pipelining the latency is 17 + 49 + 17 = 83
cycles.

The architecture follows a published design. This covers the signal-flow
graph, the unit types and their order, the transposer structure, the
latencies, the word widths (17 bits with rounding, 22 bits with truncation),
and the idea of setting the signal levels at the multipliers. The following
are this implementation's own choices: the gain values, the stream
interface, the reset, the final rounding and the exact fixed-point format.
They are marked as such below and in each file header.

## Stream interface and timing

```
idct_2d #(W = 17, QMODE = Q_ROUND, IN_W = 12, OUT_W = 9)
  clk, rst_n (asynchronous, active low)
  in_valid, in_coef[11:0]   -> one coefficient accepted; the whole pipeline advances
  in_pos[5:0]               <- slot (0..63) the next coefficient takes in its block
  out_valid, out_pix[8:0]   <- one pixel, rounded and clipped to -256..255
  out_row[2:0], out_col[2:0]<- where that pixel belongs in the 8×8 block
```

* **Advance.** Every register in the design moves only on cycles where
  `in_valid` is high. A low `in_valid` stalls the whole pipeline, so gaps in
  the input are allowed. Blocks are otherwise back to back: slot 0 of the next
  block follows slot 63 of the previous one.
* **Latency.** A coefficient accepted on advance *n* belongs to the block whose
  pixels appear from advance *n* + 83 on. `out_valid` is high in the cycle after
  each advance, once 83 advances have filled the pipeline. To drain the last
  block, keep feeding input, for example the next block or zeros: one block
  plus 19 samples are still inside the pipeline.
* **Input order.** The kernel expects each 8-vector in the frequency order
  `ORD_IN = 5,3,7,1,6,2,4,0`. This is the order of the graph's input column. The
  rows of the block are fed in the same order. Slot `8r+p` must therefore carry
  `F[ORD_IN[r]][ORD_IN[p]]`, where the first index is vertical frequency.
* **Output order.** The kernel produces the spatial order
  `ORD_OUT = 5,2,6,1,4,3,7,0`. The transposer leaves the block column by column,
  so output slot `8p+q` is the pixel at row `ORD_OUT[q]`, column `ORD_OUT[p]`.
  `out_row`/`out_col` give that position directly. Reordering into raster order
  would need a block buffer, which is not part of this design.

## The 1-D kernel (`idct_1d`)

The fast algorithm is a transposed and flipped constant-geometry DCT-II graph.
It has three multiplier columns, each followed by butterflies, plus
subtraction and reordering stages in between. Projected onto one unit per stage,
it becomes this cascade (slot = position of a sample in its 8-vector):

| unit | operation on the 8-vector (slots 0..7) | latency |
|---|---|---|
| LSU  | slots 1,3,5 become `x[p] - x[p-1]`: x3−x5, x1−x7, x2−x6 | 1 |
| SEU2 | exchange slots 0 and 2 | 2 |
| M0   | × 2d1, 1, 2d1, 1, 2d1, 1, d1, d1 | 1 |
| BU   | each pair (a,b) → (b−a, a+b) | 2 |
| SEU1 | exchange slots 1↔2 and 5↔6 | 1 |
| LSU  | slots 1,3 become `x[p] - x[p-1]` | 1 |
| M1   | × 2d3, 1, 2d2, 1, d3, 1, d2, 1 | 1 |
| BU   | (b−a, a+b) | 2 |
| PS8  | perfect shuffle 0,4,1,5,2,6,3,7 | 3 |
| M2   | × d7, 1, d6, 1, d5, 1, d4, 1 | 1 |
| BU   | (b−a, a+b) | 2 |

The coefficients come from the recursion d1 = √½, d(2i) = √((1+d(i))/2),
d(2i+1) = √((1−d(i))/2). So d2 = cos π/8, d3 = cos 3π/8, d4 = cos π/16,
d5 = cos 7π/16, d6 = cos 3π/16 and d7 = cos 5π/16. `idct_pkg` evaluates the
recursion at elaboration time.

With unit gains, the result is exactly twice the orthonormal 8-point IDCT.
The multiplier gains described below scale it further. Two details were
settled by checking the cascade numerically against the IDCT matrix: which
slots the second reordering exchanges, and the butterfly sign orientation
(first output = second − first). Every other choice tried gave no IDCT or
gave alternating output signs.

Every unit decodes its control from the slot of the sample at its input. That
slot is the kernel's `pos_i` minus the latency in front of the unit. There is
no separate controller and no state other than the data registers.

### Units

* **Shift-exchange unit SEU_K (`idct_seu`).** A K-register delay line with a
  multiplexer at each end. With `c=0` it is a delay of K. If `c=1` while
  sample i+K arrives, that sample goes straight to the output, into the slot
  that sample i would have taken. The sample leaving the line (sample i) is
  written back into the line and comes out K cycles later, in the old slot of
  sample i+K. Raising `c` for selected slots therefore exchanges pairs K apart
  with no extra storage. The output multiplexer is combinational.
* **Butterfly unit (`idct_bu`).** Two delay registers and one adder/subtractor.
  When b arrives the unit computes b−a from the input and the first register.
  One cycle later it computes a+b from the two registers. The result is
  registered.
* **Local subtraction unit (`idct_lsu`).** One delay register and a subtractor.
  The unit outputs either the sample itself or the sample minus its
  predecessor.
* **Multiplier (`idct_mult`).** A W×W product with the slot's coefficient,
  times the column's gain `GAIN`. The product is brought back to W bits by
  round-to-nearest or by truncation (`QMODE`). Slots drawn without a
  multiplier use 1.0 × `GAIN`.
* **Perfect shuffle (`idct_ps8`).** SEU2 exchanges slots 2↔4 and 3↔5, giving
  0,1,4,5,2,3,6,7. SEU1 then exchanges 1↔2 and 5↔6, giving 0,4,1,5,2,6,3,7.

## The transposer (`idct_transpose`)

Write a slot as six bits `r2 r1 r0 c2 c1 c0`, where r is the row and c the
column. Transposition swaps each `r_k` with `c_k`. Swapping `r0`/`c0` moves
every sample with c0=1, r0=0 forward by 8−1 = 7 slots, and its partner back by
7. This is one SEU7 with control `slot[3] & ~slot[0]`. In the same way, SEU14
(`slot[4] & ~slot[1]`) and SEU28 (`slot[5] & ~slot[2]`) swap the other two bit
pairs. The three units in cascade hold 49 words. Their latency of 49 equals the
largest distance any sample moves (slot 7 ↔ 56), which is the minimum for a
sequential transposition. Each unit decodes its control from the slot of the
sample at its own input, counting from the transposer input: slot, slot−7,
slot−21.

## Fixed-point format and signal scaling

The data path has one word width, W bits, everywhere. The coefficients of every
multiplier column are also rounded to W bits. The only quantization points are
the six multiplier columns: the subtractors and butterflies are exact as long
as nothing overflows. Accuracy therefore depends on how much of the word
each signal uses. Because *every* sample passes every multiplier column,
including slots whose coefficient is 1, the signal level can be changed at
no cost by folding a gain into a column's coefficients. Gains are not limited
to powers of two.

This design's choice of levels (constants in `idct_pkg`):

* The 12-bit coefficient is shifted left by W−15 bits.
* The multiplier columns apply the gains 5.2252, 0.5209 and 2.6821 in the row
  kernel, and 0.5069, 0.5808 and G_COL2 in the column kernel. G_COL2 is
  8 / (product of the other five), which makes the overall gain of the
  transform exactly 2^(W−10). Each gain sets the level of the segment that
  follows it, up to the next multiplier column, so that the segment's largest
  value on the IEEE 1180 test data is about 80% of full scale. The biggest
  values occur after the second butterfly stage of each kernel. The gains were
  found with a bit-accurate model, by measuring each segment's peak at unit
  gain.
* In each column, the coefficient format has as many fraction bits as the
  largest scaled coefficient allows (W−1−integer bits).
* The result has W−10 fraction bits. It is rounded to the nearest integer with
  ties to even, then clipped to −256..255. With ties rounded up, the output
  showed a measurable positive mean error.
* Sums wrap in W bits, and no saturation is built in. Realistic blocks (pixels
  within about ±300) stay inside the 20% headroom. Arbitrary full-scale
  coefficient blocks can overflow.

## Accuracy

`tb_idct_ieee1180` runs the six random sets of IEEE Std 1180-1990 (10 000
blocks each) through 14 instances: W = 16..22, each with both quantization
modes. The figures below are the worst over the six sets. The limits are:
peak ≤ 1, pixel MSE ≤ 0.06, overall MSE ≤ 0.02, pixel mean error ≤ 0.015,
|overall mean error| ≤ 0.0015.

| W | mode | peak | pixel MSE | overall MSE | pixel ME | overall ME | |
|---|---|---|---|---|---|---|---|
| 16 | round | 1 | 0.0438 | 0.0354 | 0.0057 | 0.00036 | fails |
| **17** | **round** | 1 | 0.0223 | 0.0171 | 0.0038 | 0.00013 | **meets** |
| 18 | round | 1 | 0.0110 | 0.0087 | 0.0023 | 0.00015 | meets |
| 22 | round | 1 | 0.0013 | 0.0006 | 0.0008 | 0.00002 | meets |
| 17 | trunc | 1 | 0.6998 | 0.0459 | 0.6998 | 0.03364 | fails |
| 20 | trunc | 1 | 0.0491 | 0.0050 | 0.0491 | 0.00329 | fails |
| 21 | trunc | 1 | 0.0257 | 0.0026 | 0.0257 | 0.00173 | fails |
| **22** | **trunc** | 1 | 0.0132 | 0.0012 | 0.0132 | 0.00083 | **meets** |

With rounding, 17 bits is the narrowest word that meets the standard. With
truncation it is 22 bits. These are the widths reported for the original
architecture. The overall MSE is the binding limit for rounding. For
truncation it is the per-pixel mean error: every product is biased towards
−∞, so the mean error is almost as large as the MSE. Truncation saves the
rounding adders but costs five bits of word width. The default instance is
W = 17 with rounding. For a truncating build, use `W=22, QMODE=Q_TRUNC`.

## Departures and limits

* **Arithmetic count.** The design has six multipliers, six adder/subtractors
  (the butterflies) and four subtractors (the local subtraction units), as
  published. It also has two blocks the published count leaves out: the input
  shift, which is wiring, and the output stage. The output stage adds one
  rounding adder and a clipper.
* **Truncation-bias compensation not built.** With truncation, the error always
  has the same sign. Generating some error of the opposite sign could make the
  truncating word narrower than 22 bits. That idea is only suggested, not
  designed, so it is not included.
* **No overflow protection.** See the scaling section.
* **No raster reordering.** Pixels leave in the kernel's output order, with
  their coordinates. Raster order would need a block buffer.
* **Minimum width.** `W` must be at least 15 so that the input shift is not
  negative.

## Files

| file | content |
|---|---|
| `rtl/idct_pkg.sv` | quantization enum, slot orders, latencies, multiplier gains, d_i recursion, coefficient tables |
| `rtl/idct_lsu.sv`, `idct_seu.sv`, `idct_bu.sv`, `idct_mult.sv` | basic units |
| `rtl/idct_ps8.sv` | 8-point perfect shuffle (SEU2 + SEU1) |
| `rtl/idct_1d.sv` | sequential 8-point kernel |
| `rtl/idct_transpose.sv` | SEU7 + SEU14 + SEU28 transposer |
| `rtl/idct_2d.sv` | top: scaling, row kernel, transposer, column kernel, rounding |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |
| `tb/tb_idct_2d.sv` | end to end at default parameters: 200 random blocks with random stalls; error ≤ 1 against a double-precision IDCT, 83-cycle latency, every position once per block, zero in → zero out; counts stalls, exchanges, subtractions and clipped pixels |
| `tb/tb_idct_ieee1180.sv` | the accuracy sweep above (about 20 s). It checks that 17/round and 22/trunc meet every limit and that 16/round and 21/trunc do not. |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle
watchdog.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing -Irtl rtl/idct_pkg.sv tb/tb_idct_2d.sv \
          --top-module tb_idct_2d -o sim && ./obj_dir/sim
```

Replace `tb_idct_2d` with any other testbench name. Verilator finds the other
modules through `-Irtl`, because each module is in `rtl/<module>.sv`. To
change the word width or the quantization, override `W` and `QMODE` on
`idct_2d`. The gains are tuned for the 12-bit input and hold for any `W`,
because the level of every segment scales with 2^(W−15).
