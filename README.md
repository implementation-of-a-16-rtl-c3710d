# 16 x 16 approximate multiplier with approximate 5:2 compressors

This multiplier trades a small, one-sided error for a shallower and smaller
partial-product reduction tree. It is an unsigned 16 x 16 → 32-bit array
multiplier. The 256 partial-product bits are reduced mainly by *approximate
5:2 compressors*. Each one takes five bits of one column and gives back only
two: a sum in the same column and a carry into the next. Two bits can count
to 3 at most, so a compressor that sees four or five ones under-reports. This
is the only source of error in the design. Everything else (full adders, half
adders, the final adder) is exact.

The design is purely combinational: `a` and `b` go in, `product` comes out,
with no clock, no registers and no handshake.

```
a,b ─► pp_gen ─► stage 1 ─► stage 2 ─► stage 3 ─► stage 4 (final_adder) ─► product
        256 bits   139 bits   121 bits   72 bits     32-bit ripple adder
        ≤16/column ≤9/column  ≤5/column  ≤3/column
```

## The approximate 5:2 compressor (`approx_compressor_5_2`)

An exact 5:2 compressor needs carry-in and carry-out links to its neighbours.
This one has none: five inputs, two outputs. Its function is the saturated
count:

    s + 2·c = min(popcount(x[4:0]), 3)

| ones in x | exact value | s + 2c | error |
|-----------|-------------|--------|-------|
| 0–3       | 0–3         | same   | 0     |
| 4         | 4           | 3      | −1    |
| 5         | 5           | 3      | −2    |

26 of the 32 input patterns are exact. A partial-product bit `a[j]&b[i]` is
1 with probability 1/4 for random operands, so a compressor fed straight from
the AND array is inexact about 1.6 % of the time. The error is never
positive, so the whole multiplier never overestimates: `product ≤ a*b`.

The circuit is a full adder on `x[0..2]`, giving `(s1, c1)`, plus a 2:1 mux:

* `c1 = 0`: the count is `s1 + x3 + x4 ≤ 3`, so `s` is their parity and `c` their majority.
* `c1 = 1`: the count is at least 2, so `c = 1` and `s = s1 | x3 | x4`.

The mux selects `s` on `c1`, and `c = c1 | maj(s1, x3, x4)`.

## Reduction tree (`reduction_stage`, schedule in `amul_pkg`)

The tree works on columns: column *c* holds the bits of weight 2^c.
`pp_gen` fills column *c* with the `min(c+1, 31−c)` bits `a[c−i] & b[i]`.
The three reduction stages are the same module, `reduction_stage`, with
`STAGE` = 1, 2 or 3. Which cells go into which column is decided at
elaboration time by the constant function `amul_pkg::sched()`:

* **Stage 1** uses only compressors: one for every full group of five bits in
  a column. The leftover bits pass through.
* **Stages 2 and 3** go through the columns from the LSB up. A column must end
  at or below a target height: 5 after stage 2, 3 after stage 3. That height
  counts the carries that the column below sends in during the same stage. While
  the column is too tall, the stage adds a compressor if at least 3 bits must
  still go, else a full adder if 2 must go, else a half adder.
* The top column (31) is never reduced, so no carry can leave the product.

For N = 16 this gives:

| stage | 5:2 compressors | full adders | half adders | max column height after |
|-------|-----------------|-------------|-------------|-------------------------|
| 1     | 39              | 0           | 0           | 9                       |
| 2     | 5               | 3           | 6           | 5                       |
| 3     | 15              | 4           | 4           | 3                       |

Compressors sit in all three stages, so an error can enter at any level of the
tree, not only on raw partial products.

### Packed column layout

Each stage's bits travel as one flat vector. Columns sit back to back, LSB
column first. Inside a column the order is:

1. sums of this stage's compressors, then full adders, then half adders
2. bits passed through unchanged
3. carries from the column below: compressor carries, then full-adder carries, then half-adder carries

Cells take their inputs from the bottom of the input column in the same order:
compressors first, then full adders, then half adders. The approximate result
depends on which five bits share a compressor, so this ordering is part of the
design's function, not only of its wiring. `stage_height`, `stage_offset`,
`stage_width` and `stage_own` in `amul_pkg` give the layout as constants.

## Stage 4: final adder (`final_adder`)

After stage 3 every column holds at most three bits. Each column of the
final adder is two full adders:

* the first adds the column's three bits (missing bits are 0)
* the second adds that sum and the two carries coming from the column below;
  its sum is `product[c]`

Both carries go up one column. Five inputs can make at most 5 = 1 + 2·2, so
the stage is exact. Each full adder is made of two `half_adder` instances and
an OR gate, so stage 4 consists of half adders only (128 of them for N = 16).
The critical path is a ripple through 32 columns.

## Accuracy

From `tb_approx_mult16`, 20 000 random operand pairs:

* 42 % of products are exact, 58 % are low
* mean relative error 0.25 %
* largest relative error seen 13 %. Large relative errors occur for small
  products whose few ones all fall into one compressor.
* multiplying by 0, 1 or any power of two is always exact, since no column
  then holds more than one 1

In an image-smoothing test (`tb_image_smoothing`), a 3 × 3 Gaussian filter
runs over a 32 × 32 image of 8-bit pixels. The weights are 16-bit fractions,
and every product goes through the multiplier. 27 % of the products come out
low. The filtered image still matches the exact one at 55.9 dB PSNR.

For 30000 × 20000 this design returns exactly 600 000 000. The published
simulation of the original circuit shows 599 550 976 for the same pair. Its
compressor logic or bit grouping must therefore differ from the choices
described below.

## Where this RTL follows the source and where it chooses

Taken from the source design:

* 16-bit operands A and B and a 32-bit product
* the AND array of 16 partial-product rows
* approximate 5:2 compressors with five inputs and two outputs, built from
  gates and a mux
* stage 1 made of compressors on groups of five bits
* stages 2 and 3 made of compressors and adders, with a sum and a carry out of every cell
* stage 4 made of half adders

Chosen here, because the source does not specify it:

* **Compressor function**: the saturated count above, and its gate-and-mux circuit.
* **Cell placement in stages 2 and 3**: the greedy rule and the target heights
  5 and 3. None of the greedy schedules tried for N = 16 got every column down
  to two rows in three stages, so stage 3 leaves up to three.
* **Stage 4 form**: half adders cannot add two rows on their own. They are
  paired into full adders, and the stage adds three rows exactly.
* **Unsigned operands, no Booth coding, no pipeline registers.**

The comparison design of the source, a multiplier built on approximate 4:2
compressors, is not included.

Synthesis reference: a generic coarse synthesis of `approx_mult16` gives about
1 500 gate-level cells (AND, OR, XOR, MUX), with no flip-flops. The source
reports 290 LUTs on an FPGA, which is a different measure and not directly
comparable.

## Files

| file | contents |
|------|----------|
| `rtl/amul_pkg.sv` | targets, `sched()` schedule and layout functions |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | exact adder cells |
| `rtl/approx_compressor_5_2.sv` | approximate 5:2 compressor |
| `rtl/pp_gen.sv` | AND array, column-packed |
| `rtl/reduction_stage.sv` | one reduction stage, `STAGE` = 1..3 |
| `rtl/final_adder.sv` | stage 4 ripple adder |
| `rtl/approx_mult16.sv` | top: `a`, `b` → `product` |
| `tb/amul_ref_pkg.sv` | reference model (class `amul_ref`) used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

`N` (default 16) is a parameter of every module except the cells. The
schedule supports N up to 64 (`MAX_COLS`). The elaboration check in
`final_adder` stops with an error if a column would reach stage 4 with more
than three bits. Only N = 16 has been simulated. To try other stage targets,
change `STAGE2_TARGET` and `STAGE3_TARGET` in `amul_pkg`, and the matching
constant in `amul_ref_pkg::stage()`.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on a
watchdog if it hangs:

* `tb_half_adder`, `tb_full_adder`, `tb_approx_compressor_5_2`: exhaustive. The
  compressor test also checks the error profile (26 exact, 5 one low, 1 two low).
* `tb_pp_gen`: every packed bit against `a[c−i] & b[i]`.
* `tb_reduction_stage`: each of the three stages on random inputs of varying
  density, compared bit for bit with one step of the reference model. It also
  checks that no stage raises the weighted sum, that sparse inputs lose
  nothing, and that the layout widths agree.
* `tb_final_adder`: against the weighted popcount of its inputs.
* `tb_approx_mult16`: the full 16 × 16 design with default parameters. It
  compares against the reference model bit for bit, checks `product ≤ a*b`, and
  requires exact results for 0, 1 and powers of two. It requires both exact
  and approximated outputs to occur.

* `tb_image_smoothing`: the filter workload above. It checks every product
  against the reference model and requires a PSNR of at least 40 dB.

The reference model in `tb/amul_ref_pkg.sv` is written separately from the
RTL. It keeps each column as a list of bits and picks cells while it walks the
list, rather than reading the precomputed schedule. It follows the same rules,
so it confirms that the netlist does what the rules say, not that the rules
are the best ones.

Simulating with Verilator, for example the top-level test:

```
verilator --binary -Irtl -Itb rtl/amul_pkg.sv tb/amul_ref_pkg.sv \
    tb/tb_approx_mult16.sv --top-module tb_approx_mult16
./obj_dir/Vtb_approx_mult16
```

The other testbenches build the same way with their own top module. Lint is
clean apart from the unused top carries of `final_adder` (always zero, see
above) and package constants that some modules do not use.
