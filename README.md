# Forward 8x8 integer DCT for H.264/AVC FRExt — three architectures

The High profiles of H.264/AVC (the FRExt amendment) add an 8x8 transform next
to the 4x4 one. A block of 64 prediction residuals X is taken to the frequency
domain as

    Y = C X C^T

where C is an 8x8 matrix of small integers. This RTL implements that forward
transform three ways, so that their cost and speed can be compared on the same
interface:

| unit | module | how products by C are formed | throughput | latency |
|---|---|---|---|---|
| 2D, multipliers | `dct8_2d_mult` | `*` by the matrix entries | 1 block / 3 cycles | 3 edges |
| 2D, shift-and-add | `dct8_2d_adder` | shifted copies of the operand, added | 1 block / 3 cycles | 3 edges |
| 1D butterfly | `dct8_1d` | separable butterfly, adders and right shifts | 1 block / cycle | 6 edges |

The two 2D units return the exact integer product. The butterfly returns the
transform as the standard defines it, which is close to the exact product
divided by 64 (see *Exact product versus butterfly*). `dct8_top` places the
three units side by side.

## The matrix

With every entry scaled by 8 so that all are integers (the transform proper
is C/8):

```
 8   8   8   8   8   8   8   8
12  10   6   3  -3  -6 -10 -12
 8   4  -4  -8  -8  -4   4   8
10  -3 -12  -6   6  12   3 -10
 8  -8  -8   8   8  -8  -8   8
 6 -12   3  10 -10  -3  12  -6
 4  -8   8  -4  -4   8  -8   4
 3  -6  10 -12  12 -10   6  -3
```

Even rows are symmetric and odd rows antisymmetric about the middle. Every
magnitude is 3, 4, 6, 8, 10 or 12, each the sum of at most two powers of two.
The shift-and-add unit and the butterfly both depend on that. The matrix is
`dct_pkg::C8`.

## Buses

All three units have the same ports:

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous reset, active high |
| `enable_in` | 1 | a block is present on `residue` |
| `residue` | 512 | 64 signed 8-bit residuals; element `r*8+c` (bits `[(r*8+c)*8 +: 8]`) is row r, column c |
| `ready_out` | 1 | the unit takes the block on this edge if `enable_in` is high |
| `enable_out` | 1 | one-cycle strobe: `transform_out` holds a new result |
| `transform_out` | 1344 | 64 signed 21-bit coefficients; element `v*8+u` is vertical frequency v, horizontal frequency u |

21 bits is exactly what the exact product needs. The largest magnitude is
64 · 64 · 128 = 2^19, reached at Y[0][0] when every residual is −128.
`transform_out` holds its value until the next result.

## 2D units: INITIALIZATION, TRANSFORM1, TRANSFORM2

Both 2D units use the controller `dct2d_ctrl`. It is a three-state machine,
and each state lasts one cycle:

1. **INITIALIZATION**: `ready_out` is high. When `enable_in` is seen, the 512
   input bits are registered.
2. **TRANSFORM1**: all 64 entries of T = C·X are computed at once and
   registered. T needs 15 bits, since |T| ≤ 64·128.
3. **TRANSFORM2**: all 64 entries of Y = T·C^T are computed and registered on
   `transform_out`. `enable_out` is high in the following cycle.

If `enable_in` stays high, a block is taken every third cycle. A block offered
while the unit is busy stays on the bus until `ready_out` rises.

The only difference between the two units is how a product such as C[i][k]·x
is built:

* `dct8_2d_mult` writes it as a multiplication by a constant.
* `dct8_2d_adder` uses `dct_pkg::mul_shift_add`. This function builds 12x as
  `{x,3'b0} + {x,2'b0}`, 10x as `{x,3'b0} + {x,1'b0}`, and so on, then negates
  the result for a negative entry.

Each output is a sum of eight such terms in a single cycle. That adder tree
sets the critical path of both 2D units.

## 1D butterfly unit

`bfly8` computes the 8-point transform of one row or column in three stages,
with a register after each stage:

```
stage 1   a0 = x0+x7  a1 = x1+x6  a2 = x2+x5  a3 = x3+x4
          a4 = x0-x7  a5 = x1-x6  a6 = x2-x5  a7 = x3-x4
stage 2   b0 = a0+a3  b1 = a1+a2  b2 = a0-a3  b3 = a1-a2
          b4 = a5+a6 + (a4 + (a4>>>1))     b5 = a4-a7 - (a6 + (a6>>>1))
          b6 = a4+a7 - (a5 + (a5>>>1))     b7 = a5-a6 + (a7 + (a7>>>1))
stage 3   y0 = b0+b1         y4 = b0-b1
          y2 = b2+(b3>>>1)   y6 = (b2>>>1)-b3
          y1 = b4+(b7>>>2)   y3 = b5+(b6>>>2)
          y5 = b6-(b5>>>2)   y7 = (b4>>>2)-b7
```

Expanding any output gives the matching row of C/8. For example,
y1 = 1.5·a4 + 1.25·a5 + 0.75·a6 + 0.375·a7, which is 12, 10, 6, 3 divided by 8.
The output is 3 bits wider than the input.

`dct8_1d` uses 16 of these butterflies, all working at once:

* Eight butterflies transform the eight rows (8-bit in, 11-bit out).
* The 8x8 result is transposed.
* Eight more butterflies transform what were the columns (11-bit in, 14-bit
  out).
* A final transpose restores row order, and each result is sign-extended to
  21 bits.

Both transposes are wiring only, because all 64 values are present in the same
cycle. There are six register stages in total. A block can enter on every
cycle, and `enable_out` is `enable_in` delayed by six cycles. `ready_out` is
always high.

## Exact product versus butterfly

The 2D units return C X C^T exactly. The butterfly returns the standard
transform, which is about (C X C^T)/64. It is not exactly that, because of the
right shifts. The shifts round towards −∞ and drop fractional bits in the odd
part and in y2/y6 of each pass.

On the test data the largest value of |64·Y_butterfly − C X C^T| is 536. That
is less than one part in a thousand of full scale. This rounding is part of
how the standard defines the transform, so it is not an error of the
butterfly unit. To compare the two kinds of unit, divide the 2D result by 64,
or multiply the butterfly result by 64, and allow for this difference.

## Design choices

The reference description fixes the following:

* the three architectures and the 2D state sequence;
* the matrix and the butterfly equations;
* the 512-bit and 1344-bit buses;
* the `Enable_in` and `Enable_out` strobes.

These were chosen for this RTL:

* **One cycle per FSM state.** Both 2D products are fully parallel.
* **`ready_out`.** It was added so that a source knows when a 2D unit takes a
  block. A source that ignores it must not offer blocks more often than every
  third cycle.
* **Butterfly pipeline.** There is one register per butterfly stage, and all
  16 butterflies run in parallel.
* **Reset.** It is synchronous and active high. It clears every register, and
  the 2D controller goes back to INITIALIZATION.
* **Element order and signedness** on the buses (see *Buses*).
* **No output scaling.** The 2D units keep the exact product and the butterfly
  unit keeps the standard scaling.
* **Arithmetic right shifts** (`>>>`) throughout the butterfly.

For orientation only: published FPGA results for these three architectures
(LUTs / registers / fmax) were about 19.5k / 2.1k / 83 MHz with multipliers,
14.1k / 2.2k / 100 MHz with shift-and-add, and 6.0k / 4.9k / 200 MHz for the
pipelined butterfly. This RTL has not been timed on an FPGA. Its register
counts are close: about 2.8k bits for each 2D unit (input, T and output
registers) and about 4.5k bits for the butterfly.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | sizes, bus types, FSM state type, matrix `C8`, `mul_shift_add` |
| `rtl/dct2d_ctrl.sv` | INITIALIZATION / TRANSFORM1 / TRANSFORM2 controller, with assertions on `enable_out` and on legal states |
| `rtl/dct8_2d_mult.sv` | 2D unit with multipliers |
| `rtl/dct8_2d_adder.sv` | 2D unit with shift-and-add |
| `rtl/bfly8.sv` | 8-point butterfly, three pipeline stages, parameter `IN_W` |
| `rtl/dct8_1d.sv` | row/column butterfly unit |
| `rtl/dct8_top.sv` | the three units side by side; ports prefixed `mult_`, `adder_`, `bfly_` |
| `tb/dct_ref_pkg.sv` | integer reference models: exact C X C^T, the butterfly, bus packing, block generators |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the outputs with the integer models in
`tb/dct_ref_pkg.sv`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_bfly8` checks random and extreme vectors against the model. For inputs
  that are multiples of 8, no shift loses a bit, so it also checks the model
  against the matrix exactly.
* `tb_dct2d_ctrl` follows a cycle-accurate model of the state machine under a
  random `enable_in`, including a reset in the middle of an operation.
* `tb_dct8_2d_mult` and `tb_dct8_2d_adder` check:
  * every coefficient against the exact product;
  * a latency of exactly 3 edges;
  * one block every 3 cycles when `enable_in` is held high.
* `tb_dct8_1d` checks:
  * the result against the row/column butterfly model;
  * a latency of 6;
  * back-to-back blocks;
  * a bound of 1024 on |64·Y − C X C^T|.
* `tb_dct8_top` streams 240 blocks through all three units at full size. The
  blocks are random, all −128, all 127, sign patterns that push coefficients to
  the top of their range, small values and impulses. It counts, and requires
  at least once, each of these events:
  * a 2D unit holds off a block while busy;
  * a full 2D FSM pass;
  * back-to-back butterfly blocks;
  * idle gaps in the butterfly pipeline;
  * coefficients of 20 bits or more;
  * butterfly results that differ from C X C^T/64 by rounding.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct8_top.sv --top-module tb_dct8_top
./obj_dir/Vtb_dct8_top
```

Replace `tb_dct8_top` with any other testbench name. Each run takes well under
a second.
