# Pipelined approximate multiplier with dynamic truncation

An unsigned N x N multiplier (8 x 8 by default) that gives up some accuracy to save
power and logic. Exact results are not needed in image processing, signal processing
or neural-network inference. Two approximations are used:

* **Dynamic input truncation.** A run-time control `trunc` drops that many low bits of
  both operands before any partial product is formed. The control can change on every
  clock, so one multiplier can switch between near-exact and coarse operation.
  `trunc = 0` leaves the operands untouched. A small **error compensation** step stops
  the truncation from always rounding down.
* **Approximate 4-2 compressors.** These reduce the partial-product matrix. A compressor
  is wrong only when all four of its inputs are 1. Its carry output is always right.

The last two rows are added by an exact ripple-carry adder. That adder is built from a
multiplexer-based full adder and an AND/OR half adder. Registers sit at the input,
inside the partial-product accumulation and at the output. The multiplier accepts one
operation per clock and returns its product 3 clocks later.

```
 a,b,trunc ──►[input reg]──► truncate+compensate (a) ─┐
                        └──► truncate+compensate (b) ─┴► AND array (N rows)
                                                          │
                                          4-2 compressor level 1  (N → N/2 rows)
                                                          │
                                                  [accumulation reg]
                                                          │
                               4-2 compressor levels 2.. (N/2 → 2 rows)
                                                          │
                                           ripple adder (MHA + MFAs)
                                                          │
                                                    [output reg] ──► product, out_valid
```

## The approximate 4-2 compressor

The reduction tree depends on this cell, and it is the least obvious part of the design
(`rtl/approx_compressor_4_2.sv`). It takes four bits of the same weight, `x1..x4`, and
returns `sum` (weight 1) and `carry` (weight 2). Unlike the usual 4-2 compressor, it has
no carry-in and no carry-out.

```
W1 = x1 & x2      W2 = x1 | x2      W3 = x3 & x4      W4 = x3 | x4
W5 = W1 | W3      (a pair of ones in x1/x2 or in x3/x4)
W6 = W2 & W4      (a one in x1/x2 and a one in x3/x4)
carry = W5 | W6
sum   = W5 ^ W2 ^ W4
```

The carry is 1 exactly when at least two inputs are 1, so it is always correct. A wrong
carry would cost twice as much as a wrong sum. The sum reuses the OR terms W2 and W4.
XOR-ing only W2 and W4 would be wrong whenever a pair is 11; W5 corrects that case. The
only input still wrong is `1111`. It gives `carry=1, sum=1`, which is 3 instead of 4, an
error distance of 1. All other 15 inputs are exact.

Because no carry moves sideways between compressors, every column of a compressor level
is independent. A level is just W compressors per group of four rows, with the carry
row shifted up by one column (`rtl/pp_compress_level.sv`).

## Truncation and compensation

For a control value `t`, clamped to N (`rtl/dynamic_input_truncation.sv`,
`rtl/error_compensation.sv`):

1. The low `t` bits of the operand are cleared.
2. If any cleared bit was 1, bit `t-1` is set again. The operand then stands for the
   middle of the range of values it replaced, not the bottom of it. If all cleared bits
   were 0, the operand is already exact and stays as it is.

Example with `t = 3`: `0x67 = 0110_0111` first becomes `0110_0000`. One of the cleared
bits was 1, so bit 2 is set again, giving `0110_0100 = 0x64`. An operand of `0x60`
stays `0x60`.

The compensation rule is this implementation's own choice. The original design names an
error-compensation circuit but does not describe how it works.

The compensated operands feed a plain AND array: row `i` is `a & {N{b[i]}}` shifted
left by `i` (`rtl/partial_product_gen.sv`). Its unshifted rows are available on the
`ppd` port as an N x N array.

## Accuracy

Measured over all 65,536 operand pairs at N = 8. MRED is the mean of
|approx − exact| / exact over the nonzero exact products.

| trunc | MRED    |
|-------|---------|
| 0     | 0.12 %  |
| 1     | 0.12 %  |
| 2     | 2.56 %  |
| 3     | 7.51 %  |
| 4     | 18.3 %  |
| 5     | 43.3 %  |
| 6     | 105 %   |
| ≥ 8   | 876 %   |

At `trunc = 0` all of the error comes from compressor columns that hold four ones.
`trunc = 1` is no worse than `trunc = 0`, because the compensation puts back the single
dropped bit. The published accuracy loss for the original design is about 2.3 %, but
the metric behind that number is not stated. The closest setting here is `trunc = 2`.

The large values at high `trunc` come from small operands. Once every bit of a small
operand is truncated, compensation turns it into `2^(t-1)`, so the relative error
explodes. Settings above about 4 are only useful for operands whose high bits are set.

Some reference values (a, b, trunc → product):

| a    | b    | trunc | product | exact  |
|------|------|-------|---------|--------|
| 0x67 | 0x60 | 0     | 0x26a0  | 0x26a0 |
| 0x67 | 0x60 | 3     | 0x2580  | 0x26a0 |
| 0x47 | 0x68 | 4     | 0x1d40  | 0x1cd8 |
| 0xa8 | 0x92 | 6     | 0x6400  | 0x5fd0 |

A waveform published for the original design has the same first row. For the last
three inputs it shows 0x2500, 0x11d8 and 0x5000. Those values come from a
partial-product truncation that treats each row differently, and the rule behind it is
not given. This design uses the operand-truncation rule above instead.

## Adder cells

* `modified_full_adder` is an exact full adder made of two 4:1 multiplexers. The
  multiplexers are selected by `{a,b}`. The sum multiplexer passes `c, ~c, ~c, c` and
  the carry multiplexer passes `0, c, c, 1`.
* `modified_half_adder` is an exact half adder written as two AND terms merged by an
  OR (`a&~b | ~a&b`) plus an AND for the carry, with no XOR gate.
* `final_adder` is a W-bit ripple-carry adder: one half adder at bit 0, then full
  adders. In the multiplier its carry-out is always 0. A compressor never outputs more
  than the sum of its inputs, so the two final rows never add up to more than the exact
  product. A simulation assertion in the top checks this.

## Pipeline and interface

`approx_mult_pipe` (top), parameters `N = 8` and `TW = 4` (width of `trunc`):

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                              |
| `rst`       | in  | 1     | synchronous, active high                        |
| `in_valid`  | in  | 1     | `a`, `b`, `trunc` hold an operation this cycle  |
| `a`, `b`    | in  | N     | unsigned operands                               |
| `trunc`     | in  | TW    | low operand bits to drop (0 = exact operands)   |
| `out_valid` | out | 1     | `product` holds a result                        |
| `product`   | out | 2N    | approximate product                             |

Timing of one operation:

* **Edge 1:** the operands are registered.
* **Between edges 1 and 2:** truncation, compensation, the AND array and the first
  compressor level.
* **Edge 2:** the N/2 rows are registered.
* **Between edges 2 and 3:** the remaining compressor levels and the ripple adder.
* **Edge 3:** the product is registered.

A new operation can enter on every clock. Nothing stalls the pipeline and there is no
ready signal, so results must be taken as they come. Reset clears all three stages,
including results still in flight.

The three-stage split, the valid flags and the reset behaviour are choices of this
implementation. The original design registers the inputs and pipelines the
partial-product accumulation, but it does not say where the registers go.

`N` must be a power of two and at least 4. An elaboration assertion checks this. The
tree then has log2(N) − 1 compressor levels: 2 levels for N = 8 and 3 for N = 16.
Rows are grouped four at a time in row order.

## What is not included

* **Reversible full and half adders.** The original design names them as replacements
  for conventional adders but gives neither a gate structure nor a place in the
  datapath. The exact adder cells above do the arithmetic.
* **Approximate 5-3 compressor.** It is named but never specified. Every reduction
  level uses the 4-2 compressor.
* **FPGA results.** The original design's LUT, delay and power figures come from an
  FPGA implementation and cannot be reproduced in RTL.

## Files

| file | content |
|------|---------|
| `rtl/amul_pkg.sv` | default sizes, pipeline latency, `trunc` clamp function |
| `rtl/approx_mult_pipe.sv` | top: pipeline and datapath |
| `rtl/approx_compressor_4_2.sv` | approximate 4-2 compressor |
| `rtl/pp_compress_level.sv` | one reduction level of 4-2 compressors |
| `rtl/partial_product_gen.sv` | AND array |
| `rtl/dynamic_input_truncation.sv` | operand truncation |
| `rtl/error_compensation.sv` | compensation of a truncated operand |
| `rtl/modified_full_adder.sv`, `rtl/modified_half_adder.sv` | adder cells |
| `rtl/final_adder.sv` | ripple-carry adder |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. The leaf
testbenches are exhaustive where the input space allows. `tb_approx_mult_pipe`
compares every product, for every operand pair and every `trunc` value, with an
independent behavioural model. It also checks:

* the 3-cycle latency and back-to-back throughput;
* random bubbles (cycles with no valid input);
* a reset while operations are in flight;
* that truncation, compensation, four-ones columns, bubbles and reset each occur.

It prints the accuracy table above and runs in about a second.
`tb_approx_mult_pipe_n16` runs the same kind of check at N = 16 on 200,000 random
operations. At that size the tree has three compressor levels.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/amul_pkg.sv tb/tb_approx_mult_pipe.sv --top-module tb_approx_mult_pipe
./obj_dir/Vtb_approx_mult_pipe
```

Replace the testbench name to run any other block's test. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/amul_pkg.sv rtl/<module>.sv`.
