# Multimode single precision floating point unit

A combinational arithmetic unit that adds, subtracts, multiplies and divides
IEEE 754 single precision (binary32) numbers, selected by a 2-bit mode input.
Its main idea is sharing: instead of four separate operators there are two
combined datapaths. One add/subtract unit serves both additive operations
(subtraction is addition with the sign of `b` flipped). One multiply/divide
unit serves both multiplicative operations with a single sign calculator,
exponent calculator and normalization unit; only the significand core
differs (a Dadda multiplier tree for products, an array divider for
quotients). The design follows a published FPGA design that reports a 14 %
LUT and 19 % area saving from this combination. Those figures come from a
Xilinx Zynq (xc7z020) implementation and are not reproduced here.

Results are rounded toward zero (the fraction is truncated). Overflow gives a
signed infinity and raises `overflow`. Underflow gives a signed zero and
raises `underflow`. There are no subnormals.

## Number format

| bits  | field    | meaning                                     |
|-------|----------|---------------------------------------------|
| 31    | sign     | 1 = negative                                |
| 30:23 | exponent | biased by 127                               |
| 22:0  | mantissa | fraction after a hidden leading 1           |

A normal number is `(-1)^s * 2^(E-127) * 1.M`. The exponent and mantissa
widths are parameters (`EXP_W`, `MAN_W`) of every module. The defaults are 8
and 23. Smaller formats with the same structure can be built, for example
the 8-bit-exponent, 4-bit-mantissa format used below as a worked example.

Operand classes. These rules are this design's own choice; the source
defines only the normal-number behaviour:

- Exponent field 0 reads as zero. Subnormal operands are flushed to a signed zero.
- All-ones exponent with fraction 0 is infinity. With a nonzero fraction it is NaN.
- A NaN operand, 0 x inf, inf - inf, 0/0 and inf/inf all give the quiet NaN
  `0x7FC00000` and raise `invalid`.
- x/0 gives a signed infinity without a flag.
- Operations on these special operands never raise `overflow` or `underflow`.

## Top level: `fp_multimode_unit`

| port        | dir | width | meaning                                          |
|-------------|-----|-------|--------------------------------------------------|
| `a`, `b`    | in  | 32    | operand words                                    |
| `mode`      | in  | 2     | `fp_pkg::fp_op_e`: 0 add, 1 sub, 2 mul, 3 div    |
| `result`    | out | 32    | result word                                      |
| `overflow`  | out | 1     | result too large, `result` is +-infinity         |
| `underflow` | out | 1     | result below the normal range, `result` is +-0   |
| `invalid`   | out | 1     | invalid operation, `result` is the quiet NaN     |
| `cvt_sign`, `cvt_int`, `cvt_frac` | in | 1, 32, 32 | fixed-point number to convert |
| `cvt_result` | out | 32   | converted word (truncated)                       |
| `cvt_overflow`, `cvt_underflow` | out | 1 | converter range flags          |

The `cvt_*` ports belong to the binary-to-floating-point converter, which
stands beside the arithmetic units (see below). There is no clock. Outputs follow the inputs after the combinational delay.
Register the ports outside the unit, or add pipeline stages, to meet a clock
target. The mode encoding is this design's choice.

```
                 +-------------------------------------------+
 a, b ---------->| fp_addsub  (sub = mode==SUB)               |--+
                 |   swap -> align+sticky -> add/sub ->        |  |
                 |   leading-zero normalize -> ovf_unf_detect  |  |  mode
                 +-------------------------------------------+  +--> mux --> result, flags
                 +-------------------------------------------+  |
 a, b ---------->| fp_muldiv  (div = mode==DIV)               |--+
                 |  sign_calc      (sa ^ sb)                  |
                 |  exponent_calc  (Ea+Eb-127 | Ea-Eb+127)    |
                 |  dadda_multiplier | mantissa_divider       |
                 |  normalizer -> ovf_unf_detect              |
                 +-------------------------------------------+
```

## Multiply and divide path (`fp_muldiv`)

Multiplication takes these steps:

1. The sign is `sa XOR sb` (`sign_calc`).
2. The exponent is `Ea + Eb - 127` (`exponent_calc`). Each biased exponent
   already carries the bias once, so the sum carries it twice.
3. The two 24-bit significands `1.Ma` and `1.Mb` are multiplied
   (`dadda_multiplier`). The 48-bit product lies in [1, 4).
4. The normalizer places exactly one 1 before the radix point and truncates
   the fraction to 23 bits.
5. The final exponent is checked for overflow and underflow.

Division uses the same structure with `Ea - Eb + 127`, where the bias cancels
in the difference and is added back. `mantissa_divider` computes the
quotient `floor(1.Ma * 2^24 / 1.Mb)`, which lies in (1/2, 2).

Both significand cores deliver the same shape to the shared normalizer: two
integer bits and 24 fraction bits (`xx.f`). The product is cut to its top
26 bits. The quotient is zero-extended. The normalizer then has three cases:

| raw significand | action                 | exponent |
|-----------------|------------------------|----------|
| [2, 4)          | shift right one place  | +1       |
| [1, 2)          | none                   | 0        |
| [1/2, 1)        | shift left one place   | -1       |

The first case happens only for products and the last only for quotients.
The bits dropped before normalization do not disturb the rounding: flooring
twice gives the same result as flooring once, so the result is exact
round-toward-zero.

The intermediate exponent is a signed value two bits wider than the field
(10 bits). A product of two small numbers can give a negative intermediate
exponent, and a product of two large ones can exceed 255. Neither case may
wrap before the check.

Worked example in a reduced format (8-bit exponent, 4-bit mantissa):
`A = 0 10000100 0100` (40) times `B = 1 10000001 1110` (-7.5).

- Significands: `1.0100 x 1.1110 = 10.01011000`.
- Exponent: `10000100 + 10000001 - 01111111 = 10000110`.
- Normalizing shifts right once: `1.001011000`, exponent `10000111`.
- Truncating to four bits gives `1 10000111 0010`, which is -288.

The exact result is -300. The difference is the truncation to a 4-bit
mantissa. In binary32 the same product is exactly `0xC3960000` (-300).

## The Dadda tree (`dadda_multiplier`)

The N x N partial-product bits `a[i] & b[j]` are grouped into columns of
equal weight `i + j`. The tallest column has N bits. A Dadda tree lowers the
column heights in stages with targets ..., 28, 19, 13, 9, 6, 4, 3, 2. Each
target is `floor(1.5 x)` of the next smaller one. For N = 24 that gives seven
stages, with targets 19, 13, 9, 6, 4, 3 and 2.

Within a stage, each column is processed from the least significant end.
The column's height counts its own bits plus the carries arriving from the
column below in the same stage. If that height exceeds the stage target by
`x`, the column gets `x / 2` full adders and, if `x` is odd, one half adder.
That is the least reduction that reaches the target, which is what sets a
Dadda tree apart from a Wallace tree. After the last stage no column holds
more than two bits, and one carry-propagate adder (`+`) adds the two rows.

The schedule is not written out by hand. The constant function `sched()`
replays the Dadda rule at elaboration and returns the full-adder count,
half-adder count and column height for any stage and column. Generate loops
then wire the adders:

- Sums go to the bottom of the column in the next stage.
- Untouched bits are passed through above the sums.
- Carries from the column below are appended on top.

Changing `N` regenerates the whole tree. Any N >= 2 works.

## Add and subtract path (`fp_addsub`)

1. The operand with the larger magnitude (`{exponent, fraction}` compared as
   one integer) is taken as the base. Its sign becomes the result sign.
2. The other significand is shifted right by the exponent difference into a
   field with three extra low bits: guard, round and sticky. The sticky bit
   collects the OR of every bit shifted further.
3. The significands are added or subtracted according to the effective
   signs.
4. A carry out shifts the result right one place (exponent +1). Otherwise a
   leading-zero count shifts it left (exponent minus the count).

Truncating this result gives the exact round-toward-zero answer. When bits
are lost in the alignment, the exact value and the computed value differ by
less than one sticky unit and lie in the same truncation interval. An exact
zero result is +0. The only exception is (-0) + (-0), which gives -0.

## Overflow and underflow (`ovf_unf_detect`)

Both datapaths end in this block. It receives the sign, the signed exponent
after normalization and the 23-bit fraction:

- exponent >= 255: `overflow`, result +-infinity
- exponent <= 0: `underflow`, result +-0
- otherwise: the packed word

The check comes after normalization. An intermediate exponent of 0 that the
normalizer raises to 1 is therefore a valid normal result, not an underflow.

## Binary to floating point conversion (`bin_to_float`)

Values often exist as plain binary numbers, not as floating point words.
The converter takes a sign, a 32-bit integer part and a 32-bit binary
fraction. For example, 12.375 is integer `1100` and fraction `.011`, which is
`cvt_int = 12`, `cvt_frac = 0x6000_0000`. The steps are:

1. Place both parts side by side and find the leading 1.
2. Take the exponent from the leading 1's distance to the binary point, plus
   127.
3. Keep the 23 bits after the leading 1 as the mantissa and truncate the
   rest.

12.375 becomes `0x41460000`. A fraction with no finite binary form, such as
0.1, arrives already cut to 32 bits. It converts to the truncated word
`0x3DCCCCCC`. The range check is the shared overflow/underflow block. It
never triggers at the default widths, but can with a narrower exponent. The
input widths are parameters (`CVT_INT_W`, `CVT_FRAC_W` on the top).

## Where this design departs from or goes beyond its source

- The source describes the multiplier in detail. For division and the
  add/subtract unit it gives only the function. The restoring array divider,
  the add/subtract datapath and the way the units share hardware are this
  design's choices.
- In one passage the source states the exponent check with an 11-bit
  exponent and a bias of 1023, the double precision values. This design uses
  the single precision 8-bit exponent and bias 127 throughout, as the rest of
  the source does.
- Only truncation is implemented. The source uses truncation in its example
  and names no other rounding mode.
- Special operands, the `invalid` flag and the mode encoding are not in the
  source. See "Number format".
- The source explains conversion into the format as a procedure on decimal
  numbers. The hardware converter takes the number already in binary and
  does only the normalization and packing. Its input widths are this
  design's choice.
- The unit is purely combinational. The source names no clock, register or
  latency.
- The FPGA resource comparison (LUTs, area) is not reproduced.

## Files

`rtl/` (synthesizable):

| file                   | contents                                              |
|------------------------|-------------------------------------------------------|
| `fp_pkg.sv`            | format defaults, `fp_op_e` mode enum                  |
| `fp_multimode_unit.sv` | top level                                             |
| `fp_addsub.sv`         | combined add/subtract unit                            |
| `fp_muldiv.sv`         | combined multiply/divide unit                         |
| `sign_calc.sv`         | sign XOR                                              |
| `exponent_calc.sv`     | intermediate exponent for product or quotient         |
| `dadda_multiplier.sv`  | N x N Dadda multiplier                                |
| `mantissa_divider.sv`  | restoring array divider for significands              |
| `normalizer.sv`        | normalization, truncation                             |
| `ovf_unf_detect.sv`    | overflow/underflow decision and result packing        |
| `bin_to_float.sv`      | fixed-point binary to floating point converter        |

`tb/` (self-checking testbenches):

- Each rtl module has one, named `tb_<module>.sv`.
- `tb_fp_reduced_format.sv` runs the 4-bit-mantissa worked example and random
  vectors in that format.
- `fp_ref_pkg.sv` is the reference model. It computes every result with exact
  wide-integer arithmetic (up to 512 bits), not with the hardware's
  algorithm, and it also generates the random operands.

Each testbench prints `TB_RESULT checks=N failures=M`. The top-level test
applies 20,000 random vectors across all modes, plus 2,000 converted
numbers, at the default parameters. It
also counts how often each mechanism was exercised and fails if any count is
zero:

- binary-to-float conversion, whose result is fed on as an operand
- every mode, and mode switches
- overflow, underflow and invalid operations
- the special-operand bypass and divide by zero
- the normalizer's right and left shifts
- the adder's carry-out and cancellation shifts

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_multimode_unit.sv \
    --top-module tb_fp_multimode_unit -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` and its module name for the block tests. Add
`-Wno-fatal` if a lint warning (for example about unused product bits) stops
the build. Elaboration of the Dadda schedule takes about half a minute at
N = 24.

## Changing it

- **Format:** set `EXP_W` and `MAN_W` on `fp_multimode_unit`. Every internal
  width follows from them.
- **Rounding:** the normalizer and the adder keep truncated bits only.
  Round-to-nearest would need the product's and quotient's lower bits (or the
  divider's remainder) carried into the normalizer as guard and sticky bits,
  plus an increment after normalization.
- **Pipelining:** the natural register points are after the significand cores
  (product or quotient, sign, exponent) and after the adder's alignment
  shift.
