# Pipelined double-precision exp() for FPGAs

This is a fully pipelined IEEE-754 double-precision exponential unit. It
takes one argument per clock and returns `exp(x)` 30 clock cycles later.
The error is at most 1 ulp. Two units run side by side in `exp_twin`, which
takes a 128-bit word (two doubles) per clock. That matches a board whose
memory delivers 128 bits per clock.

The unit needs no floating-point multiplier and no high-degree polynomial.
After one range reduction, almost all of the work is done by three small
tables. A first-order Taylor term covers the last 35 bits of the reduced
argument. Four fixed-point multipliers then combine the pieces, and none of
them builds the low product columns that cannot affect the result.

## The arithmetic

For an argument `x`:

```
x_I = floor(x * log2 e)            integer part, 11-bit two's complement
x_F = x - x_I * ln 2               0 <= x_F < ln 2, a 62-bit fraction
exp(x) = 2^x_I * e^x_F
```

Because `x_F` is never negative, the sign of the argument ends up entirely
in `x_I`. The 62 bits of `x_F` are cut into four slices:

| slice | bits of x_F | weights        | evaluated as                          |
|-------|-------------|----------------|---------------------------------------|
| x_M   | 61:53       | 2^-1 .. 2^-9   | table: `m = e^xM`                     |
| x_D   | 52:44       | 2^-10 .. 2^-18 | table: `d = e^xD - 1`                 |
| x_L   | 43:35       | 2^-19 .. 2^-27 | table: `l = e^xL - 1`                 |
| x_T   | 34:0        | 2^-28 .. 2^-62 | Maclaurin: `t = xT ~ e^xT - 1`        |

So `e^x_F = m (1+d) (1+l) (1+t)`. Since `xT < 2^-27`, the omitted
`xT^2/2` is below 2^-55.

The lower three factors are kept without their leading 1. Their values are
small (`d < 2^-9`, `l < 2^-18`, `t < 2^-27`), so their leading zeros never
reach a multiplier. The products are grouped as:

```
P1 = m + m*d                  (msb_combine)     = e^(xM+xD)
S  = l + t + l*t              (lsb_combine)     = e^(xL+xT) - 1,  S < 2^-17
R  = P1 + P1*S                (final_combine)   = e^x_F,          1 <= R < 2
y  = 2^x_I * R, rounded to 52 fraction bits     (exp_normalize)
```

### Number formats

All fixed-point values are scaled by 2^62:

- The converted argument is 73 bits: sign, 10 integer bits and 62 fraction
  bits.
- Table words and products carry 62 fraction bits. That is 10 guard bits
  beyond the 52 of a double.
- Each multiplier output has 6 further guard bits. The round stage that
  follows the multiplier removes them, rounding half up.

`rtl/exp_pkg.sv` holds all the widths and constants:

- `ln 2` with 76 fraction bits;
- `log2 e` with 24 fraction bits;
- the special-result code `special_e` (`SP_NONE`, `SP_INF`, `SP_ZERO`,
  `SP_NAN`).

### Finding x_I cheaply

`mul_log2e` multiplies only a short version of `x` by a short constant:

- `x` rounded down to 2^-16;
- `log2 e` to 24 fraction bits.

For `|x| < 1024` this estimate of `floor(x*log2 e)` is at most one off.
`int_frac_sep` then:

1. computes `x - x_I*ln2` accurately;
2. applies one correction step: if the difference is below 0 it adds
   `ln 2` and decrements `x_I`, and if it is at least `ln 2` it subtracts
   `ln 2` and increments `x_I`.

The testbench counts how often this correction is taken. It is rare, but it
does happen.

## Pipeline and timing

Each entry is the cycle at which the stage's result appears, counted from
the clock edge that samples the argument:

| cycle | stage | module |
|------:|-------|--------|
| 5  | conversion to fixed point, special-argument classification | `fp_to_fixed` |
| 7  | `x*log2 e` estimate (x delayed 2 cycles alongside) | `mul_log2e`, `delay_line` |
| 12 | `x_I`, `x_F`, range check of `x_I` | `int_frac_sep` |
| 14 | table reads and Maclaurin term (1 cycle), alignment register (1 cycle) | `frac_eval`, `exp_lut` |
| 21 | `m*d` in 6 cycles, `m` delayed 6, add and round 1 | `msb_combine` |
| 20 (+1 delay = 21) | `l*t` in 4 cycles, round 1, `l`/`t` delayed 5, align and add 1 | `lsb_combine` |
| 29 | `P1*S` in 6 cycles, `P1` delayed 6, round 1, add 1 | `final_combine` |
| 30 | normalize, round, exponent and special cases (`x_I` delayed 17) | `exp_normalize` |

The stage latencies and delay lengths come from the published block
diagram. Where the diagram gives a stage's total but not how its cycles are
used, the split is this design's own. That applies to conversion,
separation, and round-and-add. `trunc_mult` uses three registers of real
work (operands, tile products, sum) and pads the rest of its latency with
registers that a synthesis tool can retime.

There is no back-pressure. `in_valid` travels through a 30-stage delay line
beside the data and becomes `out_valid`. The delay line is tapped at
cycles 12 and 29. At those taps, two assertions in `exp_unit` check that
every valid `x_F` is below `ln 2` and that `R` lies between 1 and 2 (plus
a few units of rounding).

## Reduced-width multipliers

`trunc_mult` cuts both operands into 17-bit tiles, the size of one DSP
multiplier.

- A tile product that lies entirely below column `TRUNC` is not built.
- The other tiles are cut at `TRUNC` before they are summed.

The result is `floor(a*b / 2^TRUNC)` minus at most one unit per tile. All
three uses keep 6 guard bits, so this error is at most 16 units of
2^-68, which is 2^-64, before the rounding to 2^-62.

| use | operands | tiles built |
|-----|----------|-------------|
| `m*d`  | 64 x 53 | 13 of 16 |
| `l*t`  | 44 x 35 | 6 of 9   |
| `P1*S` | 64 x 46 | 9 of 12  |

## Special values and range

| argument | result |
|----------|--------|
| NaN | quiet NaN `0x7FF8000000000000` |
| +inf, or `x_I > 1023`, or a rounded exponent over 2046 | +inf |
| -inf, or `x_I < -1024`, or a result below 2^-1022 | +0 (subnormal results are flushed) |
| `|x| < 2^-62`, subnormal `x` | 1.0 |

The result's sign bit is always 0.

## Accuracy

Arguments are truncated to 2^-62. The tables and products are rounded at
2^-62. Only the dropped Maclaurin term `xT^2/2` is of a size that shows in
the result. It is always positive, so every result is pulled down by up to
2^-55 relative (about 1/8 ulp). The final rounding from 62 to 52 bits
rounds half up.

Against the simulator's `$exp`, over about 110,000 random arguments:

- every result is within 1 ulp;
- about 6% differ from `$exp` by exactly 1 ulp;
- the RMS difference is about 0.25 ulp.

## Modules

| file | role |
|------|------|
| `exp_pkg.sv` | widths, constants, `special_e`, and `expm1_fix`, the table generator |
| `exp_twin.sv` | **top**: two `exp_unit` lanes on a 128-bit stream |
| `exp_unit.sv` | one 30-cycle `exp()` pipeline |
| `fp_to_fixed.sv` | double to fixed point (5 cycles) |
| `mul_log2e.sv` | estimate of `x_I` (2 cycles) |
| `int_frac_sep.sv` | `x_I`, `x_F`, correction, range (5 cycles) |
| `frac_eval.sv` | slices `x_F`, three tables and the Maclaurin term (2 cycles) |
| `exp_lut.sv` | one 512-word table, registered read |
| `msb_combine.sv`, `lsb_combine.sv`, `final_combine.sv` | the three multiply-and-add stages |
| `trunc_mult.sv` | tiled reduced-width multiplier |
| `exp_normalize.sv` | final rounding and packing (1 cycle) |
| `delay_line.sv` | N-cycle alignment register |

### Table contents

The table contents are not stored in files. `exp_lut` fills its array in
an `initial` loop, for `v = a * 2^-LSB_EXP`:

```
word(a) = round((e^v - 1) * 2^62)         (+ 2^62 for the MSB table)
```

`e^v - 1` is summed as the Taylor series `v + v^2/2! + ...` in 120-bit
fixed point until the next term is zero. A synthesis tool that evaluates
initial loops will fill the block RAM from the same code.

The MSB table has 512 words for its 9-bit address. Only the first 355 are
reachable, because `x_F < ln 2`.

### Top-level ports (`exp_twin`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | `in_data` holds two arguments |
| `in_data` | in | 128 | lane 0 argument in bits 63:0, lane 1 in 127:64 |
| `out_valid` | out | 1 | `out_data` holds two results, 30 cycles after their arguments |
| `out_data` | out | 128 | `exp()` of each lane, same positions |

## Departures from the published design and own choices

- **Table contents.** The published design says the MID and LSB tables
  give `e^xD` and `e^xL`, and shows which blocks feed which multiplier and
  adder. Storing them as `e^v - 1` (and the `P1 = m + m*d` grouping that
  follows) is this design's reading of that dataflow.
- **Widths.** The published multipliers are described as roughly 54 bits
  wide with 62-bit working precision. Here they are 64 x 53, 44 x 35 and
  64 x 46, with 6 guard bits. The constant widths (`log2 e` 24 bits,
  `ln 2` 76 bits) are also this design's own.
- **x_I correction.** The correction step in `int_frac_sep` is this
  design's way to get an exact `x_I` from the deliberately inexact constant
  multiplication.
- **Rounding and specials.** Round-half-up, subnormal flushing, the
  special-value results and the lane order of `exp_twin` are not specified
  by the source and were chosen here.
- **Reset.** Only the delay lines, including the valid pipeline, are
  reset. Data registers are not.
- **Left out.** The FPGA board's SRAM banks, its host link and the
  platform's service logic are not part of this RTL. `exp_twin`'s 128-bit
  ports are where a memory streamer connects.
- **Not checked here.** Resource use and clock rate were not checked on an
  FPGA. The published unit runs at 200 MHz, which gives 2.5 ns per result
  for the pair.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Compile each one with `rtl/exp_pkg.sv`
and `tb/exp_ref_pkg.sv` (the reference helpers built on `$exp`). Verilator
finds the modules in `rtl/` by file name. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/exp_pkg.sv tb/exp_ref_pkg.sv tb/tb_exp_twin.sv \
    --top-module tb_exp_twin -o sim
./obj_dir/sim
```

`tb_exp_twin` is the end-to-end test at full size. It runs:

- special and boundary arguments in both lanes;
- vectors of 10, 100, 1000, 10^4 and 10^5 random doubles streamed two per
  clock.

It checks each of these:

- every result is within 1 ulp of `$exp`;
- every result has a latency of exactly 30;
- there are no gaps, so a 10^5-element vector takes 50,000 cycles plus the
  latency.

It also counts x_I corrections, normalization adjustments, and +inf, +0 and
NaN results, and fails if any of these never occurs.

Each module has its own testbench, `tb/tb_<module>.sv`. The arithmetic
stages are checked against exact wide-integer products, the tables against
double-precision series, and the units against `$exp`.

To change the precision, edit `FW`/`GUARD` in `exp_pkg.sv`. The slice
width `SEG_W` sets the table depth: 3 x 9 bits are table-driven, and the
rest of `x_F` is left to the Maclaurin term. That term is only accurate
enough while `x_T < 2^-27`.
