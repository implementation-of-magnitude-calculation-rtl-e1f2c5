# Complex magnitude by piecewise alpha-max-plus-beta-min, with a table-driven divider

This is synthesizable SystemVerilog for a unit that estimates the magnitude
`sqrt(P^2 + Q^2)` of a complex sample with 12-bit two's complement parts. It
needs no square root and no iterative divider. Its error stays within
0.26 % of the true value plus 1.5 output LSBs.

The classic alpha-max-plus-beta-min estimate is `alpha*x + beta*y`, where
`x = max(|P|,|Q|)` and `y = min(|P|,|Q|)`. With a single `(alpha, beta)` pair
its error is close to 4 %. This design splits the 0..45 degree range of the
angle `atan(y/x)` into **four sectors**. Each sector has its own pair. The
sector is found from the quotient `r = y/x`. That quotient needs a general
division, which this design does with a **non-iterative multiplicative
divider**: four small look-up tables and three multipliers give an
approximation of `1/x`, and one more multiplier forms `y * (1/x)`.

```
 P,Q ──► |.|, BA1, MUX1/MUX2 ──► Max, Min ──────────────────────────────┐
 (12b)      (stage 1)             │                                      │
                                  ▼ normalise if Max < 64                │
                       RECP: LT1..LT4, MULT1..3, BA2 ──► 1/Max (15b)     │
                                  │     (stage 2)                        │
                                  ▼                                      │
                       MULT4: r = Min * (1/Max)  (8b)                    │
                                  │                                      ▼
                       LT5: sector (2b) ──► LT6/LT7: alpha, beta ──► MULT6, MULT7, BA3 ──► |z| (12b)
                                             (stage 3)
```

The six multipliers (MULT1–MULT4, MULT6, MULT7) match the six DSP blocks the
original FPGA implementation reports. In this text, "the original design"
means that implementation.

## The four sectors and their coefficients

For an angle θ inside a sector centred on φ, the estimate is
`alpha cosθ + beta sinθ = sqrt(alpha²+beta²) cos(θ-φ)`. The error is
equiripple, with equal peaks of opposite sign at the centre and at both edges,
when:

* `alpha = (1+e) cos φ` and `beta = (1+e) sin φ`;
* `(1+e) cos δ = 1-e`, where δ is the half-width of the sector.

Four equal sectors of 11.25° give `δ = 5.625°` and `e = 0.241 %`. The
published beta values are 0.0983, 0.2910, 0.4725 and 0.6359, and this
construction reproduces all four. The alpha values and the sector boundaries
come from the same construction.

| sector | r range (= tan θ)   | alpha   | beta    | alpha·2^11 | beta·2^11 |
|--------|---------------------|---------|---------|-----------:|----------:|
| 0      | 0 … 0.19891         | 0.99759 | 0.09825 | 2043       | 201       |
| 1      | 0.19891 … 0.41421   | 0.95925 | 0.29099 | 1965       | 596       |
| 2      | 0.41421 … 0.66818   | 0.88405 | 0.47253 | 1811       | 968       |
| 3      | 0.66818 … 1         | 0.77488 | 0.63592 | 1587       | 1302      |

The coefficients are 11-bit pure fractions. LT5 maps the 8-bit quotient
`r8 = floor(256 r)` to a sector: r8 ≤ 50 gives sector 0, 51–106 sector 1,
107–171 sector 2, and 172 or more sector 3. All of these numbers are in
`rtl/amb_pkg.sv`, next to the formulas that produce them.

If the quotient is slightly wrong near a boundary, the unit picks the
neighbouring sector. That costs `x·(beta_i − beta_i+1)·ε_r` (at most
`0.193·x·ε_r`), which is why the divider only needs to be accurate to about
1 %.

## The reciprocal unit (RECP)

This is the part that needs the most explanation. The divisor `x` is 11 bits.
It is split into two segments:

* `a = x[10:6]·64`, the upper 5 bits, which address LT1–LT3;
* `b = x[5:0]`, the lower 6 bits, which address LT4.

Then `1/(a+b) = 1/a − b/(a(a+b))`. The trouble is that the second term
depends on all 11 bits. Replacing `a+b` in its denominator by `a+K1` gives a
first approximation. A correction for the error of that step, with `a+b`
replaced by `a+K2`, gives the form used here:

```
1/x ≈ 1/a − b·[1/(a(a+K1))] − b·(K1−b)·[1/(a(a+K1)(a+K2))]
        LT1      MULT1, LT2       MULT3 ← LT4 × (MULT2 ← b × LT3)
```

* `K2 = 63`, the end of the b interval.
* `K1 = 27.959` equalises the two interior error extremes over `b` at
  `a = 64`.
* The residual error is `b(K1−b)(K2−b) / (a(a+b)(a+K1)(a+K2))`. It is largest
  at the smallest `a`, and there it is about 1.72·10⁻⁴.

The table words (all 14 bits) and the intermediate results are:

| signal | value                    | format                   | notes                                  |
|--------|--------------------------|--------------------------|----------------------------------------|
| LT1    | 1/a                      | unsigned, LSB 2^-19      | 8192 at a = 64                         |
| LT2    | 1/(a(a+K1))              | unsigned, LSB 2^-25      |                                        |
| LT3    | 1/(a(a+K1)(a+K2))        | unsigned, LSB 2^-33      |                                        |
| LT4    | K1 − b                   | signed, LSB 2^-7         | K1 stored as 3579/128; negative for b ≥ 28 |
| MULT1  | b·LT2                    | 14 b, LSB 2^-19          | span 2^-6 … 2^-19                      |
| MULT2  | b·LT3                    | 14 b, LSB 2^-27          |                                        |
| MULT3  | MULT2·LT4                | signed 18 b, LSB 2^-24   | span 2^-8 … 2^-24                      |
| BA2    | LT1 − MULT1 − MULT3      | 26 b inside, LSB 2^-24   | output truncated to 15 b, LSB 2^-19    |

Multiplier results are truncated toward minus infinity. The tables are not
lists of numbers. `recp_lut` fills them when the design is elaborated, using
integer functions in `amb_pkg` that round to nearest. To change K1, K2 or a
fraction width, you change one constant.

**Valid range.** The algorithm needs `a ≥ 64`, that is `x ≥ 64`. When
`Max < 64`, the helper `range_norm` shifts Max and Min left by the same amount
before RECP and MULT4. This leaves the quotient unchanged. The final products
still use the unshifted values. An assertion in `recp` reports any divisor
from 1 to 63 that reaches it.

**Measured.** Over every `x` from 64 to 2047, the largest `|R − 1/x|` is
1.745·10⁻⁴. The analytic bound for the method is 1.717·10⁻⁴; the small excess
comes from the 2^-19 output word. The relative error of R is:

* up to 1.9 % for x just above 64;
* 0.54 % or less for x ≥ 256. This floor comes from LT2 and LT3 having only
  a few significant bits at large a.

## Quotient and magnitude

MULT4 multiplies the 15-bit reciprocal by the (normalised) 11-bit Min and keeps
the bits 2^-1 … 2^-8 as `r8`. A product of 1 or more happens only when
Min equals or nearly equals Max; it is limited to 255, which changes nothing because it stays in
sector 3.

MULT6 and MULT7 form `alpha·Max` and `beta·Min`. Each product is rounded to an
11-bit integer, and BA3 adds the two into the 12-bit result. The largest
possible result is about 2900, so 12 bits are enough.

## Pipeline, interface and timing

`magnitude_calc` is the top module.

| port        | dir | width | meaning                                     |
|-------------|-----|-------|---------------------------------------------|
| `clk`       | in  | 1     | clock                                       |
| `rst_n`     | in  | 1     | asynchronous active-low reset of all stage registers |
| `in_valid`  | in  | 1     | `p`, `q` carry a sample this clock          |
| `p`, `q`    | in  | 12    | real and imaginary part, two's complement   |
| `out_valid` | out | 1     | `mag` and `region` carry a result           |
| `mag`       | out | 12    | magnitude estimate, unsigned integer        |
| `region`    | out | 2     | sector used for this result                 |

With the default `PIPELINED = 1`, the design has three register stages:

1. abs / compare / select, and normalisation;
2. RECP and MULT4;
3. LT5, LT6/LT7, MULT6/MULT7 and BA3.

A sample accepted at a rising edge appears at the outputs after the third
following edge. A new sample can enter every clock; there is no back-pressure.
With `PIPELINED = 0` the registers are removed and the whole path is
combinational; `out_valid` then equals `in_valid`. The original design reports
three stages of 4.48 ns, or 13.44 ns unpipelined, on a Virtex-6. Those timing
figures are not reproduced here.

The input `-2048` has no 11-bit magnitude, so it is treated as `2047`.

## Accuracy you can expect

The full-range run streams 52,056 points spread over the whole 12-bit input
plane:

* Every result is within `0.26 %·|z| + 1.5` of the exact magnitude.
* For `|z| ≥ 1024`, the worst relative error is **0.34 %**.

The two sources of error beyond the 0.24 % approximation error are:

* the 8-bit quantisation of `r`, which occasionally picks the neighbouring
  sector;
* the 14-bit table words.

For small magnitudes, the rounding of the two products (up to one LSB)
dominates.

## Where this RTL departs from, or fills in, the original description

* **Segment split.** The block diagram draws 6-bit `a` and 5-bit `b` inputs.
  The constants K1 = 27.959 and K2 = 63, and the term ranges, are derived for a
  5-bit `a` (a ≥ 64) and a 6-bit `b` (b ≤ 63). The RTL uses 5/6.
* **LT1 word position.** The bit map of the original design places 1/a in
  2^-6 … 2^-14. Here LT1 uses 2^-6 … 2^-19, still 14 bits. With the coarser
  LSB, 1/a at a = 1984 would be off by up to 6 %.
* **MULT1 width.** The original block diagram marks MULT1 as 12 bits. Here it
  keeps 14 bits, because the term spans 2^-6 … 2^-19.
* **Additions.** These are this design's own:
  * the absolute-value step in front of the comparator;
  * the saturation of −2048;
  * the normalisation of Max < 64.
* **Derived values.** The alpha values and the sector boundaries are not
  published; they are derived as described above.
* **Fixed-point choices.** The stage boundaries, the valid handshake, the
  reset, and the rounding and truncation points are choices made here.
* **Names.** The last two multipliers are called MULT6 and MULT7, as in the
  prose description. The original block diagram repeats the labels MULT4 and
  MULT5 for them.
* **Input width.** A 16-bit input range is mentioned as possible but not
  worked out. It would need new segment sizes and new constants K1 and K2,
  and is not provided.

## Files

Design, in `rtl/`:

| file | contents |
|------|----------|
| `amb_pkg.sv` | widths, fixed-point positions, K1/K2, coefficient and boundary constants, table functions |
| `max_min_sel.sv` | \|P\|, \|Q\|, BA1 and MUX1/MUX2 |
| `range_norm.sv` | scales a divisor below 64 (and the dividend with it) |
| `recp_lut.sv` | LT1–LT4 |
| `recp.sv` | RECP: tables, MULT1–MULT3 and BA2 |
| `ratio_mult.sv` | MULT4 |
| `region_lut.sv` | LT5 |
| `coef_lut.sv` | LT6/LT7 |
| `mag_sum.sv` | MULT6, MULT7 and BA3 |
| `magnitude_calc.sv` | top: the three-stage pipeline |

Self-checking testbenches, in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_max_min_sel` | corners and 20,000 random pairs |
| `tb_recp_lut` | every table entry against the real-valued formulas |
| `tb_recp` | every divisor 64..2047 against the reciprocal error bound |
| `tb_ratio_mult` | random operands; the quotient limit |
| `tb_region_lut` | all 256 quotients against `tan(11.25°·k)` |
| `tb_coef_lut` | the coefficients against `(1+e)cos/sin φ` and the published betas |
| `tb_mag_sum` | random operands and rounding cases |
| `tb_magnitude_calc` | see below |
| `tb_magnitude_calc_full` | the full-range accuracy run at default parameters |

`tb_magnitude_calc` runs the pipelined and combinational tops side by side on
random streams with idle cycles. It checks:

* a latency of 3 clocks;
* bit-exact agreement between the two tops;
* the accuracy bound;
* that the chosen sector is the true sector or a neighbour of it.

It also counts that each of these actually occurs: every sector, swapped
operands, −2048, normalisation, Min = Max, a neighbour-sector choice and idle
cycles.

## Simulating and changing it

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/amb_pkg.sv tb/tb_magnitude_calc_full.sv --top-module tb_magnitude_calc_full
./obj_dir/Vtb_magnitude_calc_full
```

Replace the testbench name to run any other testbench. Each one takes well
under a second. To lint a module alone, use
`verilator --lint-only -Wall -Irtl rtl/amb_pkg.sv rtl/<module>.sv`.

Useful knobs, all in `amb_pkg`:

* `K1_Q7` and `K2`;
* the fraction positions `LT*_F`, `R_F` and `SUM_F`;
* the coefficient tables `ALPHA` and `BETA`, and the boundary list `RBOUND`.

For more sectors, extend `ALPHA`, `BETA` and `RBOUND` with the formulas above
and raise `REGIONS`. Changing the 5/6 segment split also needs new K1 and K2.
The accuracy bounds in the testbenches are written for the default four
sectors.
