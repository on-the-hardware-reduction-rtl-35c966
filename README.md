# Vectoring CORDIC with an adder-free angle datapath

A vectoring CORDIC turns a vector (x, y) step by step until y is zero; the
final x is the vector's length and the sum of the angles it was turned by is
its phase. In a classical pipeline every stage therefore has three adders: two
for x and y, and a third on the angle (z) side that adds or subtracts a stored
constant atan(2^-i).

This design removes the z side almost completely. Twelve of its fourteen stages
turn by exactly 2^-i radians ("scaling-free" stages), so their angles are powers
of two, and the phase is just the pattern of turn directions, reordered by a
one-place cyclic shift. Only the two coarse stages (i = 2, 3) still use
atan(2^-i); their four possible sums come from a two-word ROM. The result is a
fully pipelined processor, 16 bits wide by default, that needs no adder per
stage on the angle side and no per-stage angle register, only one bit per stage.
The word length is a parameter `B`; the section "Other word lengths" shows how
the stage layout follows from it.

    x_in,y_in ─► domain_fold ─► basic_pipeline (14 stages) ──x──► scaling_unit ─► mag_out
    (Q2.14)      quadrant and    i=2,3 classical                   1/K, and 1/sqrt2
                 domain folding  i=4..15 scaling-free              when pre-rotated
                      │              │ 14 direction bits
                      └─ token ──────┴──────────────────────────► output_unit ──► phase_out
                        {quad,domain} travels with the sample     bits ─► angle

One vector enters per clock; magnitude and phase leave 16 clocks later.

## Number formats

For the default `B = 16`:

| Signal | Width | Format | Range |
|---|---|---|---|
| `x_in`, `y_in` | 16 | signed Q2.14, 1.0 = `16'h4000` | [-2, 2) |
| pipeline x, y | 18 | signed Q4.14 (two integer guard bits) | [-8, 8) |
| internal angles | 19 | signed, 15 fractional bits | |
| `mag_out` | 16 | unsigned Q2.14 | [0, 4) |
| `phase_out` | 17 | signed Q3.14 radians | (-pi, pi] |

The guard bits are needed because the pi/4 pre-rotation below is done without
its 1/sqrt(2) factor, and the two classical stages lengthen the vector by a
further 3.9 %. Angles use 2^-15 resolution inside because that is the weight of
the last stage; they are rounded to 2^-14 at the output. In general: data
`B` bits with `B-2` fractional bits, pipeline `B+2` bits, phase `B+1` bits.

## Domain folding (`domain_fold`)

The pipeline can only resolve angles within about +-0.49 rad (the sum of all its
stage angles). The input is first folded:

1. **Quadrant.** x and y are replaced by |x| and |y|; `quad = {x<0, y<0}` is kept.
2. **Domain.** With theta the first-quadrant angle:
   * theta <= pi/8: passed unchanged (`DOM_LOW`);
   * pi/8 < theta <= 3pi/8: turned by -pi/4 as x' = x + y, y' = y - x
     (`DOM_MID`, the vector is now sqrt(2) too long);
   * theta > 3pi/8: x and y swapped (`DOM_HIGH`, the pipeline sees pi/2 - theta).

The two decisions are comparators of |y| against |x| tan(pi/8) and of |x|
against |y| tan(pi/8). tan(pi/8) = 0.41421 is approximated by the shifts
2^-2 + 2^-3 + 2^-5 = 0.40625. That moves each boundary by about 0.007 rad, which
is harmless: after folding the pipeline has to cover +-0.40 rad and can cover
+-0.49 rad.

## The rotation stages (`conv_stage`, `sf_stage`, `basic_pipeline`)

Every stage looks at the sign of its incoming y and records a **direction bit**
`d = ~y[MSB]`: 1 means y >= 0, the stage turns clockwise and the phase gains
+alpha_i; 0 means the opposite.

* **Classical stages, i = 2 and 3** (`conv_stage`): x' = x +- y 2^-i,
  y' = y -+ x 2^-i, alpha_i = atan(2^-i). They supply the coarse range
  (atan 1/4 + atan 1/8 = 0.369 rad) and have a gain of
  K = sqrt(1+2^-4) sqrt(1+2^-6) = 1.038798.
* **Scaling-free stages, i = 4 .. 15** (`sf_stage`): sin and cos of 2^-i are
  replaced by 2^-i and 1 - 2^-(2i+1):

      x' = x - x 2^-(2i+1) +- y 2^-i
      y' = y - y 2^-(2i+1) -+ x 2^-i

  This turns by 2^-i rad (to within 2^-3i / 6) and keeps the length constant to
  within 2^-(4i+2), so these stages need no scale correction. For i >= 8 the
  2^-(2i+1) term lies below the word and is dropped, leaving two adders per
  stage. The smallest index is 4 because below it the approximation of sin is
  too coarse for 16 bits (the rule is i_min = floor((b - 2.585) / 3) for a
  b-bit word).

Adders: 2 x 2 + 4 x 4 + 8 x 2 = 36 in the pipeline.

`basic_pipeline` chains the 14 stages, one register each. The direction bits of
a sample are produced one per clock as it moves down the pipeline, so they are
delayed in a **triangular array** of one-bit registers: behind stage k sit k+1
bits. The sample's `{quad, domain}` token is delayed alongside. At the end the
14 bits, the token and x arrive together:
`dirs_out[13]` is stage i = 2, `dirs_out[12]` is i = 3, `dirs_out[11:0]` are
i = 4 .. 15.

## Reading the angle from the direction bits (`output_unit`)

This is the central trick. Take the scaling-free bits b4 .. b15. The angle they
stand for is

    A = sum over i = 4..15 of (b_i ? +2^-i : -2^-i)

If the rotation were one-sided (bits meaning "add 2^-i or nothing"), the bits
would simply *be* the binary angle. With two-sided rotation they are not, but
they are close. Writing s_i = 2 b_i - 1,

    A = 2 sum(b_i 2^-i) - (2^-3 - 2^-15)

In units of 2^-15 this is the bit pattern shifted one place towards the more
significant end, minus 2^12, plus 1. The shifted-out bit b4 and the -2^12
cancel when b4 = 1 and produce the sign when b4 = 0. The result is:

    A (two's complement, units 2^-15) = { ~b4 (sign), b5, b6, ..., b15, 1 }

Equivalently, in ones' complement, A = { ~b4, b5 ... b15, b4 }: the pattern
rotated cyclically by one place, b4 moving to the least significant position.
No adder is involved, only wiring. The least significant bit is always 1: a sum
of +-2^-i down to 2^-15 is always an odd multiple of 2^-15.

A 4-bit example with stage angles 1/2, 1/4, 1/8, 1/16:
bits 1 0 1 1 mean +1/2 - 1/4 + 1/8 + 1/16 = 7/16, and {~1, 0, 1, 1, 1} =
0 0111 = 7 sixteenths. Bits 0 1 0 0 mean -7/16, and {~0, 1, 0, 0, 1} =
1 1001 = -7.

The two classical bits d2, d3 select one of four sums +-(atan 2^-2 +- atan 2^-3).
Because the four values are two magnitudes with two signs, **`angle_rom`** stores
only two words (0.369334 and 0.120624, rounded to 2^-15). The word is the sum
when d2 = d3 and the difference otherwise, and it is subtracted when d2 = 0.

The output unit then applies three adder/subtractors:

1. z = A +- ROM word;
2. domain correction: phi = z (low), pi/4 + z (mid), pi/2 - z (high);
3. quadrant correction: phase = phi, -phi, pi - phi, phi - pi for
   quad = 00, 01 (y<0), 10 (x<0), 11;

and rounds from 2^-15 to 2^-14 into the output register.

## Magnitude scaling (`scaling_unit`)

The final x is |v| times K = 1.038798, and also times sqrt(2) for `DOM_MID`
samples. The unit multiplies by 1/K = 0.962651 as a shift-and-add over the ones of
its 16-bit binary expansion. It then multiplies by 1/sqrt(2) in the same way,
and a multiplexer bypasses that section unless the token says the sample was
pre-rotated. The data carry two extra fractional bits through the sums
(`SCALE_GUARD`), and the result is truncated once. The output saturates at
the unsigned 16-bit range, which a Q2.14 input cannot reach.

## Interface and timing

`vcordic_top` ports: `clk`, `rst_n` (synchronous, active low), `in_valid`,
`x_in`, `y_in`, `out_valid`, `mag_out`, `phase_out`. There is no back-pressure:
`out_valid` is `in_valid` delayed by 16 clocks (1 domain + 14 pipeline +
1 output; `B` clocks in general), and bubbles are allowed. The zero vector
gives magnitude 0 and an arbitrary phase.

## Accuracy

Measured by `tb_vcordic_top` against real-valued `$sqrt` / `$atan2`, over a
200 x 200 grid with x, y in (0, 1] and 20,000 random vectors over the whole input
plane:

* magnitude: largest error 6.8e-4 (11 LSB), RMS 2.2e-4;
* phase: largest error 4.0e-3 rad (about 8 bits), RMS 3.6e-4 rad.

The largest phase errors are for short vectors: the truncation noise of 14
stages at 14 fractional bits becomes an angle error inversely proportional to
the length. The magnitude error is dominated by the truncations in the scaling
unit. Neither is corrected by wider internal words. That is deliberate, so the
figures describe the 16-bit datapath as specified.

## Where this RTL departs from, or completes, the original description

* **Scale factor.** The description quotes 1.040201018 as the factor to
  compensate. The gain of the two classical stages it uses is 1.038798 (the
  scaling-free stages add under 2^-18), and that value is used here. The quoted
  one would leave a 0.14 % magnitude error.
* **Register count.** The description counts 80 one-bit registers in the basic
  pipeline. This RTL keeps the full triangle (14 + 91 direction-bit registers)
  plus a 4-bit token per stage.
* **Internal width.** The description speaks of 16-bit adders. The pipeline
  here is 18 bits wide so that full-scale inputs cannot overflow after the
  unscaled pi/4 pre-rotation.
* **Domain and quadrant correction.** Only the +-pi/4 correction is described.
  The pi/2 - z correction for swapped vectors and the quadrant restoration to a
  full-circle phase (a third adder/subtractor, 17-bit output) are additions of
  this RTL.
* **Folded range.** The description speaks of folding every vector into
  [0, pi/8]. The -pi/4 pre-rotation used here leaves (-pi/8, pi/8] instead.
  The two-sided pipeline handles negative angles as easily as positive ones.
* **Quadrant folding** takes |x| and |y|, two negations that the description's
  count of two comparators and two adder/subtractors for the domain unit leaves
  out.
* **Comparator constant**, quadrant encoding, direction-bit polarity, valid
  flag, reset and output rounding are choices of this RTL; the description does
  not fix them.

## Other word lengths

Everything is derived from `B` at elaboration:

* first scaling-free index p = floor((B - 2.585) / 3), the smallest i for
  which the Taylor form of the rotation is accurate to the word;
* classical stages i = 2 .. p-1 (K = p-2 of them), scaling-free i = p .. B-1,
  so the pipeline is B-2 stages long;
* ROM of 2^(K-1) words. Word `a` holds atan(2^-2) + sum over j = 3 .. p-1 of
  +-atan(2^-j), with a minus where the address bit of stage j is 1. The decoder
  sets that bit to d2 xor dj. The words are computed with `$atan` at
  elaboration;
* 1/K and 1/sqrt(2) rounded to B fractional bits for the scaling unit;
* the bit-to-angle wiring is {~b_p, b_(p+1) .. b_(B-1), 1}.

| B | classical stages | scaling-free stages | ROM words | measured max magnitude error |
|---|---|---|---|---|
| 16 | 2 | 12 | 2 | 11 LSB |
| 20 | 3 | 15 | 4 | 12 LSB |
| 24 | 5 | 17 | 16 | 14 LSB |
| 28 | 6 | 20 | 32 | 15 LSB |
| 32 | 7 | 23 | 64 | 21 LSB |

The ROM doubles with every extra classical stage, so beyond about 28 bits it
becomes larger than the per-stage angle table of a classical CORDIC. B below
16 is rejected at elaboration (fewer than two classical stages).

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/vcordic_pkg.sv tb/tb_vcordic_top.sv --top-module tb_vcordic_top
    ./obj_dir/Vtb_vcordic_top

The same command runs any other testbench; `tb_vcordic_wordlength` also needs
`-y tb` to find its helper `wl_lane`. To build a different word length,
override the top's parameter, e.g. `vcordic_top #(.B(24))`.

| Testbench | Covers |
|---|---|
| `tb_vcordic_top` | whole processor, 60,008 vectors, latency, rate, every domain/quadrant/ROM case, accuracy statistics |
| `tb_vcordic_wordlength` | processors with B = 20, 24, 28, 32 side by side (lanes in `wl_lane`), 4,000 random vectors each |
| `tb_domain_fold` | quadrant/domain decisions against atan2, exact folded values |
| `tb_conv_stage` | i = 2, 3 exact equations and rotation geometry |
| `tb_sf_stage` | i = 4, 7 (four adders), 8, 15 (two adders) against an exact 2^-i rotation |
| `tb_basic_pipeline` | 14-clock latency, residual y, gain K, angle rebuilt from the bits |
| `tb_angle_rom` | every classical-bit combination against `$atan`, for B = 16 and B = 32 |
| `tb_output_unit` | bit-to-angle reconstruction, domain and quadrant corrections |
| `tb_scaling_unit` | 1/K and 1/(sqrt2 K) scaling, bypass, saturation |

## Files

`rtl/vcordic_pkg.sv` holds the `domain_e` enum, the `token_t` struct and the
elaboration-time functions for the stage layout, the ROM words and the scale
constants. Each other module is one file in `rtl/` named after it, and
`vcordic_top` is the top level.
