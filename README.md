# Geometrical mapper: pixel-address transformations on redundant CORDIC pipelines

To move, rotate, resize or warp part of a picture (picture-in-picture, templates for
recognition, a "globe" effect), a processor must compute for every pixel `(x, y)` of the
source the address `(u, v)` it maps to. This design computes that address at one pixel per
clock for two families of mappings:

* **affine**: rotate by θ, translate along x by d, scale along x by c

      u = c · (x cos θ − y sin θ + d)        v = x sin θ + y cos θ

* **spherical** (plane to sphere, r is the curvature radius)

      u = r·x / sqrt(r² − x² − y²)           v = r·y / sqrt(r² − x² − y²)

Every arithmetic function is produced by one kind of processing element, a CORDIC
(shift-and-add rotation). The affine map needs one CORDIC in rotating mode; the spherical
map needs four in vectoring mode (a circular square root, a hyperbolic square root and two
divisions). Every micro-iteration of every CORDIC is its own pipeline stage, and the
arithmetic is redundant (carry-save), so no stage holds a carry chain across the word.
The "constant-factor-redundant" (CFR) variant of CORDIC used here keeps the CORDIC gain a
constant even though directions are picked from an inexact estimate. That constant gain is
then removed by a few extra shift-add steps rather than by a divider.

The CFR recurrences, their selection rule, the correcting iterations, implicit scaling, the
one-CORDIC affine unit and the four-CORDIC spherical unit come from the original VLSI
proposal. Word widths, handshake, the estimate width, the exact correction positions, the
scaling-factor search, range handling and the top-level merging are choices of this design.
The section *Departures and open points* lists them.

## Number formats

| quantity | format | range |
|---|---|---|
| pixel coordinates `x, y, d, r, u, v` | 16-bit two's complement, 12.4 | ±2048 pixels, 1/16 pixel steps |
| angle `theta` | 20-bit two's complement, 3.17, radians | [−π, π] |
| scale `c` | 10-bit unsigned, 2.8 | [0, 4) |
| CORDIC datapath word (`word_t`) | 30 bits, 18.12 | magnitude must stay below 2^27 LSB (8192 pixels) |
| scaled angle U inside the rotating CORDIC | 30 bits, 10.20 | |

The 12 integer bits cover an image of about 10^5 pixels, and also a 1920 × 1080 frame
addressed from its centre. The 4 fractional bits give sub-pixel positions for
interpolation. Internally 8 guard bits absorb the truncation of about 27 shift-add steps.

## The CFR-CORDIC element (the hard part)

### Rotating mode (`cfr_cordic_rot`)

A conventional CORDIC rotates (X, Y) by θ through micro-rotations by ±atan 2^-i. Each one
needs the exact sign of the residual angle Z, so a full carry-propagate addition is needed
per step. Here X, Y and the residual are carry-save pairs `(s, c)`, and the residual is
kept scaled as U = 2^i·Z:

    X ← X − σ_i 2^-i Y
    Y ← Y + σ_i 2^-i X
    U ← 2 (U − σ_i c_i),   c_i = 2^i atan 2^-i   (a constant per stage)

Because U is rescaled at each step, its sign is decided in the same few integer bits at
every stage. The **estimate** takes the integer bits and T = 4 fractional bits of both
carry-save components, adds them, and adds one more unit at weight 2^-T. That last unit
centres the truncation error, so the estimate is within ±2^-T of U. The **selection**
(`cordic_pkg::cfr_select`) is then:

| estimate | first half, i < N/2 | second half, i ≥ N/2 |
|---|---|---|
| > 0 | σ = +1 | σ = +1 |
| = 0 | σ = +1 | σ = 0 |
| < 0 | σ = −1 | σ = −1 |

In the first half σ is never 0, so every stage multiplies the vector length by the same
sqrt(1 + 2^-2i), and the total gain K is a constant. In the second half, skipping a rotation
changes K by less than 2^-N, so σ = 0 is harmless there. In the first half, an estimate of 0
can pick the wrong direction when |U| < 2^-T. The error that causes grows by at most a
factor of 2 per stage. **Correcting iterations** repeat an index j without doubling U:

    U ← U − 2 σ c_j,  and X, Y rotated once more by atan 2^-j

With N = 16 and T = 4 they sit at j = 3, 6 (every T−1 indices) and at j = N/2 = 8. The last
one brings |U| back within 2, the range in which the second-half selection provably
converges. This gives 19 micro-iteration stages. They are listed by
`cordic_pkg::stage_index` / `stage_repeat`.

Two details make carry-save work on two's complement words:

* **Wrapped pairs.** `s + c` is right modulo 2^DW, but the two parts on their own may have
  wrapped. Then shifting each part right gives a wrong result. Before any shift or estimate,
  `cs_unwrap` looks at the top two bits of both parts. If both sign bits are equal and the
  next bit differs, it flips both sign bits. This removes the wrap and leaves the sum
  unchanged, provided |value| < 2^(DW−3).
* **Subtraction** of a carry-save pair adds both one's complements. The two "+1"s go into
  the free LSBs of the two carry vectors of the 4:2 compression (`cs_addsub`).

### Vectoring mode (`cfr_cordic_vec`)

Vectoring drives Y to zero. The same trick keeps W = 2^i·Y, so the selection looks at the
sign of W's estimate:

    W ← 2 (W − σ X)            X ← X + m σ 2^-2i W        (m = +1, 0, −1)
    repetition of index j:  W ← W − 2 σ X,   X ← X + m σ 2^-(2j+1) W

* `CIRCULAR`: X → K·sqrt(x² + y²), and Z += σ·atan 2^-i gives atan(y/x) on `a_out`.
  Stage schedule as in the rotating mode.
* `HYPERBOLIC`: X → K_h·sqrt(x² − y²). i = 1..16, with 4 and 13 repeated. Converges for
  |y/x| < 0.806.
* `LINEAR`: X is constant and Z accumulates σ·m·2^-i. This gives m·y/x: a division that
  also multiplies by the operand `m_in`. It starts at i = −1, so |y/x| < 4.

### Implicit scaling (`cs_scaler`)

The gain is removed by extra stages v ← v ± 2^-k v, whose product equals 1/K. The shifts
are found at elaboration time by a greedy search in integer arithmetic
(`cordic_pkg::scale_factor`). The search stops when P²K² is within 2^-(N+3) of 1. At the
defaults the circular mode needs 8 steps (shifts −1, +2, −5, −8, −10, −14, −17, −19) and
the hyperbolic mode 7. Every constant (angles, gain, scaling shifts) follows from N and T,
so changing them regenerates the pipeline.

## Affine transformer (`affine_transformer`)

    fold (1) → cfr_cordic_rot (28) → translate x+d (1) → scale by c, round (1)   = 31 cycles

The CORDIC only converges for |θ| ≤ 1.74 rad. Angles beyond ±π/2 are therefore folded first
by an exact quarter turn: the angle loses π/2 and (x, y) becomes (−y, x) (mirrored for
negative angles). Translation is one adder stage after the CORDIC. Scaling along x is a
10-bit multiplier. u and v are rounded to 12.4 and saturate, and `ovf` flags saturation.
θ, d and c travel with each pixel.

## Spherical transformer (`spherical_transformer`)

    |x| (1) → circular: ρ = sqrt(x²+y²) (28) → hyperbolic: h = sqrt(r²−ρ²) (26)
           → two linear: u = r·x/h, v = r·y/h (18) → round (1)                 = 74 cycles

x, y and r follow the CORDICs in delay lines. The hyperbolic stage only converges for
ρ/r < 0.806. The unit therefore tests 5ρ < 4r on the circular result and reports
`in_sphere`; outside that region u = v = 0. Inside it, h ≥ 0.6·r, so the quotients stay
within the linear CORDIC's range.

## The mapper (`geometric_mapper`, top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, clears the valid pipeline |
| `in_valid` | in | 1 | a pixel is presented this cycle (no back-pressure) |
| `mode` | in | 1 | `MAP_AFFINE` or `MAP_SPHERICAL`, per pixel |
| `x_in`, `y_in` | in | 16 | source pixel, 12.4 |
| `theta_in`, `d_in`, `c_in` | in | 20, 16, 10 | affine parameters |
| `r_in` | in | 16 | sphere radius, 12.4 |
| `out_valid` | out | 1 | a result is presented |
| `out_mode` | out | 1 | mode of that result |
| `u_out`, `v_out` | out | 16 | destination address, 12.4 |
| `out_of_range` | out | 1 | saturated, or outside the usable sphere |

A pixel enters only the transformer its mode selects. The affine result is delayed by
43 cycles to the spherical latency. Results therefore come out in input order, one per clock,
75 cycles after the pixel, however the modes are mixed. An assertion checks that the two
aligned result streams never collide. Generating the source scan and reading or writing
pixel memory are left to the surrounding system.

## Accuracy and rate

Measured against floating point over thousands of random operands (see the testbenches):

| unit | worst error |
|---|---|
| rotating CORDIC (radius up to 2900 pixels) | 0.08 pixel |
| circular / hyperbolic square root | 0.005 pixel |
| circular angle atan(y/x) | 3·10^-5 rad |
| linear division r·y/x | 0.10 pixel |
| spherical map | 0.19 pixel |
| whole mapper, test frames | 0.09 pixel |
| whole mapper, two 99,840-pixel frames | 0.04 pixel |

The rotation error is dominated by the residual angle after 16 micro-iterations, about
2^-15 rad. The rate is one address per clock. A screen of about 10^5 pixels every 0.1 s
therefore needs only 1 MHz, and 1080p at 30 frames/s needs 62.2 MHz. No clock rate has been
evaluated. After generic synthesis the whole mapper has about 7,300 word-level cells and 14,600
flip-flop bits, almost all of them carry-save pipeline registers, plus 6,300 bits of delay
lines for the operands that travel beside the CORDICs.

## Departures and open points

* **Rotation sign.** The printed CFR recurrence rotates clockwise. The mapping defines
  Rot(θ) counter-clockwise, and this design follows the mapping.
* **Final correction at N/2, not N/2 − 1.** With the last correction at N/2 − 1, some
  angles leave the second half's convergence range (errors up to 0.4 pixel were seen). At
  N/2 they do not.
* **Centred estimate.** Plain truncation biases the estimate. The second-half rule "0 when
  the estimate is 0" then diverges. The extra 2^-T unit fixes that.
* **Scaling overhead.** 8 circular scaling steps (50 % of 16) instead of roughly 30 %. The
  greedy search aims at 2^-19 and is not optimised.
* **Hyperbolic and linear modes** reuse the circular W-form and selection. The hyperbolic
  repetitions at 4 and 13 are the standard ones.
* **Spherical range** is limited to ρ/r < 0.8 by the hyperbolic CORDIC. No range extension
  is built.
* **Translation after scaling.** The translator is one adder stage after the scaled CORDIC
  result, not an addition folded into a micro-iteration. The vector is then already at unit
  gain when d is added, so d needs no pre-scaling and no per-stage scaling is required.
* **Carry-save** is used as the redundant form. A radix-2 signed-digit adder would do the
  same job.
* Angle folding, the multiplier for c, saturation, the valid-only handshake and per-pixel
  mode selection are additions needed for a usable unit.

## Files

`rtl/`: `cordic_pkg.sv` (formats, carry-save functions, schedules, constant functions),
`delay_line.sv`, `cs_scaler.sv`, `cfr_cordic_rot.sv`, `cfr_cordic_vec.sv`,
`affine_transformer.sv`, `spherical_transformer.sv`, `geometric_mapper.sv` (top).
`tb/`: one self-checking testbench per unit, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb_geometric_mapper` runs the top at its default
parameters: five frames of a 48 × 32 sub-image in both modes, switching modes mid-frame.
`tb_tv_frame` is the throughput workload: two full 384 × 260 frames (99,840 pixels, about
one TV image), one affine and one spherical. Each frame takes 99,916 cycles (pixel count
plus latency), and all 199,680 addresses are checked against floating point.

Simulate, for example, the top:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cordic_pkg.sv \
        tb/tb_geometric_mapper.sv --top-module tb_geometric_mapper -Mdir obj
    ./obj/Vtb_geometric_mapper

Lint: `verilator --lint-only -Wall -y rtl rtl/cordic_pkg.sv rtl/geometric_mapper.sv`.
Widths follow from `cordic_pkg`. `N` and `T` are parameters of every unit. When either
changes, the testbenches' expected latencies and tolerances must be updated.
