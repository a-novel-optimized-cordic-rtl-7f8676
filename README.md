# LUT-CORDIC phase-difference core

Phase plane correlation estimates motion between two image blocks by taking the 2-D DFT of
both, replacing every frequency bin by the unit vector of the normalized cross product

    P(w) = A(w) * conj(B(w)) / |A(w) * conj(B(w))| = exp(j * (arg A(w) - arg B(w)))

and transforming back: a translation turns into a sharp peak at the displacement. The middle
step needs multiplications, a square root and divisions per bin, tens of millions of times per
second for standard-definition video. This core computes it with shifts, adds, a few bit
registers and three look-up tables, at one bin per clock.

It sits between the forward FFT (with a field delay holding the reference spectrum) and the
inverse FFT and peak search of a phase-correlation motion estimator. Only this core is
provided; the FFTs, the field memory and the peak search are not.

## How the phase difference is found without computing either phase

Each vector is turned towards the positive x axis by the usual vectoring CORDIC sequence: at
step i it is rotated by -atan(2^-i) if it lies above the axis and by +atan(2^-i) if below. After
n steps the angle of the vector is the sum of the rotations applied to it. A and B are rotated
side by side with the same step sizes, so their phase difference is

    phi = sum_i (sA_i - sB_i) * atan(2^-i),      s = +1 above the axis, -1 below.

A step where both vectors turn the same way contributes nothing; opposite turns contribute
+-2 atan(2^-i). Only the pair of turn directions per step matters, so no angle accumulator is
needed. The core splits the steps into two parts:

* **Coarse part, steps 0..K-1.** The 2K turn directions are stored as the *rotation register*
  (two bits per step: A's and B's direction) and a table of 2^(2K) entries returns the coarse
  difference `phi_a` directly. A table over all n steps would be far too large, which is why
  the split exists.
* **Fine part, steps K..n-1.** From step K on, atan(2^-i) is close enough to 2^-i that each
  contribution is a single bit of weight 2*2^-i. Opposite turns set that bit in one of two plain
  bit registers: `alpha` when the difference is larger than the estimate so far, `beta` when it
  is smaller. No addition happens inside the stages. At the end `phi_d = alpha - beta`.
* **Output.** `phi = phi_a + phi_d` addresses a cosine and a sine table, which give `XP` and `YP`.

The defaults are 12-bit inputs and n = 12 iterations, split as K = 6 coarse and 6 fine steps.

### Half-plane conditioning

Vectoring that starts with a 45-degree step only converges for angles within about
+-100 degrees. Before the first step, a vector with x < 0 is therefore negated, which turns it
by 180 degrees. If both A and B are negated their difference is unchanged. If only one is,
the difference changes by pi, and a single *flip* bit (`A negated xor B negated`) is carried to
the output, where it negates `XP` and `YP`. This stage is this design's own addition: the
architecture it follows does not say how inputs outside the convergence range are handled.

## Block structure

```
            +-----------------+     vectors     +-----------------+
 XA,YA ---> | coarse_pipeline |---------------->|  fine_pipeline  |--> phi_add (alpha)
 XB,YB ---> | conditioning +  |                 | s_cordic K..N-1 |--> phi_sub (beta)
            | K x 2 rotators  |                 +-----------------+          |
            +-----------------+                                              v
               | decisions, flip   +-------------------+   +-----------+  +----------------+
               +------------------>| rotation_register |-->| phi_a_lut |->| phase_combiner |--> phi
                                   +-------------------+   +-----------+  +----------------+
                                            | flip                                 |
                                            +-------------------------> trig_lut (cos) --> XP
                                                                       trig_lut (sin) --> YP
```

| File | Block |
|------|-------|
| `rtl/lutcor_pkg.sv` | default sizes, width helpers, the cos/sin selector enum |
| `rtl/cordic_rotator.sv` | one vectoring micro-rotation with its decision bit, one register stage |
| `rtl/coarse_pipeline.sv` | conditioning stage and K rotators for A and for B |
| `rtl/rotation_register.sv` | shift registers that line up the 2K decision bits and the flip bit of one sample |
| `rtl/phi_a_lut.sv` | coarse phase table, 2^(2K) entries, combinational |
| `rtl/s_cordic.sv` | one fine step: two rotators plus the alpha/beta bit update |
| `rtl/fine_pipeline.sv` | chain of N-K fine steps starting with alpha = beta = 0 |
| `rtl/phase_combiner.sv` | phi = phi_a + phi_add - phi_sub, one register stage |
| `rtl/trig_lut.sv` | cosine or sine table addressed by phi, with negate input, one register stage |
| `rtl/lutcor_top.sv` | the core: wiring, valid pipeline |

## Interface and timing (`lutcor_top`)

| Port | Dir | Width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the valid pipeline only |
| `in_valid` | in | 1 | a sample pair is present |
| `xa`, `ya`, `xb`, `yb` | in | IN_W | A and B, signed two's complement |
| `out_valid` | out | 1 | result present |
| `xp`, `yp` | out | OUT_W | cos and sin of arg A - arg B, full scale 2^(OUT_W-1)-1 = 2047 |
| `phi_o` | out | PHI_FRAC+3 | phase estimate in radians (PHI_FRAC fraction bits) before the pi correction |
| `flip_o` | out | 1 | pi is to be added to `phi_o`; already applied in `xp`, `yp` |

A pair is accepted every clock in which `in_valid` is high; there is no back-pressure. The
result appears exactly `N + 3` clocks later (15 at the defaults): one clock for conditioning,
one per CORDIC step, one for the phase adder and one for the cos/sin tables. A 32x32 block of
bins therefore takes 1024 + 15 clocks.

Parameters: `IN_W` (12), `N` total iterations (12), `K` coarse steps (6, must satisfy
1 <= K < N), `GUARD` fraction guard bits in the rotators (2), `PHI_FRAC` phase fraction bits
(11, must be at least N-2), `OUT_W` (12).

## Number formats

* Rotator datapath: `IN_W + 3 + GUARD` bits (17). One bit covers negating -2^(IN_W-1), two
  cover the CORDIC growth (at most 1.65 * sqrt 2), `GUARD` bits sit below the input LSB. The
  gain factor K_i is never corrected, because only the sign of y is used.
* Phase words (`phi_a`, alpha, beta, `phi`): signed radians, `PHI_FRAC` fraction bits and two
  integer bits, range -4..+4 rad. The alpha/beta bit of fine step i sits at position
  `PHI_FRAC + 1 - i`, so unused low and high bits of those words are constant zero.
* Tables: `phi_a_lut` entry = round(2^PHI_FRAC * sum (sA_i - sB_i) atan(2^-i)); `trig_lut`
  entry a = round(2047 * cos or sin(a / 2^PHI_FRAC)) over the full signed phase range (16384
  entries each at the defaults), so no range reduction is needed. All three are filled at
  start-up by a loop in an `initial` block from these formulas; a synthesis flow that cannot
  evaluate real-valued `initial` code needs the tables supplied another way.

## Accuracy

With well-conditioned inputs (magnitude above about 1/16 of full scale), random tests give a
phase error of at most about 0.002 rad and `XP`/`YP` within 4 LSB of the rounded ideal
values. For small vectors the answer degrades, as for any CORDIC of this width, because the
direction of a vector of a few LSB is poorly defined. Phase correlation tolerates this: in the
32x32 block test, the correlation peak reaches 0.998 of its ideal height and every other value
of the surface stays below 0.005 of it.

## How far it has been checked

Every stage is compared bit for bit with an integer model, both tables entry by entry with their
formulas, and the whole core against real arithmetic and in a complete phase-correlation loop.
All of this is simulation at the RTL level. No timing analysis or synthesis against a cell
library has been done, so the clock rate, and with it the throughput in samples per second, is
not established; the pipeline has one adder (or one table read) per stage, which is what a
high clock rate needs.

## Where this departs from or adds to the published architecture

* Half-plane conditioning and the flip bit (see above) are additions.
* The two bits stored per coarse step are A's and B's turn directions. The architecture
  describes them as rotation direction and angle sign; the information is the same.
* A fine step is weighted 2*2^-i ("twice the step angle"). A bit-register formula written with
  weight 2^-i is taken to have the factor two folded into the bit positions.
* K = 6 is one of the two values (5 or 6) given for where the atan approximation takes over.
* Pipeline registers after every step, the valid signal, reset, widths, the phase format, the
  output scale and rounding are this design's own choices.
* Only the core is provided. The FFT, field delay, inverse FFT and peak search of the
  surrounding motion estimator are not described in enough detail to build.

## Simulating

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. Build one
with verilator, giving the package first:

    verilator --binary --timing --assert -y rtl -y tb rtl/lutcor_pkg.sv tb/tb_lutcor_top.sv --top tb_lutcor_top
    ./obj_dir/Vtb_lutcor_top

| Testbench | What it shows |
|-----------|---------------|
| `tb_lutcor_top` | 4000 random pairs in bursts and gaps at the default parameters, compared with real-arithmetic cos/sin of the true difference; latency N+3, one result per clock; flips, alpha/beta bits and agreeing steps all occur |
| `tb_ppc_block32` | phase correlation of 32x32 blocks shifted by known amounts, circularly and as windows of a moving picture: DFTs in the testbench, the core on all 1024 bins at full rate, peak of the inverse DFT at the shift (height about 0.7 of ideal for the windowed cases, next value below 0.1) |
| `tb_iteration_sweep` | the core at N = 4, 6, 8, 10 and 12 iterations on one sample stream; the phase error stays within 2*2^-(N-1) + 0.0015 rad and shrinks with N (about 0.24, 0.063, 0.016, 0.004, 0.002 rad) |
| `tb_cordic_rotator`, `tb_coarse_pipeline`, `tb_rotation_register`, `tb_s_cordic`, `tb_fine_pipeline`, `tb_phase_combiner` | bit-exact integer models of each stage, including pipeline alignment |
| `tb_phi_a_lut`, `tb_trig_lut` | every table entry against the defining formula |

To change the split or precision, override `K`, `N` or `PHI_FRAC` on `lutcor_top`. The table
sizes grow as 2^(2K) and 2^(PHI_FRAC+3).
