# Jacobian-update and cost accelerator for bundle adjustment

Bundle adjustment (BA) refines camera poses and 3D point positions in visual
SLAM. It shrinks the reprojection error, which is the distance between where a
feature was seen in an image and where the current estimate projects it. Each
Levenberg-Marquardt iteration of BA first evaluates, for every observation
(one 3D point seen by one camera):

* the **cost calculation (CC)**: the residual `r = measured - projected`, and
* the **Jacobian update (JU)**: the 2 x 9 block of derivatives of the
  projected position `(U, V)` with respect to the point `[X Y Z]`, the camera
  rotation `w1..w3` (Lie-algebra coordinates) and the translation `t1..t3`.

These two steps take most of an iteration's run time. This RTL computes them
in fixed point on an FPGA-style datapath. A host solves the normal equations,
updates the estimates and starts the next iteration. The main idea is to
factor the derivatives so that they share almost all of their work. `1/z*` is
computed once, in an iterative divider. A handful of products of it are
formed once and then reused by all eighteen derivatives and by the residual.

## Number format

Every value on the datapath is a 20-bit two's-complement fixed-point number
with 16 fraction bits: 1 sign bit, 3 integer bits and 16 fraction bits, called
**Q4.16** here. The range is [-8, 8) and the resolution is 2^-16. This word
length was picked so that the LM iterations still converge, and so that
Jacobian entries, residuals and normalized coordinates (all below 3 in
magnitude in practice) never overflow. Adders and multipliers still saturate
at the range limits. Products are rounded to nearest. `rtl/ba_pkg.sv` holds
the type `q_t`, the arithmetic helpers and the packed types of a camera pose
(`cam_t`), a point (`point_t`) and a Jacobian block (`jac_t`). The word
length is set in one place, by `QW` and `QF` in that package. Problem sizes
(`N_OBS`, `N_POINTS`, `N_CAMS`) and the divider's `ITERS` are parameters of
the top.

Image positions are **normalized camera coordinates** (`x*/z*`, `y*/z*`), not
pixels. The intrinsic matrix K is constant and does not enter the
derivatives, and Q4.16 could not hold pixel values. The host converts
measured pixels with K^-1 before loading them.

## What is computed per observation

For a pose `(R, t)` and a point `P`:

```
x*, y*, z*  = R P + t                          (S1)
iz          = 1 / z*                           (Szrs, Newton divider)
a = x* iz,  b = y* iz                          (preS3, level 1)
c = a iz = x*/z*^2,  d = b iz = y*/z*^2,
ab = a b,  aa = a a,  bb = b b                 (preS3, level 2)

Jacobian, columns [X Y Z | w1 w2 w3 | t1 t2 t3]:
  U row:  R0j iz - R2j c  (j = 0..2) | -ab,      1 + aa,  -b | iz, 0,  -c
  V row:  R1j iz - R2j d  (j = 0..2) | -(1+bb),  ab,       a | 0,  iz, -d     (S3)

residual:  r_u = u_meas - a,  r_v = v_meas - b                                 (CC)
```

The point columns come from the quotient rule on `U = x*/z*`. The pose
columns are the product of the derivative of the projection,
`[[1/z, 0, -x/z^2], [0, 1/z, -y/z^2]]`, and the derivative of the transformed
point under a left perturbation of the pose, `[I | -(Rp+t)^]`. Note the
signs of the V row: `+ab` and `+a`. Some printed versions of this product
show them negative. The values here are what the product actually gives, and
the unit testbench confirms them against numerical differentiation. If your
solver uses a different perturbation convention (right perturbation, or
rotation columns first), reorder or negate the columns on the host side.

The `preS3` stage exists only to share work. Forming `x*/z*^2` and `y*/z*^2`
once, instead of inside each derivative, saves multipliers and shortens the
critical path. The design has 28 Q4.16 multipliers outside the divider: 9 in
S1, 7 in preS3 and 12 in S3.

## The Szrs reciprocal unit (`newton_recip`)

Division is the only multi-cycle operation, and it is needed only once per
observation. `newton_recip` uses the Newton-Raphson iteration for
`f(z) = 1/z - x`:

```
z(n+1) = z(n) * (2 - x * z(n))
```

Each step roughly squares the relative error `e = 1 - x z`. How it is built:

1. **Operand capture (1 cycle).** The unit registers `|x|` and the sign.
2. **First guess (1 cycle).** A leading-one detector finds `k` with
   `|x| * 2^-k` in [0.5, 1) and sets `z(0) = 2^-k`. The starting error is
   then below 1/2 for every operand, so the iteration cannot diverge.
3. **Eight steps (16 cycles).** Each step uses two multiplications in
   sequence, `x*z` and then `z*(2 - x*z)`. The iterate carries `IFRAC = 24`
   fraction bits, so the rounding of the steps stays below the output LSB.
   Five steps would already reach full precision. Eight is the count of the
   original design, and it covers the worst case with margin.
4. **Round (1 cycle).** The result is rounded to Q4.16, the sign is restored,
   and the result saturates when `|1/x| >= 8` (`|x| <= 1/8`) or `x = 0`.

`done` therefore pulses **19 cycles** after `start`. The result is within one
LSB of the exact reciprocal over the whole input range. Points must lie in
front of the camera with `z* > 1/8` for the Jacobian to be meaningful. A
smaller `z*` gives a saturated `iz`.

The `ITERS` and `IFRAC` parameters trade latency and precision. With fewer
iterations, the latency is `2*ITERS + 3` cycles.

A slower shift-and-subtract divider (about 86 cycles per division) was an
earlier alternative to this unit. It is not included.

## Control and timing (`ba_controller`)

Observations are processed **one at a time**, not overlapped. For each one,
the controller issues a stage with a one-cycle strobe, waits for that stage's
valid pulse, and then issues the next stage:

| state pair   | stage                          | stage latency |
|--------------|--------------------------------|---------------|
| RD / W_RD    | S1-IR read                     | 2             |
| S1 / W_S1    | `s1_transform`                 | 2             |
| DIV / W_DIV  | `newton_recip` (Szrs)          | 19            |
| PRE / W_PRE  | `pre_s3`                       | 2             |
| S3 / W_S3    | `s3_jacobian` + `cc_residual`  | 2 (CC: 1)     |

Each pair costs its stage latency plus one issue cycle: 3 + 3 + 20 + 3 + 3 =
**32 cycles per observation**. In the cycle in which the Jacobian block
becomes valid, `out_valid` is high together with `out_idx`, `out_jac` and
`out_res`. The next observation's read is issued in the following cycle.

A pass over `num_obs` observations takes `32 * num_obs + 1` cycles from the
`start` cycle to the `done` pulse. For the default set of 2930 observations
that is 93,761 cycles, which is 0.70 ms at 134 MHz. `start` is ignored while
`busy` is high. `num_obs = 0` does nothing. Assertions in the controller and
the top check that each stage answers only when it is waited for, and that
the divider is started only while idle.

## Input memory (`s1_ir`)

S1-IR stores one problem in three tables:

* the observation table, `N_OBS` entries: camera index, point index, measured
  `u`, `v`
* the points, `N_POINTS` entries of `[X Y Z]`
* the camera poses, `N_CAMS` entries of `R` (9 values, row-major) and `t`

Each table has a synchronous write port (`obs_*`, `pt_*`, `cam_*` on the
top). Between iterations the host rewrites the poses and points that changed.
A read takes two cycles. The first edge reads the observation entry. The
second edge reads the point and pose it names, in parallel. The contents are
not reset.

The defaults are N_OBS = 2930, N_POINTS = 1465 and N_CAMS = 2. That is a
two-image set in which 1465 features are seen by both cameras. It takes
240,320 memory bits. Larger problems either raise these parameters or are
streamed through in chunks of up to N_OBS observations per pass.

## Interface of `ba_accel_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `obs_we, obs_waddr, obs_wcam, obs_wpoint, obs_wu, obs_wv` | in | write one observation |
| `pt_we, pt_waddr, pt_wdata` | in | write one point (`point_t`) |
| `cam_we, cam_waddr, cam_wdata` | in | write one pose (`cam_t`) |
| `start`, `num_obs` | in | run observations `0 .. num_obs-1` |
| `busy`, `done` | out | pass running; one-cycle end pulse |
| `out_valid`, `out_idx` | out | result strobe and observation index |
| `out_jac` | out | `jac_t`: `[row][col]`, row 0 = U, row 1 = V, columns as above |
| `out_res` | out | `[0]` = U residual, `[1]` = V residual |

Two Jacobian entries are always zero: dU/dt2 and dV/dt1. They are output as
constants, so synthesis reports 40 output bits as idle.

## Files

`rtl/`: `ba_pkg` (types, arithmetic), `q_add`, `q_mul`, `newton_recip`,
`s1_ir`, `s1_transform`, `pre_s3`, `s3_jacobian`, `cc_residual`,
`ba_controller`, `ba_accel_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ba_accel_top` runs the whole design at its default size. It generates
  1465 points, two poses and 2930 noisy observations, loads them, runs one
  pass, changes the poses and a third of the points, and runs a second pass.
  It compares every Jacobian block and residual with a double-precision
  reference computed from the same Q4.16 inputs. Observed worst-case errors
  are about 3.4e-5 for the Jacobian and 2.3e-5 for the residual, which is
  about 2 LSB. It also checks the 32-cycle period and the pass length.
* `tb_ba_two_image_lm` runs the same two-image workload as ten iterations of
  a real pose refinement. The testbench plays the host. It solves the 6 x 6
  normal equations of each camera from the accelerator's pose columns and
  residuals, and updates the poses. With poses that start off by up to
  0.03 rad and 0.05, and measurement noise of 0.001, the RMS residual falls
  from 1.2e-2 to 5.7e-4 (the noise level) by the third iteration and stays
  there. The ten passes take 937,610 cycles, which is 7.0 ms at 134 MHz.
* `tb_s3_jacobian` checks the pose columns against central-difference
  derivatives of the perturbed projection.
* `tb_newton_recip` checks the 19-cycle latency and one-LSB accuracy over the
  full input range.
* `tb_ba_controller` drives the controller with latency models of the stages.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ba_pkg.sv \
          tb/tb_ba_accel_top.sv --top-module tb_ba_accel_top
./obj_dir/Vtb_ba_accel_top
```

Replace `ba_accel_top` with any other module name to run that unit's test.
The full-size end-to-end test builds and runs in about 10 seconds.

## Choices made in this design, and limits

Taken from the original design: the Q4.16 word, the stage structure (S1, a
separate Szrs reciprocal stage, preS3 for the shared terms, S3), the
Newton-Raphson reciprocal with 8 iterations in 19 cycles, 32 cycles per
observation without overlap, an input memory loaded per iteration, and the
two-image default size.

Chosen here:

* two's-complement encoding, round-to-nearest and saturation
* the first-guess rule of the divider and its 24 internal fraction bits
* the three-table memory layout and the write ports (instead of a file-loaded
  ROM)
* the exact controller states
* the streaming result interface (no result memory)
* placing `ab`, `aa` and `bb` in preS3
* the output column order `[point | rotation | translation]`
* the V-row signs discussed above

Limits:

* Synthesis timing has not been characterized here. The original design
  targets 100 MHz, and 134 MHz has been given for it on an Artix-7 class part.
* The RTL writes `+` and `*` and leaves their mapping to carry chains and DSP
  blocks to the synthesis tool.
* The host side is outside this RTL: the normal-equation solve, the state
  update and the RMS computation. So are the later extensions an integrator
  might want, such as an AXI wrapper or a Schur-complement unit.
