# Reconfigurable CORDIC: circular and hyperbolic, rotation and vectoring, in one circuit

CORDIC computes elementary functions with nothing but shifts and adds. It turns a
vector (x, y) through a sequence of small, fixed angles. What gets computed depends
on two choices:

- **Trajectory.** The circular trajectory gives sin, cos, atan and magnitude. The
  hyperbolic one gives sinh, cosh, exp, atanh, and from those ln and sqrt.
- **Mode.** Rotation mode turns a vector by a given angle. Vectoring mode turns it
  onto the x axis and reports the angle it took.

A conventional design needs a separate CORDIC for each combination. This design
does all four in one datapath. The circular and hyperbolic update equations use the
same operands and differ only in the sign of some of them, so a 1-bit trajectory
control **T** picks, term by term, whether an adder adds or subtracts. The mode bit
picks what steers each micro-rotation. Both bits travel with every operand set, so
consecutive operations in the pipeline can use different trajectories and modes.

Two engines implement it, side by side in the top module `reconfig_cordic`:

- **Pipelined.** One hardwired micro-rotation unit per stage. It takes one operand
  set per clock.
- **Recursive.** A single micro-rotation unit with barrel shifters, used once per
  clock over several clocks. It is smaller and slower, with a valid/ready handshake.

## What it computes

All ports are signed 16-bit Q2.13 numbers: 13 fraction bits, range [-4, 4). Angles
are in radians. For the hyperbolic trajectory the angle is the hyperbolic angle.

| T | mode | inputs | outputs |
|---|---|---|---|
| circular (0) | rotation (0) | vector (x, y), angle z in [-pi, pi) | (x, y) turned by z; z ≈ 0 |
| circular | vectoring (1) | any (x, y) | x = sqrt(x²+y²), z = atan2(y, x), y ≈ 0 |
| hyperbolic (1) | rotation | (x, y), \|z\| < 1 | x' = x cosh z + y sinh z, y' = y cosh z + x sinh z |
| hyperbolic | vectoring | x > 0, \|y/x\| < tanh 1 ≈ 0.76 | x = sqrt(x²−y²), z = atanh(y/x), y ≈ 0 |

Useful special cases:

| result | how to get it |
|---|---|
| cos z, sin z | circular rotation of (1, 0) |
| cosh z, sinh z | hyperbolic rotation of (1, 0) |
| e^z in x and y | hyperbolic rotation of (1, 1) |
| ln a = 2·z | hyperbolic vectoring of (a+1, a−1), valid for a in about [0.14, 3) |
| sqrt(a) in x | hyperbolic vectoring of (a+¼, a−¼), valid for a in about [0.04, 1.75] |

In vectoring mode the z input is ignored and the angle accumulator starts at 0.

A result outside the output range is clipped, and `sat` is raised. The most common
case is circular vectoring of a vector longer than 4.

## The micro-rotation unit (RCCU)

This is the heart of the design and where it differs most from textbook CORDIC.

A textbook CORDIC micro-rotation is x' = x − d·y·2⁻ⁱ. That turns the vector by
atan(2⁻ⁱ) and also stretches it. The stretch has to be corrected by a constant
factor at the end. For the hyperbolic trajectory some iterations must also be
repeated.

Here each micro-rotation turns by **exactly 2⁻ˢ** and does not stretch the vector.
The shift index s sets the angle. The unit multiplies by the true rotation matrix,
with cos, sin, cosh and sinh of 2⁻ˢ written as their Taylor series:

```
C = 1 ∓ θ²/2 + θ⁴/24 ∓ θ⁶/720        (cos: −,   cosh: +)      θ = 2^-s
S = θ  ∓ θ³/6 + θ⁵/120               (sin: −,   sinh: +)

circular   : x' = C·x − d·S·y     y' = C·y + d·S·x
hyperbolic : x' = C·x + d·S·y     y' = C·y + d·S·x            d = ±1
```

The two trajectories have the same terms, and only the terms with ⌊k/2⌋ odd change
sign. Term k is v·θᵏ/k!, which is a multiplication by a constant fixed by s alone.

Each term then goes through a reconfigurable adder/subtractor (`recfg_addsub`: one
adder, operand XOR-ed with the control bit, which is also the carry-in). Its control
bit is `T == circular` for the sign-changing terms. One more add/subtract forms
x' from C·x and S·y, and its control bit combines T with the direction d.

- **Pipelined RCCU (`rccu`).** s is a parameter, so every term is a hardwired
  constant and there is no barrel shifter.
- **Recursive RCCU (`rccu_var`).** s arrives at run time. Each term is
  `v · round(2^17/k!)`, followed by a barrel shift right by 17 + k·s, with rounding.
- **Series length.** Terms up to k = 6 are kept. Higher terms vanish below the
  internal LSB once s ≥ 2.

Because there is no scale factor, the magnitude from vectoring and the rotated
vector come out directly. Since every micro-rotation angle is an exact power of
two, no arctangent table is needed either.

## The micro-rotation sequence

`mrsg` gives the shift index, the angle and the direction of micro-rotation number
`idx`:

- **Shift indices.** The smallest index is the *basic-shift* b. The parameter is
  `BSHIFT`, default 2; 3 is also supported. Index b is used 2ᵇ − 1 times, then each
  index b+1 … 13 once:
  - b = 2: 2, 2, 2, 3, 4, …, 13, which is 14 micro-rotations;
  - b = 3: seven 3s, then 4 … 13, which is 17.
- **Range.** The angles add up to 1 − 2⁻¹³. That covers the [0, π/4] left after
  range folding, and hyperbolic angles up to about ±1. The last angle, 2⁻¹³, is one
  output LSB.
- **Direction.** Every micro-rotation is performed; only its direction is chosen:
  - rotation: d = +1 while the remaining angle z ≥ 0, so z is driven to 0;
  - vectoring: d = +1 while y < 0, so y is driven to 0 and z collects the angle.
- **Why this converges.** Each angle is at most the sum of all later angles plus the
  last one, the usual condition for sign-steered CORDIC.

Why not use s = 0 or 1? The Taylor series would then need many more terms. A larger
basic-shift gives shorter series per stage but more repeats. That is the trade-off
the parameter exposes.

## Range folding (pre- and postprocessing)

These units apply to the circular trajectory only. On the hyperbolic trajectory
they pass values through.

**Rotation (`pre_rot`, `post_rot`)**

1. The angle is moved into [0, 2π) by adding 2π if it is negative.
2. Three constant comparisons give the quadrant q.
3. The remainder is t = z − q·π/2.
4. If t ≤ π/4 the core turns by t. Otherwise it turns by π/2 − t, and the
   *reflection* flag is set.

A turn by −φ equals "negate y, turn by +φ, negate y". So with reflection, y is
negated before the core. Afterwards `post_rot` negates y again and adds one more
quarter turn, then applies the q quarter turns. A quarter turn only swaps and
complements x and y, so for (1, 0) this is the swap/complement of sine and cosine
by octant. Reflection flips the sign of y, so the unit works for any input vector,
not only (1, 0).

**Vectoring (`pre_vec`, `post_vec`)**

`pre_vec` folds (x, y) into 0 ≤ y ≤ x by taking absolute values and swapping when
|y| > |x|. It records both signs and the swap. `post_vec` rebuilds the full angle
from the first-octant angle a, applying in order:

- a → π/2 − a, if x and y were swapped;
- a → π − a, if x was negative;
- a → −a, if y was negative.

The magnitude needs no correction.

`cordic_pre` and `cordic_post` wrap these units for both engines:

- **`cordic_pre`** picks the rotation or vectoring path by mode and widens the
  inputs.
- **`cordic_post`** undoes the fold, rounds away the guard bits and saturates.

## The two engines and their timing

**Pipelined (`cordic_pipe`, ports `p_*`)**

The datapath is cordic_pre → input register → NSTAGE `cordic_stage`s → cordic_post
→ output register. Each `cordic_stage` holds one `mrsg` with a constant index, one
`rccu`, one add/subtract for z, and a register.

A record (`stage_t` in `cordic_pkg`) travels down the chain carrying:

- the valid bit, T and mode;
- both octant records;
- x, y and z.

Operand sets enter one per clock. `p_out_valid` rises NSTAGE + 2 clock edges after
the edge that sampled `p_in_valid`: that is 16 for b = 2 and 19 for b = 3. There is
no stall input.

**Recursive (`cordic_rec`, ports `r_*`)**

1. When `r_in_valid` and `r_in_ready` are both high at an edge, the preprocessed
   operands are loaded.
2. For the next NSTAGE clocks one `rccu_var` performs micro-rotation
   `cnt` = 0 … NSTAGE−1, and `r_in_ready` is low.
3. At the last iteration the postprocessed result goes into the output registers.
   `r_out_valid` is high for one clock, NSTAGE edges after acceptance.
4. A new operation can be accepted from the next clock on.

Reset is `rst_n`: active low and asynchronous. It clears the valid bits, the pipeline
registers and the recursive controller.

## Number formats inside

Internally every word has 22 bits with 17 fraction bits: 4 guard bits and 2 extra
integer bits, range ±16. The extra range holds two kinds of intermediate values:

- the circular magnitude of a vector (at most 5.7);
- angles up to 2π during folding.

The guard bits keep the rounding of 14 stages below one output LSB.

Internal overflow is possible for hyperbolic rotation of large vectors, since e¹·(|x|+|y|)
exceeds 16 once |x|+|y| > 5.9. The tests keep |x|, |y| ≤ 0.7 there.

## Accuracy

These limits were checked in simulation at the default parameters:

- rotation and vectoring results are within 6 output LSBs (6·2⁻¹³ ≈ 7·10⁻⁴) of
  double-precision results;
- single RCCUs are within 4 internal LSBs of the exact rotation;
- ln, computed as 2·atanh, is within 8 output LSBs.

## How far this follows its source, and what is this design's own

**Taken from the source architecture:**

- one circuit for both trajectories, switched by a 1-bit T;
- the trajectories differing only in operand signs, handled by reconfigurable
  add/subtract;
- rotation mode, vectoring mode, and a generalized unit that does both;
- preprocessing that brings the rotation angle into [0, π/4], and circular-only
  postprocessing that swaps and complements sine and cosine by octant;
- a micro-rotation sequence generator;
- a pipelined unit for basic-shift 2, with hardwired shifts in every RCCU and
  basic-shift 3 as the variant;
- a recursive variant built around one RCCU;
- a separate range-of-convergence circuit for each case.

**This design's own choices, where the source gives no detail:**

- all word lengths and formats, and the guard bits;
- the Taylor-series form of the RCCU, and its length;
- the exact shift sequence (2ᵇ−1 repeats, last shift 13) and the sign-steered
  direction rule;
- how the octant folding is done for rotation, including the y reflection that
  makes it work for any input vector;
- the whole vectoring fold;
- the same number of micro-rotations in every mode and trajectory (the source
  lets the count depend on the mode of operation but does not say how);
- one register after every pipeline stage;
- the valid and valid/ready interfaces, reset, saturation, and starting z at zero
  in vectoring.

**Not included:**

- **Range-of-convergence extension for the hyperbolic trajectory.** The source
  states that one exists but not what it does. Hyperbolic arguments are limited to
  the ranges in the table above.
- **Mux-based unrolled CORDIC.** The source also discusses this as existing work;
  it is not part of this design.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Build
and run with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_reconfig_cordic.sv \
    --top-module tb_reconfig_cordic
./obj_dir/Vtb_reconfig_cordic
```

Verilator finds the other modules through `-Irtl`, because each module sits in a
file of its own name.

| testbench | what it covers |
|---|---|
| `tb_reconfig_cordic` | Whole design at default parameters: random mixed traffic of all four operation kinds through both engines, checked against double-precision math. Also checks both latencies, and that every quadrant, reflection, vectoring fold, trajectory switch, mode switch, saturation, bubble and back-pressure case occurs. |
| `tb_cordic_functions` | sin/cos, atan2/magnitude, sinh/cosh, exp, atanh, ln and sqrt through the top. |
| `tb_cordic_pipe` | Pipelined unit alone, with basic-shift 2 and 3 fed the same stream. |
| `tb_cordic_rec` | Recursive engine and its handshake, with basic-shift 2 and 3 side by side. |
| `tb_rccu`, `tb_rccu_var` | Single micro-rotations against exact cos/sin/cosh/sinh. |
| `tb_mrsg`, `tb_pre_rot`, `tb_post_rot`, `tb_pre_vec`, `tb_post_vec`, `tb_recfg_addsub` | One unit each. |

`tb/cordic_ref_pkg.sv` holds the floating-point reference and the fixed-point
conversions. Each testbench ends itself; a watchdog ends it with a failure if it
hangs.

## Changing it

- **Basic-shift.** Set `BSHIFT` on `reconfig_cordic`, `cordic_pipe` or `cordic_rec`.
  Stage count and latency follow.
- **Word length and guard bits.** Change `W`, `F` and `G` in `rtl/cordic_pkg.sv`.
  Keep `LAST_SHIFT` = `F` so the last micro-rotation stays one LSB.
- **Series length.** Change `K_TERMS`. Taylor constants are computed from it at
  elaboration time, round(2^(FI − k·s) / k!), so no table needs regenerating.

## Files

`rtl/`:

| file | content |
|---|---|
| `cordic_pkg.sv` | formats, types (`traj_e`, `mode_e`, `stage_t`), constants, Taylor-coefficient functions |
| `reconfig_cordic.sv` | top: both engines |
| `cordic_pipe.sv`, `cordic_stage.sv` | pipelined unit and one stage of it |
| `cordic_rec.sv` | recursive engine |
| `rccu.sv`, `rccu_var.sv` | micro-rotation units, fixed and run-time shift |
| `recfg_addsub.sv` | reconfigurable adder/subtractor |
| `mrsg.sv` | micro-rotation sequence generator |
| `pre_rot.sv`, `post_rot.sv`, `pre_vec.sv`, `post_vec.sv` | range folding |
| `cordic_pre.sv`, `cordic_post.sv` | mode selection, widening, rounding and saturation around the core |

`tb/` holds one testbench per unit plus the two system-level ones listed above.
