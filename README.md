# Pipelined CORDIC sine/cosine unit

This unit computes the sine and cosine of an angle using only additions,
shifts and a few constants. It takes one new angle every clock and returns
each result 13 clocks later. It uses the CORDIC algorithm in rotation mode.
The loop of micro-rotations is fully unrolled into a pipeline, with one
register stage per micro-rotation. A folding stage in front brings any angle
into the first quadrant, and a sign-restoring stage behind undoes that
folding.

```
 phase ──► cordic_preproc ──► cordic_core (11 × cordic_stage) ──► cordic_postproc ──► cos_out, sin_out
           fold to [0,π/2]    x,y,z micro-rotations                restore signs,
           note quadrant ───── quadrant rides along as a tag ────► round to Q1.14
   1 clock                    11 clocks                            1 clock        = 13 clocks
```

## The CORDIC iteration

Rotating a vector (x, y) by an angle θ is a multiplication by a 2×2 matrix.
CORDIC splits θ into a sum of fixed angles θ_n = arctan(2^-n), each taken
either forward or backward. Factoring out cos θ_n leaves a rotation whose
off-diagonal entries are ±2^-n, which is a shift:

```
d_n     = +1 if z_n >= 0, else -1
x_{n+1} = x_n - d_n · (y_n >>> n)
y_{n+1} = y_n + d_n · (x_n >>> n)
z_{n+1} = z_n - d_n · arctan(2^-n)
```

`z` holds the part of the angle still to be turned. Each step drives it
towards zero. After N steps the vector has turned by θ to within
arctan(2^-(N-1)), but its length has grown by the constant

```
K_N = ∏_{i=0}^{N-1} sqrt(1 + 2^(-2i))      (≈ 1.6468 for N = 11)
```

The gain is removed without a multiplier: the vector starts at
x_0 = 1/K_N, y_0 = 0, so after the last stage x = cos θ and y = sin θ.
`cordic_stage` is one such step. `cordic_core` chains ITERS of them, and stage
n is built with `SHIFT = n`.

The constants arctan(2^-n) and 1/K_N are not stored in a table. The functions
`atan_code` and `inv_gain_code` in `cordic_pkg` compute them at elaboration
time in real arithmetic, using `$atan` and `$sqrt`, and round them to the
fixed-point formats below. Changing ITERS or any width therefore changes
every constant to match.

## Why the angle is folded first

The sum of all θ_n is about 99.9°. CORDIC therefore converges only for
angles within roughly ±99.9°. The unit accepts any angle of the full turn. It
mirrors the angle into [0, π/2], computes the sine and cosine there, and then
fixes the signs:

| input quadrant | folded angle θ' | cos θ   | sin θ   |
|----------------|-----------------|---------|---------|
| 1: [0, π/2)    | θ               | cos θ'  | sin θ'  |
| 2: [π/2, π)    | π − θ           | −cos θ' | sin θ'  |
| 3: [π, 3π/2)   | θ − π           | −cos θ' | −sin θ' |
| 4: [3π/2, 2π)  | 2π − θ          | cos θ'  | −sin θ' |

Angles are binary angles: the PHASE_W-bit input covers one full turn in
2^PHASE_W codes. With the default PHASE_W = 16, 0x4000 is π/2. The quadrant is
then just the two top bits of the input. The folding is a single subtraction:
quadrants 1 and 3 keep the low bits r, and quadrants 2 and 4 use
2^(PHASE_W−2) − r. The quadrant travels through `cordic_core` as a 2-bit
sideband tag, so it stays aligned with its own data at any pipeline depth.
`cordic_postproc` applies the sign column of the table.

The folded angle can be exactly π/2, which is at the edge of the first
quadrant and well inside the convergence range. `cordic_core` has an assertion
that each valid input angle lies in [−π/2, π/2].

## Number formats

| signal                | format (defaults)                                  |
|-----------------------|----------------------------------------------------|
| `phase` (input)       | unsigned, 16 bits, 2^16 codes per turn             |
| angle accumulator `z` | signed, Z_W = PHASE_W + Z_GUARD = 18 bits, 2^18 codes per turn |
| `x`, `y` in the core  | signed, FRAC + 2 = 20 bits, 18 fraction bits       |
| `cos_out`, `sin_out`  | signed Q1.14, 16 bits: 1.0 = 16384                 |

The two guard bits on `z` reduce the rounding of the small arctangent
constants of the late stages. Because the vector starts at length 1/K, its
magnitude never exceeds 1.0. One integer bit plus the sign bit is therefore
enough, and no saturation is needed. The output is rounded half up from 18 to
14 fraction bits. Negation comes before rounding, so results are symmetric
about zero.

## Timing and interface

`cordic_sincos` ports: `clk`, `rst_n`, `in_valid`, `phase`, `out_valid`,
`cos_out`, `sin_out`.

- The unit accepts one angle per clock (initiation interval 1). There is no
  back-pressure, because it never stalls.
- `out_valid` rises exactly LATENCY = ITERS + 2 = 13 clocks after the
  matching `in_valid`. Results come out in input order.
- `rst_n` is synchronous and active low. It clears only the valid flags, so
  any results in flight are dropped. The data registers are not reset, and
  their contents mean nothing while their valid flag is low.

Each submodule has the same valid-in/valid-out form with a fixed latency:
`cordic_preproc` 1, `cordic_stage` 1, `cordic_core` ITERS, `cordic_postproc` 1.

## Accuracy

The error comes mainly from the residual angle after the last stage, which
is at most arctan(2^-(ITERS−1)). Truncation in the shifts, the rounding of the
angle constants and the output rounding add a little to it. With the
defaults, an exhaustive run over all 65,536 input angles gives a largest
absolute error of 1.02·10⁻³, or about 17 LSB of Q1.14. The bound the test
applies is 1.23·10⁻³. To get more accuracy, raise ITERS. Each extra stage
adds one clock of latency and roughly halves the residual until the widths
become the limit. A 16-stage core with the default widths reaches about
8.6·10⁻⁵. For 16-bit-exact results, also widen FRAC and Z_GUARD.

## Design choices and how far to trust them

The following parts follow a published description of an HLS-generated
CORDIC accelerator:

- the split into preprocessing, calculation and post-processing;
- the iteration equations, and the start value 1/K that replaces the final
  gain correction;
- the fully unrolled, pipelined loop;
- a latency of 13 clocks at an interval of 1.

That description gives neither widths nor an iteration count. The following
are choices of this design:

- The iteration count: ITERS = 11 was picked so that, with one register
  before and one after the core, the latency comes to 13.
- The binary-angle input format.
- All widths and the output format.
- Treating z = 0 as a forward rotation (d = +1).
- The floor-rounding arithmetic shifts.
- The exact mirror used in each quadrant.
- The valid-only interface.
- The synchronous reset.

The published implementation used 758 LUTs and 412 flip-flops on an FPGA.
After generic synthesis, this RTL at its default widths has 685 flip-flop
bits. Most are in the 11 stages, each with up to 61 bits: 20 for x, 20 for y,
18 for z, 2 for the tag and 1 for valid. Synthesis removes some bits that it
finds to be constant. The end stages add the rest. This design does not try
to match the published resource count. Narrower x/y/z widths reduce the
flip-flop count and cost accuracy.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | quadrant enum, arctan and 1/K constant functions |
| `rtl/cordic_preproc.sv` | angle folding to the first quadrant, 1 clock |
| `rtl/cordic_stage.sv` | one micro-rotation, 1 clock |
| `rtl/cordic_core.sv` | ITERS unrolled stages, start vector 1/K, input range assertion |
| `rtl/cordic_postproc.sv` | sign restoration and rounding, 1 clock |
| `rtl/cordic_sincos.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`. Each compares against
references computed in real arithmetic, such as `$sin`, `$cos`, `$atan` and
`floor`, and not against a copy of the RTL. The testbenches are:

- `tb_cordic_preproc`: quadrant edges and random angles against the folding
  table.
- `tb_cordic_stage`: stages with shift 0 and shift 5 against the update
  equations.
- `tb_cordic_core`: an 11-stage core and a 16-stage core, streamed with
  random gaps. It checks the accuracy bound, the latency and the tag, and
  that 16 stages are more accurate.
- `tb_cordic_postproc`: every quadrant, the extremes and exact half-LSB
  values.
- `tb_cordic_sincos`: the whole unit at its default parameters. It first
  sweeps all 65,536 angles back to back, then sends random angles with idle
  clocks, then resets a full pipeline. It checks every result's value and its
  13-clock latency. It also counts how often each of these happened: results
  from each quadrant, back-to-back results, results after a gap, and a reset
  flush. If any of them never happened, it reports a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cordic_pkg.sv tb/tb_cordic_sincos.sv \
          --top tb_cordic_sincos -o sim_top
./obj_dir/sim_top
```

Replace the testbench name to run another one. Verilator finds the modules it
uses in `rtl/` through `-Irtl`; the package must come first on the command
line. The full-size run takes well under a second.

To change the configuration, override the parameters of `cordic_sincos`:
`PHASE_W`, `ITERS`, `Z_GUARD`, `FRAC`, `OUT_W` and `OUT_FRAC`. The latency
follows as ITERS + 2. `tb_cordic_sincos` has the same names as local
parameters at its top. If you change the unit's parameters, make the same
changes there so that its error bound and latency check match.
