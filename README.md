# Floating-point direct kinematics engine for a 5-axis spherical manipulator

The engine takes the joint values of a five-degree-of-freedom spherical robot
arm and computes the pose of its hand in the base frame: the 4x4 homogeneous
transform. The arm has two revolute base joints (theta1, theta2), a prismatic
joint (d3) and two revolute wrist joints (theta4, theta5). All arithmetic is
floating point, in a format whose exponent and mantissa widths are set before
synthesis. The sines and cosines come from a small Taylor-series core. The
twelve transform entries then come from a fixed schedule of eleven steps. The
steps share four multipliers and two adder/subtractors. In the default 32-bit
format, one pose takes 57 clock cycles.

## What is computed

The Denavit-Hartenberg table of the arm (angles in degrees, lengths in mm):

| joint | theta       | d        | l        | alpha |
|-------|-------------|----------|----------|-------|
| 1     | theta1      | d1 = 106 | 0        | 90    |
| 2     | theta2 + 90 | d2 = 130 | l2 = 0   | -90   |
| 3     | 0           | d3       | 0        | 0     |
| 4     | theta4      | 0        | 0        | 90    |
| 5     | theta5      | 0        | 0        | 0     |

Multiplying the five link matrices gives
`T = [x_x y_x z_x p_x; x_y y_y z_y p_y; x_z y_z z_z p_z; 0 0 0 1]`.
In closed form, with `Ci = cos(theta_i)` and `Si = sin(theta_i)`:

```
A   = -C1 S2 C4 - S1 S4            B   = -S1 S2 C4 + C1 S4
x_x =  A C5 - C1 C2 S5             y_x = -A S5 - C1 C2 C5
x_y =  B C5 - S1 C2 S5             y_y = -B S5 - S1 C2 C5
x_z =  C2 C4 C5 - S2 S5            y_z = -C2 C4 S5 - S2 C5
z_x = -C1 S2 S4 + S1 C4            z_y = -S1 S2 S4 - C1 C4          z_z = C2 S4
p_x = -C1 C2 d3 - C1 S2 l2 + S1 d2
p_y = -S1 C2 d3 - S1 S2 l2 - C1 d2
p_z = -S2 d3 + l2 C2 + d1
```

The second term of `x_y` is `S1 C2 S5`. Published versions of these
equations write `S1 S2 S5` there. The matrix product, and the operation
schedule this design follows, both give `S1 C2 S5`. The testbenches
compute their reference from the matrix product itself, not from these
formulas.

The link length `l2` is zero on the reference arm. It stays in the datapath so
that a calibrated value can be set through the `L2` parameter.

## Number format (`fp_pkg`)

A value is `{sign, exponent[EW], fraction[MW]}`, with a hidden leading one and
bias `2^(EW-1)-1`, as in IEEE-754. The defaults are `EW=8`, `MW=23`, which is
IEEE single precision. The design was also checked at 43 bits (11, 31) and at
64 bits (11, 52).

The format is simplified, and the same rules hold in every unit:

- An exponent field of zero means zero. Subnormals are flushed to zero.
- There are no infinities or NaNs. A result that overflows saturates to the
  largest finite value.
- Rounding is to nearest, ties to even.

`fp_pkg::real_to_fp` and `fp_pkg::fp_to_real` convert between a `real` and any
format up to 64 bits. The RTL uses them only at elaboration, to build constant
tables. The testbenches use them to make stimuli and references.

## Arithmetic units (`fp_mul`, `fp_addsub`)

Both units are combinational with one output register. Operands are presented
in one clock and the result is in the register after the next edge. Both accept
a new operation every clock.

- **`fp_mul`** multiplies the significands exactly and normalises by at most
  one place. It then rounds and adjusts the exponent.
- **`fp_addsub`** computes `a + b` or `a - b`, chosen by the `sub` input. It
  shifts the smaller operand right, keeping guard, round and sticky bits. It
  then adds or subtracts and renormalises, right by one or left by the
  leading-zero count. Finally it rounds.

## Taylor core (`fp_taylor`, `taylor_coef_rom`)

One core computes sin, cos or atan by a truncated series around 0. The `op`
input chooses the function. The core has one multiplier, one add/subtract unit
and three coefficient ROMs:

| function | first term | term n (n = 0..NTERMS-1)   |
|----------|------------|----------------------------|
| sin      | x          | -/+ x^(2n+3) / (2n+3)!     |
| cos      | 1          | -/+ x^(2n+2) / (2n+2)!     |
| atan     | x          | -/+ x^(2n+3) / (2n+3)      |

The ROMs hold the positive factors. They are computed at elaboration for the
chosen format. The sign alternates through the add/subtract control: subtract
for even n, add for odd n.

A state machine runs the core:

1. `SQ`: form x*x.
2. `INIT`: store x^2. Set the accumulator and the running power to the first
   term.
3. Four clocks per term:
   - `POW`: power times x^2.
   - `COEF`: that power times the ROM factor.
   - `ACC`: accumulator plus or minus the result.
   - `NEXT`: write back and advance n.

The latency from `start` to `ready` is therefore `4*NTERMS + 3` clocks. That is
23 for the default of five terms (x^11 for sine, x^10 for cosine) and 11 for two
terms.

Sin and cos are accurate only inside [-pi/2, pi/2], which covers the arm's
joint ranges. There is no range reduction. With five terms the truncation error
at +/-pi/2 is below 5e-7. The series for atan converges only for |x| < 1. The
engine does not use atan; the core supports it because it shares the same
structure.

`start` samples `x` and `op`. `ready` rises with the result and stays high until
the next `start`.

## The scheduled engine (`dk_top`, `dk_pkg`)

The engine has two phases:

- **Step 0.** Eight Taylor cores run in parallel: cosine of theta1, theta2,
  theta4, theta5 in cores 0..3 and sine in cores 4..7. They all start on the
  same clock.
- **Steps 1..11.** Four multipliers (A..D) and two add/subtract units (0, 1)
  work through a fixed schedule. Each add/sub can negate its first operand
  (the sign bit is flipped at operand load), so `a-b`, `-a-b`, `-a+b` and
  `a+b` all take a single unit.

| step | mult A       | mult B      | mult C      | mult D      | add/sub 0                  | add/sub 1                 |
|------|--------------|-------------|-------------|-------------|----------------------------|---------------------------|
| 1    | C1 C2        | C2 C4       | l2 C2       |             |                            |                           |
| 2    | C2C4 * C5    | S2 S5       | C2C4 * S5   | S2 C5       | l2C2 + d1                  |                           |
| 3    | S2 d3        | S2 l2       | S1 d2       | C1C2 * d3   | **x_z**                    | **y_z**                   |
| 4    | C1 * S2l2    | S1 * S2l2   | C1 d2       | S1 C2       | **p_z**                    | S1d2 - C1C2d3             |
| 5    | S1C2 * d3    | **z_z** = C2 S4 | S2 S4   | S2 C4       | **p_x**                    | -S1S2l2 - C1d2            |
| 6    | S1 C4        | C1 * S2S4   | S1 * S2S4   | C1 C4       | **p_y**                    |                           |
| 7    | C1 * S2C4    | S1 S4       | C1 S4       | S1 * S2C4   | **z_x**                    | **z_y**                   |
| 8    |              |             |             |             | A                          | B                         |
| 9    | A C5         | A S5        | C1C2 * S5   | C1C2 * C5   |                            |                           |
| 10   | B C5         | B S5        | S1C2 * S5   | S1C2 * C5   | **x_x**                    | **y_x**                   |
| 11   |              |             |             |             | **x_y**                    | **y_y**                   |

This table is the function `dk_pkg::schedule`. Every input, intermediate and
result has a slot in one register file, named by `dk_pkg::reg_e`. Each step
lasts three clocks:

1. `LOAD`: read the operands from the register file into the units' input
   registers.
2. `EXEC`: the units compute into their output registers.
3. `WB`: write the results back.

A step reads only values written by earlier steps. This is why the schedule
has the step dependencies shown in the table.

### Timing

With the default five-term Taylor cores:

- `start` is sampled at clock 0.
- The cores finish after 23 clocks. Their results are written at clock 24.
- Step k writes back at clock `24 + 3k`.

| results        | step | valid after (clocks) |
|----------------|------|----------------------|
| x_z, y_z       | 3    | 33                   |
| p_z            | 4    | 36                   |
| z_z, p_x       | 5    | 39                   |
| p_y            | 6    | 42                   |
| z_x, z_y       | 7    | 45                   |
| x_x, y_x       | 10   | 54                   |
| x_y, y_y       | 11   | 57                   |

An implementation of this architecture has been reported at 43..67 clocks for
the same steps. Its spacing of three clocks per step is the same as here. The
extra ten clocks at its start are not explained by its Taylor-core latency and
are not reproduced. At the 54 MHz that a Virtex-II class FPGA reaches with the
single-precision build, 57 clocks take about 1.06 us.

### Interface

| port                               | dir | width  | meaning                                                        |
|------------------------------------|-----|--------|----------------------------------------------------------------|
| `clk`, `rst_n`                     | in  | 1      | clock; asynchronous active-low reset                           |
| `start`                            | in  | 1      | samples the joint inputs when idle; ignored while busy         |
| `theta1`, `theta2`, `theta4`, `theta5` | in | W   | joint angles in radians, within [-pi/2, pi/2]                  |
| `d3`                               | in  | W      | prismatic extension, mm                                        |
| `busy`                             | out | 1      | high from start until done                                     |
| `done`                             | out | 1      | one-clock pulse when the last results are written              |
| `out_valid`                        | out | 12     | per-result valid bits, order `x_x x_y x_z y_x y_y y_z z_x z_y z_z p_x p_y p_z` |
| `x_x` .. `p_z`                     | out | W      | transform entries; held until the next start                   |

`W = 1 + EW + MW`. The parameters are:

| parameter | default | meaning                                  |
|-----------|---------|------------------------------------------|
| `EW`      | 8       | exponent width                           |
| `MW`      | 23      | mantissa width                           |
| `NTERMS`  | 5       | Taylor terms after the leading one       |
| `D1`      | 106.0   | link offset d1, mm (real)                |
| `D2`      | 130.0   | link offset d2, mm (real)                |
| `L2`      | 0.0     | link length l2, mm (real)                |

The lengths can be in any unit, as long as `d3` uses the same one.

Two concurrent assertions in `dk_top` check the controller in simulation.
The first checks that no result is written twice in one run. The second checks
that the eight Taylor cores stay in lock step.

## Where this design makes its own choices

The architecture fixes several things, and the RTL follows them:

- the unit counts: 8 trigonometric cores, 4 multipliers and 2 add/subs;
- the Taylor core's structure and its 4*N+3 latency;
- the step in which each result appears;
- the use of selectable floating-point widths.

The following are this design's own:

- The insides of the multiplier and the adder/subtractor, with their rounding,
  flush-to-zero and saturation rules.
- One pipeline register per arithmetic unit, and the three-clock
  LOAD/EXEC/WB step.
- The register file and the handshake: `start`, `busy`, `done`, `out_valid`.
- The Taylor cores all take 23 clocks. Reported latencies for such cores differ
  between sine (26) and cosine (23). This design follows the series-length
  rule instead, in which the time depends only on the number of terms.
- The absolute cycle counts, as described under Timing.

The software comparison platform is not included. It had an embedded PowerPC
with a cycle counter and a UART on its local bus, and it only served to time a
software version.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...`
line.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_fp_mul`          | 6000 products, bit-exact against double-precision products rounded to the format; zero, overflow, underflow and rounding-carry cases; 2000 more in the 24-bit (6, 17) format |
| `tb_fp_addsub`       | 5000 sums and differences, bit-exact; exponent gaps up to 28, cancellation, ties to even, zeros, overflow; 2000 more in the 24-bit format |
| `tb_taylor_coef_rom` | every ROM entry against 1/(2n+3)!, 1/(2n+2)!, 1/(2n+3) |
| `tb_fp_taylor`       | sin/cos/atan at 5 and 2 terms against the same truncated series in double precision and against `$sin`/`$cos`; latency 23 and 11 |
| `tb_dk_top`          | 60 poses with l2 = 5 mm against the product of the five link matrices; the clock at which each result becomes valid; done/busy behaviour; that a start while busy is ignored |
| `tb_dk_top_full`     | the same with every parameter at its default, over 100 poses, printing the mean square error of each entry |
| `tb_dk_formats`      | 20 poses each in the 43-bit and 64-bit formats, with the 57-clock run time |

Tolerances are 2e-5 on orientation entries and 5e-3 mm on positions. In the
32-bit format, the mean square error over 100 random poses is about 1e-14 for
the orientation entries. For the positions it is between 1e-10 and 3e-9 mm^2. Arguments
span theta1, theta4, theta5 in [-90, 90] degrees, theta2 in [-35, 20] degrees
and d3 in [160, 760] mm.

## Simulating

All RTL is in `rtl/` and all testbenches are in `tb/`. List the packages
first, and let verilator find the modules through `-y`. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/fp_pkg.sv rtl/dk_pkg.sv \
          tb/tb_dk_top_full.sv --top-module tb_dk_top_full
./obj_dir/Vtb_dk_top_full
```

The same command runs any other testbench: change the file and the
`--top-module` name. `tb_fp_mul`, `tb_fp_addsub`, `tb_fp_taylor` and
`tb_taylor_coef_rom` need only `rtl/fp_pkg.sv` before them.

To change the format, set `EW` and `MW` on `dk_top`. `MW` may be at most 52 and
`EW` at most 11 if the testbench helpers are to be used. To change the series
length, set `NTERMS`. The latency of every step then moves by 4 clocks per term.
