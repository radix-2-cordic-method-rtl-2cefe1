# Unrolled radix-2 CORDIC with constant scale factor

This is a sine/cosine and vector-rotation engine made only of adders and fixed
wiring. It has no multipliers, no iteration counter and no registers. An input
vector is rotated by an arbitrary angle in a cascade of elementary rotations.
Stage *i* rotates by exactly ±atan(2^-i), so each of its "multiplications" is
a right shift by *i* bits. Every stage always rotates one way or the other and
never skips, so the length of the vector grows by the same factor whatever the
angle. That fixed gain can be taken out in advance by scaling the starting
vector, and the outputs are then cos z and sin z directly.

The design is written for word lengths of 16 bits (the default) and 32 bits.
The two published 30° examples of the original 16-bit and 32-bit designs are
reproduced bit for bit, stage by stage.

## The algorithm as built

Each stage *i* (0 ≤ *i* < `STAGES`) computes, in rotation mode:

```
d      = +1 if z_i >= 0, else -1
x_i+1  = x_i - d * (y_i >>> i)
y_i+1  = y_i + d * (x_i >>> i)
z_i+1  = z_i - d * atan(2^-i)
```

The residual angle `z` is steered towards zero. After all stages:

```
X = An * (x cos z - y sin z)
Y = An * (y cos z + x sin z)
Z ≈ 0
An = prod_i sqrt(1 + 2^-2i) ≈ 1.64676
```

To get cos and sin, load `x = 1/An ≈ 0.607253`, `y = 0`, `z = angle`. No
scaling multiplier exists in the hardware: correcting the gain is the job of
whoever supplies the input vector.

A stage whose incoming `z` is exactly 0 rotates in the + direction. This is the
rule "d = -1 only if z < 0" taken literally.

## Number format

All six data ports are signed two's-complement words of `WIDTH` bits with
`WIDTH-2` fraction bits. 1.0 is 2^(WIDTH-2), and the range is [-2, 2). Angles
use the same format, in radians.

| quantity              | 16 bit  | 32 bit       |
|-----------------------|---------|--------------|
| 1.0                   | 16384   | 1073741824   |
| 1/An (x for cos/sin)  | 9949    | 652032874    |
| 30° = 0.5236 rad      | 8579    | 562209904    |
| atan(1) = π/4 (stage 0) | 12868 | 843314857    |

Worked example at 16 bits: `x = 9949, y = 0, z = 8579` gives `X = 14191`
(cos 30° · 16384 = 14189) and `Y = 8189` (sin 30° · 16384 = 8192), with
`Z = 0`. The x values after stages 1 to 8 are 9949, 14923, 13680, 14768,
14331, 14084, 14214 and 14151: you can see x converge to cos 30°.

Limits that the hardware does not check:

- **Angle range.** The stage angles add up to 1.7433 rad, so `|z|` must stay
  below that, about ±99.9°. Angles outside it need a quadrant fold before the
  processor, which is not included.
- **Magnitude.** `An · |(x, y)|` must stay below 2, and so must every
  intermediate value. Otherwise the adders wrap silently. With `x = 1/An`,
  `y = 0` this always holds.
- **Accuracy.** At 16 bits, cos and sin come out within 16 LSB (10^-3) of
  the true values over the whole angle range, and usually within a few LSB.
  Truncating shifts and the rounded angle table each add a little error per
  stage. At 32 bits the tests hold them to within 64 LSB of 2^-30.

## Structure

```
 x  y  z
 |  |  |
 [stage 0]  shift 0,  const atan(1)
 [stage 1]  shift 1,  const atan(1/2)
   ...
 [stage S-1] shift S-1, const atan(2^-(S-1))
 |  |  |
 X  Y  Z
```

Each stage (`cordic_stage`) contains:

- **Two barrel shifters** (`cordic_barrel_shifter`). These are arithmetic
  right shifters built from log2 levels of 2:1 multiplexers. Their shift
  amount is the constant *i*, so synthesis reduces them to rewiring: bit *k*
  of the shifted word is bit *k+i* of the input, with the sign copied into
  the top *i* bits. The x shifter feeds the y adder and the y shifter feeds
  the x adder: this is the crossover that makes the step a rotation.
- **One arctangent ROM** (`cordic_atan_rom`), read at the constant address
  *i*. The table holds round(atan(2^-i) · 2^(WIDTH-2)). It is computed at
  elaboration from the power series of atan (`cordic_pkg::atan_fixed`), so it
  follows `WIDTH` without any data file. With a constant address the ROM
  collapses to a hard-wired constant.
- **Three adder/subtractors** (`cordic_addsub`) for x, y and z. The sign bit
  of `z_i` sets all three: x and z subtract while y adds, or the other way
  round.

`cordic_processor` chains `STAGES` of these. There is nothing else: no
control, no state. After coarse synthesis at 16 bits the processor is 93
word-level add/subtract cells and 47 multiplexers. Each adder/subtractor is
written as an add and a subtract with a select, and some fold into constants.
There are no flip-flops.

## Timing

The processor is purely combinational. A change on `x`, `y` or `z` reaches
`X`, `Y`, `Z` after the ripple through `STAGES` adder/subtractors. The
decision of each stage waits for the z adder of the stage before it, so the
critical path is the z chain followed by the last x/y adder. There is no
latency in clock cycles and a new operand can be applied whenever the previous
result has been captured.

`clk` and `rst` are on the port list, so the pinout matches the original
processor (6·WIDTH data pins + 2). The datapath does not use them, and a lint
tool will report them as unused. If you need throughput above what one
combinational pass allows, put registers on the stage boundaries in
`cordic_processor`. That changes the design into a pipeline with `STAGES`
cycles of latency; it is not done here.

## Vectoring build

`cordic_processor #(.MODE(cordic_pkg::CORDIC_VECTORING))` uses the same
datapath. The only change is that each stage takes its direction from the sign
of `y` (d = +1 when y < 0), so the vector is turned onto the positive x axis.
With `z = 0` the results are:

```
X = An * sqrt(x^2 + y^2)     (magnitude, scaled by An)
Y ≈ 0
Z = atan(y / x)              (plus the starting z, if not 0)
```

The input vector must lie within ±99.9° of the +x axis (for example any
vector with x ≥ 0). The angle resolution drops as the vector gets shorter:
keep |(x, y)| above about 1/4 for full accuracy. Rotation mode is the default
and is the mode the original processor implements. Vectoring is the other
mode of the same algorithm; it is offered here as a parameter, not as a pin.

## Parameters

| module              | parameter | default            | meaning |
|---------------------|-----------|--------------------|---------|
| `cordic_processor`  | `WIDTH`   | 16                 | word length of all data ports (32 is the other published size; 16 and 32 are tested) |
|                     | `STAGES`  | `WIDTH`            | number of elementary rotations, i = 0 .. STAGES-1 |
|                     | `MODE`    | `CORDIC_ROTATION`  | `CORDIC_ROTATION` or `CORDIC_VECTORING` |
| `cordic_stage`      | `STAGE`   | 0                  | index *i* of the stage |
| `cordic_atan_rom`   | `DEPTH`   | `WIDTH`            | number of table entries; addresses beyond read 0 |
| `cordic_barrel_shifter` | `SHIFT_W` | clog2(WIDTH)   | width of the shift amount |

`1/An` depends on `STAGES`, but once there are more than about WIDTH/2
stages it no longer changes at the word's resolution. The values in the
number-format table hold for `STAGES = WIDTH`.

## Where this RTL departs from or adds to the original design

- **Stage count at 32 bits.** One stage per word bit is the default
  (16 stages at 16 bits, 32 at 32 bits). The published 16-bit results come
  out exactly with 16 stages. The published 32-bit results come out exactly
  only with `STAGES = 30`. With 32 stages, X and Y are identical and the
  residual angle is Z = 0 instead of -1.
- **Number format and rounding.** The fixed-point format and the
  round-to-nearest angle table were inferred from the published example
  values. Truncating the table instead gives Y = 8191, Z = 1 at 16 bits,
  which does not match.
- **No registers.** The original design is described as strictly
  combinational, and this RTL follows that description. Its FPGA report,
  however, lists one slice register. What that register held is not
  described, so nothing corresponds to it here.
- **No iteration counter.** The original component list names one, but in an
  unrolled chain there are no iterations to count.
- **Overflow** wraps in two's complement. No saturation or flag is provided.
- **Vectoring mode** is an addition, as a compile-time option; see above.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | number format, mode enum, elaboration-time atan(2^-i) |
| `rtl/cordic_addsub.sv` | adder/subtractor |
| `rtl/cordic_barrel_shifter.sv` | multiplexer arithmetic right shifter |
| `rtl/cordic_atan_rom.sv` | arctangent table |
| `rtl/cordic_stage.sv` | one elementary rotation |
| `rtl/cordic_processor.sv` | the unrolled processor (top) |
| `tb/tb_cordic_ref_pkg.sv` | independent bit-exact software model used by the testbenches |
| `tb/tb_cordic_*.sv` | self-checking testbenches, one per module, plus the two below |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and exits. For example,
to build and run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cordic_pkg.sv tb/tb_cordic_ref_pkg.sv tb/tb_cordic_processor.sv \
    -y rtl --top-module tb_cordic_processor -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. What they check:

- `tb_cordic_processor`: the default 16-bit build, with no parameter
  overrides. It runs the 30° example, a 3000-angle cos/sin sweep over
  ±1.74 rad and 3000 general rotations. Every result must match the
  bit-exact model and be within 16 LSB of the ideal value. It also
  requires that every stage turned both ways, that a z = 0 tie occurred and
  that negative angles were applied.
- `tb_cordic_published`: the 16-bit and 32-bit published examples,
  including the first eight stage outputs. It also runs 32-bit random angles
  with 30 and 32 stages.
- `tb_cordic_vectoring`: the vectoring build at 16 and 32 bits. It checks
  magnitude and angle against `$sqrt` and `$atan2`.
- `tb_cordic_stage`, `tb_cordic_addsub`, `tb_cordic_barrel_shifter`,
  `tb_cordic_atan_rom`: each unit against the model, exhaustively where
  that is cheap (all shift amounts, all table entries).

The reference model gets its angle table from `$atan`, not from the RTL's
series, and writes the shift as floor division, not as `>>>`, so that it
does not share code with the design.
