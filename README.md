# Digital phase alignment for a Cartesian-feedback transmitter

A power amplifier (PA) driven hard enough to be efficient distorts its signal
and spills power into the neighbouring channels. Cartesian feedback fixes
this with a loop. The PA output is coupled off, attenuated and demodulated
back to baseband I/Q. That feedback is subtracted from the wanted I/Q, and the
difference drives the up-converter. Wherever the PA falls short, the
difference grows and pushes the PA input the other way. The loop is only
stable if the demodulated feedback arrives **in phase** with the wanted signal.
The PA, the mixers and the filters all shift the phase, and the shift drifts
with power, temperature and ageing. If it reaches ±90°, the negative feedback
turns positive.

This repository holds the digital half of a mixed analog/digital
Cartesian-feedback transmitter for W-CDMA (3.84 Mchip/s, 1.95 GHz, 65 nm
CMOS). The feedback is digitised by two 12-bit ADCs, and the error goes back
to the analog chain through two 12-bit DACs, all running at 240 MS/s. Between
the converters, logic does the two jobs that analog circuits did in earlier
loops: it **aligns the phase of the feedback with the direct path**, sample by
sample, and it **subtracts** the aligned feedback from the direct path. The
phase is measured and corrected with CORDIC arithmetic: shift-and-add
rotations with no multipliers and no tables.

```
 direct I/Q ──┬──► cordic_vector ──θd──┐
              │                        ├──► phase_diff_norm ──θ──┐
 feedback I/Q ┼─┬► cordic_vector ──θfb─┘                          │
  (from ADCs) │ │                                                 ▼
              │ └──► delay_line (8) ─────────────────────► cordic_rotate
              │                                                   │  aligned feedback
              └────► delay_line (16) ────────► iq_subtract ◄──────┘
                                                   │
                                          error I/Q (to DACs)
```

`cfb_digital` is the top module. It takes one direct sample and one feedback
sample per clock, and 17 clocks later it returns the error sample for the DACs.

## The phase-alignment idea

Write the direct sample as `x = |x|·e^{jθd}` and the feedback as
`f = |f|·e^{jθfb}`. The unit computes

```
θ   = θd − θfb            (brought into (−π, π])
f'  = f · e^{jθ}          (feedback turned onto the direct sample's phase)
err = x − f'
```

After the rotation, `f'` points the same way as `x`, so `err` lies along `x`
and its size is `|x| − |f|`. Any constant or slowly varying loop phase shift
(the `e^{jδ}` of the classic stability analysis) is removed before the
subtraction, whatever its size. The price is that the correction works on
the magnitude. Phase distortion of the PA (AM/PM) is aligned away along with
the loop phase, not fed back.

## Measuring a phase: `cordic_vector`

A vectoring CORDIC turns the vector towards the positive x axis in steps of
`atan(2^-i)`, i = 0 … ITER−1, and adds up the steps it took:

```
d  = (y < 0) ? +1 : −1
x' = x − d·2^-i·y
y' = y + d·2^-i·x
z' = z − d·atan(2^-i)
```

When `y` reaches zero, `z` holds `atan2(y, x)`. Each step is an add and a
wired shift. The constants `atan(2^-i)` live in `cfb_pkg`.

Three details make this work over the full circle and at 12-bit precision:

* **Half-plane fold.** The steps add up to only about ±1.74 rad (±99.9°), so a
  vector in the left half-plane cannot be reached. A first stage negates such
  a vector (a rotation by π) and starts `z` at +π if `y ≥ 0`, or at −π if
  `y < 0`. The result then covers (−π, π], give or take a few LSBs of
  CORDIC residual.
* **Magnitude growth is ignored.** Each pseudo-rotation lengthens the vector
  by `sqrt(1 + 2^-2i)`, about 1.647 in total. Only the angle is used here, so
  no correction is needed. The datapath carries 2 extra integer bits for the
  growth (and the fold of −2048) and 4 guard fraction bits against
  truncation.
* **Accuracy.** With 12 iterations the residual angle is below
  `atan(2^-11)` ≈ 0.5 mrad. Truncation adds about 12/(16·|v|) rad, so short
  vectors (a few LSBs long) get rough angles. This hardly matters, because a
  short vector contributes little to the error signal. The tests hold the
  angle to 1.5 mrad + 0.75/|v| rad: 2.3 mrad (0.13°) at |v| = 1000 LSB and
  13 mrad (0.75°) at |v| = 64 LSB. The target accuracy was about 1°.

## Normalising the phase error: `phase_diff_norm`

`θd − θfb` can lie anywhere in (−2π, 2π]. One comparison each way brings it
back into (−π, π]: subtract 2π above π, add 2π at or below −π. The inputs are
radians, not a binary angle that would wrap by itself, so this test is
needed. An assertion checks the output range.

## Turning the feedback: `cordic_rotate`

A CORDIC in rotation mode turns `f` by `θ`. It starts with `z = θ` and
steers `d = sign(z)` until `z` reaches zero. Because of the same convergence
range, a first stage folds angles beyond ±π/2: it negates the vector and
moves `θ` by ∓π.

Here the magnitude growth does matter, since `f'` is subtracted from `x`. The
last stage multiplies by `K = Π cos(atan(2^-i))` ≈ 0.60725 (an unsigned Q16
constant from `cfb_pkg`, chosen to match ITER). It then rounds, drops the
guard bits and **saturates** to 12 bits. Saturation is needed because a
full-scale corner vector such as (2047, 2047) is 2895 LSB long, and turning
it onto an axis would overflow 12 bits.

## The subtractor: `iq_subtract`

`err = x − f'`, computed as `x + ~f' + 1` at 13 bits and saturated to 12 bits
so that a DAC code never wraps.

## Pipelining, latency and the 183 ns budget

The CORDICs are unrolled: one hardware stage per iteration. The `REG_EVERY`
parameter places a register after every `REG_EVERY`-th iteration and always
after the last one. With `REG_EVERY = 1` the core is fully pipelined. The
default of 2 puts two iterations between registers. This is a partly
pipelined core, a middle ground between the fully pipelined and the
combinational versions, which is the trade-off the source design selected.
Its exact register split is not known, and this one is a choice.

| stage               | cycles (defaults) | formula                        |
|---------------------|-------------------|--------------------------------|
| `cordic_vector`     | 7                 | 1 + ⌈ITER / REG_EVERY⌉         |
| `phase_diff_norm`   | 1                 |                                |
| `cordic_rotate`     | 8                 | 1 + ⌈ITER / REG_EVERY⌉ + 1     |
| `iq_subtract`       | 1                 |                                |
| **`cfb_digital`**   | **17**            | `LATENCY` localparam           |

The budget comes from the loop. One W-CDMA chip lasts 260 ns. The analog
filters take about 77 ns of that, which leaves 183 ns for the digital part,
or 43 cycles at 240 MHz. At the defaults the unit uses 17 cycles (71 ns). The
two `delay_line`s hold the raw samples back so that each one meets its own
angles: 8 cycles for the feedback and 16 for the direct path. The latency is
fixed and does not depend on the data. `in_valid` travels with each sample,
and gaps in the stream are allowed. A concurrent assertion in `cfb_digital`
checks that each input produces an output exactly `LATENCY` cycles later.

Whether the logic closes timing at 240 MHz depends on the cell library. The
source design reports about 233 MHz for its partly pipelined core in 65 nm.
`REG_EVERY = 1` shortens the critical path to one add per stage.

## Number formats and parameters

| parameter    | default | meaning                                                        |
|--------------|---------|----------------------------------------------------------------|
| `DATA_W`     | 12      | I/Q sample width, two's complement (matches the 12-bit DAC/ADC) |
| `ITER`       | 12      | CORDIC iterations                                              |
| `GUARD`      | 4       | extra fraction bits inside the CORDIC datapath                 |
| `ANGLE_FRAC` | 12      | fraction bits of angles; angles are `ANGLE_FRAC + 4` bits wide  |
| `REG_EVERY`  | 2       | CORDIC iterations per pipeline register                        |

Angles are signed radians: with the defaults, 16 bits with an LSB of
1/4096 rad (0.014°), and π = 12868. `ANGLE_FRAC` may go up to 20 (the
precision of the constant table). `ITER` beyond 20 adds stages whose angle
constant rounds to zero. All modules use a synchronous, active-low reset
that clears every register.

## Ports of `cfb_digital`

| port        | dir | width  | meaning                                               |
|-------------|-----|--------|-------------------------------------------------------|
| `clk`       | in  | 1      | sample clock (240 MHz in the target system)           |
| `rst_n`     | in  | 1      | synchronous reset, active low                         |
| `in_valid`  | in  | 1      | a sample pair is present                              |
| `i_in/q_in` | in  | 12     | direct-path (wanted) I/Q                              |
| `i_fb/q_fb` | in  | 12     | feedback I/Q from the ADCs                            |
| `out_valid` | out | 1      | error sample present, `LATENCY` cycles after input    |
| `i_err/q_err` | out | 12   | error I/Q for the DACs                                |
| `phase_err` | out | 16     | measured loop phase θ, 8 cycles after input (observation) |

## What is outside this RTL

The analog part of the transmitter has no logic to write. It comprises the
12-bit current-steering DACs, the pipelined ADCs (a 1.5-bit stage, four
2.5-bit stages and a 3-bit flash), the three-stage baseband filters, the
Gilbert-cell up-converter, the two-stage PA, the variable π attenuator and
the passive ring down-converter. The unit's ports stand where the converters
connect. A second digital option was evaluated and rejected before this one
was chosen: a look-up-table version with sine/cosine/arctangent ROMs and a
restoring divider. It is not included.

## Choices made here, and where to be careful

* **What is rotated.** The feedback is turned onto the direct path, as a
  receiver locks to its transmitter. Rotating the direct path instead would
  give an error in the feedback's frame.
* **Gain correction.** The output is multiplied by `K` ≈ 0.607, the product
  of the cosines that the pseudo-rotations leave out. Multiplying by its
  inverse, as one reading of the CORDIC description suggests, would make the
  feedback 2.7 times too large.
* **Half-plane fold, quarter fold, saturation, guard bits, the register
  split, the valid strobe, the delay lines and the reset** are this design's
  own. The source design gives the algorithm and the block order, not these
  details.
* The iteration count (12) and the angle format are this design's own. They
  were chosen for 12-bit samples and a phase accuracy well below 1°.
* Per-sample alignment removes every phase difference, including PA AM/PM, as
  noted above. That is what the algorithm prescribes. A loop that must also
  correct AM/PM would need a filtered (slow) phase estimate, which is not
  implemented.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_cfb_digital rtl/cfb_pkg.sv tb/tb_cfb_digital.sv
./obj_dir/Vtb_cfb_digital
```

Replace `tb_cfb_digital` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/cfb_pkg.sv rtl/<module>.sv`.
The only lint warnings are unused last-stage outputs of the CORDIC cores
(the vectoring core does not use its final x/y; the rotation core does not use
its final angle residual). Those bits are dropped on purpose.

| testbench            | what it establishes                                                                                   |
|----------------------|--------------------------------------------------------------------------------------------------------|
| `tb_cordic_vector`   | angle vs. `atan2` for axis, corner and 3000 random vectors; 7-cycle latency; left-half-plane fold used |
| `tb_phase_diff_norm` | exact wrap into (−π, π], including the ±π edges; both wrap directions used                           |
| `tb_cordic_rotate`   | rotation vs. exact trigonometry within 3 LSB; 8-cycle latency; quarter fold and saturation used        |
| `tb_iq_subtract`     | exact saturating difference; 1-cycle latency; both saturation directions used                         |
| `tb_cfb_digital`     | whole unit vs. a real-arithmetic reference within 6 LSB, over six loop gain/phase settings in all four quadrants; fixed 17-cycle latency within the 43-cycle budget; half-plane fold, 2π wrap, quarter fold, rotator saturation and stream gaps each observed |
| `tb_cfb_digital_regsplit` | three copies with `REG_EVERY` = 1, 2 and 12 give bit-identical outputs at latencies 29, 17 and 7; the default copy also matches the reference |
| `tb_cfb_wcdma`       | 64000 samples of a 3.84 Mchip/s QPSK stream at 240 MS/s, with a delayed, compressed and phase-shifted feedback; worst deviation from the reference about 2 LSB |

All testbenches except `tb_cfb_digital_regsplit` run the modules at their default parameters. Every
testbench was also run against a copy of its module with one deliberate
fault. Examples are a wrong fold angle, a missing wrap and a delay line one
cycle short. Each such run fails.
