# Adaptive spectral-sharpening hearing aid with Booth-Wallace multipliers

People with hearing loss often lose more than sensitivity. They also lose
*frequency discrimination*: neighbouring formants (the resonances of the vocal
tract that tell vowels apart) blur into one another. A plain equaliser cannot
undo that. This design instead applies **adaptive spectral sharpening** to one
microphone signal sampled at 8 kS/s. It tracks the speech spectrum sample by
sample and makes its peaks sharper:

```
            1 - A(z/beta)
   H(z) = -----------------        0 < beta < gamma < 1
            1 - A(z/gamma)
```

Here A(z) is the order-M linear predictor of the speech. Scaling z by beta or
gamma pulls the predictor's roots toward the origin:

- the numerator, with a small beta, removes the formants almost completely;
- the denominator, with a larger gamma, puts them back more strongly.

The net effect is that formants stand out against the valleys between them.

The predictor is never formed as a polynomial. An **adaptive gradient lattice
decorrelator** estimates reflection coefficients k_1..k_M every sample. Two
fixed-parameter lattices copy those coefficients:

- an FIR **analysis** lattice (beta);
- an all-pole **synthesis** lattice (gamma).

Each multiplier in the datapath is a combinational **Booth-recoded Wallace-tree
multiplier** with a carry-lookahead final adder.

The RTL is SystemVerilog-2017. Defaults: M = 8 stages, beta = 0.04,
gamma = 0.6, forgetting factor eta = 0.98. The datapath is 8-bit fixed point.

## The two arrangements

The top level, `hearing_aid_top`, holds both arrangements. The `mode` input
picks one for each sample:

| | speech enhancement (`MODE_SPEECH_ENH`) | noise reduction (`MODE_NOISE_RED`) |
|---|---|---|
| decorrelator input | x through a 6-tap FIR high-pass | x directly |
| analysis/synthesis input | x directly | x through the IIR high-pass b(1-z^-1)/(1-az^-1) |
| output stage | loudness control | none |
| clocks per sample | 37 | 36 |

**Speech enhancement.** The high-pass filter in front of the decorrelator
offsets the natural spectral tilt of speech, which loses about 10 dB per
octave above 1 kHz. Without it, the coefficients would favour the strong low
formants and the sharpening would make the tilt worse.

**Noise reduction.** The decorrelator sees the raw input. Background noise
with a flat spectrum then gets almost no gain, while speech with strong
resonances gets a lot. There is no loudness control, because that gain
difference is the point of this mode. The high-pass filter moves to the signal
path, so the sound does not become dull.

Both high-pass filters run on every sample whatever the mode. After a mode
switch their state is already settled.

## Lattice equations

All signals are Q0.7 (8-bit two's complement, range -1 to 127/128). Each
product is shifted back with floor rounding (`>>> 7`). Every stage output
saturates to 8 bits.

**Decorrelator stage i** (`gal_stage`, which contains a `lattice_stage`):

```
f_i(n) = f_{i-1}(n) - k_i b_{i-1}(n-1)
b_i(n) = b_{i-1}(n-1) - k_i f_{i-1}(n)
```

Each stage also updates its coefficient:

```
num       = f_i(n) b_{i-1}(n-1) + b_i(n) f_{i-1}(n)
sigma2(n) = eta sigma2(n-1) + f_{i-1}(n)^2 + b_{i-1}(n-1)^2
k_i      += num / sigma2(n)
```

How the update is sized:

- **Why a true divide.** Dividing by the running power sigma2 makes the step
  independent of input level. That is what lets the coefficients converge
  quickly on both quiet and loud speech. A fixed small step size mu cannot do
  this.
- **Widths.** sigma2 is a 24-bit Q0.14 accumulator that saturates at 2^23-1.
  eta is 251/256, applied by a 24 x 10 Booth-Wallace multiplier.
- **Division.** The quotient comes from a 32-cycle restoring divider
  (`seq_divider`). It is saturated to +-(2^17-1) in Q0.15.
- **Coefficient register.** k_i is a 16-bit Q0.15 register, clamped to
  +-127/128 so that the synthesis lattice stays stable. Its top 8 bits drive
  the filter multipliers.
- **Silence.** A zero sigma2 (digital silence) gives a zero step.

**Analysis stage** (`lattice_stage` with scaling, chained in
`analysis_filter`). It uses the same equations as the decorrelator stage. The
difference is that the delayed lower-path value is multiplied by beta first:
b' = beta * b_{i-1}(n-1).

**Synthesis stage** (`synthesis_stage`, chained in `synthesis_filter`). This
is the all-pole lattice. It runs from stage M down to stage 1:

```
g'(n)      = gamma g_{m-1}(n-1)
f_{m-1}(n) = f_m(n) + k_m g'(n)
g_m(n)     = g'(n)  - k_m f_{m-1}(n)
g_0(n)     = f_0(n) = output
```

The analysis and synthesis lattices for sample n use the coefficients left by
the update for sample n-1. The update then runs while the next sample is
awaited.

## Booth-Wallace multiplier

`booth_wallace_mult` (parameters `A_W`, `B_W`, with `B_W` even) works in four
steps.

1. **Booth recoding.** `booth_encoder` recodes each 3-bit overlapping group of
   the multiplier into a digit in {0, +-1, +-2}. A negative digit yields the
   one's complement of the row and a `neg` bit.
2. **Correction row.** The `neg` bits are gathered into one extra row. For
   8 x 8 that makes 4 + 1 = 5 rows.
3. **Wallace tree.** A tree of 3:2 `carry_save_adder`s reduces whole rows,
   three at a time. For 8 x 8 this goes 5 -> 4 -> 3 -> 2.
4. **Final add.** A `cla_adder` adds the last two rows. It has 4-bit lookahead
   groups and expanded carry equations inside each group.

All arithmetic is modulo 2^(A_W+B_W), so the result is the exact signed
product. The design uses 8 x 8, 9 x 8 and 24 x 10 instances. 16 x 16 is also
tested.

## Timing and handshake

The input is `adc_valid` with `adc_code[13:0]`, a 14-bit offset-binary sample
from the converter. The input side works as follows:

- A sample may be offered only while `ready` is high. The assertion
  `a_no_overrun` checks this rule.
- `adc_interface` keeps the top 8 bits and inverts the MSB, which gives Q0.7.
- The output appears on `dac_valid` with `dac_code[11:0]`. That is the 8-bit
  result with its MSB inverted and four zero LSBs, in offset binary. It comes
  **5 clocks** after `adc_valid` in both modes.

`ready` is low while two things are running:

- the coefficient update, which takes 34 clocks: 1 to start, then the 32-cycle
  divide plus handshakes;
- in speech-enhancement mode, the 24-bit gain division of the loudness
  control.

The shortest sample period is therefore 37 clocks in speech enhancement and
36 in noise reduction. 8 kS/s needs a clock of at least 296 kHz. The longest
combinational path runs through the 8-stage synthesis chain (three multipliers
per stage), and it sets the upper limit on the clock.

`mode` is sampled together with `adc_valid`. `k_coef` shows the current
coefficient set.

## Departures and choices

**Things the source design leaves open, and what this RTL chooses:**

- **Loudness control.** The thesis names this block but does not describe it.
  `loudness_control` is an invented version:
  - two envelope followers, `env += (|s|*256 - env) >> 6`, one on the
    microphone and one on the sharpened signal;
  - gain = env_in / env_out in unsigned Q2.6, with a maximum of 3.98;
  - the gain comes from a 24-bit `seq_divider` after each sample and applies
    to the next one;
  - the gain starts at 1.0 and is held while the output envelope is zero.

  So in speech-enhancement mode the output level stays close to the input
  level. The sharpening survives, but the overall gain of about 2 that the
  thesis reports for this arrangement does not show. Noise-reduction mode has
  no loudness control, and there the level does rise (see below).
- **FIR high-pass coefficients.** The thesis gives only the order (5, so six
  taps), the 700 Hz cutoff and 8 kHz sampling. The RTL uses an antisymmetric
  least-squares design in Q0.7, {2, 18, 78, -78, -18, -2}.
- **Conflicting high-pass descriptions.** The thesis elsewhere describes this
  filter as 1 - alpha z^-1 with alpha = 1. The six-tap FIR was kept.
- **IIR high-pass values.** a = 115/128 and b = 122/128, which gives unity gain
  at 4 kHz. These are chosen here.
- **Quantised parameters.** beta = 5/128, gamma = 77/128 and eta = 251/256 are
  the nearest values to 0.04, 0.6 and 0.98.
- **Other design choices.** All fixed-point formats, saturation, coefficient
  clamping, the divide-based update schedule and the ready/valid handshake are
  choices of this design. Reset is synchronous and active low.

**Other departures from the thesis:**

- **Stage count.** The thesis's hardware version was single-stage, using about
  196 flip-flops on a Virtex-II Pro, and its floating-point model used 8
  stages. This RTL defaults to 8 stages, which gives 1562 flip-flop bits. Set
  `STAGES = 1` for the single-stage version.
- **Carry-save lattice chain not built.** A lattice can keep each stage's sum
  in carry-save form and pass the extra vector down the chain, doing one
  carry-propagating add after the last stage. That would shorten the long
  combinational path through many stages. Here each stage saturates its
  output to 8 bits, which needs the resolved sum, so every stage completes
  its own addition.
- **Baseline multipliers not built.** The shift/add and sequential Booth
  multipliers that the thesis compares against are not included.
- **Converters not modelled.** The analog converters are outside the RTL. Only
  their digital codes are ports.

## Results at the thesis's settings

The testbench `tb_ha_workloads` runs the configurations the thesis evaluates,
on synthetic speech. Every output sample matches the bit-exact reference
model. The RMS output/input ratios were:

| configuration | RMS out/in |
|---|---|
| 1 stage, 250 samples, enhancement, beta 0.04, gamma 0.6 | 0.92 |
| 1 stage, enhancement, beta 0.04, gamma 0.6 | 0.99 |
| 1 stage, enhancement, beta 0.4, gamma 0.6 | 0.99 |
| 8 stages, enhancement, beta 0.4, gamma 0.6 | 0.98 |
| 8 stages, noise reduction, beta 0.03, gamma 0.7 | 2.81 |
| 8 stages, noise reduction, beta 0.3, gamma 0.7 | 2.18 |

In noise-reduction mode the gain rises as beta falls, which is the trend the
thesis reports. The enhancement rows sit near 1 because of the loudness
control described above.

## Files

Each file under `rtl/` holds one module or package:

- `ha_pkg`: shared types and helpers.
- Arithmetic: `cla_adder`, `carry_save_adder`, `booth_encoder`,
  `booth_wallace_mult`, `seq_divider`.
- Filters: `fir_highpass`, `iir_highpass`, `lattice_stage`, `analysis_filter`,
  `synthesis_stage`, `synthesis_filter`, `gal_stage`, `adaptive_decorrelator`,
  `loudness_control`.
- Converter codes: `adc_interface`, `dac_interface`.
- Top level: `hearing_aid_top`.

Testbenches are under `tb/`:

- Every module has a self-checking testbench, `tb_<module>`. Each one prints
  `TB_RESULT checks=N failures=M`.
- `ha_ref_pkg` is a bit-exact reference model of every block.
- `tb_hearing_aid_top` runs 40 000 samples (5 s) at the default size. It
  switches modes every 3000 samples and checks every output code, the latency
  and the sample period. It also counts stalls, coefficient clamps,
  silent-update divides, saturation and gain above and below 1.
- `tb_ha_workloads` uses the `ha_workload_run` helper.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ha_pkg.sv tb/ha_ref_pkg.sv tb/tb_hearing_aid_top.sv \
  --top-module tb_hearing_aid_top
./obj_dir/Vtb_hearing_aid_top
```

For another testbench, substitute its name. The packages must come first on
the command line. The full-size run
(40 000 samples) takes about 8 s of simulation. It ends with an event summary
and an overall RMS out/in of about 1.9 over the mixed-mode run.
