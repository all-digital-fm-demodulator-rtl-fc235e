# All-digital FM demodulator

This is synthesizable SystemVerilog for an FM broadcast receiver back end that works on RF samples taken directly from the antenna. A 2.56 GS/s ADC digitizes the whole 88–108 MHz band. Everything after the ADC is digital: band filtering, decimation, tuning to one channel (98.7 MHz by default), phase detection and frequency detection. A single pulse-width-modulated pin stands in for the audio DAC. Filtering, oscillator and phase detector use only adders, shifts and tables. The only multipliers are the two in the quadrature mixer.

The structure follows the design of the M.S. thesis *All Digital FM Demodulator* (Virginia Tech, 2019): block order, decimation factors, oscillator table and increment, CORDIC angle table and PWM scheme. Where that description is silent or contradicts itself, choices were made here. They are listed under [Departures and choices](#departures-and-choices).

## Signal chain

```
din <16,14> ──► stage I CIC ──►──┬──► × cos ──► stage II CIC ──► I ─┐
 2.56 GS/s      R=8, M=1         │                R=16, M=10         ├─► CORDIC ──► phase ──► Δ ──► freq ──► 4-bit ──► PWM ──► pwm_out
                320 MS/s         └──► × sin ──► stage II CIC ──► Q ─┘   arctan     <20,8>         <16,8>    word       16 ticks
                                        ▲          20 MS/s                                                      per period
                                 DDS 98.67 MHz
                                 (12-bit accumulator, quarter-wave table)
```

| Point in the chain | Rate (full-rate input) | Width / format | Module |
|---|---|---|---|
| ADC sample `din` | 2.56 GS/s | 16 bit, signed <16,14> | – |
| Stage I CIC output | 320 MS/s | 19 bit | `cic_decimator` (R=8, M=1) |
| Oscillator sine / cosine | 320 MS/s | 16 bit, <16,14> | `sincos_gen` |
| Mixer outputs I, Q | 320 MS/s | 19 bit | `iq_mixer` |
| Baseband I, Q (`i_bb`, `q_bb`) | 20 MS/s | 27 bit | `cic_decimator` ×2 (R=16, M=10) |
| Phase | 20 MS/s | <20,8> degrees, ±180 | `cordic_arctan` |
| Frequency word `freq` | 20 MS/s | <16,8> degrees per sample | `phase_freq_conv` |
| PWM word / pin | 320 MHz tick, 20 MHz period | 4 bit / 1 bit | `pwm_gen` |

`<W,L>` denotes a signed two's-complement word of W bits with L fractional bits.

**One clock, valid strobes.** The design runs on a single clock `clk` and accepts at most one sample per cycle on `din`/`din_valid`. The lower rates are valid strobes: the stage I output strobe steps the oscillator, clocks the mixer and the stage II CICs, and serves as the PWM reference tick. Every 128th input gives a baseband pair. If the input arrives every clock, those strobes are exactly the 320 MHz and 20 MHz rates of the table. Because everything is enabled by strobes, the chain works at any lower input rate too. Frequencies then scale with the input rate.

## Number formats and scaling

- **Angles** are in degrees, not radians or binary angle units, with 8 fractional bits: 1° = 256 LSB. The CORDIC's angle table is kept in this form.
- **Frequency word.** One LSB is 1/256 degree of phase advance per 20 MHz output sample. This is 20e6/(360·256) ≈ 217 Hz. Broadcast FM deviates by at most ±75 kHz, which is ±1.35 °/sample or ±345 LSB. The 16-bit word spans ±128 °/sample (±7.1 MHz) before it clips.
- **Sign.** Q is the product with the sine, so a carrier *above* the oscillator frequency gives a *negative* frequency word. Audio polarity is irrelevant for the listener, but keep this in mind when checking numbers.
- **Gains.** Stage I has a DC gain of 8 (R·M). Stage II has a DC gain of 160. The mixer halves the wanted component (cos·cos = ½ + image). A half-scale carrier (8192 LSB) at 98.7 MHz gives baseband vectors of a few million LSB. The CORDIC is exact to its ±0.45° limit at that size.

## The local oscillator and tuning

`sincos_gen` is a direct digital synthesizer. A 12-bit phase accumulator adds the increment M at every stage I strobe. Its top two bits pick the quadrant. Its lower ten bits address a quarter-wave sine table of 1024 <16,14> entries. Entry *k* holds round(2¹⁴·sin(π/2 · k/1023)), so entry 0 is 0 and entry 1023 is exactly +1.0. The table is computed at elaboration with `$sin`; there is no data file. The other three quadrants come from mirroring the address (1023−a) in quadrants 2 and 4 and negating in quadrants 3 and 4. The cosine is the same lookup with the quadrant advanced by one.

Output frequency is f = M · f_strobe / 4096. The top's default `TUNE_M = 1263` with a 320 MHz strobe gives **98.671875 MHz**, which is 28.1 kHz below the 98.7 MHz channel. The demodulator therefore sees the carrier as a constant offset of about −130 LSB in the frequency word (−0.51 °/sample). That is a DC term in the audio that the PWM stage shows as a duty of about 5.7/16 instead of 8/16. To tune to another channel, set `TUNE_M = round(f_channel · 4096 / 320 MHz)`. The residual error is at most 39 kHz (half a step of 78.1 kHz). Finer tuning would need a wider accumulator. `sincos_gen` supports that through `ACC_W`: the table stays at 1024 entries, addressed by the accumulator's top 12 bits.

## Channel selection with CIC filters

Both decimators are the same single-stage CIC (`cic_decimator`). An integrator runs at the input rate. Every R-th input the integrator value is taken, and the comb subtracts the value taken M decimated samples earlier. The output is the sum of the last R·M inputs, read once per R inputs. The output has IN_W + ⌈log₂(R·M)⌉ bits, so wrap-around in the integrator cancels exactly, and nothing is truncated.

- **Stage I** (R=8, M=1) is an 8-sample box-car. It has nulls at multiples of 320 MHz. At 98.7 MHz its gain is 6.8 of the DC gain of 8. Its purpose is to bring the rate down to one that the oscillator and mixer can run at.
- **Stage II** (R=16, M=10) is a 160-sample box-car at 320 MS/s, i.e. a 0.5 µs average. Its nulls fall at multiples of 2 MHz, so it is the channel-select filter. The mixer's image at 2·98.7 MHz folds to 122.6 MHz, where stage II attenuates it by about 45 dB. Stations within ±1 MHz of the channel, including the neighbours 200 kHz away, fall inside the main lobe and pass almost unattenuated. Farther ones meet only the sinc side lobes (about −13 dB at the first). A single-stage CIC is a weak channel filter; a stronger one would need more stages (N > 1) or a compensating FIR.

## The CORDIC arctangent

`cordic_arctan` finds the phase of the baseband vector (I, Q) with shifts and adds, one micro-rotation per clock, controlled by a two-state machine (idle, rotate).

1. **Pre-rotation.** The iterations below converge only for vectors within ±99.4° of the x axis (the sum of the eight table angles). A vector with I < 0 is first turned by a right angle, which is free: swap and negate. If Q ≥ 0 the vector becomes (Q, −I) and the angle register starts at +90°. Otherwise it becomes (−Q, I) and the register starts at −90°. The result covers the full ±180°. For I > 0 it is the plain arctan(Q/I) in ±90°.
2. **Eight iterations,** i = 0 … 7. The direction is d = +1 if y < 0, else −1. Then:
   - x ← x − d·(y >>> i)
   - y ← y + d·(x >>> i)
   - z ← z − d·atan(2⁻ⁱ)

   Each step turns the vector toward the x axis by ±atan(2⁻ⁱ) and books the turn in z. The angles 45°, 26.565°, 14.036°, 7.125°, 3.576°, 1.790°, 0.895° and 0.448° are stored as <20,8> constants in `fm_demod_pkg`.
3. After the last step z holds the phase. The remaining error is bounded by the last step, about ±0.45° (115 LSB). Very short vectors (a few hundred LSB) lose more accuracy to the truncating shifts.

x and y are IN_W + 2 bits wide. The two extra bits hold the CORDIC gain of 1.647 and the pre-rotation. `start` is taken when `busy` is low. `out_valid` pulses 8 clocks after the edge that took `start`. An assertion flags a `start` while busy. In the top the CORDIC has 128 clocks per sample and is idle most of the time.

**What the angle error means for the audio.** The frequency is a first difference of phases. Each phase carries up to ±0.45° of error, so a single frequency word can be off by up to ±0.9° (±230 LSB). That is comparable to the full ±345 LSB deviation. The error is a deterministic function of the angle: with the carrier rotating slowly, it behaves like high-frequency noise. Any average of consecutive words telescopes to a difference of two phases, so an average of 32 words is within about ±7 LSB (±1.5 kHz). The PWM pin and the external low-pass filter after it do that averaging. Each added iteration would halve the error; `ITER` is a parameter, but `atan_rom` in the package holds only the eight angles used here and would need extending first.

## From phase to the PWM pin

`phase_freq_conv` subtracts the previous phase from the current one. The phase is cut at ±180°, so a step across the cut looks like a jump of about 360°. The difference is folded back into (−180°, +180°] (`phase_wrapped`). It is then clipped to 16 bits (`freq_clipped`; only possible more than 7.1 MHz off channel). The first phase after reset only primes the register.

The top turns the 16-bit word into the PWM's 4-bit word:

1. Shift right by `PWM_LSB` (default 6). One PWM step is then 0.25 °/sample, about 13.9 kHz.
2. Clip to −8 … +7 (`pwm_clip`).
3. Invert the sign bit (offset binary), so zero frequency gives 8/16 duty.

With the default, ±75 kHz plus the 28 kHz tuning offset stays inside the window.

`pwm_gen` counts 16 reference ticks per period and drives the pin high while the counter is below the word. A word w gives a duty of w/16, from 0 up to 15/16. The word is loaded when the counter wraps, so a period is never cut short by a new word. In the top the tick is the 320 MHz stage I strobe, which makes one PWM period exactly one 20 MHz frequency word. An external RC low-pass (not part of the RTL) turns the pin into audio.

## Departures and choices

Taken from the original description: the block order, stage I R=8/M=1/N=1, stage II R=16/M=10/N=1, the 12-bit accumulator with 10-bit table address and 1024-entry quarter table, M = 1263, <16,14> input and oscillator words, the vectoring CORDIC with pre-rotation, 8 iterations and a <20,8> degree angle ROM, the first-difference frequency detector with a 16-bit output, and the 4-bit, 16-tick counter/comparator PWM.

Choices and departures made here:

- **PWM input bits.** The description feeds the PWM the 4 most significant bits of the frequency word. In any consistent scaling those bits do not move for a ±75 kHz deviation. This design takes a 4-bit window at `PWM_LSB` with clipping and offset binary instead.
- **PWM duty.** The description's duty table (15 → 100 %, 7 → 75 %, 3 → 50 %, 1 → 25 %) and its waveform example (3 → 20 %, 7 → 46 %) disagree with each other. Both also disagree with its own rule "high while the counter is below the word". The rule is implemented, which gives duty = w/16.
- **Oscillator clock.** The description gives both 325 MHz and 320 MHz for the oscillator clock. M = 1263 only matches 98.7 MHz at 320 MHz. One example there (M = 311 for 98.7 MHz) fits a 10-bit accumulator instead. The 12-bit accumulator at the 320 MHz strobe is used.
- **Phase width.** The phase reaches the frequency detector at its full 20 bits, not 16. Sixteen bits of <.,8> degrees cannot hold ±180°.
- **Not specified in the description, chosen here:**
  - the single clock with valid strobes;
  - the full-precision widths between blocks (19 and 27 bits);
  - the mixer's rounding and clipping;
  - the wrap correction and clipping in the frequency detector;
  - the CORDIC handshake;
  - the synchronous active-low reset of every register.
- **Outside the RTL:** the antenna amplifier, the ADC, the JESD204B serial link that would deliver the samples (`din`/`din_valid` stand for its output), and the PWM-to-audio filter. A real 2.56 GS/s front end delivers several samples per FPGA clock. This RTL takes one per clock, so a polyphase stage I would be needed to run at full rate on an FPGA.

## Files

| File | Contents |
|---|---|
| `rtl/fm_demod_pkg.sv` | formats, angle constants, CORDIC angle table |
| `rtl/cic_decimator.sv` | single-stage CIC decimator (stage I and stage II) |
| `rtl/sincos_gen.sv` | DDS: phase accumulator and quarter-wave sine/cosine table |
| `rtl/iq_mixer.sv` | quadrature mixer |
| `rtl/cordic_arctan.sv` | state-machine CORDIC, vectoring mode |
| `rtl/phase_freq_conv.sv` | phase difference with wrap correction |
| `rtl/pwm_gen.sv` | 4-bit counter/comparator PWM |
| `rtl/fm_demod_top.sv` | the complete demodulator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fm_demod_top` |

## Verification

Every testbench compares against values it computes itself with real or integer arithmetic. Each prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

- `tb_cic_stage1`, `tb_cic_stage2` check the step response (it settles at R·M), then random samples with gaps against a box-car sum model, with the output exactly one clock after the R-th sample.
- `tb_sincos_gen` checks every output against the table rule and against the ideal sine/cosine (±30 LSB). It checks the accumulator and the hold while disabled. It counts 12630 periods in 40960 steps at M = 1263, and it also runs M = 311, 150 and 450.
- `tb_iq_mixer` checks random products, including full-scale corners, against floor(x·lo/2¹⁴).
- `tb_cordic_arctan` checks Q/I = ±1, 2, 4, 8, 16, the axes and 3000 random vectors in all quadrants against atan2 (±0.5°), plus the 8-clock latency and the busy and pre-rotation flags.
- `tb_phase_freq_conv` checks ramps across ±180°, small steps and arbitrary jumps against the wrapped and clipped difference.
- `tb_pwm_gen` runs all 16 words and random ones, with continuous and gapped ticks. It checks every tick and that a mid-period word change waits for the next period.
- `tb_fm_demod_top` runs the whole chain at its default parameters on a synthesized 98.7 MHz FM signal (about 3.5 M input samples, a few seconds). The signal has segments with no deviation, ±75 kHz, +300 kHz (PWM clipping), a carrier 7.3 MHz off channel (word clipping), a 10 kHz tone and 1 ms of a 1 kHz tone, both at ±75 kHz. It checks:
  - the 32-word means of the frequency word against the true phase advance (±24 LSB);
  - every PWM word against its frequency word;
  - the mean PWM word and the duty measured on the pin;
  - the 8:1 and 128:1 rates and the 9 + 1 clock latency of phase and frequency.

  - the audio on the pin: the 10 kHz and 1 kHz components of `pwm_out` must show the swing the ±75 kHz deviation should give. That swing is 0.3375 of full duty (345 LSB / 64 / 16), within 15 %, with no quadrature part. Measured: 0.343 for both tones.

  It also requires that decimation, pre-rotation, phase wrap, word clip and PWM clip each happened.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fm_demod_pkg.sv \
          tb/tb_fm_demod_top.sv --top-module tb_fm_demod_top
./obj_dir/Vtb_fm_demod_top
```

Replace the testbench name for the others. The testbenches do not depend on x/z values, and every register is reset.

Not verified here: operation on recorded off-air samples, behaviour with adjacent-channel stations present, and timing closure at 320 MHz or above on any FPGA.
