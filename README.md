# Ultrasonic sonar receive channel: sigma-delta ADC and I/Q downconverter

A sonar that warns a blind user of an approaching obstacle has to tell, for
every echo of its 40 kHz ultrasonic pulses, how strong the echo is, from which
direction it arrives and whether its frequency has been pushed up by the
Doppler effect. Direction finding compares the phase of the same echo across
an array of receivers, so each receiver needs a compact channel that turns the
transducer signal into amplitude and phase. This RTL is that channel, built
almost entirely in an FPGA:

* a **first-order sigma-delta ADC** whose only external parts are two RC
  integrators and a resistor. An FPGA LVDS input buffer serves as the
  modulator's subtractor and comparator, and one flip-flop is its quantizer;
* a **digital downconverter** that turns the 1-bit, 50 MHz stream into
  baseband In-phase and Quadrature (I/Q) samples at 8 kHz. From these, the
  echo's amplitude is `sqrt(I^2 + Q^2)`, its phase is `atan2(Q, I)`, and a
  Doppler shift shows as a slow rotation of `I + jQ`.

A second, smaller build is included beside it: the stand-alone ADC as used to
characterise the converter. It has its own clock divider and a shift register
that packs the bitstream into 36-bit words for a logic analyser.

The beamformer that would combine several channels, the parametric speaker
that sonifies the obstacle, and all the analog parts are not part of this RTL
(see "What is outside the RTL").

## Signal chain and rates

Everything runs on one 100 MHz clock. A trigger generator makes three
one-cycle strobes, and every block uses one of them as its clock enable:

| strobe    | ratio  | rate    | drives |
|-----------|--------|---------|--------|
| `stb_sdm` | 2      | 50 MHz  | sigma-delta sampling flip-flop |
| `stb_bb`  | 625    | 160 kHz | CIC output, oscillator, 90° shift, mixers, low-pass filters |
| `stb_out` | 12 500 | 8 kHz   | final decimation register (I/Q output) |

Each counter runs from 1 to its ratio and restarts at 1. Because 12 500 =
20 × 625, every 8 kHz strobe falls on a 160 kHz strobe.

```
            +-------- analog, off-chip --------+      +------------------- FPGA (downconverter.sv) ----------------------+
 echo ----> | RC integ. -> LVDS buffer (+)      | cmp  | sdm_quantizer --> cic_decimator --+--> mixer(I) --> lpf_decimator --> I
            |              LVDS buffer (-) <-RC-+|----->| (50 MHz)    |    (/625, 160 kHz) |      ^  lo                 (8 kHz)
            |                              |    |      |             |                    |   local_osc 1,0,-1,0
            +------------------------------|----+      |             |                    |      v
                                           +-----------| sdm_bit <---+                    +--> mixer(Q) --> lpf_decimator --> Q
                                          output buffer|                                         ^ phase_shift_90 (one sample)
                                                       +--------------------------------------------------------------------+
```

| block | file | what it does |
|-------|------|--------------|
| trigger generator | `rtl/trigger_gen.sv` | the three strobes above |
| quantizer | `rtl/sdm_quantizer.sv` | the flip-flop that samples the comparator at 50 MHz |
| CIC decimator | `rtl/cic_decimator.sv` | 1-bit stream → Q2.14 at 160 kHz (mean of 625 clocks) |
| local oscillator | `rtl/local_osc.sv` | 40 kHz as the sequence +1, 0, −1, 0 |
| 90° shift | `rtl/phase_shift_90.sv` | oscillator delayed by one 160 kHz sample |
| mixer | `rtl/mixer.sv` | registered Q2.14 × Q2.14, keeps Q2.14 |
| delay line | `rtl/delay_line.sv` | z^−K shift register for the combs |
| low-pass + decimator | `rtl/lpf_decimator.sv` | moving averages of 80 and 53 samples, then ↓20 |
| receive channel | `rtl/downconverter.sv` | the chain above |
| clock divider | `rtl/clk_divider.sv` | ÷N square wave for the stand-alone ADC |
| capture register | `rtl/bit_capture.sv` | 36-bit serial-to-parallel with a store trigger |
| stand-alone ADC | `rtl/sdm_adc.sv` | divider + quantizer + capture register |
| top | `rtl/sonar_top.sv` | receive channel (`rx_*`) and stand-alone ADC (`adc_*`) side by side |
| shared types | `rtl/sonar_pkg.sv` | Q2.14 type, word widths, rate ratios, filter lengths |

## The sigma-delta loop split between board and FPGA

A first-order sigma-delta modulator subtracts its own 1-bit output from the
input, integrates the difference, and quantizes the result. Here the
subtraction moves *after* the integration. The input is integrated by one RC
network (10 kΩ, 330 pF, τ = 3.3 µs, corner about 48 kHz, just above the
carrier). The output bit is integrated by an identical network. The two
integrated voltages go to the + and − pins of an LVDS input buffer, whose
logic output says which is larger: subtraction and comparison in one
primitive. `sdm_quantizer` samples that level on each 50 MHz strobe. The
sampled bit is the ADC output. It also leaves the FPGA through an output
buffer. A 680 Ω resistor to ground, with the buffer's 220 Ω output
resistance, brings the buffer's high level from 3.3 V to about 2.5 V. That
level drives the second integrator.

This costs two integrators instead of one, but it removes the op-amp
difference amplifier. The input range is 0 to 2.5 V (LVDS_25 on a bank that
cannot do 3.3 V LVDS), so a full-scale sine is 1.25 V ± 1.25 V. A bit of 1
means +1.0 and a bit of 0 means −1.0.

The comparator level is asynchronous and is sampled by a single flip-flop,
with no synchroniser. A second flip-flop would add a clock of loop delay.
Expect the occasional metastable sample. In a sigma-delta loop it shows up
as a little extra noise.

## CIC decimator: why it reads a 50 MHz stream at 100 MHz

The downconverter needs four samples per carrier period, 160 kHz. The ratio
from 50 MHz is 312.5, which is not an integer. So the CIC filter reads the
bitstream on every 100 MHz clock. Each modulator bit is then counted twice,
which leaves the mean unchanged, and the ratio becomes 625.

The filter is a moving average of length 625 written as a CIC, an
integrator followed by a comb:

* every clock, the integrator adds +1.0 or −1.0 (`2^14` in Q12.14, 25 bits);
* on each 160 kHz strobe, the comb subtracts the integrator value saved at
  the previous strobe and divides the difference by 625 (truncating toward
  zero). The result is the mean of the last 625 bits, between −1 and +1, in
  Q2.14.

The integrator may wrap around: the difference is exact modulo 2^25, and a
window sum is at most 625 × 2^14 ≈ 1.02·10^7 < 2^24. The first null of the
average is at 160 kHz. At 40 kHz it attenuates by about 0.45 dB (gain 0.95).
Because the strobe comes every 625 clocks, the division is a
divide-by-constant. Synthesis builds a combinational divider for it. That
divider has 6.4 µs to settle, but it needs a multicycle constraint or it
will be timed as a one-cycle path.

## Number formats

| where | format | width | why |
|-------|--------|-------|-----|
| CIC integrator | Q12.14 | 25 | holds 625 × ±1.0 |
| CIC output, mixers, oscillator, I/Q | Q2.14 | 16 | ±2 range, +1.0 = `16'h4000` |
| LPF integrators and combs | Q9.14 | 23 | holds 80 × a Q2.14 sample |

The mixer keeps product bits 29..14 of its 32-bit Q4.28 product. This is
safe only because the oscillator is always +1, 0 or −1. An oscillator with
other values would need a different scaling.

## Oscillator and quadrature at four samples per period

At 160 kHz a 40 kHz cosine is only ever +1, 0, −1, 0, so the oscillator is a
2-bit counter and a multiplexer, with no table. Delaying it by one sample is
a quarter period: 0, +1, 0, −1, which is `sin(π n / 2)`. So the 90° block is
one 16-bit register.

**Sign of the rotation.** The I branch multiplies by `cos` and the Q branch
by `+sin`. For an input `A cos(2π f t + φ)`, the low-pass outputs are
`I + jQ ≈ (A/2)·G·e^{−j(2π (f − 40 kHz) t + φ)}`, where G is the filter gain.
A tone above 40 kHz therefore turns the phasor clockwise (negative
frequency), and a tone below turns it anticlockwise. At the 8 kHz output
rate, ±1 kHz is ∓45° per sample. The published measurements of this circuit
report the opposite sign for a 41 kHz input. The RTL follows the circuit as
described (Q oscillator = oscillator delayed by one sample). A consumer that
wants "above carrier = positive frequency" should use `I − jQ`.

## Low-pass filter: two averages with interleaved nulls

After mixing, the wanted band is within about ±1 kHz of DC, and the mixer's
image sits near 80 kHz. The filter is two recursive moving averages at
160 kHz:

* **K1 = 80**: nulls at every multiple of 2 kHz;
* **K2 = 53** (160/3 ≈ 53.3): first null near 3 kHz, where the first
  average's first side lobe peaks.

Each average is an integrator, a delay line of K values of the integrator,
and a comb that subtracts the delayed value and divides by K. The result is
then kept on every 20th sample (8 kHz), a plain register loaded on
`stb_out`. The decimation folds everything above 4 kHz onto the band, and the
two filters do not null all of it. Treat the output as suited to narrow-band
echoes near 40 kHz, not as a brick-wall filter. DC passes with gain exactly 1.
A 1 kHz baseband tone passes with 0.637 × 0.829 ≈ 0.53, and a 2 kHz tone is
removed.

Exact timing, counting 160 kHz strobes t: the first comb holds
`trunc(Σ x[t−80..t−1] / 80)`, the second holds `trunc(Σ c1[t−54..t−2] / 53)`.
On an 8 kHz strobe, `y` takes the second comb's value as it stood before that
strobe.

## Latency and handshakes

There are no handshakes. Every stage takes its input at its strobe and
presents a registered output one clock later. Between strobes, outputs hold
their values. `cic_valid` and `iq_valid` are one-cycle pulses one clock after
`stb_bb` and `stb_out`. Stage to stage, each 160 kHz stage uses the sample
its predecessor produced at the previous strobe. From a change at the
antenna, the I/Q output therefore reflects it after the CIC window (3.9 µs),
about three 160 kHz samples of pipeline, the filters' group delay
((80 + 53)/2 samples ≈ 0.42 ms), and up to one 8 kHz period.

## Stand-alone ADC build

`sdm_adc` is the converter on its own. `clk_divider` divides the clock by
N = 2 into a square wave. Its rising edges, reported as a one-cycle `rise`
strobe, set the sampling instants of `sdm_quantizer`. `bit_capture` shifts
each new bit into bit 0 of a 36-bit word. After every 36 bits it pulses
`trig` for one clock, which is when a logic analyser should store the word.
For odd N the divider is low for ⌊N/2⌋ input clocks and high for the rest.

## What is outside the RTL

* the LVDS input buffers and output buffers (device primitives), whose
  output and input are the `*_cmp_in` and `*_bit` ports;
* the RC integrators, the 680 Ω divider resistor, the preamplifier (gain
  100, output divided to 0 to 2.5 V), the test-signal offset circuit and the
  transducers;
* the logic analyser and the block RAM that record capture words;
* the beamformer (direction of arrival from several channels) and the
  parametric speaker.

`tb/sdm_analog_model.sv` is a behavioural model of the analog loop for
simulation only. It has both integrators (forward Euler, 10 ns step), the
2.49 V feedback level and the comparator.

## Where this RTL departs from, or adds to, the described circuit

* **One clock, enables instead of derived clocks.** The original clocks each
  block from a trigger pulse or a divided clock. Here every flip-flop is on
  the 100 MHz clock and the pulses are enables. The sample timing is the
  same.
* **Reset.** A synchronous, active-high `rst` clears every register,
  including the delay lines, and the trigger counters return to 1. The
  original relies on power-up values.
* **`rise` strobe** of `clk_divider` and the one-clock-later capture enable
  in `sdm_adc`: these are needed to stay on one clock.
* **Monitoring outputs**: `cic_out` and `cic_valid` are extra ports.
* **Divider for odd N**: the split is taken from the counting scheme, because
  a prose description of it does not add up to N.
* **Per-comb division** in the LPF (divide by 80 after the first comb and by
  53 after the second), as in the implemented filter, rather than a single
  gain at the end as in its simulation model.
* **Q sign**, as explained above.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with a
model written independently of the RTL. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_trigger_gen` | exact periods 2 / 625 / 12 500, first strobe after reset, 8 kHz strobe on a 160 kHz strobe |
| `tb_sdm_quantizer` | sampling on random strobes only |
| `tb_clk_divider` | N = 2, 5, 8: low/high lengths, period count, `rise` |
| `tb_bit_capture` | word against a software shift register, trigger every 36 samples only |
| `tb_sdm_adc` | output bit every second clock, every captured word |
| `tb_cic_decimator` | 60 windows of random density against a direct mean, exact ±1.0 on all-1/all-0 windows, output timing |
| `tb_local_osc`, `tb_phase_shift_90`, `tb_mixer`, `tb_delay_line` | bit-exact against reference sequences, products and queues |
| `tb_lpf_decimator` | bit-exact against a direct (non-recursive) double moving average; DC gain 1; 2 kHz tone removed |
| `tb_downconverter` | closed loop with the analog model, 40/41/39/42 kHz: CIC amplitude, output periods, \|I+jQ\| (0.36 / 0.19 / 0.19 / 0.0001), phase step (0 / −45° / +45° per sample) |
| `tb_sonar_top` | whole top at default sizes: 41 and 39 kHz on the receive channel, 40 kHz on the stand-alone ADC (capture words, density of ones 0.50); counts that sampling, CIC outputs, I/Q outputs, both rotation directions and capture triggers all occur |
| `tb_workload_sdm_rates` | stand-alone ADC at 10, 12.5, 20, 25 and 50 MHz sampling, 40 kHz 1 V tone: amplitude 0.70–0.72 of full scale after a 625-clock average (0.72 expected), sine-to-residual 33 / 35 / 39 / 41 / 45 dB, improving with every step up in rate |
| `tb_workload_sdm_fin` | stand-alone ADC at 50 MHz with 20, 40, 50 and 63 kHz tones, analysed only from the unpacked 36-bit capture words: amplitude within 0.004 of prediction after a 400-sample average (125 kHz band), sine-to-residual 43–47 dB |
| `tb_workload_cic_m63` | one bitstream (40 kHz, 0–2.5 V) into CICs with M = 625 and M = 63: amplitudes 0.90 and 1.00 of full scale as the sinc gain predicts; the M = 63 output (1.587 MHz) is a sine with more noise (28.6 dB against 45.9 dB) |
| `tb_workload_lpf_tones` | low-pass filter fed DC + 1 kHz + 2 kHz + 2.5 kHz (0.25 each): 8 kHz output amplitudes match the two-sinc gain (1, 0.528, 0, 0.036) to 1e-5 |

Every testbench was also run against a copy of its block with one deliberate
error, and each reported failures.

The closed-loop results depend on the analog model
being a fair stand-in for the board. It ignores comparator offset,
hysteresis and metastability, and input-pin loading.

## Simulating

All defaults are the design's real sizes, and every testbench runs in
seconds. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/sonar_pkg.sv tb/tb_sonar_top.sv --top-module tb_sonar_top -o sim
./obj_dir/sim
```

Replace `tb_sonar_top` with any other testbench name. The analog model's
`freq_hz` and `amp_mv` inputs set the test tone. Its parameters set τ and the
feedback level.

## Changing it

* **Rates**: `DIV_SDM`, `DIV_BB` and `DIV_OUT` on `downconverter`.
  `DIV_BB` is also the CIC length. Keep `DIV_OUT` a multiple of `DIV_BB`
  (asserted), and keep `DIV_BB × 2^14 < 2^24` or widen `ACC_W`.
* **Carrier**: the oscillator relies on the baseband rate being exactly
  four times the carrier. Another carrier needs another `DIV_BB`, or a real
  oscillator and a mixer scaling that no longer assumes ±1.
* **Filter**: `K1` and `K2` set the nulls (`f_null = 160 kHz / K`). Keep
  `K1 × 2^15 < 2^(W−1)` (asserted).
* **Capture length**: `CAP_N` on `sdm_adc`.
