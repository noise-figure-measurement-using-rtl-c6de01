# Mixed-signal BIST core for noise-figure, linearity and frequency-response tests

This is the digital part of a built-in self-test (BIST) for the analog path of a
mixed-signal system. It lets a chip measure the noise figure (NF), gain, phase
and linearity of an analog block with no spectrum analyzer and no on-chip FFT.
The core needs the DAC and ADC the system already has, plus one analog switch
that can bypass the device under test (DUT).

The main idea is to measure a spectrum one frequency at a time, by correlation:

* A direct digital synthesizer (DDS) generates the stimulus tone, which goes
  out through the system DAC, through the DUT and back through the system ADC.
* Two more oscillators generate a cosine and a sine reference at a second
  frequency w. Two multiply-accumulators correlate the returned samples f(n)
  with these references over K clock cycles:

      DC1 = sum_n f(n) * cos(w n)        DC2 = sum_n f(n) * sin(w n)

* The amplitude of f at w is `sqrt(DC1^2 + DC2^2)` and its phase is
  `-atan(DC2 / DC1)`. Stepping w across a band gives the spectrum, one bin
  per step.

For a noise-figure test the stimulus stays at f1 and the references sweep the
band. The bin at f1 holds the signal, and every other bin samples the noise
floor. The same sweep is run once with the DUT bypassed and once through it:

    SNR  = P(signal bin) / mean P(noise bins)
    NF   = SNR_in / SNR_out          (in dB: SNR_in_dB - SNR_out_dB)

The core outputs DC1 and DC2 for every point. The square root, arctangent and
SNR/NF arithmetic are left to whatever reads the results (a host processor or
a test program). This design does not build them in hardware.

## Block structure

```
  tpg                                                  analog (outside the core)
  ---                                                  -------------------------
  nco1 --s1--+--------------------+
             +--(s1+s2)>>>1 --+   +--> MUX1 --> dac_data ---> DAC --+--> DUT --+
  nco2 --s2--+                +------> MUX1         |               |          v
             |                                      |               +------> MUX3 --> ADC
  s1, s2 ----------------------------> MUX2 --> ref1|                                  |
  nco3 --s3----------------------------------> ref2 |                                  |
                                                    | (digital loopback)     adc_data  |
  ora                                               v                                  |
  ---                             MUX4 <------------+----------------------------------+
                                   | f(n)
                                   +--> x ref1 --> accumulate --> DC1
                                   +--> x ref2 --> accumulate --> DC2

  test_controller: restarts the NCOs, steps the frequency words, drives
  MUX1..MUX4, clears and enables the accumulators, reports each point
```

| Module | Role |
|---|---|
| `bist_pkg` | Mux select enums, the setup record `bist_cfg_t`, `TPG_LATENCY` |
| `phase_accumulator` | n-bit phase register: `acc += f` each clock, output `acc + theta` |
| `sine_lut` | 2^p-entry signed sine table, registered output |
| `nco` | phase accumulator -> truncation to the top p bits -> sine table |
| `tpg` | three NCOs, two-tone adder, MUX1 (DAC source) and MUX2 (first reference) |
| `mac` | registered N x N signed multiply, then accumulate |
| `ora` | MUX4 plus two `mac`s, giving DC1 and DC2 |
| `test_controller` | sequencing of the measurement points and of the sweep |
| `bist_top` | wires the above together; converter and MUX3 signals are ports |

## What the muxes are for

| Test | MUX1 (DAC) | MUX2 (ref1) | MUX3 (analog) | MUX4 (ORA input) | NCO settings |
|---|---|---|---|---|---|
| Noise figure | NCO1 | NCO2 | bypass, then DUT | ADC | f1 fixed; f2 = f3 swept; theta2 - theta3 = quarter turn |
| Frequency response | NCO1 | NCO1 | bypass, then DUT | ADC | f1 = f3 swept; theta3 = theta1 + quarter turn |
| Linearity (two tones) | NCO1 + NCO2 | NCO1 or NCO2 | DUT | ADC | tones on NCO1 and NCO2; NCO3 probes the intermodulation products (DC2 only; two passes with theta3 a quarter turn apart give both components) |
| Self-check of the core | any | any | - | loopback | any |

The quarter-turn phase offset is `2^(n-2)`: `16'h4000` at the default n = 16.

Use the bypass path for calibration. The DAC, the ADC and their filters add
their own delay and gain, so a sweep with MUX3 on bypass measures the path
without the DUT. Subtracting its phase and dividing by its amplitude leaves
the DUT's own response. For an NF test the bypass sweep gives SNR_in.

## Oscillators

Each NCO adds its frequency word f to an n-bit accumulator every clock.
Theta is added to the accumulator output, the top p bits of the sum address
the sine table, and the lower n-p bits are dropped (phase truncation). The
output frequency is

    f_out = f * f_clk / 2^n

Entry a of the table holds `round((2^(N-1) - 1) * sin(2*pi*a / 2^p))`. The
values are computed when the design is elaborated, so there is no data file.
A cosine comes from the same table by adding a quarter turn to theta.

The two-tone sum is halved, `(s1 + s2) >>> 1`, so that it still fits the
N-bit DAC word. Each tone therefore has half the amplitude of a single tone.

## Timing of a measurement point (read this before changing pipelines)

The correlation only works if the references and the response line up, and
if each point starts from a known phase. The controller restarts all three
NCO accumulators at the start of every point. The references and the
stimulus are then phase-locked to each other, and the results of different
points can be compared.

Each point runs through these states:

| State | Cycles | What happens |
|---|---|---|
| LOAD | 1 | `nco_load` and `ora_clr`: accumulators restart at 0, DC1/DC2 cleared |
| SETTLE | settle + TPG_LATENCY - 1 | pattern pipeline fills; the analog path settles |
| ACCUM | K | `ora_en = 1` |
| DRAIN | 1 | the last product reaches the accumulators |
| REPORT | 1 | `result_valid = 1`; `dc1`, `dc2`, `point_idx`, `point_f2` valid |

A point takes **K + settle + 5 clocks**. Samples leave the TPG
`TPG_LATENCY = 3` clocks after LOAD: one for the phase register, one for the
LUT register and one for the TPG output register. As a result, **the first
accumulated sample is sample number `settle` of every NCO**. In digital
loopback this is exact, and the testbench checks it bit for bit.

On the ADC path the returned sample also carries the delay of the DAC, the
DUT and the ADC. That delay shows up as a phase shift, which the bypass
calibration removes. Set `settle` long enough for the analog path's
transients to die out, for example a filter's step response.

Each `mac` registers its product, so a sample presented with `en = 1` in
cycle c is in the accumulator from cycle c + 2. `done` is high together with
the REPORT of the last point. `start` is a one-clock pulse, and is ignored
while `busy` is high. The setup record is captured when `start` is taken.

For coherent measurements, choose K and the frequency words so that each tone
completes a whole number of periods in K samples: `K * f / 2^n` should be an
integer. At n = 16 and K = 4096, that means f is a multiple of 16, and bin b
is `f = 16 b`. Then the bins do not leak into each other, and the noise bins
hold only noise.

## Setup record (`bist_cfg_t`)

| Field | Meaning |
|---|---|
| `mux1`, `mux2`, `mux3`, `mux4` | mux selects (enums in `bist_pkg`) |
| `fX_start`, `fX_step`, `thetaX` (X = 1, 2, 3) | point i uses `fX = fX_start + i * fX_step`; the low n bits are used |
| `k_len` | K, samples per point, 1 <= K < 2^M (an assertion checks the upper bound) |
| `settle` | extra settling clocks per point |
| `n_points` | points in the sweep, >= 1 |

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| `DATA_W` (N) | 8 | the 8-bit converter data path of the reference hardware |
| `PHASE_W` (n) | 16 | chosen; frequency resolution f_clk / 65536 |
| `ADDR_W` (p) | 10 | chosen; 1024-entry tables |
| `CNT_W` (M) | 16 | chosen; K < 65536 |
| accumulator | 2N + M = 32 bits | derived so that K full-scale products cannot overflow |

At the defaults the top synthesizes to about 400 flip-flop bits and three
1024 x 8 ROMs. That is small enough for the smallest FPGAs: a Spartan-II
XC2S50 has 1,536 flip-flops and 32 Kbit of block RAM.

## Departures and open points

* The architecture describes an "M-bit accumulator, with M chosen so that
  K < 2^M". Here the accumulator is 2N + M bits, reading M as the growth
  allowance above the 2N-bit product. A literal M-bit accumulator would
  overflow for all but tiny K.
* The controller's state sequence, the settle count, per-point stepping of all
  three frequency words and the start/done handshake are this design's own.
  The architecture only states that the controller sweeps the reference
  frequency and switches the DUT bypass.
* The widths n, p and M, the table contents and rounding, the halving of the
  two-tone sum, the register stages and the asynchronous active-low reset are
  all choices made here.
* The DAC, ADC, DUT, anti-alias filter and the MUX3 switch are analog and stay
  outside `bist_top`. The core drives `dac_data` and `mux3_sel`, and takes
  `adc_data`. The DAC word is N bits, so a wider DAC takes it on its upper
  bits.
* Amplitude, phase, PSD, SNR and NF are computed from DC1/DC2 outside the
  core.

## Simulating

Each testbench prints one line `TB_RESULT checks=<n> failures=<m>`. For
example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv tb/tb_bist_top.sv \
          --top-module tb_bist_top -o sim
./obj_dir/sim
```

The unit tests build the same way (`tb_<module>.sv`, `--top-module tb_<module>`).
To lint a module: `verilator --lint-only -Wall -Irtl rtl/bist_pkg.sv rtl/<module>.sv`.

What the testbenches check:

* `tb_phase_accumulator`, `tb_sine_lut`, `tb_nco` check every output against
  sine values computed in the testbench, including the latencies.
* `tb_tpg` checks all MUX1/MUX2 settings and that the I/Q references are in
  quadrature.
* `tb_mac` and `tb_ora` check exact sums for random data, MUX4, clear, and a
  long full-scale run that needs more than 2N bits.
* `tb_test_controller` checks the state sequence cycle by cycle: point length
  K + settle + 5, exactly K enabled cycles, the frequency words of each point,
  one `done`, and that a `start` during a sweep is ignored.
* `tb_bist_top` runs the whole core with `tb/analog_loop_model.sv`, a
  behavioural DAC -> DUT -> MUX3 -> ADC model with gain, a one-pole low-pass,
  Gaussian noise, delay and 8-bit quantization. It checks:
  * exact DC1/DC2 in digital loopback, for single tone, two tones and both
    MUX2 settings;
  * an NF sweep over bins 1..79, where a noiseless DUT gives NF within
    2.5 dB of 0, a DUT with gain 0.9 that adds 3 LSB of noise gives about
    10.6 dB, the value the model predicts, and a DUT with gain 0.5 and
    2.7 LSB of noise gives about 15 dB (the size of noise figure an op-amp
    stage typically shows);
  * the DUT's one-clock delay recovered as a phase difference against the
    bypass path;
  * a frequency-response sweep that reproduces the low-pass gain to 3 % and
    its phase to 0.03 rad.

  The NF tolerance reflects the statistical spread of a noise floor averaged
  over 78 bins.
