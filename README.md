# SSNOC signal detector: a correlation detector that tolerates faulty sub-blocks

This is synthesizable SystemVerilog for a PN-code acquisition detector built
on the idea of a *stochastic sensor network on chip* (SSNOC). The job is a
classic one: for every incoming sample, decide whether the last 256 samples
of a noisy 8-bit input stream match a locally stored 256-chip pseudo-noise
(PN) code. The usual way is a 256-tap FIR correlator whose output is compared
with a threshold `T`. That circuit gives a wrong answer as soon as any part of
it computes wrongly, for example because a transistor in a variation-prone
technology is slow or dead. The SSNOC form splits the same work into 64 small,
statistically similar pieces and combines their results in a way that ignores
a minority of bad pieces.

## The idea in one paragraph

The 256-tap correlation `y[n] = sum_j h[j] x[n-j]` is cut into 64 **sensors**
of four taps each. Sensor `i` computes

    y_i[n] = sum_{j=0..3} h[4i+j] * x[n-4i-j]

Each `y_i` is a noisy estimate of the same underlying quantity (scaled by
1/64). Instead of adding the 64 estimates (which would reproduce the full
correlation, errors included), the detector takes their **median** and
compares it with `T`. A sensor that produces garbage moves the median very
little, whereas it can move the sum arbitrarily far. The median is never
actually computed: `median(y_i) > T` holds exactly when more than half of the
`y_i` exceed `T`, so each sensor output is compared with `T` and a **majority
vote** over the 64 comparison bits gives the decision. This is cheaper than
the adder tree of the conventional detector as well as more robust.

The price is a small loss in ideal (error-free) detection quality, since the
median of 64 short correlations is not the optimal statistic for Gaussian
noise. The gain appears when the hardware itself makes errors: the vote
outvotes a minority of wrong sensors, which the sum cannot do.

## Block diagram

    x_in ──► sensor 0 ──4D──► sensor 1 ──4D──► ... ──► sensor 63
              │ h[0:3]         │ h[4:7]                  │ h[252:255]
              ▼ y_0            ▼ y_1                     ▼ y_63
           [y_0 > T]        [y_1 > T]     ...        [y_63 > T]     threshold_slicer
              └───────────────┴──────────┬──────────────┘
                                    majority vote                     majority_voter
                                         ▼
                                decision, vote_count

| Module (`rtl/`)      | Role |
|----------------------|------|
| `ssnoc_pkg`          | default sizes and width helpers |
| `pn_code_store`      | 256 coefficient registers, one write port, all read in parallel |
| `ssnoc_sensor`       | one 4-tap direct-form FIR; its 4-deep delay line doubles as the 4-sample delay to the next sensor |
| `sensor_array`       | 64 chained sensors |
| `threshold_slicer`   | `y_i - T` per sensor, sign bit = 1 only for a strictly positive difference |
| `majority_voter`     | pipelined count of ones, decision = count >= M/2 |
| `fusion_block`       | slicer + voter, i.e. `sign(median(y_i) - T)` |
| `ssnoc_detector`     | top: code store + sensor array + fusion block |

## Numbers and formats

| Item | Value | Origin |
|------|-------|--------|
| Correlation length `N_TAPS` | 256 | as designed in the reference work |
| Sensors `M_SENSORS` | 64, 4 taps each | as designed in the reference work |
| Input `x_in` | 8-bit two's complement | 8 bits from the reference work, signedness chosen here |
| Coefficients `h` | 8-bit two's complement (`H_W`) | chosen here; a ±1 PN code needs only two levels |
| Sensor output / `thresh` | `X_W + H_W + 2` = 18 bits signed, full precision | chosen here |
| Vote count | 7 bits (0..64) | follows from M |

All parameters are typed and can be changed; `N_TAPS` must be a multiple of
`M_SENSORS` (an elaboration-time assertion checks this).

## Interface and timing of `ssnoc_detector`

* `clk`, `rst_n`: one clock, synchronous active-low reset that clears every
  register (coefficients, delay lines, pipeline).
* Code load: `h_we`, `h_addr` (8 bits), `h_data` write one coefficient
  `h[h_addr]` per clock. Load the code before streaming; coefficients written
  while samples are in flight take effect for the sensors on the next clock.
* `thresh`: the threshold `T` in the 18-bit sensor-output format. It is used
  by the slicer stage, one cycle after a sample is clocked in, so change it only
  when no sample is between the sensor and slicer registers. In the intended
  use `T` is calibrated for a target false-alarm rate (5 % in the reference
  study) and then held.
* Stream: a sample is taken on each clock where `x_valid` is high; idle cycles
  are allowed anywhere. There is no back-pressure: one sample per clock is the
  peak rate.
* Result: `decision` with `dec_valid`, plus `vote_count` (how many sensors
  exceeded `T`), **9 clocks** after the sample: 1 (sensor register) + 1
  (slicer) + 6 (one register per adder-tree level, log2 64) + 1 (compare).
  The pipeline keeps every adder and comparator off the path through a sensor,
  so the sensor sets the clock period, as the architecture intends.
* The first 255 samples after reset are correlated against zeros in the
  delay line; only decisions from the 256th sample on see a full window.

## Points to understand before changing it

**The tie rule.** With 64 sensors an exact 32/32 split can occur. The median
is then the mean of the 32nd and 33rd ranked outputs, which can lie on either
side of `T`, so no vote rule matches the median in every tie. This design
resolves a tie as *detected* (`count >= M/2`). The median equivalence holds
exactly for every other count, and the fusion testbench checks it against a
sort-based median. For odd `M` the rule is an ordinary strict majority.

**Zero difference counts as "not above".** A sensor output equal to `T` votes
0, so the slicer computes `y_i > T`, not `y_i >= T`.

**Where the tolerance comes from.** The decision is right as long as the wrong
sensors do not change which side of M/2 the count falls on. If a clean count
is `c`, up to `c - 32` (for a detection) or `31 - c` (for a rejection) sensors
may be arbitrarily wrong. The fusion testbench corrupts exactly that many
sensors with extreme values and checks that the decision does not change. It
also counts how often the same corruption would have flipped a sum-based
(conventional) decision: about half the time in that test.

**What this buys, measured.** `tb_ssnoc_error_resilience` runs the detection
task on the RTL sensor array and fusion block, with sensor errors injected
between them: each sensor output is replaced by a random value over its full
range with probability 10 %. The signal is amplitude 8 times the ±1 code, and
the noise is uniform in ±60. Both thresholds come from noise-only trials at a
5 % false-alarm rate. The conventional decision is modelled in the testbench
from the same corrupted sensor values. Over 240 trials of each kind:

| Sensor errors | SSNOC Pd / Pfa | Sum-based Pd / Pfa |
|---------------|----------------|--------------------|
| none          | 220 / 18       | 240 / 12           |
| 10 %          | 206 / 24       | 121 / 117          |

Without errors the sum is the better statistic. With errors the sum-based
detector falls to chance, while the vote loses little. The signal and noise
model are this testbench's own choices, so the numbers show the trend, not a
reproduction of published rates.

**What the RTL does not model.** The robustness argument is about hardware
errors: timing violations and dead transistors in an aggressive carbon-nanotube
FET implementation with minimal transistor widths and a clock only 5 % above
the nominal critical delay. This RTL is the error-free logic function. The
errors appear only in a gate-level netlist simulated with per-instance delay
samples. The slicers and voter are meant to be built conservatively, so that
they are error-free, while the sensors may err.

## Departures and gaps

* The conventional adder-tree detector is the point of comparison only and is
  not built. Its decision (sum of the 64 sensor outputs against a threshold)
  is computed inside the fusion testbench where it is needed.
* The coefficient width, the write port of the code store, the `x_valid`
  handshake, the reset behaviour, the register placement and the tie rule are
  this design's choices. The reference work specifies none of them.
* The reference study reports detection probabilities (about 92.5 % for the
  SSNOC form and 95.1 % for the conventional form, error-free, at 5 % false
  alarm). Those numbers depend on a signal and noise model that is not
  specified, so they are not reproduced here.
* The reference synthesis of the fusion logic reports 1011 registers and 6364
  combinational cells. The register count depends on where the pipeline is cut,
  which is not specified, so this RTL is not expected to match it.
* The statistical yield experiments over nanotube process parameters are
  device-level studies with no RTL counterpart.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog:

| Testbench | What it checks |
|-----------|----------------|
| `tb_ssnoc_sensor` | sum of products and 4-sample forwarding against a reference history, random valid gaps, -128 × -128 extremes, reset |
| `tb_sensor_array` | all 64 partial correlations per sample, and that they add up to the full 256-tap correlation |
| `tb_threshold_slicer` | sign bits incl. `y == T`, format extremes, one-cycle latency |
| `tb_majority_voter` | M = 64 and M = 5, counts at M/2-1, M/2 and M/2+1, latency log2(M)+1 |
| `tb_pn_code_store` | reset, single writes, no write without enable, parallel read |
| `tb_fusion_block` | decision vs. sorted median (non-tie), count, tolerance to corrupted sensors, 8-cycle latency |
| `tb_ssnoc_error_resilience` | thresholds calibrated for 5 % false alarm, detection rates of the vote and of the sum with and without injected sensor errors, every decision bit-exact against a model |
| `tb_ssnoc_detector` | full default size, end to end: ±1 LFSR PN code embedded in noise, every decision and count against a bit-exact model, 9-cycle latency, idle cycles, 32/32 ties, sensors equal to T, a code reload; counts detections at aligned windows and false alarms |

The end-to-end test runs the top at its default parameters and finishes in
about 15 seconds. To run any testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/ssnoc_pkg.sv tb/tb_ssnoc_detector.sv --top-module tb_ssnoc_detector
    ./obj_dir/Vtb_ssnoc_detector

Both Verilator lint (`--lint-only -Wall`) and a slang-based front end accept
every file in `rtl/`. The only lint remarks are unused package constants in
modules that do not need all of them.
