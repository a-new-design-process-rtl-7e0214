# Fixed-point burst analysis for a GSM software-defined-radio receiver

This RTL implements the receiver function that dominates the processing load of
a small GSM base station built on a software-defined radio: the analysis of a
received traffic burst. From the raw 12-bit I/Q samples of the radio's ADC it
finds, for one burst,

* the **time of arrival (ToA)** of the burst's training sequence, to 1/8 of a
  sample,
* the **valley power (VP)**, the correlation level just beside the peak, which
  with the peak amplitude tells a real burst from noise, and
* the **channel estimate**, the complex correlation values at and after the
  peak.

The main idea is about arithmetic, not structure. Written in floating point, the
function does not fit the radio's FPGA. Here every quantity is held in fixed
point, and each point of the chain gets the narrowest word that still leaves the
bit-error rate where floating point puts it. The word lengths were chosen by
simulation. The search starts from a safe estimate of the width at each point of
the chain (sketched below). It then removes integer bits, and after them
fraction bits, one at a time. It stops when the SNR needed for the same BER has
risen by more than an allowed margin ε. With ε = 0.2 dB this gives a
**62.4 format** (62 integer bits, 4 fraction bits) after the correlator. That is
the default here. With ε = 2 dB it gives **52.2**, which is available as a
parameter setting.

## Word lengths along the chain

| point | signal | width | where it comes from |
|---|---|---|---|
| P1 | ADC samples | 12 | converter accuracy |
| P2 | CIC decimator, full precision | 40 | 12 + N·log2(M·R) = 12 + 4·7 |
| P2 | decimated samples, as stored | 24 | full precision truncated to its top 24 bits |
| P3 | correlator products | 47 | 24 + 24 − 1 |
| P3 | correlation sum | ≤ 52 integer bits | 47 + log2(2·16 products) |
| P4 | correlation, magnitude, amplitude, valley | 66 = 62.4 | word-length search result (52.2 relaxed) |
| P4 | sinc coefficients | 24 (22 fraction bits) | a sinc never exceeds 1 |

The initial estimate that the search starts from is 47 + 24 = 71 bits after the
interpolator. The search brings this down to 66 bits. The correlation of integer
samples is an integer, so the four fraction bits of a correlation value are
always zero. They carry information only after the sinc interpolation and the
valley averaging. The integer part must hold the correlation sum, so `IWL`
must stay at 52 or more. The relaxed 52.2 format sits exactly at that limit.

## Signal path

```
 adc_i ─► cic_decimator ─┐                         ┌─► correlation store ──► chan_i/chan_q
 adc_q ─► cic_decimator ─┴► burst buffer ─► burst_correlator               (5 taps from peak)
           (N=4, R≤128,     (156 × 2×24)    (16-symbol reference,   │
            40→24 bits)                       24×24→47, sum→62.4)    ▼
                                                               cordic_mag ─► magnitude store
                                                                                │
                                                    peak_interp ◄───────────────┤
                                                    (coarse max + sinc,         │
                                                     ToA, amplitude)            │
                                                    valley_power ◄──────────────┘
                                                    (mean of lags 2..5 from peak)
```

The stages run one after another under a small controller in
`analyze_traffic_burst`:

1. **Capture.** The two CIC decimators (I and Q) run all the time. After
   `start`, the next 156 decimated samples are written to the burst buffer.
2. **Correlate.** For each of the 141 lags k = 0..140 the correlator forms
   `Σ x[k+n]·conj(r[n])` over the 16 reference samples. It does one complex
   multiply-accumulate per clock. Each result goes into the correlation store.
3. **Magnitude.** Each correlation value is passed through a vectoring CORDIC.
   The magnitude goes into the magnitude store, and the coarse peak search
   keeps the largest magnitude and its lag as the values stream past.
4. **Interpolate.** Around the integer peak p, the magnitude curve is
   interpolated with a 9-tap sinc at 9 fractional positions, p−1/2 … p+1/2
   in steps of 1/8. The largest interpolated value gives the ToA and the peak
   amplitude.
5. **Valley.** The magnitudes 2 to 5 lags either side of p are averaged.
   Lags that fall outside 0..140 are skipped, and `valley_count` says how
   many lags were used.
6. **Channel estimate.** The correlation values at lags p … p+4 are copied to
   `chan_i`/`chan_q`. Taps past the last lag are zero.

## Arithmetic details worth knowing

**CIC decimator.** This is a classic Hogenauer structure: four integrators
at the input rate, a down-sampler, and four combs with delay M = 1 at the output
rate. The registers are 40 bits wide, and two's-complement wrap-around in the
integrators is cancelled by the combs. The gain is R⁴. Only at R = 128 does the
full 40-bit range match the 24 bits that are kept, so lower rates give
proportionally smaller samples. The rate is a run-time input (1..128).
Changing it clears the filter, so each rate starts from a clean state.

**Correlator products.** A 47-bit signed product holds every product of two
24-bit numbers except (−2²³)·(−2²³). The reference must therefore avoid the code
−2²³ (symmetric range). An assertion flags any reference write that breaks this
rule. The burst samples may use the full range.

**CORDIC gain.** The CORDIC rotates the vector onto the x axis using only
shifts and adds, with 32 iterations and a fold into the right half plane first.
The magnitude comes out multiplied by K ≈ 1.64676. The gain is left in, because
all magnitudes of a burst share it. The peak position is unaffected, and peak
amplitude and valley power can still be compared directly, but their absolute
values are K times the true magnitude. The internal registers are 2 bits
wider than the data, and the output saturates.

**Sinc table.** `sinc_rom` holds `round(sinc(d − j)·2²²)` for d = (o − 4)/8,
o = 0..8, and j = −4..4, stored at address o·9 + (j+4). Here
sinc(t) = sin(πt)/(πt). The table is not windowed. `rtl/sinc_rom.hex` holds
these 81 words for the default F = 8, H = 4. Other sizes need a table made from
the same formula.

**Output formats.** `toa` is signed, in units of 1/8 decimated sample:
`toa = 8·peak_lag + o − 4`. `peak_amp` and `valley` are unsigned 62.4 values.
Fractional results are rounded down (floor). `chan_i`/`chan_q` are signed 62.4.

## Timing

At the default sizes, after the last burst sample is captured:

| stage | clocks |
|---|---|
| correlation | 141·16 + 2 = 2258 |
| magnitudes | 141·36 = 5076 (32 CORDIC iterations + 4 clocks of handshake per lag) |
| interpolation | 9·9 + 2 = 83 |
| valley | 8 + 66 + 4 + 2 = 80 |
| channel read-out and control | 12 |

That makes 7,509 clocks in all (at 62.4; 7,497 at 52.2, whose divider is 12 bits shorter). `done` then pulses once, and all results
hold until the next `done`. Capture itself takes 156·R valid ADC samples.
`start` is ignored while `busy` is high. The reference may be loaded only
while the block is idle.

## Top-level interface (`analyze_traffic_burst`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `dec_rate` | in | 8 | decimation rate 1..128 |
| `adc_valid`, `adc_i`, `adc_q` | in | 1, 12, 12 | ADC samples |
| `samp_valid`, `samp` | out | 1, 48 | decimated 24-bit I/Q stream (`atb_pkg::iq_samp_t`) |
| `ref_we`, `ref_addr`, `ref_i`, `ref_q` | in | 1, 4, 24, 24 | reference (modulated training sequence) write port |
| `start` | in | 1 | analyse the next burst |
| `busy`, `done` | out | 1 | status, results-valid pulse |
| `peak_lag` | out | 8 | integer correlation peak |
| `toa` | out | 13 | ToA, signed, 1/8 sample |
| `peak_amp`, `valley` | out | 66 | interpolated peak magnitude, mean valley magnitude |
| `valley_count` | out | 4 | lags averaged for the valley |
| `chan_i`, `chan_q` | out | 5 × 66 | channel estimate |

Main parameters are `IWL`/`FWL` (62/4; 52/2 for the relaxed format), `BURST`
(156), `RLEN` (16), `CORDIC_ITER` (32), `INTERP_F`/`INTERP_H` (8/4),
`VAL_NEAR`/`VAL_FAR` (2/5) and `NTAPS` (5). The chain widths (12, 4 stages,
rate 128, 24, 47) are constants in `atb_pkg`.

## What is specified and what is chosen here

The following come from the design this RTL implements: the chain order
(decimation, correlation, CORDIC, interpolation), the ADC width, the CIC size
(N = 4, log2(M·R) = 7), the truncation to 24 bits, the 24 × 24 → 47-bit
products, the CORDIC used to bring the magnitude into x, the 24-bit sinc
multiplicand read from memory, the 62.4 and 52.2 formats, and the three outputs
(ToA, VP, channel estimate).

These are this implementation's own choices:

* the split M = 1, R = 128, and clearing the filter on a rate change;
* one sample per symbol, a 156-sample burst, a 16-sample reference and a full
  search over all 141 lags;
* the serial schedules (one MAC, one CORDIC rotation, one interpolation product
  per clock) and the memories between the stages;
* the CORDIC iteration count and leaving the gain in;
* the coarse-then-fine peak search with 1/8-sample steps and a 9-tap unwindowed
  sinc;
* the valley as the mean magnitude 2..5 lags from the peak, rather than a mean
  power;
* a 5-tap channel estimate starting at the peak;
* all handshakes, latencies and the reset.

The original FPGA mapping used 36-bit multiplier operands and reported its
resources on a Spartan-3A DSP 3400 (about 40 % of slices and 45 % of DSP48
blocks at 62.4). This RTL describes the arithmetic at word level and leaves the
multiplier split to synthesis. Its resource use on that device has not been
measured.

Not included: the ADC itself (its samples are the top's inputs), the channel
equalizer that follows this block in a full receiver, and the floating-point
transmitter/channel model used to pick the word lengths.

## Files

`rtl/` holds one module or package per file:

* `atb_pkg.sv`: widths and the sample type
* `cic_decimator.sv`
* `sample_ram.sv`: burst buffer, correlation store and magnitude store
* `burst_correlator.sv`
* `cordic_mag.sv`
* `sinc_rom.sv` and `sinc_rom.hex`
* `peak_interp.sv`
* `valley_power.sv`
* `analyze_traffic_burst.sv`: the top

`tb/` holds one self-checking testbench per module, plus two end-to-end
benches:

* `tb_analyze_traffic_burst` runs all defaults, four bursts at rates 128 and 64.
  It covers a peak at each end of the lag range, a negative real part, a reference
  reload and a start while busy. It checks every decimated sample against a
  direct convolution model, the channel taps exactly, and ToA, amplitude and
  valley against a floating-point model.
* `tb_atb_relaxed_format` runs the same bursts in the 52.2 format.

Each testbench prints `TB_RESULT checks=N failures=M`. The tests need about
a second each.

## Simulating

Run from the repository root, because `sinc_rom` loads `rtl/sinc_rom.hex` by
that relative path:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/atb_pkg.sv \
          --top-module tb_analyze_traffic_burst tb/tb_analyze_traffic_burst.sv
./obj_dir/Vtb_analyze_traffic_burst
```

Replace the module and file name to run any other testbench. To lint a
module, use `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/atb_pkg.sv rtl/<module>.sv`.
Verilator reports the package's constants that a single module does not use;
those warnings are harmless.
