# Hybrid wideband channelizer with high-resolution signal guidance

This design splits a real-valued wideband input into channels. It then extracts
individual signals of any centre frequency and bandwidth at a low sample rate.
It combines two classic approaches:

* A **polyphase DFT (PDFT)** filter bank produces N/2+1 wide channels cheaply.
  The channels are spaced Fs/N apart, each passes 2·Fs/N, and each is sampled
  at 4·Fs/N (4× oversampled). Because neighbouring channels overlap by half,
  any signal no wider than Fs/N lies wholly inside at least one channel.
* A bank of **digital down-converters (DDC)** gives the best filtering for
  individual signals, but is expensive at the input rate. Here it runs only on
  the few PDFT channels that contain signals, at the channel rate.

A **high-resolution spectrum** of M·N bins decides which channels to use. Its
bins are Fs/(M·N) wide and it is refreshed every M·N/4 samples. A signal
parameter estimator (SPE) finds the occupied bands in it. A channel selector
gives each band a PDFT channel, a residual frequency offset and a rate
reduction, and programs a DDC unit with them.

The central economy is that **one complex FFT serves both paths**. Both data
sets are real, so the polyphase-filtered PDFT data (Path A) rides on the real
rail of the FFT input. A windowed slice of the input (Path B) rides on the
imaginary rail. After the FFT the two spectra are separated again. Path B's
N-point spectra are the row transforms of a prime-factor M·N-point FFT. Only
a column stage of N short M-point DFTs is needed to complete the
high-resolution spectrum.

Default sizes: N = 1024 branches (512 usable channels), L = 4 taps per
branch, M = 7, which gives a 7168-point high-resolution FFT. The defaults also
include four DDC units with 8 taps each.

## Data flow and timing

```
x ──► sample_buffer (PDFT history) ──► polyphase_filter ──┐ real rail
  └─► sample_buffer (HR frames)    ──► window_path ───────┤ imag rail
                                                          ▼
                                   fft_r4_pipeline (N-point, radix-4, 5 stages)
                                                          ▼
                                   fft_unpack (digit-reversal + A/B separation)
                         ┌────────────────────────────────┴──────────────┐
                    A: channels                              B: row spectrum m
                         ▼                                               ▼
                 ddc_unit × NUM_DDC  ◄── channel_select ◄── spe_detector ◄── hr_column_stage (dft_m)
```

One input sample arrives per clock at most (`x_valid`). Everything is paced by
the input:

| event | period (samples = clocks) | work per event |
|---|---|---|
| PDFT update | N/4 = 256 | polyphase filter: N/8 + 4 clocks; FFT frame: N/8 = 128 clocks per stage |
| row of a high-resolution frame | N/4 | one Path B row goes through the FFT with the PDFT frame |
| high-resolution spectrum | M·N/4 = 1792 | column stage: N + 4 clocks |
| SPE scan | M·N/2 + 4 ≈ 3588 | so every second spectrum is averaged; the others are counted as skipped |
| DDC sample | N/4 per channel sample | TAPS + 3 clocks per unit |

Outputs are held back until the filter history (N·L samples) and the first
high-resolution frame (M·N samples) are complete. A tag travels with each FFT
frame. It holds the two "history complete" flags and the row number, so no
block needs to know the pipeline depth of the others.

## Path A: polyphase filter and the oversampling phase

The input is split into frames that advance by N/4 samples (75 % overlap).
This hop is what makes the channels 4× oversampled. For output position n of
frame t, `polyphase_filter` forms

    v[n] = Σ_l h[n' + l·N] · x[t − n' − l·N],   n' = (t − n) mod N

The circular re-ordering (t − n) mod N is folded into the read addresses.
Without it, a 75 %-overlapped frame would carry a frame-dependent phase
rotation. With it, FFT bin k equals exactly the output of a DDC tuned to
k·Fs/N:

    y_k(t) = Σ_i h[i] x[t − i] e^{−j2πk(t−i)/N}

The end-to-end testbench checks the channel outputs against this formula.
Eight lanes work in parallel, each with L multipliers and a small adder tree.
A frame takes N/8 clocks.

## Path B: windowed rows of the high-resolution frame

A high-resolution frame is M·N samples long and starts every M·N/4 samples.
Each of its M rows is sent through the shared FFT in one PDFT update. The
prime-factor input map picks the N samples of row m:

    n = (N·m + M·n2) mod (M·N),   n2 = 0..N−1

Each sample is multiplied by its window value w[n]. `window_path` generates
the index map incrementally with modular additions.

Both paths read the input from `sample_buffer`. This is a circular store with
one write port and many read ports, addressed by delay relative to an
anchor. The anchor is set at the start of each frame. The anchor moves by a
quarter frame per update, so the 75 % overlap costs no copying.

## Complex FFT and separation

`fft_r4_pipeline` chains log4 N radix-4 decimation-in-frequency stages
(`fft_r4_stage`). Each stage has a double-buffered N-word memory and two
butterflies, i.e. eight words per clock. A frame can enter every N/8 clocks.
Results come out in base-4 digit-reversed order, with no scaling: word growth
is absorbed by 32-bit words.

`fft_unpack` stores a frame, undoes the digit reversal and separates the two
real transforms:

    A[k] = (Z[k] + conj Z[N−k]) / 2        (PDFT channels)
    B[k] = (Z[k] − conj Z[N−k]) / (2j)     (row spectrum)

It handles four (k, N−k) pairs per clock.

## High-resolution spectrum (prime factor algorithm)

M and N are relatively prime, so the M·N-point DFT separates into N-point
row DFTs and M-point column DFTs without twiddle factors.

`hr_column_stage` collects the M row spectra in an M-bank double buffer. It
then runs one `dft_m` per bin k2, one per clock. The output of column k2,
row k1 is high-resolution bin

    k = (N·tN·k1 + M·tM·k2) mod (M·N),   N·tN ≡ 1 (mod M),  M·tM ≡ 1 (mod N)

This Chinese-remainder map is generated on the fly.

`dft_m` is a folded M-point DFT. It takes sums and differences of mirrored
inputs, multiplies them by cosines and sines, and recombines the results. All
M outputs appear every clock. For M = 7 it uses 36 real multipliers.

## Signal parameter estimation and channel selection

`spe_detector` works on the bins k = 0..M·N/2. It squares the magnitude of
each bin after an 8-bit pre-shift and keeps a running average per bin:
avg += (p − avg)/4. After a spectrum it scans the averages, one bin per clock.
Each maximal run of bins above `threshold` is one signal, reported as
centre2 = lo + hi (the centre in half-bin units) and bw = hi − lo + 1.

`channel_select` turns each detection into a DDC programming:

* **Channel.** PDFT channel c has its centre at high-resolution bin c·M and
  spans c·M ± M. The nearest channel is c = ⌊(centre2 + M)/(2M)⌋. It is
  accepted only if both band edges lie inside it. Wider signals are counted
  as `too_wide`.
* **NCO step.** inc = (centre2 − 2Mc)·2³²/(8M). This is the residual offset
  as a fraction of the 4M-bin channel rate.
* **Rate reduction.** dec_log is the largest d ≤ 3 with bw·2^(d+1) ≤ 4M, so
  the output rate stays at least twice the signal bandwidth.

Units are filled in scan order. Extra detections are counted as `dropped`. The
new table takes effect at the end of the scan with a single `cfg_load` pulse.

## DDC units

Each `ddc_unit` picks its channel's sample out of the unpacked Path A stream.
It then works in three stages:

1. **Mix.** Multiply by exp(−jφ) from a 1024-entry cosine/sine table, then
   advance φ by inc.
2. **Filter.** One FIR tap product per clock.
3. **Sum.** Accumulate the products and round.

The unit keeps one output in 2^dec_log. If a new configuration changes the
channel or the offset, the phase, the delay line and the decimation count
restart. An unchanged configuration leaves them running.

## Number formats

| quantity | format |
|---|---|
| input samples | 16-bit signed |
| filter, window and DDC coefficients | Q1.15 (16 bit) |
| twiddles and DFT constants | 18 bit, 16 fraction bits, rounded |
| FFT, column stage and DDC data | 32-bit signed per rail, no scaling |
| SPE powers and threshold | 48 bit |

The constant tables (twiddles, DFT constants, oscillator table) are computed
at elaboration from `$cos`/`$sin`. They are not stored as files.

## Where this design departs from the reference architecture

* **Overlapped buffers.** The reference uses pairs of buffers, each split into
  four quarter-frame memories, with old data copied into the buffer being
  refilled. Here, one circular store with a moving anchor gives the same
  overlapped frames. Its many read ports are written as a plain array; banking
  them into dual-port RAMs is left to the implementation tool.
* **Short DFT.** The reference uses a Winograd 7-point DFT with 16 real
  multiplications. Here a folded DFT with 36 multiplications is used. The
  total is 196 multipliers in the filter, window, FFT and column stage,
  against about 208 estimated for the reference. The FFT butterflies use 12
  real multipliers each, where the reference budgets 16.
* **Twiddle storage.** Each FFT stage holds full-period cosine/sine ROMs, not
  a shared quarter-period table.
* **Hermitian redundancy.** All M·N high-resolution bins are computed; only
  the non-negative half is used.
* **SPE and channel selection.** Their algorithms are not specified in the
  reference, and the ones described above are this design's own:
  * no interpolation between bins;
  * a fixed threshold;
  * spectra that arrive during a scan are skipped.
* **Rate conversion.** Only integer power-of-two decimation is built, not a
  general sample-rate converter.
* **Configuration choices.** The unit count, the DDC tap count and all word
  lengths are this design's choices.

## Files

| file | block |
|---|---|
| `rtl/chan_pkg.sv` | shared types (`cplx_t`, `tag_t`, `ddc_cfg_t`) and arithmetic helpers |
| `rtl/sample_buffer.sv` | circular multi-port sample store |
| `rtl/polyphase_filter.sv` | Path A: N-branch polyphase FIR with re-ordering |
| `rtl/window_path.sv` | Path B: windowed rows of the high-resolution frame |
| `rtl/fft_r4_stage.sv`, `rtl/fft_r4_pipeline.sv` | shared radix-4 FFT |
| `rtl/fft_unpack.sv` | digit reversal and separation of the two real spectra |
| `rtl/dft_m.sv`, `rtl/hr_column_stage.sv` | column stage of the high-resolution FFT |
| `rtl/spe_detector.sv` | band detection |
| `rtl/channel_select.sv` | channel / NCO / decimation assignment |
| `rtl/ddc_unit.sv` | one DDC unit |
| `rtl/channelizer_top.sv` | the whole channelizer |

Each file's opening comment gives its interface and latency.

## Simulation

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=… failures=…`. Most use reduced sizes, for example
N = 16, M = 3. The results are compared with direct DFT and filter formulas
evaluated in the testbench.

The two system testbenches share the stimulus and checks in
`tb/tb_chan_env.sv`:

* `tb_channelizer_top` runs at N = 64, L = 4, M = 7.
* `tb_channelizer_full` runs at the default sizes for 26 000 samples. In the
  high-resolution spectra it compares a subset of bins.

Both drive a set of tones:

* five isolated tones, each detected, assigned and down-converted to DC;
* a 15-bin cluster that no channel can hold, counted as too wide;
* more signals than DDC units, so detections are dropped.

They count each of these events and fail if one never happens.

Plain verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_channelizer_top \
    rtl/chan_pkg.sv $(ls rtl/*.sv | grep -v chan_pkg) tb/tb_chan_env.sv tb/tb_channelizer_top.sv
./obj_dir/Vtb_channelizer_top
```

A unit testbench needs only the package, its module, any sub-modules and
the testbench itself. `rtl/chan_pkg.sv` must come first. `-Wno-fatal` keeps
verilator's width lint warnings (index widths of guarded array accesses) from
stopping the build. `tb_check.svh` and
`tb_chan_wiring.svh` are included from `tb/`.
