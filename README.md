# Doppler spectral analyser: FFT velocity measurement in RTL

A radar echo returning from a moving target is shifted in frequency by
fd = 2V/λ. If the receiver delivers that signal to a fast ADC, the target's
radial speed follows from the strongest line in the spectrum:
**V = λ · fd / 2**. This RTL is the digital half of such a receiver, built as a
stand-alone spectral analyser for an FPGA. It captures 1024 consecutive samples
from a 12-bit, 500 MSPS ADC. It takes a 1024-point fixed-point FFT of them and
forms the power spectrum. It then picks the peak bin and converts the peak
frequency to a velocity. It repeats this for as long as `run` is high.

Headline numbers (all defaults of the RTL):

| quantity | value |
|---|---|
| sample rate | 500 MSPS (one sample every 2 ns) |
| ADC resolution / stored sample | 12 bits, sign-extended to 16-bit words |
| FFT | 1024 points, radix-2, decimation in frequency, no scaling |
| bin width | 500 MHz / 1024 = 488.28 kHz (about 500 kHz) |
| highest input frequency | 200 MHz = bin 409.6 (Nyquist is 250 MHz, bin 512) |
| wavelength in V = λ·fd/2 | 1.498962 m (a 200 MHz carrier), parameter `LAMBDA` in µm |
| processing time per frame | 13 322 processing clocks from FFT start to result |

## Data path

```
adc_data ──► adc_if ──► input SRAM ──► fft_r2dif ──► result SRAM ──► psd_calc ──► freq_measure ──► velocity_calc
 (adc_clk)   capture    1024 x 16      1024-pt FFT   1024 x {Re,Im}  |X|^2 stream  peak bin, fd      V = λ·fd/2
                        adc_clk│clk                                    │
                                                                       └──► psd_valid / psd_bin / psd_power (to a display)
                         spectral_ctrl sequences all of it (clk domain)
```

| file | role |
|---|---|
| `rtl/spectral_analyzer_top.sv` | top level; wires the chain and the controller |
| `rtl/adc_if.sv` | takes one frame of samples at the sample clock and writes them to the input SRAM |
| `rtl/sram_dp.sv` | simple dual-port RAM with separate write and read clocks; used for the input and result buffers |
| `rtl/fft_r2dif.sv` | in-place radix-2 DIF FFT engine |
| `rtl/fft_bfly.sv`, `rtl/twiddle_rom.sv`, `rtl/tdp_ram.sv` | its butterfly, twiddle table and working RAM |
| `rtl/psd_calc.sv` | sweeps the result SRAM and streams Re² + Im² per bin |
| `rtl/freq_measure.sv` | peak search over bins 1..511, frequency = k · fs / N |
| `rtl/velocity_calc.sv` | V = λ·fd/2 as one constant multiply |
| `rtl/spectral_ctrl.sv` | sequencer and input-buffer ownership |
| `rtl/cdc_sync.sv`, `rtl/rst_sync.sv` | two-flop synchroniser, reset synchroniser |
| `rtl/spa_pkg.sv` | shared constants and the sequencer state type |

## Two clocks and who owns the input buffer

The capture side runs on `adc_clk`, which is the ADC's sample clock: 500 MHz, one
word written every cycle. Everything else runs on `clk`, which can be far
slower. The intended processing cycle is 200 ns, and the testbench runs the
two clocks 2 ns against 200 ns. Only two things cross between the domains:

* **The input SRAM.** It is written on `adc_clk` and read on `clk`. The
  protocol guarantees that the two sides never touch it at the same time.
* **Two toggle signals, each through a two-flop synchroniser.** The controller
  flips `arm_tgl` to ask for a frame. `adc_if` writes the next 1024 samples to
  addresses 0..1023, one per clock with no gaps. It flips `cap_tgl` on the
  clock edge that performs the last write. Because of that, the whole frame is
  in the RAM before the other domain can see the toggle.

`spectral_ctrl` tracks who owns the buffer:
EMPTY → FILLING → FULL → LOADING → EMPTY.

* A frame is requested as soon as the buffer is EMPTY and `run` is high.
* The FFT starts when the buffer is FULL and the sequencer is waiting.
* The FFT pulses `in_free` once it has copied the 1024 samples into its own
  working RAM. That pulse returns the buffer to EMPTY.

So the next frame is captured while the current one is still in the FFT
butterflies. `arm_overlap` marks each request made this way. Samples that
arrive while no frame is requested are dropped. The frames are therefore
snapshots, not a gap-free stream. A frame lasts 2 µs, while processing takes
13 322 processing clocks (2.7 ms at 200 ns).

The sequencer states (`spa_pkg::ctrl_state_e`) are IDLE, WAIT_CAP, FFT, PSD,
VEL and REPORT. REPORT pulses `result_valid` and increments `frame_count`.
When `run` falls, a frame that is already captured is still processed, and
then the sequencer goes idle.

## The FFT engine (`fft_r2dif`)

**Schedule.** The engine works on one true dual-port working RAM of N complex
words and has a single butterfly unit.

1. **LOAD**, N + 2 clocks. It reads x[0..N-1] from the input SRAM, which has a
   one-clock read latency. It stores each sample with a zero imaginary part.
   The input is real.
2. **Stages**, log2 N of them, each with N/2 butterflies. In stage s,
   butterfly j combines words a and a + h:
   * h = N / 2^(s+1)
   * a = ((j >> log2(h)) << log2(2h)) | (j mod h)
   * twiddle exponent (j mod h) · 2^s

   The DIF butterfly is x = a + b and y = (a − b) · W. Each butterfly takes
   two clocks. In the first, both ports read the operands and the twiddle
   ROM reads W. In the second, both ports write the results. Reads and writes
   alternate, so a read never sees a stale word, not even across a stage
   boundary. There are no stalls.
3. **UNLOAD**, N + 1 clocks. The DIF result sits in bit-reversed order. It is
   read at address bitrev(k) for k = 0..N-1 and streamed out in natural order
   as `out_valid`/`out_idx`/`out_re`/`out_im`. The top writes this stream
   into the result SRAM.

The total from `start` to `done` is (N+2) + N·log2 N + (N+1) clocks, which is
12 291 at N = 1024. This design does not aim for throughput: one butterfly
every two clocks is the simplest structure that fits a block RAM.

**Numbers.**
* Nothing is scaled. X[0] is exactly the integer sum of the samples.
* For real 16-bit input the outputs need 16 + 10 + 1 = 27 bits, and that is
  their width.
* Inside, the working words carry 3 extra fraction bits (30 bits per
  component). The butterfly rounds its products to this precision. The output
  drops the extra bits by truncation, so each output is the internal
  30-bit result rounded down to an integer.
* Truncating inside the butterfly instead would add a bias of half an LSB per
  stage, which later stages spread into every bin. In simulation at
  N = 1024 that gives errors of up to about 350 LSB.
* Twiddles are 16-bit Q2.14, so W⁰ = 1 is exact. The table is
  re = round(cos(2πk/N)·2¹⁴) and im = −round(sin(2πk/N)·2¹⁴) for
  k = 0..N/2−1. It is computed when the design is elaborated; no data file is
  needed.
* Measured against a double-precision DFT at N = 1024:
  * impulse and constant inputs: exact;
  * two 12-bit tones: at most 21 LSB of error;
  * full-scale random 16-bit input: at most about 90 LSB, on outputs of
    about 2²⁰.

## Power spectrum, peak and velocity

`psd_calc` reads the result SRAM from bin 0 to bin N−1, one bin per clock.
It streams P[k] = Re² + Im², which is 54 bits wide, with no normalisation.
Bin k appears k + 2 clocks after start. The stream is also the top's display
output (`psd_valid`, `psd_bin`, `psd_power`).

`freq_measure` keeps the strongest bin among 1..N/2−1 and ignores the rest:
* Bin 0 holds DC and any ADC offset.
* The upper half mirrors the lower half for a real input.
* On a tie the lower bin wins.

It reports `peak_bin`, `peak_power` and `doppler_hz` = ⌊k · fs / N⌋ one clock
after the last bin. The frequency resolution is therefore one bin, 488 kHz.
There is no interpolation between bins.

`velocity_calc` computes V in mm/s as (fd · K) >> 32, rounded, where
K = round(λ[µm] · 2³¹ / 1000). This is λ/2 in mm per Hz, with 32 fraction
bits. The input is real-valued, so the spectrum cannot tell approach from
recession, and V is a magnitude.

## How far to trust it, and where it departs from its source

Each block was checked on its own and end to end against values worked out
independently in the testbenches. The design has not been synthesised for a
particular FPGA or timed. Closing timing at 500 MHz on `adc_clk` is up to the
implementation: that path is only a register, a counter and a RAM write port.

These choices were made where the source description is silent or unclear:

* **ADC width.** The named converter has 12 bits, but the prototype is also
  described as having 16-bit resolution. The RTL takes 12-bit samples
  (`ADC_W`) and stores them as 16-bit words (`SAMPLE_W`). Both are
  parameters.
* **ADC coding.** Two's complement is assumed. Set `OFFSET_BINARY` in
  `adc_if` for offset-binary converters.
* **Not built:**
  * the LVDS input buffers and level translators, which are pads: `adc_data`
    is the single-ended bus after them;
  * the ADC itself;
  * the LCD driver: its display and protocol are not specified, and the PSD
    stream and the per-frame results are the ports it would use;
  * the analog radar front end (transmitter, duplexer, antenna, receiver).
* **Parity.** The memory of the original work has block-RAM parity outputs.
  They are not modelled.
* **FFT internals** are this design's own: the memory organisation, the
  schedule, the twiddle format and the guard bits. So is the separate working
  RAM. Together with the input and result buffers this makes three 1024-word
  memories. A leaner version could run the FFT in place in the result buffer.
* **PSD** is the unnormalised |X|². If a display needs dB or a 1/N scale,
  that belongs in the display driver.
* **Wavelength.** The default is that of a 200 MHz carrier. The formula is
  applied to the frequency that the spectrum shows. That is the Doppler shift
  only if the receiver has already mixed the echo down. With the default
  wavelength, a tone at 100 MHz gives 7.5 × 10⁷ m/s, so set `LAMBDA` for the
  real radar.
* **Frame control** is new: the request/complete handshake, dropping samples
  between frames, and capture overlapping processing.
* **Reset.** One asynchronous active-low reset, released separately in each
  clock domain. Memories are not cleared.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Build one with plain Verilator 5, for
example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb rtl/spa_pkg.sv \
          tb/tb_spectral_analyzer_top.sv --top-module tb_spectral_analyzer_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_spectral_analyzer_top` | The whole design at default parameters with a behavioural ADC (`tb/ads5463_model.sv`) and tones of 0.6, 61.3, 100.1, 150 and 199.9 MHz. For each frame it checks the PSD stream, peak bin, peak power, frequency, velocity and frame count. It counts frames captured, samples dropped, captures that overlap processing, FFT passes and PSD sweeps, and fails if any of these never happens. Runs in about 4 s. |
| `tb_fft_r2dif` | 1024-point FFT against a double-precision DFT. X[0] must equal the exact sum, an impulse must give an exact flat spectrum and a constant an exact single bin. Also checks output order and the 12 291-clock latency. |
| `tb_fft_r2dif_64` | The same checks on a 64-point instance. |
| `tb_adc_if` | Frame length, back-to-back addresses, sign extension, offset-binary option, request-to-write latency, completion toggle, and that nothing is written between frames. |
| `tb_sram_dp` | Full-frame write at 2 ns and read-back at 20 ns, partial rewrites, read latency, output hold. |
| `tb_psd_calc` | Powers against 64-bit arithmetic, including the most negative values, plus timing and the `last`/`done` strobes. |
| `tb_freq_measure` | Peaks planted among random spectra. Larger values at DC and in the upper half must be ignored. Also checks ties, band edges and stalls in the stream. |
| `tb_velocity_calc` | V = λ·fd/2 within 1 mm/s from 0 to 250 MHz. |
| `tb_spectral_ctrl` | Sequencing rules with randomly delayed responders: no FFT on an incomplete frame, no request before the buffer is released, one result per frame, overlap, and a clean stop. |

To change the size, override `N` on the top. N must be a power of two; the
widths follow from it. Other parameters are `FS` (Hz), `LAMBDA` (µm) and `TW`
(twiddle width). With `IW` and `N` as parameters, the result word is
2 · (IW + log2 N + 1) bits.
