# FFT-based FIR filter core

This core filters an endless stream of samples with a long FIR filter. The
convolution is done in the frequency domain, not with a tapped delay line.
The stream is cut into blocks of N/2 samples. Each new block and the block
before it form a frame of N samples. The frame goes through four steps:

1. It is multiplied by a time window.
2. It is transformed with an N-point FFT.
3. It is multiplied by a frequency response that the core builds itself from
   two bin numbers.
4. It is transformed back.

The middle N/2 samples of the result are the output. The outer quarters hold
the circular wrap-around of the frequency-domain product, so they are thrown
away.

The impulse response has up to N/2 taps. With the default N = 1024 that is a
512-tap filter. Its pass band can be changed from frame to frame without
recomputing any coefficients.

The core takes two real channels, or one complex signal. Its features:

- **Two filters.** Each real channel gets its own band-pass filter. FILTER
  selects one of four modes: bypass, band pass, band pass plus
  differentiator, or band pass plus double differentiator.
- **Spectrum output.** The spectrum of every windowed frame is available on
  a side port.
- **Block floating point.** All FFT arithmetic uses block floating point, so
  16-bit words keep their precision through both transforms.

## Top level: `fft_filter`

| Parameter | Default | Meaning |
|---|---|---|
| `IWIDTH` | 16 | input sample width (two's complement) |
| `OWIDTH` | 16 | output and spectrum width; also the width of the internal data words |
| `WWIDTH` | 16 | width of twiddle factors and window coefficients |
| `NCODE`  | 10 | log2 of the FFT length N (6..10 gives N = 64..1024) |
| `REAL`   | 1  | 1: two real channels, each with its own filter; 0: one complex signal |
| `TRANS`  | 16 | width in bins of each filter edge (a power of two) |
| `SPECTRUM` | 1 | 1: spectrum output attached; 0: detached (ports tied to 0, registers removed) |

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `CLK`, `CE`, `RST` | in | 1 | clock, clock enable (freezes the whole core), synchronous reset |
| `START` | in | 1 | pulse: clear the input history and start accepting samples |
| `DATAE` | in | 1 | a sample is valid on `DATAIRE`/`DATAIIM` |
| `DATAIRE`, `DATAIIM` | in | IWIDTH | channel 1 / channel 2 (or real / imaginary part) |
| `FILTER` | in | 2 | 00 bypass, 01 band pass, 10 band pass + d/dt, 11 band pass + d²/dt² |
| `L1`, `H1`, `L2`, `H2` | in | NCODE | -3 dB bins of the lower and upper edges of filters 1 and 2 |
| `READY` | out | 1 | a result sample is valid |
| `ADDRESS` | out | NCODE | position of that sample within its block of N/2 |
| `DATAORE`, `DATAOIM` | out | OWIDTH | filtered channel 1 / channel 2 |
| `WESP` | out | 1 | a spectrum bin is valid |
| `SPRDY` | out | 1 | marks the first bin of a frame's spectrum |
| `SPRE`, `SPIM` | out | OWIDTH | spectrum bin mantissa |
| `FREQ` | out | NCODE | bin number of that spectrum sample |
| `SPEXP` | out | 4 | common exponent of the frame's spectrum: bin = mantissa · 2^SPEXP |

A bin code k stands for the frequency k·Fs/N. The edge of each filter is
-3 dB exactly at its code. `L = 0` removes the lower edge, which turns the
filter into a low pass. `H = N-1` puts the upper edge beyond the Nyquist bin,
which gives a high pass. A band stop cannot be set: each filter is one pass
band. Codes and FILTER are sampled when a frame starts.

### Timing

- **Input.** Samples may arrive at any rate up to one per `4·NCODE + 5`
  clocks (45 clocks for N = 1024). One frame takes `(2·NCODE + 2.5)·N`
  clocks, and a frame is started for every N/2 input samples.
- **Output.** The N/2 results of a frame come out in a burst, one per clock,
  with `ADDRESS` counting 0..N/2-1. Overall, the output stream is the input
  stream delayed by N/4 samples plus the processing time. The last result of
  a block appears `2·NCODE·N + 2.5·N + 6` clocks after the last input sample
  of that block (934 clocks at N = 64).
- **Spectrum.** The N spectrum bins appear on `WESP` during the middle of the
  frame, one every two clocks. They come in the order 0, 1, N-1, 2, N-2, …,
  N/2, and `FREQ` names each one.

## How a frame is processed

All passes work in place on one dual-port RAM of N complex words (`dp_ram`).
A controller in `fft_filter` sequences five kinds of pass over that RAM.

| Pass | Clocks | Work |
|---|---|---|
| load | N | read frame sample t from the input ring, multiply by the time window, write to bit-reversed address |
| forward FFT | NCODE × N | radix-2 decimation in time, one butterfly per two clocks |
| spectrum | N | per mirrored bin pair (i, N-i): separate channels, apply filters, pack |
| inverse FFT | NCODE × N | radix-2 decimation in frequency with conjugated twiddles |
| output | N/2 | read samples N/4 … 3N/4-1 (bit-reversed addresses), scale, saturate |

Each butterfly reads both operands through the two ports in one clock. It
writes both results back in the next clock.

- **Forward transform.** This is a DIT transform on bit-reversed input, so
  it gives the spectrum in natural order.
- **Inverse transform.** This is a DIF transform. It takes that natural-order
  spectrum and returns the time signal in bit-reversed order.

No separate reordering pass is needed.

### Input ring (`input_buffer`)

Samples arrive while a frame is being processed. They are written into a
ring of four N/2-sample slots. A frame reads the slot just completed and the
one before it. Two more slots absorb the samples that arrive meanwhile. A
slot that has not been filled since `START` reads as zero, so the first frame
sees silence as its history.

### Time window (`time_window`)

The window rises over the first N/4 samples as the first half of a Hanning
window. It is exactly 1 over the middle N/2 samples, and falls over the last
N/4 as the mirrored half.

The flat part covers exactly the samples that are kept. The window therefore
does not change the output. It only reduces the leakage seen in the spectrum
and in the discarded wrap-around samples.

### Frequency response (`freq_window`)

Each filter is the minimum of a rising edge at L and a falling edge at H.

- **Edge shape.** Each edge is the rising half of a Blackman window, `TRANS`
  bins long. Blackman has no ripple in the pass band and suppresses the stop
  band by more than 70 dB.
- **Edge position.** The edge sample that first reaches 0.7071 is placed on
  the code bin.

The same value is used for bins i and N-i, so the response is symmetric and
the filter is real.

### Channel separation and filtering (`spectrum_unit`)

Two real channels a and b are transformed together as one complex signal
x = a + j·b. After the FFT the two spectra are recovered from each mirrored
pair of bins:

    A(i) = (X(i) + X*(N-i)) / 2        B(i) = (X(i) - X*(N-i)) / (2j)

A is multiplied by H1 and B by H2. The two filtered spectra are packed back
as Z = Y1 + j·Y2 for a single inverse FFT. The real part of the result is
channel 1 and the imaginary part is channel 2. Z is stored at half value, to
keep one bit of headroom, and the exponent accounts for it.

With `REAL = 0` the complex spectrum is simply multiplied by H1 on both
sides of the spectrum.

**Differentiator.** Differentiation multiplies bin i by j·i/(N/2), which is
jω/π. The Nyquist bin is zeroed. Mode 11 applies this twice.

### Block floating point (`bfp_unit`, `fftdpath`)

The RAM holds mantissas with one common exponent for the whole array.

1. **Observe.** During every pass, `bfp_unit` ORs the magnitudes of all
   values written.
2. **Choose a shift.** At the end of the pass it picks a signed shift. The
   shift puts the largest value in [1/8, 1/4) of full scale, which leaves the
   two guard bits a radix-2 butterfly needs. It is a left shift if the data
   has become small, and a right shift if it has grown.
3. **Apply.** The butterfly (`fftdpath`) applies that shift to its operands
   on the next pass, and the shift is added to the exponent.

Right shifts round half to even, and products round to nearest. This keeps
repeated rescaling free of DC bias.

The output stage converts back to fixed point. It combines both transform
exponents, the 1/N of the inverse transform, the half-value packing, and the
difference between input and output widths. It then rounds and saturates to
`OWIDTH`.

### Twiddle factors and tables

`twiddle_rom` holds cos(2πk/N) and -sin(2πk/N) for k < N/2. All tables
(twiddles, time window, Blackman edge) are computed from these formulas at
elaboration, so there are no data files. Values are clipped to the symmetric
range ±(2^(W-1)-1). This means conjugating a twiddle for the inverse
transform can never overflow.

## Where this design departs from its source description

- **Throughput.** The reference quotes a sampling rate below Fclk/29 at
  N = 1024. It also describes its butterfly as reading one complex word
  and writing one complex word per clock. At that memory rate the two
  1024-point transforms alone need 40 clocks per input sample, so the two
  statements do not agree. This core follows the memory rate: one
  butterfly per two clocks. With the load, spectrum and output passes that
  gives one sample per 45 clocks, so running 2.5 MS/s needs a clock of
  about 113 MHz.
- **Differentiator gain.** The reference multiplies bin i by the integer i.
  Here the factor is i/(N/2), which keeps the gain at or below 1. The
  response has the same shape, scaled by a constant.
- **Precision.** The reference quotes a 70 dB signal-to-noise ratio for a
  16-bit 1024-point FFT. Here it is measured through the whole filter
  (windowing, both transforms, filtering) at N = 1024 with 16-bit words.
  - **Bypass and band-pass frames.** The RMS signal-to-noise ratio is
    about 56–58 dB. The worst single-sample error is about 50 dB below the
    signal peak.
  - **Differentiator frames.** These score lower (41–50 dB). Their output
    is smaller, while the noise floor is set by the full-scale spectrum.
  - **Likely cause.** Each butterfly keeps two guard bits, and each
    transform has ten rounding stages. This probably explains most of the
    gap to 70 dB; it has not been measured separately.

  In the frequency-response sweep, the gain 40 kHz or more outside the pass
  band is -69 dB or lower.
- **Edge width.** The width of the filter edges (`TRANS` = 16 bins) and the
  placement of the -3 dB point are this design's choices.
- **Time window.** The N/4 : N/2 : N/4 split of the time window is this
  design's choice.
- **Spectrum output.** The reference describes the spectrum output without
  its order. Here it comes in mirrored-pair order, with `FREQ` tagging each
  bin. A negative block exponent is folded into the mantissa, so `SPEXP`
  stays within 0..15.
- **Block RAM.** The vendor block RAM of the reference is replaced by a
  generic inferable dual-port RAM.

## Files

`rtl/`:

- `fft_filter_pkg.sv`: mode enum and the table generators.
- `fft_filter.sv`: the top level and pass controller.
- `dp_ram.sv`
- `input_buffer.sv`
- `time_window.sv`
- `freq_window.sv`
- `twiddle_rom.sv`
- `fftdpath.sv`: the butterfly.
- `bfp_unit.sv`
- `spectrum_unit.sv`

`tb/`:

- **Block testbenches.** There is one `<module>_tb.sv` for each block.
- **End-to-end testbenches.** These share `fft_filter_bench.svh`, which
  checks every output sample against a floating-point reference of the same
  frame algorithm. It also checks the spectrum port, the latency, and that
  every filter mode, a detached lower edge and a nonzero spectrum exponent
  all occurred.
  - `fft_filter_tb.sv` runs N = 64 with CE dropped at random on about a
    quarter of the clocks. A second core with the spectrum output detached
    runs beside it and must give identical results.
  - `fft_filter_complex_tb.sv` runs one complex signal (`REAL = 0`).
  - `fft_filter_wide_tb.sv` and `fft_filter_narrow_tb.sv` run the ends of
    the supported width range: 12-bit input with 18-bit data and
    coefficients, and 8 bits throughout.
  - `fft_filter_full_tb.sv` runs all defaults (N = 1024).
- **Frequency-response testbench.** `fft_filter_response_tb.sv` runs at the
  defaults with Fs = 2.5 MHz and a 100–200 kHz band pass (codes 41 and 82).
  It sweeps a tone from 0 to 400 kHz in 10 kHz steps, and measures the gain
  in dB for band pass and for band pass plus double differentiator. It
  checks the -3 dB edges, the flat pass band, the stop band, and the
  (f/fmax)² shape of the double differentiator.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.

## Simulating

With Verilator 5, give the package file and the testbench, and let `-y rtl`
find the modules. The end-to-end benches need `-Itb` for the shared include:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
        --top-module fft_filter_full_tb rtl/fft_filter_pkg.sv tb/fft_filter_full_tb.sv
    ./obj_dir/Vfft_filter_full_tb

A single block is built the same way, with its testbench as the top module:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl --top-module fftdpath_tb \
        rtl/fft_filter_pkg.sv tb/fftdpath_tb.sv

Each end-to-end simulation at N = 1024 takes well under a minute.
