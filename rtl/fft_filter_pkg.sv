// fft_filter_pkg: shared types, constants and elaboration-time table generators
// for the FFT-based FIR filter core.
//
// The core filters an endless sample stream by sectioned (overlap) convolution:
// each frame of N = 2**n samples is windowed, transformed, multiplied by a
// synthesised frequency response and transformed back, and the middle half of
// the result is emitted. Everything below is shared by the datapath modules:
//   * filter_mode_e  - the FILTER input code (00 bypass, 01 band pass,
//                      10 band pass + differentiator, 11 + double differentiator),
//   * bit_reverse    - address reversal used by the in-place FFT,
//   * table generators for the twiddle factors, the time window and the
//     Blackman-shaped edge of the frequency window, evaluated at elaboration so
//     every table is a constant ROM,
//   * shift_sat      - arithmetic shift by a signed amount with saturation.
// The window shapes (Hanning halves, Blackman edges) follow the design
// description; edge length and the Q formats are this implementation's choice.
package fft_filter_pkg;

  typedef enum logic [1:0] {
    FILT_NONE   = 2'b00,  // no filtering, H = 1
    FILT_BAND   = 2'b01,  // low pass + high pass (band pass)
    FILT_DIFF1  = 2'b10,  // band pass + differentiator
    FILT_DIFF2  = 2'b11   // band pass + double differentiator
  } filter_mode_e;

  localparam real PI = 3.14159265358979323846;

  // Reverse the low `bits` bits of `a`.
  function automatic logic [15:0] bit_reverse(input logic [15:0] a, input int bits);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < bits; i++) r[bits-1-i] = a[i];
    return r;
  endfunction

  // Round a real to the nearest integer and clip it to the symmetric signed
  // `w`-bit range +-(2**(w-1)-1), so that negating a table value never overflows.
  function automatic int quant(input real v, input int w);
    int q;
    int maxv;
    maxv = (1 << (w - 1)) - 1;
    q = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (q > maxv) q = maxv;
    if (q < -maxv) q = -maxv;
    return q;
  endfunction

  // Blackman window rising edge g(u) = 0.42 - 0.5 cos(pi u) + 0.08 cos(2 pi u),
  // u in [0,1], sampled at u = (k + 0.5) / len, scaled so that 1.0 = 2**(w-1).
  function automatic int blackman_edge(input int k, input int len, input int w);
    real u;
    real g;
    u = (real'(k) + 0.5) / real'(len);
    g = 0.42 - 0.5 * $cos(PI * u) + 0.08 * $cos(2.0 * PI * u);
    return $rtoi(g * real'(1 << (w - 1)) + 0.5);
  endfunction

  // Index of the first edge sample whose level reaches -3 dB (0.7071).
  // The frequency code L or H is placed on that sample.
  function automatic int edge_3db_index(input int len);
    real u;
    real g;
    for (int k = 0; k < len; k++) begin
      u = (real'(k) + 0.5) / real'(len);
      g = 0.42 - 0.5 * $cos(PI * u) + 0.08 * $cos(2.0 * PI * u);
      if (g >= 0.70710678) return k;
    end
    return len - 1;
  endfunction

  // Arithmetic shift of `v` left by `sh` (right if negative), saturated to
  // a signed `w`-bit result (w <= 32). Right shifts round to nearest.
  function automatic logic signed [31:0] shift_sat(input logic signed [47:0] v,
                                                   input int sh, input int w);
    logic signed [63:0] x;
    logic signed [63:0] maxv;
    logic signed [63:0] minv;
    x = 64'(v);
    if (sh >= 0) x = x <<< sh;
    else         x = (x + (64'sd1 <<< (-sh - 1))) >>> (-sh);  // round to nearest
    maxv = (64'sd1 <<< (w - 1)) - 64'sd1;
    minv = -(64'sd1 <<< (w - 1));
    if (x > maxv) x = maxv;
    if (x < minv) x = minv;
    return 32'(x);
  endfunction

endpackage
