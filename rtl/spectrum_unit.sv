// spectrum_unit: frequency-domain processing between the forward and inverse FFT.
//
// Works on one pair of mirrored bins per call: X(i) and X(N-i), 0 <= i <= N/2
// (for i = 0 and i = N/2 both inputs are the same bin), and returns the two
// bins Z(i), Z(N-i) that the inverse FFT will transform.
//
// REAL = 1 (two real channels a + jb packed in one complex FFT):
//   A(i) = (X(i) + conj X(N-i))/2,  B(i) = (X(i) - conj X(N-i))/(2j)
//   Y1 = A*H1*D,  Y2 = B*H2*D,  Z(i) = Y1 + jY2,  Z(N-i) = conj Y1 + j conj Y2
//   so after the inverse FFT channel 1 is the real part and channel 2 the
//   imaginary part. Z is stored at half its value (one bit of headroom); the
//   caller adds 1 to the block exponent.
// REAL = 0 (one complex signal): Z(i) = X(i)*H1*D(i), Z(N-i) = X(N-i)*H1*D(N-i).
// D is 1 (modes 00, 01), j*w (10, differentiator) or (j*w)**2 (11). w is the
// signed bin number i (or i-N on the negative-frequency side) divided by N/2,
// which equals w/pi for the bin frequency w: the differentiator returns the
// per-sample derivative scaled by 1/pi, so its gain stays at or below 1 and
// a differentiated output cannot overflow. The Nyquist bin is zeroed by the
// differentiator.
// Inputs and outputs are DW-bit signed, H is an unsigned fraction with
// 1.0 = 2**(WW-1). Combinational.
// The separation formulas, the Y1 + jY2 packing and the "multiply by i and
// swap" differentiator follow the design description; the scaling (including
// the 1/pi gain of the differentiator) is this implementation's choice.
module spectrum_unit #(
  parameter int LOGN = 10,
  parameter int DW   = 16,
  parameter int WW   = 16,
  parameter bit REAL = 1'b1
) (
  input  logic [1:0]           mode,
  input  logic [LOGN-1:0]      bin,     // i, 0..N/2
  input  logic [WW-1:0]        h1,
  input  logic [WW-1:0]        h2,
  input  logic signed [DW-1:0] xi_re,
  input  logic signed [DW-1:0] xi_im,
  input  logic signed [DW-1:0] xp_re,
  input  logic signed [DW-1:0] xp_im,
  output logic signed [DW-1:0] zi_re,
  output logic signed [DW-1:0] zi_im,
  output logic signed [DW-1:0] zp_re,
  output logic signed [DW-1:0] zp_im
);
  import fft_filter_pkg::*;

  localparam int VW = DW + 1;                 // internal word width
  localparam int HALF = 2 ** (LOGN - 1);

  typedef struct packed {
    logic signed [VW-1:0] re;
    logic signed [VW-1:0] im;
  } cplx_t;

  // v * h, h an unsigned fraction (1.0 = 2**(WW-1)), rounded.
  function automatic logic signed [VW-1:0] mul_h(input logic signed [VW-1:0] v,
                                                 input logic [WW-1:0] h);
    logic signed [VW+WW:0] p;
    p = (VW+WW+1)'(v) * $signed({1'b0, h}) + ((VW+WW+1)'(1) <<< (WW - 2));
    return VW'(p >>> (WW - 1));
  endfunction

  // v * k / 2**(LOGN-1), k signed bin number with |k| <= N/2, rounded.
  function automatic logic signed [VW-1:0] mul_k(input logic signed [VW-1:0] v,
                                                 input logic signed [LOGN:0] k);
    logic signed [VW+LOGN+1:0] p;
    p = (VW+LOGN+2)'(v) * (VW+LOGN+2)'(k) + ((VW+LOGN+2)'(1) <<< (LOGN - 2));
    return VW'(p >>> (LOGN - 1));
  endfunction

  // Multiply by j*k/(N/2)
  function automatic cplx_t mul_jk(input cplx_t v, input logic signed [LOGN:0] k);
    cplx_t r;
    r.re = -mul_k(v.im, k);
    r.im =  mul_k(v.re, k);
    return r;
  endfunction

  // Multiply by H, then by j*k/(N/2) once per differentiator.
  function automatic cplx_t apply(input cplx_t v, input logic [WW-1:0] h,
                                  input logic signed [LOGN:0] k, input logic [1:0] m);
    cplx_t hv;
    cplx_t d1;
    cplx_t d2;
    hv.re = mul_h(v.re, h);
    hv.im = mul_h(v.im, h);
    d1 = mul_jk(hv, k);
    d2 = mul_jk(d1, k);
    unique case (filter_mode_e'(m))
      FILT_DIFF1: return d1;
      FILT_DIFF2: return d2;
      default:    return hv;
    endcase
  endfunction

  cplx_t a, b, y1, y2, zi, zp;
  logic signed [LOGN:0] k_pos, k_neg;
  logic nyq;

  always_comb begin
    nyq   = (bin == LOGN'(HALF));
    k_pos = nyq ? '0 : $signed({1'b0, bin});
    k_neg = -k_pos;
    a = '0; b = '0; y1 = '0; y2 = '0; zi = '0; zp = '0;
    zi_re = '0; zi_im = '0; zp_re = '0; zp_im = '0;
    if (REAL) begin
      // 2A and 2B (the halving is folded into the final shift)
      a.re = VW'(xi_re) + VW'(xp_re);
      a.im = VW'(xi_im) - VW'(xp_im);
      b.re = VW'(xi_im) + VW'(xp_im);
      b.im = VW'(xp_re) - VW'(xi_re);
      y1 = apply(a, h1, k_pos, mode);
      y2 = apply(b, h2, k_pos, mode);
      // Z/2 = (2Y1 + j2Y2)/4
      zi_re = DW'(((VW+1)'(y1.re) - (VW+1)'(y2.im)) >>> 2);
      zi_im = DW'(((VW+1)'(y1.im) + (VW+1)'(y2.re)) >>> 2);
      zp_re = DW'(((VW+1)'(y1.re) + (VW+1)'(y2.im)) >>> 2);
      zp_im = DW'(((VW+1)'(y2.re) - (VW+1)'(y1.im)) >>> 2);
    end else begin
      a.re = VW'(xi_re);
      a.im = VW'(xi_im);
      b.re = VW'(xp_re);
      b.im = VW'(xp_im);
      zi = apply(a, h1, k_pos, mode);
      zp = apply(b, h1, k_neg, mode);
      zi_re = DW'(zi.re);
      zi_im = DW'(zi.im);
      zp_re = DW'(zp.re);
      zp_im = DW'(zp.im);
    end
  end

endmodule
