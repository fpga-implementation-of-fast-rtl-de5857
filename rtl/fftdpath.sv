// fftdpath: the radix-2 FFT butterfly datapath of the core.
//
// Takes the two complex operands of one butterfly straight from the data RAM,
// first scales both by the block-floating-point shift chosen from the
// previous pass (`shift` > 0: right, rounded half to even so repeated scaling
// adds no DC bias; `shift` < 0: left), then computes either
//   decimation in time  (dif = 0):  a' = a + W*b,   b' = a - W*b
//   decimation in frequency (dif=1): a' = a + b,     b' = (a - b)*W
// where W is the twiddle factor, conjugated when `inv` is set (inverse FFT).
// The forward transform runs in DIT form on bit-reversed input and the inverse
// transform in DIF form, so the spectrum sits in natural order between them.
// The block is combinational: its result is written back to the RAM in the
// clock after the operands were read, one butterfly per two clocks.
// Products are rounded to nearest. With both operands below a quarter of full
// scale after the shift, no output can overflow DW bits. The sums are formed
// two bits wider and truncated; lint reports those two top bits as unused,
// which is expected since they only ever repeat the sign.
// The document names this unit FFTDPATH and has it compute the radix-2
// butterfly; operand scaling, rounding and the DIT/DIF pairing are this
// implementation's choice.
module fftdpath #(
  parameter int DW = 16,   // data width (owidth)
  parameter int WW = 16,   // coefficient width (wwidth)
  parameter int SW = 6     // shift width (signed)
) (
  input  logic                 dif,
  input  logic                 inv,
  input  logic signed [SW-1:0] shift,
  input  logic signed [DW-1:0] a_re,
  input  logic signed [DW-1:0] a_im,
  input  logic signed [DW-1:0] b_re,
  input  logic signed [DW-1:0] b_im,
  input  logic signed [WW-1:0] w_re,
  input  logic signed [WW-1:0] w_im,
  output logic signed [DW-1:0] x_re,   // a'
  output logic signed [DW-1:0] x_im,
  output logic signed [DW-1:0] y_re,   // b'
  output logic signed [DW-1:0] y_im
);

  localparam int PW = DW + 1 + WW + 1;
  localparam logic signed [PW-1:0] RND = PW'(1) <<< (WW - 2);

  logic signed [DW:0]   ar, ai, br, bi;     // scaled operands
  logic signed [DW:0]   mr, mi;             // multiplier operand
  logic signed [WW-1:0] wi;
  logic signed [PW-1:0] pr, pi;             // complex product
  logic signed [DW:0]   tr, ti;             // rounded product

  // Shift by s (right if positive, rounded half to even; left if negative).
  function automatic logic signed [DW:0] scale(input logic signed [DW-1:0] v,
                                               input logic signed [SW-1:0] s);
    logic signed [DW:0] q;
    logic signed [DW:0] r;
    logic signed [DW:0] half;
    if (s <= 0) return (DW+1)'(v) <<< (-s);
    q    = (DW+1)'(v) >>> s;
    r    = (DW+1)'(v) - (q <<< s);           // bits shifted out, >= 0
    half = (DW+1)'(1) <<< (s - 1);
    if (r > half || (r == half && q[0])) q = q + 1'b1;
    return q;
  endfunction

  // Results before truncation to DW bits (two guard bits, never needed)
  function automatic logic signed [DW-1:0] fit(input logic signed [DW+1:0] v);
    return DW'(v);
  endfunction

  always_comb begin
    ar = scale(a_re, shift);
    ai = scale(a_im, shift);
    br = scale(b_re, shift);
    bi = scale(b_im, shift);
    wi = inv ? -w_im : w_im;
    if (dif) begin
      mr = ar - br;
      mi = ai - bi;
    end else begin
      mr = br;
      mi = bi;
    end
    pr = PW'(mr) * PW'(w_re) - PW'(mi) * PW'(wi) + RND;
    pi = PW'(mr) * PW'(wi)   + PW'(mi) * PW'(w_re) + RND;
    tr = (DW+1)'(pr >>> (WW - 1));
    ti = (DW+1)'(pi >>> (WW - 1));
    if (dif) begin
      x_re = fit((DW+2)'(ar) + (DW+2)'(br));
      x_im = fit((DW+2)'(ai) + (DW+2)'(bi));
      y_re = fit((DW+2)'(tr));
      y_im = fit((DW+2)'(ti));
    end else begin
      x_re = fit((DW+2)'(ar) + (DW+2)'(tr));
      x_im = fit((DW+2)'(ai) + (DW+2)'(ti));
      y_re = fit((DW+2)'(ar) - (DW+2)'(tr));
      y_im = fit((DW+2)'(ai) - (DW+2)'(ti));
    end
  end

endmodule
