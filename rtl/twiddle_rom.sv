// twiddle_rom: constant ROM of the FFT rotation factors.
//
// Word k (0 <= k < N/2) holds W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) as two
// signed WW-bit fractions (full scale 2**(WW-1) = 1.0, the value 1.0 itself is
// clipped to 2**(WW-1)-1). The table is computed at elaboration from the
// formula. The read is registered: `re`/`im` follow `k` by one clock when
// `ce` is high. The coefficient width WW corresponds to the core's `wwidth`
// generic; the table layout and rounding are this implementation's choice.
module twiddle_rom #(
  parameter int LOGN = 10,   // FFT length code n, N = 2**n
  parameter int WW   = 16    // coefficient width
) (
  input  logic                 clk,
  input  logic                 ce,
  input  logic [LOGN-2:0]      k,
  output logic signed [WW-1:0] re,
  output logic signed [WW-1:0] im
);
  import fft_filter_pkg::*;

  localparam int HALF = 2 ** (LOGN - 1);
  typedef logic signed [WW-1:0] tab_t [HALF];

  // part = 0: cos(2*pi*i/N), part = 1: -sin(2*pi*i/N)
  function automatic tab_t gen_table(input int part);
    tab_t t;
    real ang;
    real sc;
    sc = real'(1 << (WW - 1));
    for (int i = 0; i < HALF; i++) begin
      ang = 2.0 * PI * real'(i) / real'(2 * HALF);
      if (part == 0) t[i] = WW'(quant($cos(ang) * sc, WW));
      else           t[i] = WW'(quant(-$sin(ang) * sc, WW));
    end
    return t;
  endfunction

  localparam tab_t TAB_RE = gen_table(0);
  localparam tab_t TAB_IM = gen_table(1);

  always_ff @(posedge clk) begin
    if (ce) begin
      re <= TAB_RE[k];
      im <= TAB_IM[k];
    end
  end

endmodule
