// freq_window: synthesises the frequency response H(i) of one band-pass filter.
//
// Instead of storing a coefficient set, the response is generated bin by bin
// from two frequency codes: `lcode` (high-pass edge) and `hcode` (low-pass
// edge), both bin numbers at which the response is -3 dB. Each edge is a
// TRANS-bin Blackman-shaped transition (no pass-band ripple, high stop-band
// suppression) held in a small constant table; the edge sample that reaches
// -3 dB is placed on the code bin. H(i) is the smaller of the rising (high-pass)
// and falling (low-pass) edge values. `lcode` = 0 detaches the high-pass edge.
// In mode FILT_NONE the response is 1 everywhere. The response is defined for
// bins 0..N/2; the caller mirrors it (H(N-i) = H(i)).
// Output: unsigned fraction, 1.0 = 2**(WW-1). Timing: `h` follows `bin` by one
// clock when `ce` is high.
// From the design description: codes are -3 dB bin numbers, L = 0 detaches the
// HPF, Blackman-shaped response, FILTER code 00 means no filtering. The edge
// length TRANS and the table form are this implementation's choice.
module freq_window #(
  parameter int LOGN  = 10,  // FFT length code n
  parameter int WW    = 16,  // coefficient width
  parameter int TRANS = 16   // transition width in bins
) (
  input  logic            clk,
  input  logic            ce,
  input  logic [1:0]      mode,    // FILTER code
  input  logic [LOGN-1:0] lcode,
  input  logic [LOGN-1:0] hcode,
  input  logic [LOGN-1:0] bin,
  output logic [WW-1:0]   h
);
  import fft_filter_pkg::*;

  typedef logic [WW-1:0] tab_t [TRANS];

  function automatic tab_t gen_table();
    tab_t t;
    for (int k = 0; k < TRANS; k++) t[k] = WW'(blackman_edge(k, TRANS, WW));
    return t;
  endfunction

  localparam tab_t EDGE = gen_table();
  localparam int   P    = edge_3db_index(TRANS);
  localparam logic [WW-1:0] ONE = WW'(1 << (WW - 1));

  // Edge value at signed distance d from the start of the transition.
  function automatic logic [WW-1:0] edge_val(input logic signed [LOGN+1:0] d);
    if (d < 0)                              return '0;
    else if (d >= (LOGN+2)'(TRANS))         return ONE;
    else                                    return EDGE[d[$clog2(TRANS)-1:0]];
  endfunction

  logic signed [LOGN+1:0] d_lo;
  logic signed [LOGN+1:0] d_hi;
  logic [WW-1:0] g_lo;
  logic [WW-1:0] g_hi;
  logic [WW-1:0] h_next;

  always_comb begin
    d_lo = $signed({2'b00, bin}) - $signed({2'b00, lcode}) + (LOGN+2)'(P);
    d_hi = $signed({2'b00, hcode}) - $signed({2'b00, bin}) + (LOGN+2)'(P);
    g_lo = (lcode == '0) ? ONE : edge_val(d_lo);
    g_hi = edge_val(d_hi);
    if (filter_mode_e'(mode) == FILT_NONE) h_next = ONE;
    else                                   h_next = (g_lo < g_hi) ? g_lo : g_hi;
  end

  always_ff @(posedge clk) begin
    if (ce) h <= h_next;
  end

endmodule
