// time_window: ROM of the time window W applied to each N-sample frame.
//
// The window has three parts: the first quarter of the frame is the rising
// half of a Hanning window, the middle half is exactly 1, and the last quarter
// is the falling half of the Hanning window. Sample t of the rising part is
// 0.5*(1 - cos(pi*(t+0.5)/(N/4))). Values are unsigned fractions with
// 1.0 = 2**(WW-1), so the flat part is exact and the kept output samples
// (N/4 .. 3N/4-1) are not altered. Only the N/4 rising samples are stored; the
// falling part is read mirrored. The three-part Hanning/flat shape follows the
// design description; the quarter-frame taper length is this implementation's
// choice (it matches the discarded quarters of each frame).
// Timing: `w` follows `t` by one clock when `ce` is high.
module time_window #(
  parameter int LOGN = 10,   // frame length code, N = 2**n
  parameter int WW   = 16    // coefficient width
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [LOGN-1:0] t,
  output logic [WW-1:0] w
);
  import fft_filter_pkg::*;

  localparam int Q = 2 ** (LOGN - 2);
  typedef logic [WW-1:0] tab_t [Q];

  function automatic tab_t gen_table();
    tab_t tb;
    real v;
    for (int i = 0; i < Q; i++) begin
      v = 0.5 * (1.0 - $cos(PI * (real'(i) + 0.5) / real'(Q)));
      tb[i] = WW'($rtoi(v * real'(1 << (WW - 1)) + 0.5));
    end
    return tb;
  endfunction

  localparam tab_t TABLE = gen_table();

  logic [1:0]      quarter;
  logic [LOGN-3:0] idx;
  assign quarter = t[LOGN-1:LOGN-2];
  assign idx     = t[LOGN-3:0];

  always_ff @(posedge clk) begin
    if (ce) begin
      unique case (quarter)
        2'd0:    w <= TABLE[idx];
        2'd3:    w <= TABLE[(LOGN-2)'(Q - 1) - idx];
        default: w <= WW'(1 << (WW - 1));
      endcase
    end
  end

endmodule
