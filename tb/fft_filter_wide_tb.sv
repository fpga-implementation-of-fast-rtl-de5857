// fft_filter_wide_tb: end-to-end test of the FFT filter core at the widest data and coefficient widths (18 bits), 12-bit input
// (N = 2**6, 4-bin filter edges), over eight frames that cycle through all
// FILTER modes with and without the high-pass edge. The checks are in
// fft_filter_bench.svh.
module fft_filter_wide_tb;
  localparam int  NCODE   = 6;
  localparam int  IWIDTH  = 12;
  localparam int  OWIDTH  = 18;
  localparam int  WWIDTH  = 18;
  localparam bit  REAL    = 1'b1;
  localparam int  TRANS   = 4;
  localparam int  NFRAMES = 8;
  localparam int  RATE    = 34;
  localparam real AMP     = 375.0;
  localparam int  CE_GAP  = 0;

  `include "fft_filter_bench.svh"

  fft_filter #(
    .IWIDTH(IWIDTH), .OWIDTH(OWIDTH), .WWIDTH(WWIDTH),
    .NCODE(NCODE), .REAL(REAL), .TRANS(TRANS)
  ) dut (.*);

  // the bench body raises bench_done after printing its result
  initial begin
    wait (bench_done);
    $finish;
  end
endmodule
