// fft_filter_complex_tb: end-to-end test of the FFT filter core for one complex signal (REAL = 0), 16-bit data and coefficients
// (N = 2**6, 4-bin filter edges), over eight frames that cycle through all
// FILTER modes with and without the high-pass edge. The checks are in
// fft_filter_bench.svh.
module fft_filter_complex_tb;
  localparam int  NCODE   = 6;
  localparam int  IWIDTH  = 16;
  localparam int  OWIDTH  = 16;
  localparam int  WWIDTH  = 16;
  localparam bit  REAL    = 1'b0;
  localparam int  TRANS   = 4;
  localparam int  NFRAMES = 8;
  localparam int  RATE    = 34;
  localparam real AMP     = 6000.0;
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
