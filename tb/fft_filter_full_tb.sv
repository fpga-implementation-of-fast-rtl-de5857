// fft_filter_full_tb: end-to-end test of the FFT filter core with every
// parameter at its default (N = 1024, 16-bit data and coefficients, two real
// channels, 16-bin filter edges), over eight frames that cycle through all
// FILTER modes with and without the high-pass edge. The checks are in
// fft_filter_bench.svh.
module fft_filter_full_tb;
  localparam int  NCODE   = 10;
  localparam int  IWIDTH  = 16;
  localparam int  OWIDTH  = 16;
  localparam int  WWIDTH  = 16;
  localparam bit  REAL    = 1'b1;
  localparam int  TRANS   = 16;
  localparam int  NFRAMES = 8;
  localparam int  RATE    = 48;
  localparam real AMP     = 6000.0;
  localparam int  CE_GAP  = 0;

  `include "fft_filter_bench.svh"

  fft_filter dut (.*);

  // the bench body raises bench_done after printing its result
  initial begin
    wait (bench_done);
    $finish;
  end
endmodule
