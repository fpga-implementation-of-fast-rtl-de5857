// fft_filter_tb: end-to-end test of the FFT filter core at a reduced size
// (N = 64, 16-bit data and coefficients, two real channels, 4-bin filter
// edges), over eight frames that cycle through all FILTER modes with and
// without the high-pass edge, with CE dropped at random on about one clock
// in four. The checks are in fft_filter_bench.svh.
// A second core, built with its spectrum output detached, runs on the same
// inputs: its results must equal the first core's, and its spectrum port
// must stay silent.
module fft_filter_tb;
  localparam int  NCODE   = 6;
  localparam int  IWIDTH  = 16;
  localparam int  OWIDTH  = 16;
  localparam int  WWIDTH  = 16;
  localparam bit  REAL    = 1'b1;
  localparam int  TRANS   = 4;
  localparam int  NFRAMES = 8;
  localparam int  RATE    = 34;
  localparam real AMP     = 6000.0;
  localparam int  CE_GAP  = 4;

  `include "fft_filter_bench.svh"

  fft_filter #(
    .IWIDTH(IWIDTH), .OWIDTH(OWIDTH), .WWIDTH(WWIDTH),
    .NCODE(NCODE), .REAL(REAL), .TRANS(TRANS)
  ) dut (.*);

  logic                     ready_d, sprdy_d, wesp_d;
  logic [NCODE-1:0]         addr_d, freq_d;
  logic signed [OWIDTH-1:0] ore_d, oim_d, spre_d, spim_d;
  logic [3:0]               spexp_d;

  fft_filter #(
    .IWIDTH(IWIDTH), .OWIDTH(OWIDTH), .WWIDTH(WWIDTH),
    .NCODE(NCODE), .REAL(REAL), .TRANS(TRANS), .SPECTRUM(1'b0)
  ) dut_nosp (
    .CLK, .CE, .RST, .START, .DATAE, .FILTER, .L1, .H1, .L2, .H2,
    .DATAIRE, .DATAIIM,
    .READY(ready_d), .ADDRESS(addr_d), .DATAORE(ore_d), .DATAOIM(oim_d),
    .SPRDY(sprdy_d), .WESP(wesp_d), .SPRE(spre_d), .SPIM(spim_d),
    .FREQ(freq_d), .SPEXP(spexp_d)
  );

  always @(posedge CLK) begin
    if (!RST && CE && (READY || ready_d)) begin
      checks++;
      if (ready_d != READY || addr_d != ADDRESS || ore_d != DATAORE || oim_d != DATAOIM) begin
        failures++;
        $display("FAIL: core without spectrum output differs at address %0d", ADDRESS);
      end
    end
    if (!RST && (wesp_d || sprdy_d || spre_d != '0 || spim_d != '0 || freq_d != '0 || spexp_d != '0)) begin
      failures++;
      $display("FAIL: detached spectrum output is active");
    end
  end

  // the bench body raises bench_done after printing its result
  initial begin
    wait (bench_done);
    $finish;
  end
endmodule
