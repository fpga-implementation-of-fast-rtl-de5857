// fft_filter_response_tb: measures the frequency response of the core at its
// default size (N = 1024) the way a bench would: tones of stepped frequency
// go in as a sine on the first channel and a cosine on the second, both
// channels are filtered by the same band pass, and the magnitude of the
// complex output (first + j*second channel) averaged over a settled frame,
// in dB against the input amplitude, is the response at that frequency.
// Setting: sampling rate 2500 kHz, band pass 100..200 kHz, so the codes are
// L = round(100*1024/2500) = 41 and H = round(200*1024/2500) = 82.
// Sweep 1 (FILTER = 01): pass band 125..175 kHz within +-0.5 dB, -3 dB
// (+-1.5 dB) at 100 and 200 kHz, at least 60 dB suppression at and below
// 50 kHz and at and above 250 kHz.
// Sweep 2 (FILTER = 11, band pass + double differentiator): in the pass band
// the response must follow (f/(Fs/2))**2, the differentiator squared, within
// 0.5 dB, and stay 60 dB down in the stop band.
module fft_filter_response_tb;
  localparam int  N     = 1024;
  localparam int  HALF  = N / 2;
  localparam int  RATE  = 48;
  localparam real FS    = 2500.0;   // kHz
  localparam real AMP   = 8000.0;
  localparam int  NPTS  = 41;       // 0, 10, ..., 400 kHz
  localparam real PI_R  = 3.14159265358979323846;

  logic CLK = 1'b0;
  logic CE = 1'b1;
  logic RST = 1'b1;
  logic START = 1'b0;
  logic DATAE = 1'b0;
  logic [1:0] FILTER = 2'b01;
  logic [9:0] L1 = 10'd41, H1 = 10'd82, L2 = 10'd41, H2 = 10'd82;
  logic signed [15:0] DATAIRE = '0, DATAIIM = '0;
  logic READY;
  logic [9:0] ADDRESS;
  logic signed [15:0] DATAORE, DATAOIM;
  logic SPRDY, WESP;
  logic signed [15:0] SPRE, SPIM;
  logic [9:0] FREQ;
  logic [3:0] SPEXP;

  fft_filter dut (.*);

  always #5 CLK = ~CLK;

  int checks = 0, failures = 0;
  int oframe = 0;
  real acc = 0.0;
  real frame_mag [2 * 2 * NPTS + 2];

  always @(posedge CLK) begin
    if (READY) begin
      acc += $sqrt(real'(DATAORE) * real'(DATAORE) + real'(DATAOIM) * real'(DATAOIM));
      if (ADDRESS == 10'(HALF - 1)) begin
        frame_mag[oframe] = acc / real'(HALF);
        acc = 0.0;
        oframe++;
      end
    end
  end

  function automatic real db(input real v);
    return 20.0 * $ln((v < 1e-6 ? 1e-6 : v)) / $ln(10.0);
  endfunction

  task automatic expect_range(input string what, input real f, input real v, input real lo, input real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL: %s at %0.0f kHz: %0.2f dB not in [%0.2f, %0.2f]", what, f, v, lo, hi);
    end
  endtask

  real ph = 0.0;
  initial begin
    real f, r, dexp;
    int seg = 0;
    repeat (4) @(posedge CLK);
    RST <= 1'b0;
    @(posedge CLK);
    START <= 1'b1;
    @(posedge CLK);
    START <= 1'b0;
    // two sweeps, two segments per frequency point; the frame made of both
    // segments of one point is the measured one
    for (int sw = 0; sw < 2; sw++) begin
      for (int p = 0; p < NPTS; p++) begin
        f = 10.0 * real'(p);
        for (int s = 0; s < N; s++) begin
          FILTER <= (sw == 0) ? 2'b01 : 2'b11;
          DATAIRE <= 16'($rtoi(AMP * $sin(ph)));
          DATAIIM <= 16'($rtoi(AMP * $cos(ph)));
          ph += 2.0 * PI_R * f / FS;
          DATAE <= 1'b1;
          @(posedge CLK);
          DATAE <= 1'b0;
          repeat (RATE - 1) @(posedge CLK);
        end
        seg += 2;
      end
    end
    wait (oframe == seg);
    for (int sw = 0; sw < 2; sw++) begin
      for (int p = 0; p < NPTS; p++) begin
        f = 10.0 * real'(p);
        // frames are numbered by segment; frame 2p+1 holds both segments of p
        r = db(frame_mag[sw * 2 * NPTS + 2 * p + 1] / AMP);
        $display("sweep %0d %5.0f kHz %8.2f dB", sw, f, r);
        dexp = (sw == 0) ? 0.0 : db((f / (FS / 2.0)) * (f / (FS / 2.0)));
        if (f >= 125.0 && f <= 175.0) expect_range("pass band", f, r, dexp - 0.5, dexp + 0.5);
        if (sw == 0 && (f == 100.0 || f == 200.0)) expect_range("band edge", f, r, -4.5, -1.5);
        if (f <= 50.0 || f >= 250.0) expect_range("stop band", f, r, -200.0, -60.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NPTS * N * RATE + 200000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
