// freq_window_tb: sweeps every bin 0..N/2 for several frequency-code pairs
// and all FILTER modes and compares H with the response computed in floating
// point from the Blackman edge formula. Also checks that the code bins sit at
// -3 dB (0.70..0.80), that L = 0 detaches the high-pass edge, that H = N-1
// gives a high pass, and that the stop band is exactly zero.
module freq_window_tb;
  localparam int LOGN  = 8;
  localparam int WW    = 16;
  localparam int TRANS = 16;
  localparam int N     = 2 ** LOGN;
  localparam real PI_R = 3.14159265358979323846;
  logic clk = 1'b0;
  logic ce = 1'b1;
  logic [1:0] mode = '0;
  logic [LOGN-1:0] lcode = '0, hcode = '0, bin = '0;
  logic [WW-1:0] h;
  int checks = 0, failures = 0;

  freq_window #(.LOGN(LOGN), .WW(WW), .TRANS(TRANS)) dut (.*);

  always #5 clk = ~clk;

  function automatic real bedge(input int d);
    real u;
    if (d < 0) return 0.0;
    if (d >= TRANS) return 1.0;
    u = (real'(d) + 0.5) / real'(TRANS);
    return 0.42 - 0.5 * $cos(PI_R * u) + 0.08 * $cos(2.0 * PI_R * u);
  endfunction

  function automatic int p3db();
    for (int k = 0; k < TRANS; k++) if (bedge(k) >= 0.70710678) return k;
    return TRANS - 1;
  endfunction

  initial begin
    int lc [5] = '{20, 0, 60, 5, 30};
    int hc [5] = '{50, 40, 100, 120, N - 1};  // last: high pass
    real ev, sc, lo, hi;
    sc = real'(1 << (WW - 1));
    for (int c = 0; c < 5; c++) begin
      for (int m = 0; m < 4; m++) begin
        mode <= 2'(m); lcode <= LOGN'(lc[c]); hcode <= LOGN'(hc[c]);
        for (int b = 0; b <= N / 2; b++) begin
          bin <= LOGN'(b);
          @(posedge clk);
          #1;
          lo = (lc[c] == 0) ? 1.0 : bedge(b - lc[c] + p3db());
          hi = bedge(hc[c] - b + p3db());
          ev = (m == 0) ? 1.0 : ((lo < hi) ? lo : hi);
          ev = ev * sc;
          checks++;
          if (real'(h) - ev > 1.0 || ev - real'(h) > 1.0) begin
            failures++; $display("FAIL: L=%0d H=%0d mode %0d bin %0d h=%0d exp %0.1f", lc[c], hc[c], m, b, h, ev);
          end
          if (m != 0 && (b == hc[c] || (b == lc[c] && lc[c] != 0))) begin
            checks++;
            if (real'(h) < 0.70 * sc || real'(h) > 0.80 * sc) begin
              failures++; $display("FAIL: code bin %0d level %0d not -3 dB", b, h);
            end
          end
          if (m != 0 && b > hc[c] + TRANS) begin
            checks++;
            if (h != 0) begin failures++; $display("FAIL: stop band bin %0d = %0d", b, h); end
          end
          if (m != 0 && lc[c] == 0 && b == 0) begin
            checks++;
            if (h != WW'(1 << (WW - 1))) begin failures++; $display("FAIL: HPF not detached"); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
