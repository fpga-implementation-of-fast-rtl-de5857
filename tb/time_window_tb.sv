// time_window_tb: reads the whole window and compares it with the
// three-part formula (rising Hanning half over the first quarter, exactly 1
// over the middle half, falling Hanning half over the last quarter), and
// checks symmetry and the one-clock latency.
module time_window_tb;
  localparam int LOGN = 6;
  localparam int WW   = 14;
  localparam int N    = 2 ** LOGN;
  localparam int Q    = N / 4;
  localparam real PI_R = 3.14159265358979323846;
  logic clk = 1'b0;
  logic ce = 1'b1;
  logic [LOGN-1:0] t = '0;
  logic [WW-1:0] w;
  logic [WW-1:0] got [N];
  int checks = 0, failures = 0;

  time_window #(.LOGN(LOGN), .WW(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    real ev, sc;
    int tt;
    sc = real'(1 << (WW - 1));
    for (int i = 0; i < N; i++) begin
      t <= LOGN'(i);
      @(posedge clk);
      #1;
      got[i] = w;
      tt = (i >= 3 * Q) ? N - 1 - i : i;
      ev = (tt < Q) ? 0.5 * (1.0 - $cos(PI_R * (real'(tt) + 0.5) / real'(Q))) : 1.0;
      ev = ev * sc;
      checks++;
      if (real'(w) - ev > 1.0 || ev - real'(w) > 1.0) begin
        failures++; $display("FAIL: t=%0d w=%0d exp %0.1f", i, w, ev);
      end
      if (i >= Q && i < 3 * Q) begin
        checks++;
        if (w != WW'(1 << (WW - 1))) begin failures++; $display("FAIL: t=%0d not exactly 1", i); end
      end
    end
    for (int i = 0; i < N / 2; i++) begin
      checks++;
      if (got[i] != got[N - 1 - i]) begin failures++; $display("FAIL: asymmetric at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
