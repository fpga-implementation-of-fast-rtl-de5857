// twiddle_rom_tb: reads every twiddle word and compares it with
// cos(2*pi*k/N) and -sin(2*pi*k/N) computed in floating point (within one
// LSB), and checks the one-clock read latency.
module twiddle_rom_tb;
  localparam int LOGN = 6;
  localparam int WW   = 12;
  localparam int HALF = 2 ** (LOGN - 1);
  localparam real PI_R = 3.14159265358979323846;
  logic clk = 1'b0;
  logic ce = 1'b1;
  logic [LOGN-2:0] k = '0;
  logic signed [WW-1:0] re, im;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOGN(LOGN), .WW(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    real sc, er, ei;
    sc = real'(1 << (WW - 1));
    for (int i = 0; i < HALF; i++) begin
      k <= (LOGN-1)'(i);
      @(posedge clk);
      #1;
      er = $cos(2.0 * PI_R * i / (2 * HALF)) * sc;
      ei = -$sin(2.0 * PI_R * i / (2 * HALF)) * sc;
      checks += 2;
      if (real'(re) - er > 1.0 || er - real'(re) > 1.0) begin
        failures++; $display("FAIL: k=%0d re %0d exp %0.1f", i, re, er);
      end
      if (real'(im) - ei > 1.0 || ei - real'(im) > 1.0) begin
        failures++; $display("FAIL: k=%0d im %0d exp %0.1f", i, im, ei);
      end
    end
    // special points: k = 0 is (max, 0), k = N/4 is (0, -max)
    k <= '0; @(posedge clk); #1;
    checks++;
    if (re != WW'((1 << (WW - 1)) - 1) || im != 0) begin failures++; $display("FAIL: k=0 %0d %0d", re, im); end
    k <= (LOGN-1)'(HALF / 2); @(posedge clk); #1;
    checks++;
    if (re != 0 || im != -WW'((1 << (WW - 1)) - 1)) begin failures++; $display("FAIL: k=N/4 %0d %0d", re, im); end
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
