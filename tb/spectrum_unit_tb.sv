// spectrum_unit_tb: random mirrored bin pairs X(i), X(N-i) through both
// configurations (two real channels and one complex signal) in all FILTER
// modes, against a floating-point model of the channel separation, the
// filter multiplication (H comes from the frequency-window generator, which
// supplies 1.0 in mode 00), the differentiators (j*k/(N/2), zero at Nyquist)
// and the Y1 + jY2 packing. Tolerance 2 LSB.
module spectrum_unit_tb;
  localparam int LOGN = 6;
  localparam int DW   = 16;
  localparam int WW   = 16;
  localparam int N    = 2 ** LOGN;
  localparam int HALF = N / 2;
  logic [1:0] mode = '0;
  logic [LOGN-1:0] bin = '0;
  logic [WW-1:0] h1 = '0, h2 = '0;
  logic signed [DW-1:0] xi_re = '0, xi_im = '0, xp_re = '0, xp_im = '0;
  logic signed [DW-1:0] r_zi_re, r_zi_im, r_zp_re, r_zp_im;
  logic signed [DW-1:0] c_zi_re, c_zi_im, c_zp_re, c_zp_im;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  spectrum_unit #(.LOGN(LOGN), .DW(DW), .WW(WW), .REAL(1'b1)) dut_real (
    .mode, .bin, .h1, .h2, .xi_re, .xi_im, .xp_re, .xp_im,
    .zi_re(r_zi_re), .zi_im(r_zi_im), .zp_re(r_zp_re), .zp_im(r_zp_im));
  spectrum_unit #(.LOGN(LOGN), .DW(DW), .WW(WW), .REAL(1'b0)) dut_cplx (
    .mode, .bin, .h1, .h2, .xi_re, .xi_im, .xp_re, .xp_im,
    .zi_re(c_zi_re), .zi_im(c_zi_im), .zp_re(c_zp_re), .zp_im(c_zp_im));

  always #5 clk = ~clk;

  task automatic cmp(input string what, input logic signed [DW-1:0] got, input real e);
    checks++;
    if (real'(got) - e > 2.0 || e - real'(got) > 2.0) begin
      failures++;
      $display("FAIL: mode %0d bin %0d %s = %0d exp %0.2f", mode, bin, what, got, e);
    end
  endtask

  // (vr + j vi) * g * D(k)^m, D = j*k/(N/2)
  task automatic filt(input real vr, input real vi, input real g, input int k, input int m,
                      output real orr, output real oi);
    real t;
    orr = vr * g; oi = vi * g;
    for (int r = 0; r < m; r++) begin
      t = -oi * real'(k) / real'(HALF);
      oi = orr * real'(k) / real'(HALF);
      orr = t;
    end
  endtask

  initial begin
    real ar, ai, br, bi, g1, g2, y1r, y1i, y2r, y2i, zr, zi;
    int i, m, kk;
    for (int it = 0; it < 2000; it++) begin
      i = (it % 17 == 0) ? 0 : (it % 17 == 1) ? HALF : int'($urandom_range(1, HALF - 1));
      mode <= 2'($urandom);
      bin <= LOGN'(i);
      h1 <= (it % 3 == 0) ? WW'(1 << (WW - 1)) : WW'($urandom_range(0, 1 << (WW - 1)));
      h2 <= WW'($urandom_range(0, 1 << (WW - 1)));
      xi_re <= DW'($signed($urandom_range(0, 40000)) - 20000);
      xi_im <= DW'($signed($urandom_range(0, 40000)) - 20000);
      xp_re <= DW'($signed($urandom_range(0, 40000)) - 20000);
      xp_im <= DW'($signed($urandom_range(0, 40000)) - 20000);
      if (i == 0 || i == HALF) begin
        // self-paired bins: both inputs are the same bin
        @(posedge clk);
        xp_re <= xi_re; xp_im <= xi_im;
      end
      @(posedge clk);
      #1;
      m = (mode == 2'b10) ? 1 : (mode == 2'b11) ? 2 : 0;
      kk = (m > 0 && i == HALF) ? 0 : i;
      g1 = real'(h1) / real'(1 << (WW - 1));
      g2 = real'(h2) / real'(1 << (WW - 1));
      // two real channels
      ar = (real'(xi_re) + real'(xp_re)) / 2.0; ai = (real'(xi_im) - real'(xp_im)) / 2.0;
      br = (real'(xi_im) + real'(xp_im)) / 2.0; bi = -(real'(xi_re) - real'(xp_re)) / 2.0;
      filt(ar, ai, g1, kk, m, y1r, y1i);
      filt(br, bi, g2, kk, m, y2r, y2i);
      // stored at half value
      cmp("real zi_re", r_zi_re, (y1r - y2i) / 2.0);
      cmp("real zi_im", r_zi_im, (y1i + y2r) / 2.0);
      cmp("real zp_re", r_zp_re, (y1r + y2i) / 2.0);
      cmp("real zp_im", r_zp_im, (y2r - y1i) / 2.0);
      // one complex signal, filter 1 only; negative frequency -k on the mirror
      filt(real'(xi_re), real'(xi_im), g1, kk, m, zr, zi);
      cmp("cplx zi_re", c_zi_re, zr);
      cmp("cplx zi_im", c_zi_im, zi);
      filt(real'(xp_re), real'(xp_im), g1, -kk, m, zr, zi);
      cmp("cplx zp_re", c_zp_re, zr);
      cmp("cplx zp_im", c_zp_im, zi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
