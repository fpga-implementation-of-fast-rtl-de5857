// fftdpath_tb: random butterflies in both forms (DIT and DIF), forward and
// inverse, with every block shift from -3 to +2, against a floating-point
// model of the butterfly (tolerance 2 LSB for the rounding of scaling and
// product). Operands are drawn so that after the shift they stay below a
// quarter of full scale, the condition the block floating point guarantees.
module fftdpath_tb;
  localparam int DW = 16;
  localparam int WW = 16;
  localparam int SW = 6;
  localparam real PI_R = 3.14159265358979323846;
  logic dif = 1'b0, inv = 1'b0;
  logic signed [SW-1:0] shift = '0;
  logic signed [DW-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic signed [WW-1:0] w_re = '0, w_im = '0;
  logic signed [DW-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fftdpath #(.DW(DW), .WW(WW), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd_op(input int s);
    // |v * 2**-s| < 2**(DW-3)
    int lim;
    lim = (s >= 0) ? (1 << (DW - 3 + s)) - 1 : (1 << (DW - 3 + s)) - 1;
    if (lim > (1 << (DW - 1)) - 1) lim = (1 << (DW - 1)) - 1;
    return $signed($urandom_range(0, 2 * lim)) - lim;
  endfunction

  function automatic bit near(input real got, input real e);
    return (got - e <= 2.0) && (e - got <= 2.0);
  endfunction

  initial begin
    real sc, ar, ai, br, bi, wr, wi, mr, mi, tr, ti, ex_r, ex_i, ey_r, ey_i, th;
    int s;
    sc = real'(1 << (WW - 1));
    for (int it = 0; it < 3000; it++) begin
      s = int'($urandom_range(0, 5)) - 3;
      dif <= 1'($urandom); inv <= 1'($urandom);
      shift <= SW'(s);
      a_re <= DW'(rnd_op(s)); a_im <= DW'(rnd_op(s));
      b_re <= DW'(rnd_op(s)); b_im <= DW'(rnd_op(s));
      th = 2.0 * PI_R * real'($urandom_range(0, 1023)) / 1024.0;
      w_re <= WW'($rtoi($cos(th) * (sc - 1.0)));
      w_im <= WW'($rtoi(-$sin(th) * (sc - 1.0)));
      @(posedge clk);
      ar = real'(a_re) * 2.0 ** (-s); ai = real'(a_im) * 2.0 ** (-s);
      br = real'(b_re) * 2.0 ** (-s); bi = real'(b_im) * 2.0 ** (-s);
      wr = real'(w_re) / sc;
      wi = (inv ? -real'(w_im) : real'(w_im)) / sc;
      if (dif) begin
        mr = ar - br; mi = ai - bi;
        ex_r = ar + br; ex_i = ai + bi;
        ey_r = mr * wr - mi * wi; ey_i = mr * wi + mi * wr;
      end else begin
        tr = br * wr - bi * wi; ti = br * wi + bi * wr;
        ex_r = ar + tr; ex_i = ai + ti;
        ey_r = ar - tr; ey_i = ai - ti;
      end
      checks += 4;
      if (!near(real'(x_re), ex_r)) begin failures++; $display("FAIL: it %0d x_re %0d exp %0.1f", it, x_re, ex_r); end
      if (!near(real'(x_im), ex_i)) begin failures++; $display("FAIL: it %0d x_im %0d exp %0.1f", it, x_im, ex_i); end
      if (!near(real'(y_re), ey_r)) begin failures++; $display("FAIL: it %0d y_re %0d exp %0.1f", it, y_re, ey_r); end
      if (!near(real'(y_im), ey_i)) begin failures++; $display("FAIL: it %0d y_im %0d exp %0.1f", it, y_im, ey_i); end
    end
    // rounding half to even on a right shift: 6/4 -> 2, 10/4 -> 2, -6/4 -> -2
    dif <= 1'b1; inv <= 1'b0; shift <= SW'(2);
    w_re <= WW'((1 << (WW - 1)) - 1); w_im <= '0;
    a_re <= DW'(6); a_im <= DW'(10); b_re <= DW'(-6); b_im <= '0;
    @(posedge clk);
    checks++;
    if (x_re != 0 || x_im != 2) begin failures++; $display("FAIL: rounding %0d %0d", x_re, x_im); end
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
