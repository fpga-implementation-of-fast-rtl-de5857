// Shared body of the end-to-end testbenches of fft_filter.
//
// The including module defines the localparams NCODE, IWIDTH, OWIDTH, WWIDTH,
// REAL, TRANS (the core's configuration), NFRAMES (frames to run), RATE
// (enabled clocks per input sample), AMP (tone amplitude) and CE_GAP (0: CE
// always high; otherwise CE is dropped at random on about one clock in
// CE_GAP, and all timing is counted in enabled clocks), and instantiates the
// core as `dut` on the signals declared here. After printing TB_RESULT the
// body sets bench_done; the including module then calls $finish.
//
// Stimulus: two channels, each a sum of two tones at non-integer bin
// frequencies plus a little noise, one sample every RATE clocks. Every frame
// uses its own FILTER mode and frequency codes, cycling through all four
// modes, with and without the high-pass edge.
// Reference: for every frame the testbench recomputes, in floating point and
// from the formulas of the algorithm, the windowed frame, its DFT (checked
// against the spectrum outputs), the channel separation, the band-pass
// responses with Blackman edges, the differentiators, the inverse DFT and the
// middle half of the result (checked against the filter outputs, saturated
// like the core's outputs). It also checks the bin count per frame, the
// latency from the last sample of a segment to the last result, and that
// every mechanism (each mode, detached HPF, nonzero block exponent, spectrum
// output) was exercised.

  localparam int N    = 2 ** NCODE;
  localparam int HALF = N / 2;
  localparam int NS   = NFRAMES * HALF;     // input samples
  localparam real PI_R = 3.14159265358979323846;
  // clocks from the last sample of a segment to the last result of its frame
  localparam int LATENCY = 2 * NCODE * N + N + 1 + N + 2 + HALF + 3;

  logic CLK = 1'b0;
  logic CE = 1'b1;
  logic RST = 1'b1;
  logic START = 1'b0;
  logic DATAE = 1'b0;
  logic [1:0] FILTER = '0;
  logic [NCODE-1:0] L1 = '0, H1 = '0, L2 = '0, H2 = '0;
  logic signed [IWIDTH-1:0] DATAIRE = '0, DATAIIM = '0;
  logic READY;
  logic [NCODE-1:0] ADDRESS;
  logic signed [OWIDTH-1:0] DATAORE, DATAOIM;
  logic SPRDY, WESP;
  logic signed [OWIDTH-1:0] SPRE, SPIM;
  logic [NCODE-1:0] FREQ;
  logic [3:0] SPEXP;

  always #5 CLK = ~CLK;

  int checks = 0;
  bit bench_done = 1'b0;  // set once TB_RESULT has been printed
  int failures = 0;
  // cycles are counted in clock edges with CE high, the core's own time
  longint cycle = 0;
  always @(posedge CLK) if (CE) cycle <= cycle + 1;

  // clock enable: with CE_GAP > 0, CE is low on about one edge in CE_GAP
  int n_ce_low = 0;
  always @(posedge CLK) begin
    if (CE_GAP > 0 && !RST) begin
      CE <= ($urandom % CE_GAP) != 0;
      if (!CE) n_ce_low++;
    end
  end

  // advance to the next clock edge at which the core is enabled
  task automatic tick();
    do @(posedge CLK); while (!CE);
  endtask

  // stimulus and per-frame settings
  int sig_re [NS];
  int sig_im [NS];
  logic [1:0]       f_mode [NFRAMES];
  logic [NCODE-1:0] f_l1 [NFRAMES], f_h1 [NFRAMES], f_l2 [NFRAMES], f_h2 [NFRAMES];

  // captured results
  int out_re [NFRAMES][HALF];
  int out_im [NFRAMES][HALF];
  int sp_re  [NFRAMES][N];
  int sp_im  [NFRAMES][N];
  int sp_seen[NFRAMES][N];
  int sp_exp [NFRAMES];
  int oframe = 0, sframe = 0, sbins = 0;
  int n_sprdy = 0, n_saturated = 0, n_bfp_shift = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_hpf_off = 0;
  longint last_in_cycle [NFRAMES];
  longint last_out_cycle [NFRAMES];

  always @(posedge CLK) if (!RST && CE) begin
    if (READY) begin
      if (oframe < NFRAMES) begin
        out_re[oframe][ADDRESS] = DATAORE;
        out_im[oframe][ADDRESS] = DATAOIM;
        if (ADDRESS == NCODE'(HALF - 1)) begin
          last_out_cycle[oframe] = cycle;
          oframe++;
        end
      end
    end
    if (SPRDY) begin
      n_sprdy++;
      if (sbins != 0) begin
        failures++;
        $display("FAIL: SPRDY after %0d bins of frame %0d", sbins, sframe);
      end
    end
    if (WESP && sframe < NFRAMES) begin
      sp_re[sframe][FREQ] = SPRE;
      sp_im[sframe][FREQ] = SPIM;
      sp_seen[sframe][FREQ]++;
      sp_exp[sframe] = SPEXP;
      sbins++;
      if (sbins == N) begin
        sframe++;
        sbins = 0;
      end
    end
  end

  // ------------------------------------------------------- reference model
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real tw(input int t);
    int q = N / 4;
    int tt = (t >= 3 * q) ? N - 1 - t : t;
    if (tt < q) return 0.5 * (1.0 - $cos(PI_R * (real'(tt) + 0.5) / real'(q)));
    return 1.0;
  endfunction

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

  function automatic real hresp(input int k, input int m, input int l, input int h);
    int kk = (k > HALF) ? N - k : k;
    real lo, hi;
    if (m == 0) return 1.0;
    lo = (l == 0) ? 1.0 : bedge(kk - l + p3db());
    hi = bedge(h - kk + p3db());
    return (lo < hi) ? lo : hi;
  endfunction

  function automatic int clip(input real v);
    real lim = real'(1 << (OWIDTH - 1));
    if (v >= lim - 1.0) return (1 << (OWIDTH - 1)) - 1;
    if (v <= -lim) return -(1 << (OWIDTH - 1));
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  real xr [N], xi [N], Xr [N], Xi [N], Zr [N], Zi [N], yr [N], yi [N];
  real cs [N], sn [N];

  task automatic dft(input bit inverse);
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int t = 0; t < N; t++) begin
        int idx = (k * t) % N;
        real c = cs[idx];
        real s = inverse ? sn[idx] : -sn[idx];
        if (!inverse) begin
          sr += xr[t] * c - xi[t] * s;
          si += xr[t] * s + xi[t] * c;
        end else begin
          sr += Zr[t] * c - Zi[t] * s;
          si += Zr[t] * s + Zi[t] * c;
        end
      end
      if (!inverse) begin Xr[k] = sr; Xi[k] = si; end
      else begin yr[k] = sr / real'(N); yi[k] = si / real'(N); end
    end
  endtask

  task automatic check_frame(input int f);
    int m;
    real sc, xmax, ymax, tol, err, ps, pn;
    int bad;
    m = (f_mode[f] == 2'b10) ? 1 : (f_mode[f] == 2'b11) ? 2 : 0;
    for (int t = 0; t < N; t++) begin
      int s = (f - 1) * HALF + t;       // frame f = segments f-1 and f
      real w = tw(t);
      xr[t] = (s >= 0) ? w * real'(sig_re[s]) : 0.0;
      xi[t] = (s >= 0) ? w * real'(sig_im[s]) : 0.0;
    end
    dft(1'b0);
    // spectrum output check (values in units of the input LSB * 2**(IW-OW))
    sc = 2.0 ** (OWIDTH - IWIDTH);
    xmax = 0.0;
    for (int k = 0; k < N; k++) begin
      if (fabs(Xr[k]) > xmax) xmax = fabs(Xr[k]);
      if (fabs(Xi[k]) > xmax) xmax = fabs(Xi[k]);
    end
    bad = 0;
    tol = xmax * sc * (2.0 ** -(OWIDTH - 5)) + 2.0 ** sp_exp[f];
    for (int k = 0; k < N; k++) begin
      real gr = real'(sp_re[f][k]) * (2.0 ** sp_exp[f]);
      real gi = real'(sp_im[f][k]) * (2.0 ** sp_exp[f]);
      checks++;
      if (sp_seen[f][k] != 1) bad++;
      else if (fabs(gr - Xr[k] * sc) > tol || fabs(gi - Xi[k] * sc) > tol) begin
        bad++;
        $display("FAIL: bin %0d got %0.1f %0.1f exp %0.1f %0.1f tol %0.1f", k, gr, gi, Xr[k]*sc, Xi[k]*sc, tol);
      end
    end
    if (bad != 0) begin
      failures += bad;
      $display("FAIL: frame %0d spectrum: %0d bins wrong", f, bad);
    end
    if (sp_exp[f] != 0) n_bfp_shift++;
    // filtering
    for (int k = 0; k < N; k++) begin
      int kn = (N - k) % N;
      real ar, ai, br, bi, g1, g2, dr, di, y1r, y1i, y2r, y2i, tr;
      int kk = (k < HALF) ? k : k - N;
      if (REAL) begin
        ar = (Xr[k] + Xr[kn]) / 2.0;  ai = (Xi[k] - Xi[kn]) / 2.0;
        br = (Xi[k] + Xi[kn]) / 2.0;  bi = -(Xr[k] - Xr[kn]) / 2.0;
      end else begin
        ar = Xr[k]; ai = Xi[k]; br = 0.0; bi = 0.0;
      end
      g1 = hresp(k, f_mode[f], f_l1[f], f_h1[f]);
      g2 = hresp(k, f_mode[f], f_l2[f], f_h2[f]);
      // D = (j*kk/(N/2))**m = (j*w/pi)**m, zero at Nyquist when m > 0
      dr = 1.0; di = 0.0;
      for (int r = 0; r < m; r++) begin
        tr = -di * real'(kk) / real'(HALF);
        di = dr * real'(kk) / real'(HALF);
        dr = tr;
      end
      if (m > 0 && k == HALF) begin dr = 0.0; di = 0.0; end
      y1r = g1 * (ar * dr - ai * di);  y1i = g1 * (ar * di + ai * dr);
      y2r = g2 * (br * dr - bi * di);  y2i = g2 * (br * di + bi * dr);
      Zr[k] = y1r - y2i;
      Zi[k] = y1i + y2r;
    end
    dft(1'b1);
    ymax = 0.0;
    for (int a = 0; a < HALF; a++) begin
      if (fabs(yr[N / 4 + a]) > ymax) ymax = fabs(yr[N / 4 + a]);
      if (fabs(yi[N / 4 + a]) > ymax) ymax = fabs(yi[N / 4 + a]);
    end
    // rounding noise: a few LSBs of the block-floating-point spectrum, whose
    // exponent is set by the largest bin (about xmax * 2**-(OWIDTH-3)), spread
    // by the inverse transform over N samples (divided by sqrt(N))
    tol = 4.0 * xmax * (2.0 ** -(OWIDTH - 3)) / $sqrt(real'(N)) + 3.0;
    bad = 0;
    err = 0.0;
    ps = 0.0;
    pn = 0.0;
    for (int a = 0; a < HALF; a++) begin
      int er = clip(yr[N / 4 + a]);
      int ei = clip(yi[N / 4 + a]);
      real d1 = fabs(real'(out_re[f][a] - er));
      real d2 = fabs(real'(out_im[f][a] - ei));
      if (d1 > err) err = d1;
      if (d2 > err) err = d2;
      // signal-to-noise ratio against the unrounded reference
      ps += yr[N / 4 + a] ** 2 + yi[N / 4 + a] ** 2;
      pn += (real'(out_re[f][a]) - yr[N / 4 + a]) ** 2 + (real'(out_im[f][a]) - yi[N / 4 + a]) ** 2;
      if (fabs(yr[N / 4 + a]) >= real'(1 << (OWIDTH - 1)) ||
          fabs(yi[N / 4 + a]) >= real'(1 << (OWIDTH - 1))) n_saturated++;
      checks += 2;
      if (d1 > tol) bad++;
      if (d2 > tol) bad++;
    end
    $display("frame %0d mode %b L1=%0d H1=%0d L2=%0d H2=%0d: max|y|=%0.1f max err=%0.2f tol=%0.2f snr=%0.1f dB spexp=%0d",
             f, f_mode[f], f_l1[f], f_h1[f], f_l2[f], f_h2[f], ymax, err, tol,
             10.0 * $log10(ps / (pn + 1.0e-9)), sp_exp[f]);
    if (bad != 0) begin
      failures += bad;
      $display("FAIL: frame %0d: %0d output samples wrong", f, bad);
    end
  endtask

  // --------------------------------------------------------------- stimulus
  initial begin
    real fa1, fa2, fb1, fb2;
    int fb;
    for (int k = 0; k < N; k++) begin
      cs[k] = $cos(2.0 * PI_R * real'(k) / real'(N));
      sn[k] = $sin(2.0 * PI_R * real'(k) / real'(N));
    end
    fa1 = 0.07 * N; fa2 = 0.31 * N; fb1 = 0.13 * N; fb2 = 0.41 * N;
    for (int s = 0; s < NS; s++) begin
      automatic real ph = 2.0 * PI_R * real'(s) / real'(N);
      sig_re[s] = $rtoi(AMP * $sin(fa1 * ph) + 0.5 * AMP * $cos(fa2 * ph + 0.3))
                + int'($urandom_range(0, 64)) - 32;
      sig_im[s] = $rtoi(AMP * $cos(fb1 * ph + 1.0) + 0.5 * AMP * $sin(fb2 * ph))
                + int'($urandom_range(0, 64)) - 32;
    end
    for (int f = 0; f < NFRAMES; f++) begin
      f_mode[f] = 2'(f % 4);
      fb = (f / 4) % 2;
      // channel 1: band around tone fa1; channel 2: band around fb2 (or fb1)
      f_l1[f] = (fb == 1) ? '0 : NCODE'($rtoi(0.04 * N));
      f_h1[f] = NCODE'($rtoi(0.12 * N));
      f_l2[f] = (fb == 1) ? '0 : NCODE'($rtoi(0.10 * N));
      f_h2[f] = (fb == 1) ? NCODE'($rtoi(0.20 * N)) : NCODE'($rtoi(0.45 * N));
      if (fb == 1) n_hpf_off++;
      n_mode[f % 4]++;
    end
    repeat (4) @(posedge CLK);
    RST <= 1'b0;
    @(posedge CLK);
    START <= 1'b1;
    tick();
    START <= 1'b0;
    for (int s = 0; s < NS; s++) begin
      automatic int f = s / HALF;
      // settings of the frame this segment completes, applied from its start
      FILTER <= f_mode[f];
      L1 <= f_l1[f]; H1 <= f_h1[f]; L2 <= f_l2[f]; H2 <= f_h2[f];
      DATAIRE <= IWIDTH'(sig_re[s]);
      DATAIIM <= IWIDTH'(sig_im[s]);
      DATAE   <= 1'b1;
      tick();
      if (s % HALF == HALF - 1) last_in_cycle[f] = cycle;
      DATAE   <= 1'b0;
      repeat (RATE - 1) tick();
    end
    wait (oframe == NFRAMES);
    repeat (10) @(posedge CLK);
    for (int f = 0; f < NFRAMES; f++) begin
      check_frame(f);
      checks++;
      if (last_out_cycle[f] - last_in_cycle[f] != LATENCY) begin
        failures++;
        $display("FAIL: frame %0d latency %0d, expected %0d", f,
                 last_out_cycle[f] - last_in_cycle[f], LATENCY);
      end
    end
    // every mechanism must have happened
    checks++;
    if (n_sprdy != NFRAMES) begin failures++; $display("FAIL: %0d SPRDY pulses", n_sprdy); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL: FILTER mode %0d never used", m); end
    end
    checks++;
    if (n_hpf_off == 0) begin failures++; $display("FAIL: HPF never detached"); end
    checks++;
    if (n_bfp_shift == 0) begin failures++; $display("FAIL: block exponent never nonzero"); end
    if (CE_GAP > 0) begin
      checks++;
      if (n_ce_low == 0) begin failures++; $display("FAIL: CE never low"); end
    end
    $display("modes used %0d/%0d/%0d/%0d, HPF detached in %0d frames, %0d saturated samples, CE low on %0d edges",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_hpf_off, n_saturated, n_ce_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    bench_done = 1'b1;
  end

  initial begin
    repeat (2 * (NFRAMES + 3) * (HALF * RATE + LATENCY)) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    bench_done = 1'b1;
  end
