// fft_filter: FFT-based FIR filter core (top level with its controller).
//
// The core convolves an endless stream of samples with a long impulse
// response by sectioned convolution. The stream is cut into segments of N/2
// samples; for every new segment a(k) it builds the frame <a(k-1), a(k)> of
// N = 2**NCODE samples and runs five passes over one dual-port data RAM:
//   LOAD  frame sample t times time window W(t) -> RAM[bitrev(t)]
//   FFT   NCODE radix-2 DIT stages, one butterfly per two clocks (fftdpath)
//   PAIR  for every bin pair i, N-i: emit the spectrum on the SP* outputs,
//         separate the two channels, multiply by the synthesised responses
//         H1/H2 and the differentiators, write back (spectrum_unit)
//   IFFT  NCODE radix-2 DIF stages with conjugated twiddles
//   OUT   emit the N/2 samples t = N/4 .. 3N/4-1, free of circular wrap
// All passes use block floating point (bfp_unit); the output stage converts
// back to fixed point using the collected exponents and saturates.
//
// REAL = 1: DATAIRE and DATAIIM are two real channels, filtered by filter 1
// (L1/H1) and filter 2 (L2/H2); results on DATAORE and DATAOIM. Feeding one
// signal to both inputs gives two filters on a single signal. REAL = 0: the
// input is one complex signal filtered by filter 1.
// FILTER: 00 no filtering, 01 band pass (L = 0 detaches the high-pass edge),
// 10 band pass + differentiator, 11 band pass + double differentiator. A
// differentiator multiplies bin k by j*k/(N/2) = j*w/pi, i.e. it outputs the
// per-sample derivative divided by pi, so its gain never exceeds 1.
// Codes L/H are bin numbers of the -3 dB points (bin = f*N/Fs), latched with
// FILTER at the start of each frame.
//
// Interface and timing: everything advances only while CE is high. RST is
// synchronous. A START pulse clears the input buffer and arms the core; from
// then on each clock with DATAE high takes one sample. Every N/2 samples a
// frame is processed, taking about (2*NCODE + 2.5)*N clocks; samples must
// therefore arrive no faster than one per ~(4*NCODE + 5) clocks (45 for
// N = 1024). Results leave as N/2 consecutive READY strobes with ADDRESS
// counting 0..N/2-1. During the PAIR pass WESP strobes each of the N spectrum
// bins once (order 0, 1, N-1, 2, N-2, ..., N/2), FREQ giving the bin; SPRDY
// marks the first. SPRE/SPIM are the block mantissas of the FFT of the
// windowed frame, the true value being mantissa * 2**SPEXP in units of the
// input LSB * 2**(IWIDTH-OWIDTH). SPECTRUM = 0 detaches the spectrum output
// at instantiation: its ports then stay 0 and its registers are removed.
//
// From the design description: the port list, generics, segment/frame
// structure, windowing, channel separation, differentiators, frequency codes,
// block floating point and the FFTDPATH name. This implementation's choices:
// the pass schedule, DIT forward / DIF inverse pairing, the four-slot input
// ring, bin ordering of the spectrum output and all rounding and scaling.
module fft_filter
  import fft_filter_pkg::*;
#(
  parameter int IWIDTH = 16,  // input data width
  parameter int OWIDTH = 16,  // output and intermediate data width
  parameter int WWIDTH = 16,  // coefficient width
  parameter int NCODE  = 10,  // FFT length code n, N = 2**n
  parameter bit REAL   = 1'b1, // 1: two real channels, 0: one complex signal
  parameter int TRANS  = 16,  // frequency-window edge length in bins
  parameter bit SPECTRUM = 1'b1 // 1: spectrum output attached, 0: detached
) (
  input  logic                     CLK,
  input  logic                     CE,
  input  logic                     RST,
  input  logic                     START,
  input  logic                     DATAE,
  input  logic [1:0]               FILTER,
  input  logic [NCODE-1:0]         L1,
  input  logic [NCODE-1:0]         H1,
  input  logic [NCODE-1:0]         L2,
  input  logic [NCODE-1:0]         H2,
  input  logic signed [IWIDTH-1:0] DATAIRE,
  input  logic signed [IWIDTH-1:0] DATAIIM,
  output logic                     READY,
  output logic [NCODE-1:0]         ADDRESS,
  output logic signed [OWIDTH-1:0] DATAORE,
  output logic signed [OWIDTH-1:0] DATAOIM,
  output logic                     SPRDY,
  output logic                     WESP,
  output logic signed [OWIDTH-1:0] SPRE,
  output logic signed [OWIDTH-1:0] SPIM,
  output logic [NCODE-1:0]         FREQ,
  output logic [3:0]               SPEXP
);

  localparam int N    = 2 ** NCODE;
  localparam int HALF = N / 2;
  localparam int DW   = OWIDTH;
  localparam int EW   = 6;   // block exponent width (signed)
  localparam int SW   = 6;   // block shift width (signed)

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FFT, S_PAIR, S_IFFT, S_OUT
  } state_e;

  state_e            state;
  logic              run;
  logic              pending;
  logic [1:0]        pend_seg;
  logic [1:0]        frame_seg;
  logic [NCODE:0]    cnt;
  logic [3:0]        stage;
  logic              phase;
  logic [1:0]        mode_q;
  logic [NCODE-1:0]  l1_q, h1_q, l2_q, h2_q;
  logic signed [EW-1:0] e_fft;
  logic signed [EW-1:0] e_ifft;

  // ---------------------------------------------------------------- input
  logic                    seg_done;
  logic [1:0]              seg_last;
  logic [NCODE-1:0]        ld_t;
  logic signed [IWIDTH-1:0] ib_re, ib_im;

  input_buffer #(.LOGN(NCODE), .IW(IWIDTH)) u_inbuf (
    .clk     (CLK),
    .rst     (RST),
    .ce      (CE),
    .clear   (START),
    .we      (DATAE && run && !START),
    .din_re  (DATAIRE),
    .din_im  (DATAIIM),
    .seg_done(seg_done),
    .seg_last(seg_last),
    .rd_seg  (frame_seg),
    .rd_t    (ld_t),
    .rd_re   (ib_re),
    .rd_im   (ib_im)
  );

  logic [WWIDTH-1:0] win;
  time_window #(.LOGN(NCODE), .WW(WWIDTH)) u_twin (
    .clk(CLK), .ce(CE), .t(ld_t), .w(win)
  );

  // --------------------------------------------------------- data RAM
  logic             we_a, we_b;
  logic [NCODE-1:0] addr_a, addr_b;
  logic [2*DW-1:0]  din_a, din_b, dout_a, dout_b;

  dp_ram #(.AW(NCODE), .DW(2 * DW)) u_ram (
    .clk(CLK), .ce(CE),
    .we_a(we_a), .addr_a(addr_a), .din_a(din_a), .dout_a(dout_a),
    .we_b(we_b), .addr_b(addr_b), .din_b(din_b), .dout_b(dout_b)
  );

  logic signed [DW-1:0] ra_re, ra_im, rb_re, rb_im;
  assign ra_re = dout_a[2*DW-1:DW];
  assign ra_im = dout_a[DW-1:0];
  assign rb_re = dout_b[2*DW-1:DW];
  assign rb_im = dout_b[DW-1:0];

  // ------------------------------------------------ butterfly addressing
  logic [NCODE-2:0] bfly;
  logic [NCODE-1:0] bf_top, bf_bot;
  logic [NCODE-2:0] tw_k;
  logic [NCODE-1:0] span;

  always_comb begin
    logic [NCODE-1:0] grp;
    logic [NCODE-1:0] j;
    bfly   = cnt[NCODE-2:0];
    span   = NCODE'(1) << stage;
    j      = NCODE'(bfly) & (span - 1'b1);
    grp    = NCODE'(bfly) >> stage;
    bf_top = (grp << (stage + 1)) | j;
    bf_bot = bf_top | span;
    tw_k   = (NCODE-1)'(j << (NCODE - 1 - int'(stage)));
  end

  logic signed [WWIDTH-1:0] tw_re, tw_im;
  twiddle_rom #(.LOGN(NCODE), .WW(WWIDTH)) u_tw (
    .clk(CLK), .ce(CE), .k(tw_k), .re(tw_re), .im(tw_im)
  );

  logic signed [SW-1:0] bfp_shift;
  logic signed [EW-1:0] bfp_exp;
  logic signed [DW-1:0] bx_re, bx_im, by_re, by_im;

  fftdpath #(.DW(DW), .WW(WWIDTH), .SW(SW)) u_dpath (
    .dif  (state == S_IFFT),
    .inv  (state == S_IFFT),
    .shift(bfp_shift),
    .a_re (ra_re), .a_im(ra_im), .b_re(rb_re), .b_im(rb_im),
    .w_re (tw_re), .w_im(tw_im),
    .x_re (bx_re), .x_im(bx_im), .y_re(by_re), .y_im(by_im)
  );

  // ------------------------------------------------ spectrum processing
  logic [NCODE-1:0] pair_i, pair_p;
  logic [WWIDTH-1:0] hv1, hv2;
  logic signed [DW-1:0] zi_re, zi_im, zp_re, zp_im;

  assign pair_i = cnt[NCODE-1:0];
  assign pair_p = NCODE'(N) - pair_i;   // wraps to 0 for i = 0

  freq_window #(.LOGN(NCODE), .WW(WWIDTH), .TRANS(TRANS)) u_fw1 (
    .clk(CLK), .ce(CE), .mode(mode_q), .lcode(l1_q), .hcode(h1_q),
    .bin(pair_i), .h(hv1)
  );
  freq_window #(.LOGN(NCODE), .WW(WWIDTH), .TRANS(TRANS)) u_fw2 (
    .clk(CLK), .ce(CE), .mode(mode_q), .lcode(l2_q), .hcode(h2_q),
    .bin(pair_i), .h(hv2)
  );

  spectrum_unit #(.LOGN(NCODE), .DW(DW), .WW(WWIDTH), .REAL(REAL)) u_spec (
    .mode (mode_q), .bin(pair_i), .h1(hv1), .h2(hv2),
    .xi_re(ra_re), .xi_im(ra_im), .xp_re(rb_re), .xp_im(rb_im),
    .zi_re(zi_re), .zi_im(zi_im), .zp_re(zp_re), .zp_im(zp_im)
  );

  // --------------------------------------------------------- load path
  logic                      ld_wr;
  logic [NCODE-1:0]          ld_t_q;
  logic signed [DW-1:0]      ld_re, ld_im;

  function automatic logic signed [DW-1:0] windowed(input logic signed [IWIDTH-1:0] x,
                                                    input logic [WWIDTH-1:0] w);
    logic signed [IWIDTH+WWIDTH:0] p;
    p = (IWIDTH+WWIDTH+1)'(x) * $signed({1'b0, w});
    return DW'(shift_sat(48'(p), DW - IWIDTH - (WWIDTH - 1), DW));
  endfunction

  assign ld_t  = cnt[NCODE-1:0];
  assign ld_re = windowed(ib_re, win);
  assign ld_im = windowed(ib_im, win);

  // ----------------------------------------------------- block floating
  logic bfp_clear, bfp_pass_end;
  logic [1:0] obs_en;
  logic signed [DW-1:0] obs0_re, obs0_im, obs1_re, obs1_im;

  bfp_unit #(.DW(DW), .EW(EW), .SW(SW)) u_bfp (
    .clk(CLK), .rst(RST), .ce(CE),
    .clear(bfp_clear), .pass_end(bfp_pass_end), .obs_en(obs_en),
    .obs0_re(obs0_re), .obs0_im(obs0_im), .obs1_re(obs1_re), .obs1_im(obs1_im),
    .shift(bfp_shift), .exponent(bfp_exp)
  );

  // ----------------------------------------------- RAM port multiplexing
  logic pair_self;   // i == N-i (bins 0 and N/2)
  assign pair_self = (pair_i == pair_p);

  always_comb begin
    we_a = 1'b0; we_b = 1'b0;
    addr_a = '0; addr_b = '0;
    din_a = '0;  din_b = '0;
    bfp_clear = 1'b0; bfp_pass_end = 1'b0;
    obs_en = '0;
    obs0_re = '0; obs0_im = '0; obs1_re = '0; obs1_im = '0;
    unique case (state)
      S_LOAD: begin
        bfp_clear = (cnt == '0);
        we_a   = ld_wr;
        addr_a = NCODE'(bit_reverse(16'(ld_t_q), NCODE));
        din_a  = {ld_re, ld_im};
        obs_en = {1'b0, ld_wr};
        obs0_re = ld_re; obs0_im = ld_im;
      end
      S_FFT, S_IFFT: begin
        bfp_pass_end = !phase && (cnt == '0);
        addr_a = bf_top;
        addr_b = bf_bot;
        we_a   = phase;
        we_b   = phase;
        din_a  = {bx_re, bx_im};
        din_b  = {by_re, by_im};
        obs_en = {phase, phase};
        obs0_re = bx_re; obs0_im = bx_im; obs1_re = by_re; obs1_im = by_im;
      end
      S_PAIR: begin
        bfp_clear = !phase && (cnt == '0);
        addr_a = pair_i;
        addr_b = pair_p;
        we_a   = phase;
        we_b   = phase && !pair_self;
        din_a  = {zi_re, zi_im};
        din_b  = {zp_re, zp_im};
        obs_en = {phase && !pair_self, phase};
        obs0_re = zi_re; obs0_im = zi_im; obs1_re = zp_re; obs1_im = zp_im;
      end
      S_OUT: begin
        addr_a = NCODE'(bit_reverse(16'(NCODE'(N / 4) + cnt[NCODE-1:0]), NCODE));
      end
      default: ;
    endcase
  end

  // --------------------------------------------------------- output path
  int out_shift;
  always_comb begin
    out_shift = int'(e_fft) + int'(e_ifft) + (REAL ? 1 : 0) - NCODE + IWIDTH - DW;
  end

  // Spectrum mantissa for the SP* outputs: the port exponent is unsigned, so a
  // negative block exponent is applied to the mantissa (rounded) instead.
  function automatic logic signed [DW-1:0] sp_mant(input logic signed [DW-1:0] v);
    if (e_fft < 0) return DW'(shift_sat(48'(v), int'(e_fft), DW));
    return v;
  endfunction

  logic out_wr;
  logic [NCODE-1:0] out_idx;

  // ------------------------------------------------------------ control
  logic                 sprdy_q, wesp_q;
  logic signed [DW-1:0] spre_q, spim_q;
  logic [NCODE-1:0]     freq_q;
  logic [3:0]           spexp_q;
  logic signed [DW-1:0] sp_hold_re, sp_hold_im;
  logic [NCODE-1:0]     sp_hold_bin;
  logic                 sp_hold;

  always_ff @(posedge CLK) begin
    if (RST) begin
      state     <= S_IDLE;
      run       <= 1'b0;
      pending   <= 1'b0;
      pend_seg  <= '0;
      frame_seg <= '0;
      cnt       <= '0;
      stage     <= '0;
      phase     <= 1'b0;
      mode_q    <= '0;
      l1_q <= '0; h1_q <= '0; l2_q <= '0; h2_q <= '0;
      e_fft     <= '0;
      e_ifft    <= '0;
      ld_wr     <= 1'b0;
      ld_t_q    <= '0;
      out_wr    <= 1'b0;
      out_idx   <= '0;
      READY     <= 1'b0;
      ADDRESS   <= '0;
      DATAORE   <= '0;
      DATAOIM   <= '0;
      sprdy_q     <= 1'b0;
      wesp_q      <= 1'b0;
      spre_q      <= '0;
      spim_q      <= '0;
      freq_q      <= '0;
      spexp_q     <= '0;
      sp_hold   <= 1'b0;
      sp_hold_re <= '0; sp_hold_im <= '0; sp_hold_bin <= '0;
    end else if (CE) begin
      READY <= 1'b0;
      sprdy_q <= 1'b0;
      wesp_q  <= 1'b0;
      ld_wr <= 1'b0;
      out_wr <= 1'b0;

      if (START) begin
        run     <= 1'b1;
        pending <= 1'b0;
      end else if (seg_done && state != S_IDLE) begin
        pending  <= 1'b1;
        pend_seg <= seg_last;
      end

      // output stage (one clock behind the RAM read)
      if (out_wr) begin
        READY   <= 1'b1;
        ADDRESS <= out_idx;
        DATAORE <= DW'(shift_sat(48'(ra_re), out_shift, DW));
        DATAOIM <= DW'(shift_sat(48'(ra_im), out_shift, DW));
      end

      unique case (state)
        S_IDLE: begin
          if (!START && (seg_done || pending)) begin
            frame_seg <= seg_done ? seg_last : pend_seg;
            pending   <= 1'b0;
            mode_q    <= FILTER;
            l1_q <= L1; h1_q <= H1; l2_q <= L2; h2_q <= H2;
            cnt       <= '0;
            state     <= S_LOAD;
          end
        end

        S_LOAD: begin
          ld_wr  <= (cnt < (NCODE+1)'(N));
          ld_t_q <= cnt[NCODE-1:0];
          if (cnt == (NCODE+1)'(N)) begin
            cnt   <= '0;
            phase <= 1'b0;
            stage <= '0;
            state <= S_FFT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_FFT, S_IFFT: begin
          phase <= !phase;
          if (phase) begin
            if (cnt == (NCODE+1)'(HALF - 1)) begin
              cnt <= '0;
              if (state == S_FFT) begin
                if (stage == 4'(NCODE - 1)) begin
                  state <= S_PAIR;
                end else begin
                  stage <= stage + 1'b1;
                end
              end else begin
                if (stage == '0) begin
                  e_ifft <= bfp_exp;
                  state  <= S_OUT;
                end else begin
                  stage <= stage - 1'b1;
                end
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end

        S_PAIR: begin
          phase <= !phase;
          if (!phase) begin
            if (cnt == '0) begin
              e_fft <= bfp_exp;
              spexp_q <= (bfp_exp > EW'(15)) ? 4'd15 :
                       (bfp_exp < 0)       ? 4'd0  : 4'(bfp_exp);
            end
            // second bin of the previous pair
            if (sp_hold) begin
              wesp_q    <= 1'b1;
              spre_q    <= sp_hold_re;
              spim_q    <= sp_hold_im;
              freq_q    <= sp_hold_bin;
              sp_hold <= 1'b0;
            end
          end else begin
            wesp_q <= 1'b1;
            sprdy_q <= (cnt == '0);
            spre_q <= sp_mant(ra_re);
            spim_q <= sp_mant(ra_im);
            freq_q <= pair_i;
            sp_hold     <= !pair_self;
            sp_hold_re  <= sp_mant(rb_re);
            sp_hold_im  <= sp_mant(rb_im);
            sp_hold_bin <= pair_p;
            if (cnt == (NCODE+1)'(HALF)) begin
              cnt   <= '0;
              stage <= 4'(NCODE - 1);
              state <= S_IFFT;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end

        S_OUT: begin
          out_wr  <= 1'b1;
          out_idx <= cnt[NCODE-1:0];
          if (cnt == (NCODE+1)'(HALF - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Spectrum port: with SPECTRUM = 0 it is tied off and its registers are
  // removed by synthesis.
  assign SPRDY = SPECTRUM && sprdy_q;
  assign WESP  = SPECTRUM && wesp_q;
  assign SPRE  = SPECTRUM ? spre_q  : '0;
  assign SPIM  = SPECTRUM ? spim_q  : '0;
  assign FREQ  = SPECTRUM ? freq_q  : '0;
  assign SPEXP = SPECTRUM ? spexp_q : '0;

endmodule
