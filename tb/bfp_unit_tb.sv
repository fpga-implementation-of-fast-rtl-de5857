// bfp_unit_tb: feeds passes of random observed values with a chosen largest
// magnitude and checks the shift chosen at the end of each pass (the largest
// value must land in [2**(DW-4), 2**(DW-3)) after it), the running block
// exponent, that an all-zero pass keeps the shift at 0 and that `clear`
// resets everything.
module bfp_unit_tb;
  localparam int DW = 16;
  localparam int EW = 6;
  localparam int SW = 6;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b1;
  logic clear = 1'b0;
  logic pass_end = 1'b0;
  logic [1:0] obs_en = '0;
  logic signed [DW-1:0] obs0_re = '0, obs0_im = '0, obs1_re = '0, obs1_im = '0;
  logic signed [SW-1:0] shift;
  logic signed [EW-1:0] exponent;
  int checks = 0, failures = 0;
  int exp_sum = 0;

  bfp_unit #(.DW(DW), .EW(EW), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  task automatic run_pass(input int maxmag);
    int s, m;
    int big;
    big = int'($urandom_range(0, 19));
    for (int i = 0; i < 20; i++) begin
      obs_en <= 2'($urandom_range(1, 3));
      m = (maxmag == 0) ? 0 : int'($urandom_range(0, maxmag));
      obs0_re <= DW'((i == big) ? -maxmag : m);
      obs0_im <= DW'(-m / 2);
      obs1_re <= DW'(m / 3);
      obs1_im <= DW'(-m);
      if (i == big) obs_en <= 2'b01;
      @(posedge clk);
    end
    obs_en <= '0;
    pass_end <= 1'b1;
    @(posedge clk);
    pass_end <= 1'b0;
    #1;
    // expected shift: top bit of maxmag moved to DW-4
    s = 0;
    if (maxmag != 0) begin
      m = 0;
      for (int b = 0; b <= DW; b++) if ((maxmag >> b) != 0) m = b;
      s = m - (DW - 4);
    end
    exp_sum += s;
    checks += 2;
    if (shift != SW'(s)) begin failures++; $display("FAIL: max %0d shift %0d exp %0d", maxmag, shift, s); end
    if (exponent != EW'(exp_sum)) begin failures++; $display("FAIL: exponent %0d exp %0d", exponent, exp_sum); end
    if (maxmag != 0) begin
      checks++;
      if (s >= 0 ? ((maxmag >> s) < (1 << (DW - 4)) || (maxmag >> s) >= (1 << (DW - 3)))
                 : ((maxmag << -s) < (1 << (DW - 4)) || (maxmag << -s) >= (1 << (DW - 3)))) begin
        failures++; $display("FAIL: max %0d not normalised by %0d", maxmag, s);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run_pass(30000);
    run_pass(9000);
    run_pass(5);
    run_pass(0);
    run_pass(1 << 12);
    run_pass(32768);
    for (int k = 0; k < 20; k++) begin
      clear <= 1'b1; @(posedge clk); clear <= 1'b0; #1;
      exp_sum = 0;
      checks++;
      if (shift != 0 || exponent != 0) begin failures++; $display("FAIL: clear"); end
      run_pass(int'($urandom_range(1, 32767)));
      run_pass(int'($urandom_range(1, 300)));
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
