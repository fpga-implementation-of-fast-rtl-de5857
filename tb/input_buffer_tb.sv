// input_buffer_tb: streams numbered samples into the segment buffer with
// gaps, checks the seg_done pulse and slot number after every N/2 samples,
// and after each segment reads back the whole frame <a(k-1), a(k)> while new
// samples keep arriving; the first frame after `clear` must read a(k-1) as
// zero. Read data are checked one clock after the request.
module input_buffer_tb;
  localparam int LOGN = 4;
  localparam int IW   = 12;
  localparam int N    = 2 ** LOGN;
  localparam int HALF = N / 2;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce = 1'b1;
  logic clear = 1'b0;
  logic we = 1'b0;
  logic signed [IW-1:0] din_re = '0, din_im = '0;
  logic seg_done;
  logic [1:0] seg_last;
  logic [1:0] rd_seg = '0;
  logic [LOGN-1:0] rd_t = '0;
  logic signed [IW-1:0] rd_re, rd_im;
  int checks = 0, failures = 0;
  int nseg = 0;
  int sent = 0;
  bit reading = 1'b0;

  input_buffer #(.LOGN(LOGN), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int val_re(input int s); return (s * 7 + 3) % 2000 - 1000; endfunction
  function automatic int val_im(input int s); return (s * 13 + 1) % 1800 - 900; endfunction

  // writer: one sample every 3 clocks (keeps running while frames are read)
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int s = 0; s < 8 * HALF; s++) begin
      din_re <= IW'(val_re(s));
      din_im <= IW'(val_im(s));
      we <= 1'b1;
      @(posedge clk);
      we <= 1'b0;
      sent = s + 1;
      repeat (2) @(posedge clk);
    end
  end

  // reader: on each seg_done read the frame of the segment just completed
  always @(posedge clk) begin
    if (!rst && seg_done && !reading) begin
      automatic int k = nseg;
      checks++;
      if (seg_last != 2'(k)) begin failures++; $display("FAIL: seg_last %0d exp %0d", seg_last, k % 4); end
      if (sent != (k + 1) * HALF) begin failures++; $display("FAIL: seg_done after %0d samples", sent); end
      nseg++;
      fork read_frame(k, seg_last); join_none
    end
  end

  task automatic read_frame(input int k, input logic [1:0] slot);
    int s, er, ei;
    reading = 1'b1;
    for (int t = 0; t < N; t++) begin
      rd_seg <= slot;
      rd_t <= LOGN'(t);
      @(posedge clk);
      #1;
      s = (k - 1) * HALF + t;
      er = (s < 0) ? 0 : val_re(s);
      ei = (s < 0) ? 0 : val_im(s);
      checks += 2;
      if (rd_re != IW'(er)) begin failures++; $display("FAIL: frame %0d t %0d re %0d exp %0d", k, t, rd_re, er); end
      if (rd_im != IW'(ei)) begin failures++; $display("FAIL: frame %0d t %0d im %0d exp %0d", k, t, rd_im, ei); end
    end
    reading = 1'b0;
  endtask

  initial begin
    wait (nseg == 8);
    repeat (N + 4) @(posedge clk);
    checks++;
    if (nseg != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
