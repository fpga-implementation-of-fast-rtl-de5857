// dp_ram_tb: random traffic on both ports of the dual-port RAM against a
// behavioural array model: one-clock read latency, read-first data on a
// same-address read/write, port B winning a double write, and CE freezing
// both ports.
module dp_ram_tb;
  localparam int AW = 5;
  localparam int DW = 12;
  logic clk = 1'b0;
  logic ce = 1'b1;
  logic we_a = 1'b0, we_b = 1'b0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [DW-1:0] din_a = '0, din_b = '0, dout_a, dout_b;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill through port A
    for (int i = 0; i < 2**AW; i++) begin
      we_a <= 1'b1; addr_a <= AW'(i); din_a <= DW'(i * 37 + 5);
      model[i] = DW'(i * 37 + 5);
      @(posedge clk);
    end
    we_a <= 1'b0;
    for (int it = 0; it < 400; it++) begin
      logic wa, wb, c;
      logic [AW-1:0] aa, ab;
      logic [DW-1:0] da, db;
      wa = 1'($urandom); wb = 1'($urandom); c = ($urandom_range(0, 7) != 0);
      aa = AW'($urandom); ab = (it % 5 == 0) ? aa : AW'($urandom);
      da = DW'($urandom); db = DW'($urandom);
      we_a <= wa; we_b <= wb; addr_a <= aa; addr_b <= ab; din_a <= da; din_b <= db; ce <= c;
      if (c) begin
        exp_a = model[aa];
        exp_b = model[ab];
        if (wa) model[aa] = da;
        if (wb) model[ab] = db;
      end else begin
        exp_a = dout_a;
        exp_b = dout_b;
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (dout_a !== exp_a) begin failures++; $display("FAIL: it %0d port A %h exp %h", it, dout_a, exp_a); end
      if (dout_b !== exp_b) begin failures++; $display("FAIL: it %0d port B %h exp %h", it, dout_b, exp_b); end
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
