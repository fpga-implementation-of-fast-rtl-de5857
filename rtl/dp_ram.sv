// dp_ram: dual-port synchronous block RAM, the working store of the filter core.
//
// Two independent ports (A and B), each of which can read or write one word
// per clock. Reads are synchronous with one cycle of latency and return the
// word held before a write in the same cycle (read-first). If both ports write
// the same address in one cycle, port B's word is kept. The clock enable `ce`
// freezes both ports. This is the dual-port block RAM the core is built
// around; depth and width are parameters, and the read-first behaviour and
// the collision rule are choices of this implementation.
//
// Ports: clk, ce; per port: we_x, addr_x[AW-1:0], din_x[DW-1:0], dout_x[DW-1:0].
module dp_ram #(
  parameter int AW = 10,   // address width, depth = 2**AW
  parameter int DW = 32    // word width (complex sample: re and im halves)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] din_b,
  output logic [DW-1:0] dout_b
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ce) begin
      dout_a <= mem[addr_a];
      dout_b <= mem[addr_b];
      if (we_a) mem[addr_a] <= din_a;
      if (we_b) mem[addr_b] <= din_b;
    end
  end

endmodule
