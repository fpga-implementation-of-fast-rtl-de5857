// bfp_unit: block-floating-point control for the in-place FFT.
//
// The whole data array shares one exponent. While a pass writes its results
// to the RAM, every written component is reported on the `obs*` inputs and
// the unit ORs their magnitudes together; the highest set bit of that OR is
// the highest bit used by the largest word of the array. At `pass_end` it
// chooses the shift for the next butterfly pass that normalises the array:
// after it, the largest operand has its top bit at position DW-4, i.e. it lies
// in [1/8, 1/4) of full scale, which leaves the butterfly room to grow without
// overflow while using all other bits. The shift is signed (positive = right,
// negative = left, an all-zero array is not shifted); it is added to the
// signed block exponent and a new observation starts.
// `clear` resets exponent, shift and observation at the start of a transform.
// A shared exponent with normalisation of the array is the document's; the
// OR-of-magnitudes detector and the quarter-scale rule are this
// implementation's choice. All outputs are registered; `shift` and `exponent`
// change in the clock after `pass_end`.
module bfp_unit #(
  parameter int DW = 16,   // data width
  parameter int EW = 6,    // exponent width (signed)
  parameter int SW = 6     // shift width (signed)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 clear,
  input  logic                 pass_end,
  input  logic [1:0]           obs_en,    // bit 0: obs0 valid, bit 1: obs1 valid
  input  logic signed [DW-1:0] obs0_re,
  input  logic signed [DW-1:0] obs0_im,
  input  logic signed [DW-1:0] obs1_re,
  input  logic signed [DW-1:0] obs1_im,
  output logic signed [SW-1:0] shift,
  output logic signed [EW-1:0] exponent
);

  logic [DW:0] acc;
  logic [DW:0] seen;
  logic signed [SW-1:0] shift_next;

  function automatic logic [DW:0] mag(input logic signed [DW-1:0] v);
    logic signed [DW:0] e;
    e = (DW+1)'(v);
    return (e < 0) ? -e : e;
  endfunction

  always_comb begin
    seen = '0;
    if (obs_en[0]) seen = seen | mag(obs0_re) | mag(obs0_im);
    if (obs_en[1]) seen = seen | mag(obs1_re) | mag(obs1_im);
  end

  always_comb begin
    logic [DW:0] a;
    int msb;
    a = acc | seen;
    msb = DW - 4;                     // all-zero array: no shift
    for (int i = 0; i <= DW; i++) if (a[i]) msb = i;
    shift_next = SW'(msb - (DW - 4));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc      <= '0;
      shift    <= '0;
      exponent <= '0;
    end else if (ce) begin
      if (clear) begin
        acc      <= '0;
        shift    <= '0;
        exponent <= '0;
      end else if (pass_end) begin
        acc      <= '0;
        shift    <= shift_next;
        exponent <= exponent + EW'(shift_next);
      end else begin
        acc <= acc | seen;
      end
    end
  end

endmodule
