// input_buffer: collects the incoming sample stream into half-frame segments.
//
// The filter works on frames <a(k-1), a(k)> made of the two latest segments
// of N/2 samples each. Samples (complex: channel 1 real, channel 2 imaginary)
// are written on `we` into a ring of four segment slots held in a dual-port
// RAM, so that the frame being read while new samples arrive is never
// overwritten as long as the frame is processed within two segment periods.
// When a slot fills up, `seg_done` pulses for one clock and `seg_last` names
// the slot just completed. The reader asks for frame sample `rd_t`
// (0..N-1) of the frame ending with slot `rd_seg`; samples of a slot not
// filled since `clear` read as zero, so the first frame after a start sees
// a(k-1) = 0. Read data follow the request by one clock.
// Segmenting into N/2-sample halves follows the design description; the
// four-slot ring and the zero fill are this implementation's choice.
module input_buffer #(
  parameter int LOGN = 10,
  parameter int IW   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 clear,
  input  logic                 we,
  input  logic signed [IW-1:0] din_re,
  input  logic signed [IW-1:0] din_im,
  output logic                 seg_done,
  output logic [1:0]           seg_last,
  input  logic [1:0]           rd_seg,
  input  logic [LOGN-1:0]      rd_t,
  output logic signed [IW-1:0] rd_re,
  output logic signed [IW-1:0] rd_im
);

  logic [1:0]      wslot;
  logic [LOGN-2:0] widx;
  logic [3:0]      slot_valid;
  logic [1:0]      rslot;
  logic            rvalid_q;
  logic [2*IW-1:0] rword;
  logic [2*IW-1:0] unused_a;

  // Frame sample t lives in slot rd_seg-1 (first half) or rd_seg (second half).
  assign rslot = rd_t[LOGN-1] ? rd_seg : rd_seg - 2'd1;

  dp_ram #(.AW(LOGN + 1), .DW(2 * IW)) u_mem (
    .clk    (clk),
    .ce     (ce),
    .we_a   (we),
    .addr_a ({wslot, widx}),
    .din_a  ({din_re, din_im}),
    .dout_a (unused_a),
    .we_b   (1'b0),
    .addr_b ({rslot, rd_t[LOGN-2:0]}),
    .din_b  ('0),
    .dout_b (rword)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wslot      <= '0;
      widx       <= '0;
      slot_valid <= '0;
      seg_done   <= 1'b0;
      seg_last   <= '0;
      rvalid_q   <= 1'b0;
    end else if (ce) begin
      seg_done <= 1'b0;
      rvalid_q <= slot_valid[rslot];
      if (clear) begin
        wslot      <= '0;
        widx       <= '0;
        slot_valid <= '0;
      end else if (we) begin
        if (widx == '0) slot_valid[wslot] <= 1'b0;
        widx <= widx + 1'b1;
        if (widx == '1) begin
          slot_valid[wslot] <= 1'b1;
          seg_done          <= 1'b1;
          seg_last          <= wslot;
          wslot             <= wslot + 2'd1;
        end
      end
    end
  end

  assign rd_re = rvalid_q ? rword[2*IW-1:IW] : '0;
  assign rd_im = rvalid_q ? rword[IW-1:0]    : '0;

endmodule
