// direction_conv: one orientation of the Sobel enhancement operator.
//
// Each 3x3 orientation kernel has three zero coefficients and the others are
// +1, +2, +1 on one side and -1, -2, -1 on the other, so only six pixels take
// part. The doubling is a one-bit left shift, not a multiplier.
//   stage 1: pos = pa + 2*pb + pc,  neg = na + 2*nb + nc   (registered)
//   stage 2: mag = |pos - neg|                            (registered)
//
// Interface: six pixels in, mag out (PIX_W+2 bits, up to 4*(2^PIX_W-1)).
// Timing: fully pipelined, one result per clock, CONV_LAT = 2 cycles latency.
// Six inputs, shift for x2 and a pipeline follow the document; the split into
// these two stages is this design's own.
module direction_conv #(
  parameter int unsigned PIX_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PIX_W-1:0]   pa, pb, pc,
  input  logic [PIX_W-1:0]   na, nb, nc,
  output logic [PIX_W+1:0]   mag
);
  localparam int unsigned SW = PIX_W + 2;   // width of a three-term sum

  logic [SW-1:0] pos_q, neg_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q <= '0;
      neg_q <= '0;
      mag   <= '0;
    end else begin
      pos_q <= SW'(pa) + (SW'(pb) << 1) + SW'(pc);
      neg_q <= SW'(na) + (SW'(nb) << 1) + SW'(nc);
      mag   <= (pos_q >= neg_q) ? pos_q - neg_q : neg_q - pos_q;
    end
  end
endmodule
