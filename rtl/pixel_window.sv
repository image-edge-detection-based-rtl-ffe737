// pixel_window: 3x3 pixel generation.
//
// Three shift-register groups of three pixels each and two line FIFOs turn a
// raster-order pixel stream into the 3x3 template P1..P9. The newest pixel
// enters the bottom group and the first line FIFO; the first FIFO's output
// (the pixel one line above) enters the middle group and the second FIFO; the
// second FIFO's output (two lines above) enters the top group. After the push
// of pixel (r, c), P9 = (r, c), P5 = (r-1, c-1) and P1 = (r-2, c-2).
//
// Interface: en/pix_in in; win out as nine pixels, index 0 = P1 .. 8 = P9.
// Timing: the window changes on the clock edge of each push and holds
// otherwise. Windows that straddle a line end mix two lines; they are centred
// on border pixels, which the edges control replaces by zero.
// The structure (three groups, two RAM FIFOs) follows the document; the
// wiring order of the groups is this design's own.
module pixel_window #(
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned PIX_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic [PIX_W-1:0]       pix_in,
  output logic [8:0][PIX_W-1:0]  win
);
  logic [PIX_W-1:0] line1, line2;     // one and two lines above the input
  logic [2:0][PIX_W-1:0] row_top, row_mid, row_bot;   // [2] = newest column

  line_fifo #(.LINE_LEN(IMG_W), .PIX_W(PIX_W)) u_fifo1 (
    .clk, .rst, .push(en), .din(pix_in), .dout(line1)
  );
  line_fifo #(.LINE_LEN(IMG_W), .PIX_W(PIX_W)) u_fifo2 (
    .clk, .rst, .push(en), .din(line1), .dout(line2)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      row_top <= '0;
      row_mid <= '0;
      row_bot <= '0;
    end else if (en) begin
      row_top <= {line2,  row_top[2:1]};
      row_mid <= {line1,  row_mid[2:1]};
      row_bot <= {pix_in, row_bot[2:1]};
    end
  end

  // Oldest column first: P1 P2 P3 / P4 P5 P6 / P7 P8 P9.
  assign win = {row_bot[2], row_bot[1], row_bot[0],
                row_mid[2], row_mid[1], row_mid[0],
                row_top[2], row_top[1], row_top[0]};
endmodule
