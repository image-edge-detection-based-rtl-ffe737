// sobel_edge_top: FPGA-style Sobel enhancement edge detector.
//
// A grey image enters in raster order, one pixel per clock while en is high.
// The pixel generator forms the 3x3 neighbourhood from two line buffers, the
// enhancement operator takes the strongest of four orientation responses
// (0, 45, 90, 135 degrees), the edges control zeroes the image border and
// marks valid outputs, and the binary segmentation thresholds the result to
// 0 or 255. Both the edge strength (data_out, no threshold) and the binary
// image (result) are outputs.
//
// Interface: clk, rst (synchronous, active high), en/data_in = input pixel,
// threshold = segmentation level. data_valid/data_out and
// result_valid/result deliver every image pixel in raster order.
// Timing: throughput one pixel per clock; output pixel k appears on data_out
// SOBEL_LAT+1 clock edges after the edge that pushes input pixel k+IMG_W+1,
// and on result one edge later. A 1024x1024 frame takes 1024*1024 clocks, 21 ms at
// 50 MHz. The last IMG_W+1 pixels of a frame (all border) leave with the next
// frame's first pixels or on idle cycles after the frame.
// The four-block structure follows the document; exposing data_out besides
// result is this design's own.
module sobel_edge_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned IMG_H = 1024,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [PIX_W-1:0] data_in,
  input  logic [PIX_W-1:0] threshold,
  output logic             data_valid,
  output logic [PIX_W-1:0] data_out,
  output logic             result_valid,
  output logic [PIX_W-1:0] result
);
  logic [8:0][PIX_W-1:0] win;
  logic [PIX_W-1:0]      sobel_mag;

  pixel_window #(.IMG_W(IMG_W), .PIX_W(PIX_W)) u_window (
    .clk, .rst, .en, .pix_in(data_in), .win
  );

  sobel_enh #(.PIX_W(PIX_W)) u_sobel (
    .clk, .rst, .win, .mag(sobel_mag)
  );

  edge_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W), .LAT(SOBEL_LAT)) u_edges (
    .clk, .rst, .turn(en), .sobel_mag, .en(data_valid), .data(data_out)
  );

  binary_seg #(.PIX_W(PIX_W)) u_binseg (
    .clk, .rst, .en_in(data_valid), .data(data_out), .threshold,
    .en_out(result_valid), .result
  );
endmodule
