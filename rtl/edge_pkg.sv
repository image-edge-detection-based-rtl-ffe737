// edge_pkg: types and constants shared by the Sobel edge detector.
//
// The detector works on 8-bit grey pixels. The 3x3 window is passed between
// blocks as a packed array of nine pixels, index 0 = P1 (top left) to
// index 8 = P9 (bottom right, the newest pixel), in row-major order.
// The latency constants describe the register stages of the operator; they are
// this design's choice (the operator is pipelined, but the depth is ours).
package edge_pkg;

  // Register stages inside one orientation convolution (sums, then |difference|).
  localparam int unsigned CONV_LAT  = 2;
  // Register stages of the whole enhancement operator: convolution + two max levels.
  localparam int unsigned SOBEL_LAT = CONV_LAT + 2;

  // Window tap names, row-major.
  typedef enum logic [3:0] {
    P1 = 4'd0, P2 = 4'd1, P3 = 4'd2,
    P4 = 4'd3, P5 = 4'd4, P6 = 4'd5,
    P7 = 4'd6, P8 = 4'd7, P9 = 4'd8
  } tap_e;

endpackage
