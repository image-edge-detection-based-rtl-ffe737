// edge_control: edges control of the Sobel edge detector.
//
// The 3x3 operator has no valid result for the first and last row and column
// of the image; this block knows which image pixel each operator result
// belongs to and replaces border results by zero.
//
// How it works. Output pixels leave in raster order. The window of output
// pixel k is complete in the cycle input pixel k+IMG_W+1 enters (its bottom
// right neighbour), so while pixels stream in, each input push (turn) emits the
// output IMG_W+1 pixels behind it. The distance `lag` between inputs and
// outputs grows to IMG_W+1 at the start of the first frame and then stays
// there; across frames the stream simply continues. The last IMG_W+1 outputs
// of a frame are all border pixels: they leave with the next frame's first
// pushes or, when no pixel is pushed after a complete frame, one per idle
// cycle (flush). The emit decision and the is-border flag then travel down a
// delay line matching the operator latency LAT and meet the operator result
// in the output register.
//
// Interface: turn = input pixel pushed into the window this cycle;
// sobel_mag = operator output; en/data = output pixel (EN and Data).
// Timing: en/data appear LAT+1 clock edges after the edge that pushes the
// pixel completing the window (LAT = operator latency).
// Zeroing the border and tracking the pixel position follow the document;
// the fixed lag, the flush on idle cycles and the continuation across frames
// are this design's own.
module edge_control #(
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned IMG_H = 1024,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned LAT   = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             turn,
  input  logic [PIX_W-1:0] sobel_mag,
  output logic             en,
  output logic [PIX_W-1:0] data
);
  localparam int unsigned CW   = $clog2(IMG_W);
  localparam int unsigned RW   = $clog2(IMG_H);
  localparam int unsigned LAGW = $clog2(IMG_W + 2);
  localparam logic [LAGW-1:0] LAG_FULL = LAGW'(IMG_W + 1);

  typedef struct packed {
    logic valid;
    logic border;
  } tag_t;

  logic [CW-1:0]   in_col,  out_col;
  logic [RW-1:0]   in_row,  out_row;
  logic [LAGW-1:0] lag;
  logic            frame_in_done;   // next input pixel is the first of a frame
  logic            emit, border;
  tag_t [LAT:0]    tag_q;

  assign frame_in_done = (in_col == '0) && (in_row == '0);
  assign emit   = turn ? (lag == LAG_FULL) : (frame_in_done && lag != '0);
  assign border = (out_row == '0) || (out_row == RW'(IMG_H - 1)) ||
                  (out_col == '0) || (out_col == CW'(IMG_W - 1));

  // Input position.
  always_ff @(posedge clk) begin
    if (rst) begin
      in_col <= '0;
      in_row <= '0;
    end else if (turn) begin
      if (in_col == CW'(IMG_W - 1)) begin
        in_col <= '0;
        in_row <= (in_row == RW'(IMG_H - 1)) ? '0 : in_row + 1'b1;
      end else begin
        in_col <= in_col + 1'b1;
      end
    end
  end

  // Output position and input/output distance.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_col <= '0;
      out_row <= '0;
      lag     <= '0;
    end else begin
      if (turn && !emit)      lag <= lag + 1'b1;
      else if (!turn && emit) lag <= lag - 1'b1;
      if (emit) begin
        if (out_col == CW'(IMG_W - 1)) begin
          out_col <= '0;
          out_row <= (out_row == RW'(IMG_H - 1)) ? '0 : out_row + 1'b1;
        end else begin
          out_col <= out_col + 1'b1;
        end
      end
    end
  end

  // Tag delay line: tag_q[0] lines up with the window register, tag_q[LAT]
  // with the operator result.
  always_ff @(posedge clk) begin
    if (rst) tag_q <= '0;
    else     tag_q <= {tag_q[LAT-1:0], tag_t'{valid: emit, border: border}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en   <= 1'b0;
      data <= '0;
    end else begin
      en   <= tag_q[LAT].valid;
      data <= (tag_q[LAT].valid && !tag_q[LAT].border) ? sobel_mag : '0;
    end
  end

  initial begin
    assert (IMG_W >= 3 && IMG_H >= 3) else $error("edge_control: image must be at least 3x3");
    assert (LAT >= 1) else $error("edge_control: LAT must be at least 1");
  end
endmodule
