// binary_seg: binary segmentation of the edge strength.
//
// Turns the edge-strength image into a two-level image: a pixel whose
// strength is above the threshold becomes 255 (all ones), any other 0.
//
// Interface: en_in/data in with the threshold; en_out/result out.
// Timing: one register stage, one pixel per clock.
// The two output levels and the given threshold follow the document; the
// strict comparison (data > threshold) and the threshold as an input port are
// this design's choices.
module binary_seg #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en_in,
  input  logic [PIX_W-1:0] data,
  input  logic [PIX_W-1:0] threshold,
  output logic             en_out,
  output logic [PIX_W-1:0] result
);
  always_ff @(posedge clk) begin
    if (rst) begin
      en_out <= 1'b0;
      result <= '0;
    end else begin
      en_out <= en_in;
      result <= (en_in && data > threshold) ? '1 : '0;
    end
  end
endmodule
