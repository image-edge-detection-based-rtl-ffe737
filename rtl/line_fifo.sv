// line_fifo: one-line delay buffer of the 3x3 pixel generator.
//
// A dual-port RAM with a single circular address holds LINE_LEN-1 pixels. On
// every push the word at the pointer is read (read-before-write) into the
// output register and the new pixel is written in its place, then the pointer
// advances. RAM plus output register delay the stream by exactly LINE_LEN
// pushes: just before push k, dout holds the pixel of push k-LINE_LEN.
//
// Interface: push/din in, dout out; nothing moves while push is low.
// Timing: dout changes on the clock edge of a push.
// Building the line buffer from RAM instead of a FIFO core follows the
// document; the read-before-write circular organisation is this design's own.
// Reset clears the pointer and output register, not the RAM: until a full
// line has passed, dout carries stale RAM contents, which only ever reach
// border pixels that the edges control forces to zero.
module line_fifo #(
  parameter int unsigned LINE_LEN = 1024,
  parameter int unsigned PIX_W    = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [PIX_W-1:0] din,
  output logic [PIX_W-1:0] dout
);
  localparam int unsigned DEPTH = LINE_LEN - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [PIX_W-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  // RAM: read-before-write at one address, registered read.
  always_ff @(posedge clk) begin
    if (push) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
    if (rst) dout <= '0;
  end

  always_ff @(posedge clk) begin
    if (rst)
      ptr <= '0;
    else if (push)
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  initial begin
    assert (LINE_LEN >= 3) else $error("line_fifo: LINE_LEN must be at least 3");
  end
endmodule
