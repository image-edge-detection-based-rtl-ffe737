// line_fifo_tb: checks that the line buffer delays the pushed stream by
// exactly LINE_LEN pushes, with pushes interleaved with idle cycles, and that
// the output holds while no pixel is pushed.
module line_fifo_tb;
  localparam int unsigned LINE_LEN = 7;
  localparam int unsigned PIX_W    = 8;
  localparam int unsigned NPUSH    = 200;

  logic clk = 1'b0, rst = 1'b1, push = 1'b0;
  logic [PIX_W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [PIX_W-1:0] hist [NPUSH];

  line_fifo #(.LINE_LEN(LINE_LEN), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PIX_W-1:0] held;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < NPUSH; k++) begin
      // Optional idle cycles: dout must not move.
      if ($urandom_range(0, 2) == 0) begin
        #1 held = dout;
        push <= 1'b0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
        checks++;
        if (dout !== held) begin
          failures++;
          $display("FAIL: dout moved while idle");
        end
      end
      #1;
      if (k >= LINE_LEN) begin
        checks++;
        if (dout !== hist[k - LINE_LEN]) begin
          failures++;
          $display("FAIL push %0d: dout=%0h expected %0h", k, dout, hist[k - LINE_LEN]);
        end
      end
      hist[k] = PIX_W'($urandom);
      din  <= hist[k];
      push <= 1'b1;
      @(posedge clk);
    end
    push <= 1'b0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
