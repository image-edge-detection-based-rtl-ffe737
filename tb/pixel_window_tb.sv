// pixel_window_tb: pushes a random raster stream (with idle gaps) into the
// 3x3 generator and checks, after every push, that all nine taps equal the
// pixels at the matching offsets of the stream: tap (i, j) = pixel pushed
// (2-i)*IMG_W + (2-j) pushes ago.
module pixel_window_tb;
  localparam int unsigned IMG_W = 6;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned NPUSH = 120;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [PIX_W-1:0] pix_in = '0;
  logic [8:0][PIX_W-1:0] win;
  int checks = 0, failures = 0;
  logic [PIX_W-1:0] hist [NPUSH];

  pixel_window #(.IMG_W(IMG_W), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < NPUSH; k++) begin
      hist[k] = PIX_W'($urandom);
      pix_in <= hist[k];
      en     <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 2)) @(posedge clk);
      #1;
      if (k >= 2 * IMG_W + 2) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (win[3*i + j] !== hist[k - (2 - i) * IMG_W - (2 - j)]) begin
              failures++;
              $display("FAIL push %0d tap P%0d: %0h expected %0h", k, 3*i + j + 1,
                       win[3*i + j], hist[k - (2 - i) * IMG_W - (2 - j)]);
            end
          end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
