// sobel_edge_top_full_tb: one full 1024x1024x8 frame through the detector at
// its default size.
//
// The test image is generated: a dark noisy background with a bright
// rectangle, a mid-grey disc and a diagonal band, giving edges in every
// orientation. The frame is streamed at one pixel per clock with no gaps; the
// tail then flushes on idle cycles. Every edge-strength and binary output
// pixel is compared with a reference computed from the kernel matrices, and
// the frame time is checked: the input takes exactly 1024*1024 clocks
// (20.97 ms at 50 MHz) and the last output follows within IMG_W+1 plus the
// pipeline latency.
module sobel_edge_top_full_tb;
  import sobel_ref_pkg::*;
  localparam int unsigned IMG_W = 1024;
  localparam int unsigned IMG_H = 1024;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned THR   = 100;
  localparam int unsigned LAT   = edge_pkg::SOBEL_LAT + 1;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [PIX_W-1:0] data_in = '0, threshold = PIX_W'(THR);
  logic data_valid, result_valid;
  logic [PIX_W-1:0] data_out, result;

  sobel_edge_top dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  byte unsigned img [NPIX];
  int nout = 0, nres = 0, n_hi = 0, n_sat = 0, first_push = 0, last_out = 0;

  initial begin
    repeat (NPIX + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pixel(int p);
    int r = p / IMG_W, c = p % IMG_W;
    int w [9];
    if (r == 0 || r == IMG_H - 1 || c == 0 || c == IMG_W - 1) return 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) w[3*i + j] = int'(img[(r - 1 + i) * IMG_W + (c - 1 + j)]);
    return sobel4(w, 255);
  endfunction

  function automatic int gen_pixel(int r, int c);
    int v = 30 + int'($urandom_range(0, 15));
    if (r >= 200 && r < 600 && c >= 150 && c < 700) v = 210;
    if ((r - 700) * (r - 700) + (c - 600) * (c - 600) < 150 * 150) v = 120;
    if (r + c > 1500 && r + c < 1540) v = 250;
    return v;
  endfunction

  int exp_d;
  always @(posedge clk) begin
    #1;
    if (!rst && data_valid) begin
      exp_d = ref_pixel(nout);
      if (exp_d == 255) n_sat++;
      checks++;
      if (int'(data_out) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d: data_out=%0d expected %0d", nout, data_out, exp_d);
      end
      nout++;
      last_out = cyc;
    end
    if (!rst && result_valid) begin
      exp_d = (ref_pixel(nres) > int'(THR)) ? 255 : 0;
      if (exp_d == 255) n_hi++;
      checks++;
      if (int'(result) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d: result=%0d expected %0d", nres, result, exp_d);
      end
      nres++;
    end
  end

  initial begin
    for (int p = 0; p < NPIX; p++) img[p] = byte'(gen_pixel(p / IMG_W, p % IMG_W));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int p = 0; p < NPIX; p++) begin
      data_in = img[p];
      en = 1'b1;
      @(posedge clk);
      if (p == 0) begin
        #1 first_push = cyc;
      end
      @(negedge clk);
    end
    en = 1'b0;
    checks++;
    // The last pixel is pushed NPIX-1 clocks after the first: one per clock.
    if (cyc - first_push != NPIX - 1) begin
      failures++;
      $display("FAIL: input took %0d clocks, expected %0d", cyc - first_push + 1, NPIX);
    end
    repeat (IMG_W + 50) @(negedge clk);
    checks++;
    if (nout != NPIX || nres != NPIX) begin
      failures++;
      $display("FAIL: %0d data / %0d result pixels, expected %0d", nout, nres, NPIX);
    end
    checks++;
    if (last_out - first_push > NPIX + IMG_W + 1 + LAT) begin
      failures++;
      $display("FAIL: last output %0d clocks after first input", last_out - first_push);
    end
    $display("frame: %0d clocks from first input to last edge output (%0.2f ms at 50 MHz); saturated=%0d edge_pixels=%0d",
             last_out - first_push, real'(last_out - first_push) * 20.0e-6, n_sat, n_hi);
    if (n_sat == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
