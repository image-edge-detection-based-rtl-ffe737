// edge_control_tb: checks the edges control on a small 5x4 image.
//
// The testbench stands in for the window and operator: every push advances a
// window number, which reaches sobel_mag LAT cycles later, so each output can
// be traced to the window it came from. Three frames are sent: the first with
// random idle gaps, the second back to back with the first, then an idle
// stretch (the tail must flush out), then a third frame and a final flush.
// Checked: every output pixel appears once in raster order; border pixels are
// 0; inner pixel k carries window k+IMG_W+2 and appears LAT+1 edges after the
// push of input pixel k+IMG_W+1; every pixel of every frame comes out.
module edge_control_tb;
  localparam int unsigned IMG_W = 5;
  localparam int unsigned IMG_H = 4;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned LAT   = 4;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned NFRM  = 3;

  logic clk = 1'b0, rst = 1'b1, turn = 1'b0, en;
  logic [PIX_W-1:0] sobel_mag, data;
  int checks = 0, failures = 0;

  edge_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  // Stand-in for window register plus operator pipeline.
  logic [PIX_W-1:0] wid = '0;
  logic [LAT-1:0][PIX_W-1:0] pipe = '0;
  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (turn) wid <= wid + 1'b1;
    pipe <= {pipe[LAT-2:0], wid};
  end
  assign sobel_mag = pipe[LAT-1];

  int push_cyc [NFRM * NPIX];
  int npush = 0;
  int nout = 0, n_border = 0, n_inner = 0, n_flush = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    #1;
    if (!rst && en) begin
      int p, r, c, src;
      p = nout % NPIX;
      r = p / IMG_W;
      c = p % IMG_W;
      src = nout + IMG_W + 1;          // input pixel that completed the window
      checks++;
      if (r == 0 || r == IMG_H - 1 || c == 0 || c == IMG_W - 1) begin
        n_border++;
        if (data !== '0) begin
          failures++;
          $display("FAIL out %0d (r%0d c%0d): border data=%0d", nout, r, c, data);
        end
      end else begin
        n_inner++;
        if (data !== PIX_W'(src + 1)) begin
          failures++;
          $display("FAIL out %0d (r%0d c%0d): data=%0d expected %0d", nout, r, c, data, PIX_W'(src + 1));
        end
        checks++;
        if (src >= npush || cyc != push_cyc[src] + LAT + 1) begin
          failures++;
          $display("FAIL out %0d: at cycle %0d, push %0d was at %0d", nout, cyc, src, push_cyc[src]);
        end
      end
      if (src >= npush) n_flush++;
      nout++;
    end
  end

  // Stimulus changes at the falling edge, away from the sampling edge.
  task automatic push_pixel();
    turn = 1'b1;
    @(posedge clk);
    #1;
    push_cyc[npush] = cyc;
    npush++;
    @(negedge clk);
    turn = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    // Frame 0 with gaps, frame 1 back to back.
    for (int k = 0; k < 2 * NPIX; k++) begin
      push_pixel();
      if (k < NPIX && $urandom_range(0, 2) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (IMG_W + LAT + 10) @(negedge clk);
    checks++;
    if (nout != 2 * NPIX) begin
      failures++;
      $display("FAIL: %0d outputs after two frames and idle, expected %0d", nout, 2 * NPIX);
    end
    for (int k = 0; k < NPIX; k++) push_pixel();
    repeat (IMG_W + LAT + 10) @(negedge clk);
    checks++;
    if (nout != NFRM * NPIX) begin
      failures++;
      $display("FAIL: %0d outputs in total, expected %0d", nout, NFRM * NPIX);
    end
    if (n_flush == 0 || n_inner == 0 || n_border == 0) begin
      failures++;
      $display("FAIL: flush=%0d inner=%0d border=%0d", n_flush, n_inner, n_border);
    end
    $display("edge_control_tb: outputs=%0d inner=%0d border=%0d flushed=%0d", nout, n_inner, n_border, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
