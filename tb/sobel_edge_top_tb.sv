// sobel_edge_top_tb: end-to-end test of the edge detector on small images.
//
// Sends three 10x7 frames in raster order: frame 0 with random idle gaps
// between pixels, frame 1 directly behind it (one pixel per clock), then an
// idle stretch in which the last pixels of frame 1 must flush out; the
// threshold is changed and frame 2 follows, then a final flush. Images mix
// flat areas, step edges in all four orientations and noise, so that inner
// pixels with zero, medium and saturated strength all occur.
//
// Every output pixel is checked in raster order against a reference computed
// from the kernel matrices (border pixels zero), the binary result against the
// threshold, and each inner pixel's arrival cycle against its fixed latency.
// Mechanisms counted (each must occur): input gaps, back-to-back frames,
// border zeroing, tail flush on idle cycles, saturation, result 0 and 255,
// threshold change, consecutive outputs at one pixel per clock.
module sobel_edge_top_tb;
  import sobel_ref_pkg::*;
  localparam int unsigned IMG_W = 10;
  localparam int unsigned IMG_H = 7;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned NFRM  = 3;
  localparam int unsigned LAT   = edge_pkg::SOBEL_LAT + 1;   // push edge to data_out

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [PIX_W-1:0] data_in = '0, threshold = '0;
  logic data_valid, result_valid;
  logic [PIX_W-1:0] data_out, result;

  sobel_edge_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int img [NFRM][NPIX];
  int thr [NFRM];
  int exp_data [NFRM * NPIX];
  int push_cyc [NFRM * NPIX];
  int npush = 0, nout = 0, nres = 0;
  int n_gap = 0, n_b2b = 0, n_border = 0, n_flush = 0, n_sat = 0;
  int n_hi = 0, n_lo = 0, n_thr_change = 0, n_consec = 0, last_out_cyc = -10;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pixel(int f, int p);
    int r = p / IMG_W, c = p % IMG_W;
    int w [9];
    if (r == 0 || r == IMG_H - 1 || c == 0 || c == IMG_W - 1) return 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) w[3*i + j] = img[f][(r - 1 + i) * IMG_W + (c - 1 + j)];
    return sobel4(w, 255);
  endfunction

  // data_out monitor.
  always @(posedge clk) begin
    #1;
    if (!rst && data_valid) begin
      int f, p, src;
      f = nout / NPIX;
      p = nout % NPIX;
      src = nout + IMG_W + 1;
      checks++;
      if (int'(data_out) != exp_data[nout]) begin
        failures++;
        $display("FAIL frame %0d pixel %0d: data_out=%0d expected %0d", f, p, data_out, exp_data[nout]);
      end
      if (exp_data[nout] == 255) n_sat++;
      if (src >= npush) n_flush++;
      if (p / IMG_W == 0 || p / IMG_W == IMG_H - 1 || p % IMG_W == 0 || p % IMG_W == IMG_W - 1)
        n_border++;
      else begin
        checks++;
        if (src >= npush || cyc != push_cyc[src] + LAT) begin
          failures++;
          $display("FAIL frame %0d pixel %0d: latency %0d expected %0d", f, p, cyc - push_cyc[src], LAT);
        end
      end
      if (cyc == last_out_cyc + 1) n_consec++;
      last_out_cyc = cyc;
      nout++;
    end
  end

  // result monitor.
  always @(posedge clk) begin
    #1;
    if (!rst && result_valid) begin
      int f, e;
      f = nres / NPIX;
      e = (exp_data[nres] > thr[f]) ? 255 : 0;
      if (e == 255) n_hi++; else n_lo++;
      checks++;
      if (int'(result) != e) begin
        failures++;
        $display("FAIL frame %0d pixel %0d: result=%0d expected %0d", f, nres % NPIX, result, e);
      end
      nres++;
    end
  end

  task automatic push_pixel(int v);
    data_in = PIX_W'(v);
    en = 1'b1;
    @(posedge clk);
    #1;
    push_cyc[npush] = cyc;
    npush++;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    // Images: flat background, one step edge per orientation, noisy patch.
    for (int f = 0; f < NFRM; f++) begin
      for (int p = 0; p < NPIX; p++) begin
        int r, c, v;
        r = p / IMG_W;
        c = p % IMG_W;
        v = 20 + $urandom_range(0, 3);
        case ((c + f) / 3 % 4)
          0: v = (c % 3 == 2) ? 230 : v;                 // vertical bars
          1: v = (r >= 3) ? 120 + $urandom_range(0, 40) : v; // horizontal step
          2: v = (r + c > 8) ? 200 : v;                  // diagonal step
          default: v = $urandom_range(0, 255);           // noise
        endcase
        img[f][p] = v;
      end
      for (int p = 0; p < NPIX; p++) exp_data[f * NPIX + p] = ref_pixel(f, p);
    end
    thr[0] = 60; thr[1] = 60; thr[2] = 150;

    threshold = PIX_W'(thr[0]);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    // Frame 0 with gaps, frame 1 back to back.
    for (int p = 0; p < NPIX; p++) begin
      push_pixel(img[0][p]);
      if ($urandom_range(0, 3) == 0) begin
        n_gap++;
        repeat ($urandom_range(1, 2)) @(negedge clk);
      end
    end
    n_b2b++;
    for (int p = 0; p < NPIX; p++) push_pixel(img[1][p]);
    repeat (IMG_W + LAT + 10) @(negedge clk);
    checks++;
    if (nres != 2 * NPIX) begin
      failures++;
      $display("FAIL: %0d results after two frames and idle, expected %0d", nres, 2 * NPIX);
    end
    // New threshold, then frame 2.
    threshold = PIX_W'(thr[2]);
    n_thr_change++;
    for (int p = 0; p < NPIX; p++) push_pixel(img[2][p]);
    repeat (IMG_W + LAT + 10) @(negedge clk);
    checks++;
    if (nout != NFRM * NPIX || nres != NFRM * NPIX) begin
      failures++;
      $display("FAIL: %0d/%0d outputs, expected %0d", nout, nres, NFRM * NPIX);
    end
    $display("mechanisms: gaps=%0d back_to_back=%0d border_pixels=%0d flushed=%0d saturated=%0d result255=%0d result0=%0d threshold_changes=%0d consecutive_outputs=%0d",
             n_gap, n_b2b, n_border, n_flush, n_sat, n_hi, n_lo, n_thr_change, n_consec);
    if (n_gap == 0 || n_b2b == 0 || n_border == 0 || n_flush == 0 || n_sat == 0 ||
        n_hi == 0 || n_lo == 0 || n_thr_change == 0 || n_consec < NPIX - 1) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
