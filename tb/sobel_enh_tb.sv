// sobel_enh_tb: applies a new 3x3 window every clock (random windows, ideal
// step edges in each of the four orientations, flat windows and saturating
// windows) and checks the result SOBEL_LAT = 4 cycles later against the
// maximum absolute response of the four kernel matrices.
module sobel_enh_tb;
  import sobel_ref_pkg::*;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned LAT   = 4;
  localparam int unsigned N     = 600;

  logic clk = 1'b0, rst = 1'b1;
  logic [8:0][PIX_W-1:0] win = '0;
  logic [PIX_W-1:0] mag;
  int checks = 0, failures = 0;
  int expect_q [$];
  int n_sat = 0, n_zero = 0;

  sobel_enh #(.PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [9];
    int e, base, lo, hi, o, r, c;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        case (t % 8)
          // Small-contrast random window: result below saturation.
          0, 1, 2: begin
            base = $urandom_range(0, 200);
            foreach (w[i]) w[i] = base + $urandom_range(0, 20);
          end
          // Step edge in one of four orientations with a random contrast.
          3, 4: begin
            lo = $urandom_range(0, 255);
            hi = $urandom_range(0, 255);
            o  = $urandom_range(0, 3);
            foreach (w[i]) begin
              r = i / 3;
              c = i % 3;
              case (o)
                0: w[i] = (c > 1) ? hi : lo;
                1: w[i] = (r > 1) ? hi : lo;
                2: w[i] = (r + c > 2) ? hi : lo;
                default: w[i] = (r < c) ? hi : lo;
              endcase
            end
          end
          5: foreach (w[i]) w[i] = 77;
          default: foreach (w[i]) w[i] = $urandom_range(0, 255);
        endcase
        e = sobel4(w, 255);
        if (e == 255) n_sat++;
        if (e == 0) n_zero++;
        expect_q.push_back(e);
        foreach (w[i]) win[i] <= PIX_W'(w[i]);
      end
      @(posedge clk);
      #1;
      if (t >= LAT - 1 && t - (LAT - 1) < N) begin
        e = expect_q.pop_front();
        checks++;
        if (int'(mag) != e) begin
          failures++;
          $display("FAIL t=%0d: mag=%0d expected %0d", t, mag, e);
        end
      end
    end
    if (n_sat == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL: saturation (%0d) or zero (%0d) case never exercised", n_sat, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
