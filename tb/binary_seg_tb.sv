// binary_seg_tb: random strengths and thresholds, including equality and the
// extremes, checked one cycle later: result 255 when data > threshold, else 0;
// en_out follows en_in.
module binary_seg_tb;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned N     = 500;

  logic clk = 1'b0, rst = 1'b1, en_in = 1'b0, en_out;
  logic [PIX_W-1:0] data = '0, threshold = '0, result;
  int checks = 0, failures = 0;

  binary_seg #(.PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, th, v, n_hi, n_lo;
    n_hi = 0;
    n_lo = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < N; t++) begin
      th = $urandom_range(0, 255);
      case (t % 4)
        0: d = th;
        1: d = (th < 255) ? th + 1 : 0;
        default: d = $urandom_range(0, 255);
      endcase
      v = $urandom_range(0, 1);
      data <= PIX_W'(d);
      threshold <= PIX_W'(th);
      en_in <= v[0];
      @(posedge clk);
      #1;
      checks += 2;
      if (en_out !== v[0]) begin
        failures++;
        $display("FAIL t=%0d: en_out=%0b expected %0b", t, en_out, v[0]);
      end
      if (v[0]) begin
        if (d > th) n_hi++; else n_lo++;
        if (result !== ((d > th) ? 8'd255 : 8'd0)) begin
          failures++;
          $display("FAIL t=%0d: data=%0d threshold=%0d result=%0d", t, d, th, result);
        end
      end
    end
    if (n_hi == 0 || n_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
