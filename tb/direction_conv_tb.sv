// direction_conv_tb: feeds a new random set of six pixels every clock and
// checks each |(pa + 2pb + pc) - (na + 2nb + nc)| exactly CONV_LAT = 2 cycles
// later, plus the extreme cases (all positive 255, all negative 255).
module direction_conv_tb;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned LAT   = 2;
  localparam int unsigned N     = 500;

  logic clk = 1'b0, rst = 1'b1;
  logic [PIX_W-1:0] pa = '0, pb = '0, pc = '0, na = '0, nb = '0, nc = '0;
  logic [PIX_W+1:0] mag;
  int checks = 0, failures = 0;
  int expect_q [$];

  direction_conv #(.PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [6];
    int e;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        foreach (v[i]) v[i] = $urandom_range(0, 255);
        if (t == 0) v = '{255, 255, 255, 0, 0, 0};
        if (t == 1) v = '{0, 0, 0, 255, 255, 255};
        if (t == 2) v = '{9, 4, 1, 3, 5, 2};
        e = (v[0] + 2 * v[1] + v[2]) - (v[3] + 2 * v[4] + v[5]);
        expect_q.push_back(e < 0 ? -e : e);
        {pa, pb, pc, na, nb, nc} <= {PIX_W'(v[0]), PIX_W'(v[1]), PIX_W'(v[2]),
                                     PIX_W'(v[3]), PIX_W'(v[4]), PIX_W'(v[5])};
      end
      @(posedge clk);
      #1;
      if (t >= LAT - 1 && expect_q.size() > 0 && t - (LAT - 1) < N) begin
        e = expect_q.pop_front();
        checks++;
        if (int'(mag) != e) begin
          failures++;
          $display("FAIL t=%0d: mag=%0d expected %0d", t, mag, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
