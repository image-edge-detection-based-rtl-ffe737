// sobel_enh: Sobel enhancement operator, four orientations in parallel.
//
// The classic Sobel operator uses two kernels (0 and 90 degrees). This
// operator adds the two diagonals and keeps the strongest response:
//     0 deg          45 deg         90 deg         135 deg
//   -1  0 +1       0 +1 +2       -1 -2 -1       +2 +1  0
//   -2  0 +2      -1  0 +1        0  0  0       +1  0 -1
//   -1  0 +1      -2 -1  0       +1 +2 +1        0 -1 -2
// Four direction_conv units compute |response| for each kernel at the same
// time; two registered levels of comparators pick the maximum, which is then
// saturated to 2^PIX_W-1.
//
// Interface: win (P1..P9, index 0 = P1) in, mag out. The centre pixel P5
// has a zero coefficient in every kernel and is not used.
// Timing: one window per clock, SOBEL_LAT = 4 cycles from win to mag.
// Four parallel orientation kernels compared for the maximum follow the
// document; the kernel signs, the absolute values before the comparison and
// the saturation to 8 bits are this design's choices.
module sobel_enh
  import edge_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [8:0][PIX_W-1:0] win,
  output logic [PIX_W-1:0]      mag
);
  localparam int unsigned MW = PIX_W + 2;

  logic [3:0][MW-1:0] dir_mag;       // 0, 45, 90, 135 degrees
  logic [1:0][MW-1:0] max_l1;

  // 0 degrees: right column minus left column.
  direction_conv #(.PIX_W(PIX_W)) u_d000 (
    .clk, .rst,
    .pa(win[P3]), .pb(win[P6]), .pc(win[P9]),
    .na(win[P1]), .nb(win[P4]), .nc(win[P7]),
    .mag(dir_mag[0])
  );
  // 45 degrees: top-right corner minus bottom-left corner.
  direction_conv #(.PIX_W(PIX_W)) u_d045 (
    .clk, .rst,
    .pa(win[P2]), .pb(win[P3]), .pc(win[P6]),
    .na(win[P4]), .nb(win[P7]), .nc(win[P8]),
    .mag(dir_mag[1])
  );
  // 90 degrees: bottom row minus top row.
  direction_conv #(.PIX_W(PIX_W)) u_d090 (
    .clk, .rst,
    .pa(win[P7]), .pb(win[P8]), .pc(win[P9]),
    .na(win[P1]), .nb(win[P2]), .nc(win[P3]),
    .mag(dir_mag[2])
  );
  // 135 degrees: top-left corner minus bottom-right corner.
  direction_conv #(.PIX_W(PIX_W)) u_d135 (
    .clk, .rst,
    .pa(win[P2]), .pb(win[P1]), .pc(win[P4]),
    .na(win[P6]), .nb(win[P9]), .nc(win[P8]),
    .mag(dir_mag[3])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      max_l1 <= '0;
      mag    <= '0;
    end else begin
      max_l1[0] <= (dir_mag[0] > dir_mag[1]) ? dir_mag[0] : dir_mag[1];
      max_l1[1] <= (dir_mag[2] > dir_mag[3]) ? dir_mag[2] : dir_mag[3];
      if (max_l1[0] > max_l1[1])
        mag <= (max_l1[0] > MW'({PIX_W{1'b1}})) ? '1 : max_l1[0][PIX_W-1:0];
      else
        mag <= (max_l1[1] > MW'({PIX_W{1'b1}})) ? '1 : max_l1[1][PIX_W-1:0];
    end
  end
endmodule
