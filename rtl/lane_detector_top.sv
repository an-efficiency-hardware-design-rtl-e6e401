// lane_detector_top: streaming lane detector for one camera.
//
// RGB pixels go in, one per clock in raster order; after the last pixel of
// each frame the two lane lines found in it come out as equations
// y = b - m*x in a frame centred on the image (x right, y down, both
// -W/2..W/2-1), with the angle theta of the line's normal and the height of
// its Hough peak. Three stages are chained:
//
//   masking_grayscale     RGB -> gray, rows outside the ROI forced to 0
//   sobel_edge_detection  3x3 window on two RAM line buffers, Sobel Gx/Gy,
//                         vectoring CORDIC -> edge flag, theta, position
//   hough_transform       b = cot(theta)*x + y votes into an ROI-only
//                         accumulator, two banks alternating per frame,
//                         peaks of the left (theta < 90) and right lanes
//
// With the default 1024 x 1024 frame and one pixel per clock a frame takes
// 1,048,576 cycles, 4.19 ms at 250 MHz. lines_valid pulses ITER + 15 cycles
// after the frame's last pixel entered (27 with the default ITER = 12); a
// line whose peak is under VOTE_TH votes comes out with valid = 0. Frames
// may follow each other without a gap; in_valid low simply pauses the
// stream. The chain, the ROI and the line-equation output follow the
// original architecture; the thresholds, the framing of the stream and the
// output struct are this design's choices. The edge stage hands the Hough
// stage the angle and an edge flag rather than raw Gx/Gy, since the CORDIC
// sits inside the edge detector.
module lane_detector_top
  import lane_pkg::*;
#(
  parameter int W       = IMG_W,
  parameter int H       = IMG_H,
  parameter int ITER    = 12,
  parameter int EDGE_TH = 200,
  parameter int VOTE_TH = 16,
  parameter int B_LO    = B_MIN,
  parameter int B_HI    = B_MAX,
  parameter int Y_LO    = ROI_Y_MIN,
  parameter int Y_HI    = ROI_Y_MAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_r,
  input  logic [7:0] in_g,
  input  logic [7:0] in_b,
  output logic       lines_valid,
  output lane_line_t line_left,
  output lane_line_t line_right,
  output logic [1:0] bank_ready,
  output logic       vote_lost
);
  logic                      g_valid, g_eof;
  logic [PIX_W-1:0]          g_gray;
  logic [$clog2(W)-1:0]      g_col;
  logic [$clog2(H)-1:0]      g_row;

  logic                      e_valid, e_edge, e_eof;
  logic signed [COORD_W-1:0] e_x, e_y;
  logic [THETA_W-1:0]        e_theta;
  logic [MAG_W-1:0]          e_mag;

  masking_grayscale #(.W(W), .H(H), .ROI_Y_LO(Y_LO), .ROI_Y_HI(Y_HI)) u_gray (
    .clk, .rst_n,
    .in_valid, .in_r, .in_g, .in_b,
    .out_valid(g_valid),
    .out_gray (g_gray),
    .out_col  (g_col),
    .out_row  (g_row),
    .out_eof  (g_eof)
  );

  sobel_edge_detection #(.W(W), .H(H), .ITER(ITER), .EDGE_TH(EDGE_TH)) u_sobel (
    .clk, .rst_n,
    .in_valid (g_valid),
    .in_gray  (g_gray),
    .in_col   (g_col),
    .in_row   (g_row),
    .in_eof   (g_eof),
    .out_valid(e_valid),
    .out_edge (e_edge),
    .out_x    (e_x),
    .out_y    (e_y),
    .out_theta(e_theta),
    .out_mag  (e_mag),
    .out_eof  (e_eof)
  );

  hough_transform #(
    .B_LO(B_LO), .B_HI(B_HI), .Y_LO(Y_LO), .Y_HI(Y_HI), .VOTE_TH(VOTE_TH)
  ) u_hough (
    .clk, .rst_n,
    .in_valid  (e_valid),
    .in_edge   (e_edge),
    .in_x      (e_x),
    .in_y      (e_y),
    .in_theta  (e_theta),
    .in_eof    (e_eof),
    .out_valid (lines_valid),
    .line_left,
    .line_right,
    .bank_ready,
    .vote_lost
  );
endmodule
