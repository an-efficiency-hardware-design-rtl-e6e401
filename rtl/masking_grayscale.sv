// masking_grayscale: first stage of the lane detector.
//
// Converts each RGB pixel of a raster-order stream to an 8-bit gray level and
// masks (forces to zero) every pixel whose row lies outside the region of
// interest, so that nothing above the horizon band or below the bonnet can
// produce edges. The module keeps its own column/row counters: every cycle
// with in_valid high is the next pixel of the frame, left to right, top to
// bottom, and the frame restarts after W*H pixels.
//
// The gray weights are the ITU-R BT.601 luma weights in 8-bit fixed point,
// gray = (77 R + 150 G + 29 B + 128) >> 8; the ROI rows (centred y from
// ROI_Y_MIN to ROI_Y_MAX) follow the region measured for this lane detector.
// Both the weights and masking by rows are this design's reading of the
// "masking and grayscale" stage, whose insides are not specified further.
//
// Timing: one pixel per clock, latency 1. out_col/out_row give the raster
// position of out_gray, out_eof marks the last pixel of a frame.
module masking_grayscale
  import lane_pkg::*;
#(
  parameter int W         = IMG_W,
  parameter int H         = IMG_H,
  parameter int ROI_Y_LO  = ROI_Y_MIN,
  parameter int ROI_Y_HI  = ROI_Y_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [7:0]               in_r,
  input  logic [7:0]               in_g,
  input  logic [7:0]               in_b,
  output logic                     out_valid,
  output logic [PIX_W-1:0]         out_gray,
  output logic [$clog2(W)-1:0]     out_col,
  output logic [$clog2(H)-1:0]     out_row,
  output logic                     out_eof
);
  localparam int CW = $clog2(W);
  localparam int RW = $clog2(H);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          last_col, last_row;
  logic [15:0]   luma;           // at most 65408, fits 16 bits
  logic signed [RW:0] y_c;      // centred row
  logic          in_roi;

  assign last_col = (col == CW'(W - 1));
  assign last_row = (row == RW'(H - 1));
  assign luma     = 16'(in_r) * 16'd77 + 16'(in_g) * 16'd150 + 16'(in_b) * 16'd29 + 16'd128;
  assign y_c      = $signed({1'b0, row}) - (RW+1)'(H / 2);
  assign in_roi   = (y_c >= (RW+1)'(ROI_Y_LO)) && (y_c <= (RW+1)'(ROI_Y_HI));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_gray  <= '0;
      out_col   <= '0;
      out_row   <= '0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_gray <= in_roi ? PIX_W'(luma >> 8) : '0;
        out_col  <= col;
        out_row  <= row;
        out_eof  <= last_col && last_row;
        if (last_col) begin
          col <= '0;
          row <= last_row ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end else begin
        out_eof <= 1'b0;
      end
    end
  end
endmodule
