// gx_gy_operator: Sobel masks over a 3x3 window.
//
// wRC is the pixel in window row R (0 = top, oldest) and column C (0 = left),
// so w22 is the newest pixel and w11 the window centre. The operator forms
//   Gx = (w02 + 2 w12 + w22) - (w00 + 2 w10 + w20)   (right minus left)
//   Gy = (w20 + 2 w21 + w22) - (w00 + 2 w01 + w02)   (bottom minus top)
// so the gradient vector points from dark to bright in the y-down image frame.
// The window naming follows the original architecture; the kernels are the
// standard Sobel ones and the sign convention is this design's.
//
// Timing: one window per clock, registered outputs, latency 1. The side-band
// word in_user travels alongside with the same latency.
module gx_gy_operator
  import lane_pkg::*;
#(
  parameter int USER_W = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [PIX_W-1:0]         w00, w01, w02,
  input  logic [PIX_W-1:0]         w10,      w12,
  input  logic [PIX_W-1:0]         w20, w21, w22,
  input  logic [USER_W-1:0]        in_user,
  output logic                     out_valid,
  output logic signed [GRAD_W-1:0] gx,
  output logic signed [GRAD_W-1:0] gy,
  output logic [USER_W-1:0]        out_user
);
  logic signed [GRAD_W-1:0] right, left, bottom, top;

  assign right  = GRAD_W'(w02) + (GRAD_W'(w12) <<< 1) + GRAD_W'(w22);
  assign left   = GRAD_W'(w00) + (GRAD_W'(w10) <<< 1) + GRAD_W'(w20);
  assign bottom = GRAD_W'(w20) + (GRAD_W'(w21) <<< 1) + GRAD_W'(w22);
  assign top    = GRAD_W'(w00) + (GRAD_W'(w01) <<< 1) + GRAD_W'(w02);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      gx        <= '0;
      gy        <= '0;
      out_user  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        gx       <= right - left;
        gy       <= bottom - top;
        out_user <= in_user;
      end
    end
  end
endmodule
