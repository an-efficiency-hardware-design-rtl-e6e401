// sobel_edge_detection: edge pixels and their orientation.
//
// Builds a 3x3 window over the gray stream with two registers per window row
// and two RAM-based line FIFOs between the rows (instead of shift-register
// chains W pixels long), applies the Sobel Gx/Gy masks and converts the
// gradient to an angle and a magnitude with a vectoring CORDIC:
//
//   gray -> w22 -> w21 -> w20 -> FIFO -> w12 -> w11 -> w10 -> FIFO -> w02 -> w01 -> w00
//
// When pixel (c, r) arrives, w11 is pixel (c-1, r-1); windows centred on the
// first or last column or row wrap around and are flagged as not usable. For
// each input pixel one result leaves: the centre's coordinates in the
// centred frame (x = c-1 - W/2, y = r-1 - H/2), the gradient angle theta
// (0..179 degrees), the magnitude, and out_edge, set when the centre is
// usable and the magnitude is at least EDGE_TH. The edge threshold value is
// this design's choice.
//
// Timing: one pixel per clock, latency ITER + 3 cycles. out_eof follows the
// last pixel of the frame.
module sobel_edge_detection
  import lane_pkg::*;
#(
  parameter int W       = IMG_W,
  parameter int H       = IMG_H,
  parameter int ITER    = 12,
  parameter int EDGE_TH = 200
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [PIX_W-1:0]          in_gray,
  input  logic [$clog2(W)-1:0]      in_col,
  input  logic [$clog2(H)-1:0]      in_row,
  input  logic                      in_eof,
  output logic                      out_valid,
  output logic                      out_edge,
  output logic signed [COORD_W-1:0] out_x,
  output logic signed [COORD_W-1:0] out_y,
  output logic [THETA_W-1:0]        out_theta,
  output logic [MAG_W-1:0]          out_mag,
  output logic                      out_eof
);
  typedef struct packed {
    logic                      ok;    // window does not wrap
    logic                      eof;
    logic signed [COORD_W-1:0] x;
    logic signed [COORD_W-1:0] y;
  } side_t;
  localparam int SW = $bits(side_t);

  logic [PIX_W-1:0] w00, w01, w02, w10, w11, w12, w20, w21, w22;
  side_t            side_in, side_g, side_c;
  logic             g_valid;
  logic signed [GRAD_W-1:0] gx, gy;

  assign w22 = in_gray;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {w21, w20, w11, w10, w01, w00} <= '0;
    end else if (in_valid) begin
      w21 <= w22;
      w20 <= w21;
      w11 <= w12;
      w10 <= w11;
      w01 <= w02;
      w00 <= w01;
    end
  end

  line_fifo #(.WIDTH(PIX_W), .DEPTH(W - 3)) u_fifo_1 (
    .clk, .rst_n, .en(in_valid), .din(w20), .dout(w12)
  );
  line_fifo #(.WIDTH(PIX_W), .DEPTH(W - 3)) u_fifo_0 (
    .clk, .rst_n, .en(in_valid), .din(w10), .dout(w02)
  );

  assign side_in.ok  = (in_col >= 2) && (in_row >= 2);
  assign side_in.eof = in_eof;
  assign side_in.x   = COORD_W'($signed({1'b0, in_col})) - COORD_W'(1 + W / 2);
  assign side_in.y   = COORD_W'($signed({1'b0, in_row})) - COORD_W'(1 + H / 2);

  gx_gy_operator #(.USER_W(SW)) u_gxgy (
    .clk, .rst_n,
    .in_valid (in_valid),
    .w00, .w01, .w02, .w10, .w12, .w20, .w21, .w22,
    .in_user  (side_in),
    .out_valid(g_valid),
    .gx, .gy,
    .out_user (side_g)
  );

  vectoring_cordic #(.ITER(ITER), .USER_W(SW)) u_cordic (
    .clk, .rst_n,
    .in_valid (g_valid),
    .gx, .gy,
    .in_user  (side_g),
    .out_valid(out_valid),
    .theta    (out_theta),
    .mag      (out_mag),
    .out_user (side_c)
  );

  assign out_edge = out_valid && side_c.ok && (out_mag >= MAG_W'(EDGE_TH));
  assign out_x    = side_c.x;
  assign out_y    = side_c.y;
  assign out_eof  = out_valid && side_c.eof;
endmodule
