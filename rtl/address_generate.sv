// address_generate: accumulator address of a (b, theta) vote.
//
// The accumulator only holds the region of interest: one row of B_SPAN
// intercepts per whole degree of the bands 30..53 and 130..153 (48 rows),
// intercepts B_LO..B_HI (default -860..400, so the offset 860 makes the
// address column 0..1260). A pixel votes only if it is an edge, lies in the
// ROI rows Y_LO..Y_HI, its angle is in one of the bands and its intercept is
// in range; everything else is dropped here, which is what lets the RAM
// shrink to N_ROWS * B_SPAN words.
//
//   addr = theta_row(theta) * B_SPAN + (b - B_LO)
//
// theta_row is 0..23 for 30..53 degrees and 24..47 for 130..153 degrees.
// The ROI-only layout and the offset of 860 follow the original
// architecture. Dropping votes with b outside the stored range, and gating on the ROI rows
// here as well as in the masking stage, are this design's choices.
//
// Timing: registered, latency 1; out_valid/out_eof follow every input pixel,
// out_vote only the accepted ones.
module address_generate
  import lane_pkg::*;
#(
  parameter int B_LO    = B_MIN,
  parameter int B_HI    = B_MAX,
  parameter int Y_LO    = ROI_Y_MIN,
  parameter int Y_HI    = ROI_Y_MAX,
  parameter int BC_W    = 14,                     // width of the computed b
  localparam int B_SPAN = B_HI - B_LO + 1,
  localparam int DEPTH  = N_ROWS * B_SPAN,
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_edge,
  input  logic [THETA_W-1:0]        in_theta,
  input  logic signed [BC_W-1:0]    in_b,
  input  logic signed [COORD_W-1:0] in_y,
  input  logic                      in_eof,
  output logic                      out_valid,
  output logic                      out_vote,
  output logic [ADDR_W-1:0]         out_addr,
  output logic signed [B_W-1:0]     out_b,
  output logic [THETA_W-1:0]        out_theta,
  output logic                      out_eof
);
  logic accept;
  logic [ADDR_W-1:0] row_base;
  logic signed [BC_W:0] col;

  assign accept = in_valid && in_edge
               && theta_in_roi(int'(in_theta))
               && (int'(in_y) >= Y_LO) && (int'(in_y) <= Y_HI)
               && (int'(in_b) >= B_LO) && (int'(in_b) <= B_HI);
  assign row_base = ADDR_W'(theta_row(int'(in_theta)) * B_SPAN);
  assign col      = (BC_W+1)'(in_b) - (BC_W+1)'(B_LO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vote  <= 1'b0;
      out_addr  <= '0;
      out_b     <= '0;
      out_theta <= '0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_vote  <= accept;
      out_eof   <= in_valid && in_eof;
      if (accept) begin
        out_addr  <= row_base + ADDR_W'(col);
        out_b     <= B_W'(in_b);
        out_theta <= in_theta;
      end
    end
  end
endmodule
