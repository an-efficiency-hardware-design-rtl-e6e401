// hough_transform: (b, theta) line Hough transform with even/odd voting.
//
// Every edge pixel (x, y) with gradient angle theta votes once, for the line
// through it whose normal has that angle. Instead of rho = x cos + y sin the
// vote is addressed by the intercept form
//   b = cot(theta) * x + y                                        (*)
// (b = rho / sin(theta)), so the winning cell already is a line equation:
// with m = cot(theta), every pixel of the line satisfies b = m*x + y. Only
// one trigonometric table is needed, and it only covers the ROI angles.
//
// Pipeline, one pixel per clock:
//   s0  cot ROM port a read with theta
//   s1  cot(theta) * x                  (the one multiplier)
//   s2  + y, rounded to an integer b    (*)
//   s3  address_generate: ROI/range checks, accumulator address
//   s4  voting bank (even or odd), read-increment-write, running peaks
// Two voting banks alternate frame by frame: while one votes, the other
// clears its accumulator, so frames can follow back to back as long as a
// frame lasts at least DEPTH cycles. When a bank finishes a frame its left
// and right peaks go through theta_select, which reads the slope of each
// winning angle from port b of the cot ROM, and peak_delay, which puts b and
// m of both lanes on the outputs with a one-cycle out_valid.
//
// out_valid follows the frame's last pixel (in_eof) by 11 cycles. The
// fixed-point rounding and the frame-parity switch are this design's choices.
module hough_transform
  import lane_pkg::*;
#(
  parameter int B_LO    = B_MIN,
  parameter int B_HI    = B_MAX,
  parameter int Y_LO    = ROI_Y_MIN,
  parameter int Y_HI    = ROI_Y_MAX,
  parameter int VOTE_TH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_edge,
  input  logic signed [COORD_W-1:0] in_x,
  input  logic signed [COORD_W-1:0] in_y,
  input  logic [THETA_W-1:0]        in_theta,
  input  logic                      in_eof,
  output logic                      out_valid,
  output lane_line_t                line_left,
  output lane_line_t                line_right,
  output logic [1:0]                bank_ready,   // [0] even, [1] odd
  output logic                      vote_lost
);
  localparam int BC_W   = 14;
  localparam int PROD_W = COT_W + COORD_W;
  localparam int B_SPAN = B_HI - B_LO + 1;
  localparam int ADDR_W = $clog2(N_ROWS * B_SPAN);

  // s1
  logic                      s1_valid, s1_edge, s1_eof;
  logic signed [COORD_W-1:0] s1_x, s1_y;
  logic [THETA_W-1:0]        s1_theta;
  logic signed [COT_W-1:0]   cot_a, cot_b;
  // s2
  logic                      s2_valid, s2_edge, s2_eof;
  logic signed [PROD_W-1:0]  s2_prod;
  logic signed [COORD_W-1:0] s2_y;
  logic [THETA_W-1:0]        s2_theta;
  // s3
  logic                      s3_valid, s3_edge, s3_eof;
  logic signed [BC_W-1:0]    s3_b;
  logic signed [COORD_W-1:0] s3_y;
  logic [THETA_W-1:0]        s3_theta;
  // s4
  logic                      ag_valid, ag_vote, ag_eof;
  logic [ADDR_W-1:0]         ag_addr;
  logic signed [B_W-1:0]     ag_b;
  logic [THETA_W-1:0]        ag_theta;

  logic signed [BC_W-1:0]    b_full;
  assign b_full = BC_W'(((s2_prod + PROD_W'(1 <<< (COT_FRAC - 1))) >>> COT_FRAC) + PROD_W'(s2_y));

  logic [THETA_W-1:0] sel_theta;
  logic               sel_valid, sel_right;

  cot_lut u_cot (
    .clk,
    .theta_a(in_theta), .cot_a,
    .theta_b(sel_theta), .cot_b
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1_valid, s1_edge, s1_eof, s1_x, s1_y, s1_theta} <= '0;
      {s2_valid, s2_edge, s2_eof, s2_prod, s2_y, s2_theta} <= '0;
      {s3_valid, s3_edge, s3_eof, s3_b, s3_y, s3_theta} <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_edge  <= in_valid && in_edge;
      s1_eof   <= in_valid && in_eof;
      s1_x     <= in_x;
      s1_y     <= in_y;
      s1_theta <= in_theta;

      s2_valid <= s1_valid;
      s2_edge  <= s1_edge;
      s2_eof   <= s1_eof;
      s2_prod  <= PROD_W'(cot_a) * PROD_W'(s1_x);
      s2_y     <= s1_y;
      s2_theta <= s1_theta;

      s3_valid <= s2_valid;
      s3_edge  <= s2_edge;
      s3_eof   <= s2_eof;
      s3_b     <= b_full;
      s3_y     <= s2_y;
      s3_theta <= s2_theta;
    end
  end

  address_generate #(
    .B_LO(B_LO), .B_HI(B_HI), .Y_LO(Y_LO), .Y_HI(Y_HI), .BC_W(BC_W)
  ) u_addr (
    .clk, .rst_n,
    .in_valid (s3_valid),
    .in_edge  (s3_edge),
    .in_theta (s3_theta),
    .in_b     (s3_b),
    .in_y     (s3_y),
    .in_eof   (s3_eof),
    .out_valid(ag_valid),
    .out_vote (ag_vote),
    .out_addr (ag_addr),
    .out_b    (ag_b),
    .out_theta(ag_theta),
    .out_eof  (ag_eof)
  );

  // Even/odd bank selection: parity flips after each frame's last pixel.
  logic       parity;
  logic [1:0] done, lost;
  lane_line_t pk_l [2];
  lane_line_t pk_r [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) parity <= 1'b0;
    else if (ag_valid && ag_eof) parity <= ~parity;
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    logic sel;
    assign sel = (parity == 1'(k));
    voting_module #(.B_LO(B_LO), .B_HI(B_HI), .VOTE_TH(VOTE_TH)) u_vote (
      .clk, .rst_n,
      .vote             (ag_vote && sel),
      .addr             (ag_addr),
      .b                (ag_b),
      .theta            (ag_theta),
      .frame_end        (ag_eof && sel),
      .ready            (bank_ready[k]),
      .lost             (lost[k]),
      .done             (done[k]),
      .peak_left_valid  (pk_l[k].valid),
      .peak_left_b      (pk_l[k].b),
      .peak_left_theta  (pk_l[k].theta),
      .peak_left_votes  (pk_l[k].votes),
      .peak_right_valid (pk_r[k].valid),
      .peak_right_b     (pk_r[k].b),
      .peak_right_theta (pk_r[k].theta),
      .peak_right_votes (pk_r[k].votes)
    );
    assign pk_l[k].m = '0;
    assign pk_r[k].m = '0;
  end

  assign vote_lost = |lost;

  logic       start;
  lane_line_t res_l, res_r;
  assign start = |done;
  assign res_l = done[1] ? pk_l[1] : pk_l[0];
  assign res_r = done[1] ? pk_r[1] : pk_r[0];

  theta_select u_sel (
    .clk, .rst_n,
    .start,
    .theta_left (res_l.theta),
    .theta_right(res_r.theta),
    .theta_out  (sel_theta),
    .sel_valid,
    .sel_right
  );

  peak_delay #(.ROM_LAT(1)) u_delay (
    .clk, .rst_n,
    .start,
    .peak_left (res_l),
    .peak_right(res_r),
    .sel_valid,
    .sel_right,
    .m_in      (cot_b),
    .out_valid,
    .line_left,
    .line_right
  );
endmodule
