// theta_select: shares the second port of the cot ROM between the two lanes.
//
// When a voting bank reports its peaks (start), the winning angles of the
// left and the right lane must both be turned into slopes m = cot(theta)
// through the single port b of the cot ROM. This block presents the left
// angle on the cycle after start and the right angle on the cycle after
// that, with sel_valid high and sel_right telling which lane the address
// belongs to. The two-cycle order (left first) is this design's choice.
//
// Timing: start is a one-cycle pulse; theta_out/sel_* are registered.
module theta_select
  import lane_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [THETA_W-1:0] theta_left,
  input  logic [THETA_W-1:0] theta_right,
  output logic [THETA_W-1:0] theta_out,
  output logic               sel_valid,
  output logic               sel_right
);
  logic               pending;
  logic [THETA_W-1:0] right_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      right_q   <= '0;
      theta_out <= '0;
      sel_valid <= 1'b0;
      sel_right <= 1'b0;
    end else begin
      sel_valid <= 1'b0;
      sel_right <= 1'b0;
      pending   <= 1'b0;
      if (start) begin
        theta_out <= theta_left;
        right_q   <= theta_right;
        sel_valid <= 1'b1;
        pending   <= 1'b1;
      end else if (pending) begin
        theta_out <= right_q;
        sel_valid <= 1'b1;
        sel_right <= 1'b1;
      end
    end
  end
endmodule
