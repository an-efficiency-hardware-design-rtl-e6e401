// peak_delay: assembles the two output line equations.
//
// The voting bank delivers, for each lane, the peak intercept b, its angle,
// its vote count and whether it passed the vote threshold; the slope
// m = cot(theta) arrives later from the cot ROM, left lane first (see
// theta_select). This block holds the peak data from start, delays the
// lane-select strobes by the ROM latency so each returning m lands next to
// its own b, and when the right lane's m has arrived presents both lines,
// y = b - m*x, with a one-cycle out_valid. The outputs hold until the next
// frame's lines replace them. The original architecture only names a delay
// stage at this point; how it aligns the values is this design's choice.
//
// Timing: start at cycle s, out_valid at s + 3 + ROM_LAT.
module peak_delay
  import lane_pkg::*;
#(
  parameter int ROM_LAT = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  lane_line_t              peak_left,    // m field ignored
  input  lane_line_t              peak_right,   // m field ignored
  input  logic                    sel_valid,
  input  logic                    sel_right,
  input  logic signed [COT_W-1:0] m_in,
  output logic                    out_valid,
  output lane_line_t              line_left,
  output lane_line_t              line_right
);
  lane_line_t hold_l, hold_r;
  logic [ROM_LAT-1:0] v_d, r_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_l     <= '0;
      hold_r     <= '0;
      v_d        <= '0;
      r_d        <= '0;
      out_valid  <= 1'b0;
      line_left  <= '0;
      line_right <= '0;
    end else begin
      v_d <= (ROM_LAT > 1) ? ROM_LAT'({v_d, sel_valid}) : ROM_LAT'(sel_valid);
      r_d <= (ROM_LAT > 1) ? ROM_LAT'({r_d, sel_right}) : ROM_LAT'(sel_right);
      out_valid <= 1'b0;
      if (start) begin
        hold_l <= peak_left;
        hold_r <= peak_right;
      end
      if (v_d[ROM_LAT-1] && !r_d[ROM_LAT-1]) hold_l.m <= m_in;
      if (v_d[ROM_LAT-1] &&  r_d[ROM_LAT-1]) begin
        line_left    <= hold_l;
        line_right   <= hold_r;
        line_right.m <= m_in;
        out_valid    <= 1'b1;
      end
    end
  end
endmodule
