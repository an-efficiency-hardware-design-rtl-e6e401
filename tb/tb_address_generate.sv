// tb_address_generate: random (theta, b, y, edge) inputs, including values
// just inside and just outside every limit. Accepted votes must carry
// addr = row * 1261 + (b + 860) with row 0..23 for 30..53 degrees and 24..47
// for 130..153 degrees; everything outside the ROI must be dropped.
module tb_address_generate;
  import lane_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_edge = 0, in_eof = 0;
  logic [THETA_W-1:0] in_theta = 0;
  logic signed [13:0] in_b = 0;
  logic signed [COORD_W-1:0] in_y = 0;
  logic out_valid, out_vote, out_eof;
  logic [15:0] out_addr;
  logic signed [B_W-1:0] out_b;
  logic [THETA_W-1:0] out_theta;
  int checks = 0, failures = 0, accepted = 0;

  address_generate dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(input int lo, input int hi, input int edge_lo, input int edge_hi);
    case ($urandom_range(0, 5))
      0: return edge_lo;
      1: return edge_lo - 1;
      2: return edge_hi;
      3: return edge_hi + 1;
      default: return $urandom_range(0, hi - lo) + lo;
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int t, b, y, row, ok, ea;
      @(negedge clk);
      t = ($urandom_range(0, 1) != 0) ? pick(0, 179, 30, 53) : pick(0, 179, 130, 153);
      b = pick(-1500, 1500, -860, 400);
      y = pick(-512, 511, 100, 400);
      in_valid = ($urandom_range(0, 7) != 0);
      in_edge  = ($urandom_range(0, 5) != 0);
      in_eof   = (k % 500 == 499);
      in_theta = 8'(t); in_b = 14'(b); in_y = COORD_W'(y);
      ok = in_valid && in_edge && ((t >= 30 && t <= 53) || (t >= 130 && t <= 153))
           && b >= -860 && b <= 400 && y >= 100 && y <= 400;
      row = (t < 90) ? t - 30 : 24 + t - 130;
      ea = row * 1261 + b + 860;
      @(negedge clk);
      checks++;
      if (out_vote != 1'(ok) || out_valid != in_valid || out_eof != (in_valid && in_eof)) begin
        failures++; $display("FAIL accept t=%0d b=%0d y=%0d: vote %0d exp %0d", t, b, y, out_vote, ok);
      end
      if (ok) begin
        accepted++;
        checks++;
        if (int'(out_addr) != ea || int'(out_b) != b || int'(out_theta) != t) begin
          failures++; $display("FAIL addr t=%0d b=%0d: %0d exp %0d", t, b, out_addr, ea);
        end
      end
    end
    checks++;
    if (accepted < 100) begin failures++; $display("FAIL too few accepted: %0d", accepted); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
