// tb_sobel_edge_detection: streams three 16x12 frames (random blocks of gray,
// so there are both flat areas and strong edges) with random gaps through
// the Sobel stage. For every output the centre position, the usable-window
// flag, the angle (within 1 degree of atan2 folded to 0..179), the magnitude
// (within 2% + 2 of the Euclidean norm) and the edge flag (away from the
// threshold) are compared with a model that convolves the stored frame.
// The first output must appear ITER + 3 cycles after the first pixel.
module tb_sobel_edge_detection;
  import lane_pkg::*;
  localparam int W = 16, H = 12, ITER = 12, TH = 100, FR = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_eof = 0;
  logic [7:0] in_gray = 0;
  logic [3:0] in_col = 0, in_row = 0;
  logic out_valid, out_edge, out_eof;
  logic signed [COORD_W-1:0] out_x, out_y;
  logic [THETA_W-1:0] out_theta;
  logic [MAG_W-1:0] out_mag;
  int checks = 0, failures = 0, edges = 0;
  int img [FR][H][W];
  int nout = 0, cyc = 0, first_in = -1, first_out = -1;

  sobel_edge_detection #(.W(W), .H(H), .ITER(ITER), .EDGE_TH(TH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = ((((r / 3) * 7 + (c / 4) * 5 + f) % 4) * 60) + $urandom_range(0, 15);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          in_valid = 0;
          while ($urandom_range(0, 4) == 0) @(negedge clk);
          in_valid = 1; in_gray = 8'(img[f][r][c]);
          in_col = 4'(c); in_row = 4'(r); in_eof = (r == H - 1 && c == W - 1);
          if (first_in < 0) first_in = cyc;
        end
    @(negedge clk);
    in_valid = 0;
    repeat (ITER + 6) @(negedge clk);
    check(nout == FR * W * H, $sformatf("output count %0d", nout));
    check(edges > 50, $sformatf("edges seen %0d", edges));
    check(first_out - first_in == ITER + 3, $sformatf("latency %0d", first_out - first_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int f, r, c, cr, cc, gx, gy;
    real a, m, d;
    if (first_out < 0) first_out = cyc;
    f = nout / (W * H); r = (nout / W) % H; c = nout % W;
    cr = r - 1; cc = c - 1;
    check(out_eof == (r == H - 1 && c == W - 1), "eof");
    if (r >= 2 && c >= 2) begin
      gx = img[f][cr-1][cc+1] + 2 * img[f][cr][cc+1] + img[f][cr+1][cc+1]
         - img[f][cr-1][cc-1] - 2 * img[f][cr][cc-1] - img[f][cr+1][cc-1];
      gy = img[f][cr+1][cc-1] + 2 * img[f][cr+1][cc] + img[f][cr+1][cc+1]
         - img[f][cr-1][cc-1] - 2 * img[f][cr-1][cc] - img[f][cr-1][cc+1];
      m = $sqrt(real'(gx * gx + gy * gy));
      check(int'(out_x) == cc - W / 2 && int'(out_y) == cr - H / 2,
            $sformatf("position f%0d r%0d c%0d: %0d,%0d", f, cr, cc, out_x, out_y));
      check(real'(out_mag) <= m * 1.02 + 2 && real'(out_mag) >= m * 0.98 - 2,
            $sformatf("mag %0d exp %f", out_mag, m));
      if (m > 40) begin
        a = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
        if (a < 0) a += 180.0;
        d = real'(out_theta) - a;
        if (d > 90) d -= 180; else if (d < -90) d += 180;
        check(d <= 1.01 && d >= -1.01, $sformatf("theta %0d exp %f", out_theta, a));
      end
      if (m > TH + 5)      begin check(out_edge, "edge expected"); edges++; end
      else if (m < TH - 5) check(!out_edge, "no edge expected");
    end else begin
      check(!out_edge, "border window must not be an edge");
    end
    nout++;
  end
endmodule
