// tb_hough_transform: the Hough stage at its full accumulator size, fed
// with synthetic edge-pixel streams (no image): three frames of NPIX pixels
// each, long enough for the idle bank to clear.
//   frame 0 (even bank): a left line (40 deg, b = -30), a right line
//            (140 deg, b = -200), random noise votes and pixels outside
//            the ROI rows, angle bands and b range
//   frame 1 (odd bank):  a left line (52 deg, b = 150), a right line
//            (131 deg, b = -100), noise
//   frame 2 (even bank): noise only, so both lines must come out invalid
// The expected peak of each side is found by a software histogram of
// round(cot(theta) * x + y) in real arithmetic over the same pixels; b,
// theta, the vote count, the threshold flag and m = cot(theta) are checked,
// and out_valid must follow the last pixel by 11 cycles.
module tb_hough_transform;
  import lane_pkg::*;
  localparam int NPIX = 62000, FR = 3, TH = 32;

  typedef struct {
    logic edge_;
    int   x, y, t;
  } pix_t;

  logic clk = 0, rst_n = 0, in_valid = 0, in_edge = 0, in_eof = 0;
  logic signed [COORD_W-1:0] in_x = 0, in_y = 0;
  logic [THETA_W-1:0] in_theta = 0;
  logic out_valid, vote_lost;
  lane_line_t line_left, line_right;
  logic [1:0] bank_ready;

  int checks = 0, failures = 0, cyc = 0, eof_cyc = 0;
  pix_t frame [NPIX];
  int hist [int];
  int exp_lv, exp_lb, exp_lt, exp_rv, exp_rb, exp_rt;

  hough_transform #(.VOTE_TH(TH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real cotr(input int t);
    real r;
    r = real'(t) * 3.14159265358979 / 180.0;
    return $cos(r) / $sin(r);
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // Put the points of line (t, b) at random places of the frame.
  task automatic add_line(input int t, input int b);
    for (int y = 100; y <= 400; y++) begin
      int x, idx;
      real bx;
      x = rnd(real'(b - y) / cotr(t));
      if (x < -512 || x > 511) continue;
      bx = cotr(t) * real'(x) + real'(y);
      if (bx - $floor(bx) > 0.4 && bx - $floor(bx) < 0.6) continue;   // keep away from rounding ties
      idx = $urandom_range(0, NPIX - 2);
      frame[idx] = '{edge_: 1'b1, x: x, y: y, t: t};
    end
  endtask

  task automatic build(input int f);
    foreach (frame[i]) frame[i] = '{edge_: 1'b0, x: $urandom_range(0, 1023) - 512,
                                    y: $urandom_range(0, 1023) - 512, t: $urandom_range(0, 179)};
    // noise: edge pixels anywhere, most of them outside the ROI
    for (int k = 0; k < 3000; k++) begin
      int idx;
      idx = $urandom_range(0, NPIX - 2);
      frame[idx].edge_ = 1'b1;
    end
    if (f == 0) begin add_line(40, -30); add_line(140, -200); end
    if (f == 1) begin add_line(52, 150); add_line(131, -100); end
  endtask

  // Software model: histogram and first cell to reach the highest count.
  task automatic model();
    hist.delete();
    exp_lv = 0; exp_rv = 0; exp_lb = 0; exp_rb = 0; exp_lt = 0; exp_rt = 0;
    foreach (frame[i]) begin
      int t, b, key;
      t = frame[i].t;
      if (!frame[i].edge_ || frame[i].y < 100 || frame[i].y > 400) continue;
      if (!((t >= 30 && t <= 53) || (t >= 130 && t <= 153))) continue;
      b = rnd(cotr(t) * real'(frame[i].x) + real'(frame[i].y));
      if (b < -860 || b > 400) continue;
      key = t * 4096 + b + 2048;
      hist[key] = hist.exists(key) ? hist[key] + 1 : 1;
      if (t < 90 && hist[key] > exp_lv) begin exp_lv = hist[key]; exp_lb = b; exp_lt = t; end
      if (t > 90 && hist[key] > exp_rv) begin exp_rv = hist[key]; exp_rb = b; exp_rt = t; end
    end
  endtask

  initial begin
    int bank_seen [2];
    bank_seen[0] = 0; bank_seen[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (bank_ready != 2'b11) @(negedge clk);
    for (int f = 0; f < FR; f++) begin
      build(f);
      model();
      $display("frame %0d: expect L (%0d,%0d) x%0d  R (%0d,%0d) x%0d", f, exp_lt, exp_lb, exp_lv, exp_rt, exp_rb, exp_rv);
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        in_valid = 1; in_edge = frame[i].edge_;
        in_x = COORD_W'(frame[i].x); in_y = COORD_W'(frame[i].y); in_theta = 8'(frame[i].t);
        in_eof = (i == NPIX - 1);
        if (i == NPIX - 1) eof_cyc = cyc;
        if (i == 1000) begin
          // the bank of this frame votes while the other one clears
          check(bank_ready[f % 2] && (f == 0 || !bank_ready[(f + 1) % 2]),
                $sformatf("frame %0d: bank states %b", f, bank_ready));
          bank_seen[f % 2]++;
        end
      end
      @(negedge clk);
      in_valid = 0; in_eof = 0;
      while (!out_valid) @(negedge clk);
      check(cyc - eof_cyc == 11, $sformatf("frame %0d: out_valid %0d cycles after last pixel", f, cyc - eof_cyc));
      check(line_left.valid == (exp_lv >= TH) && line_right.valid == (exp_rv >= TH),
            $sformatf("frame %0d: valid flags %b %b", f, line_left.valid, line_right.valid));
      check(int'(line_left.votes) == exp_lv && int'(line_right.votes) == exp_rv,
            $sformatf("frame %0d: votes %0d %0d", f, line_left.votes, line_right.votes));
      if (exp_lv >= TH) begin
        check(int'(line_left.b) == exp_lb && int'(line_left.theta) == exp_lt,
              $sformatf("frame %0d: left (%0d,%0d)", f, line_left.theta, line_left.b));
        check(line_left.m == COT_W'(rnd(cotr(exp_lt) * 4096.0)), "left m");
      end
      if (exp_rv >= TH) begin
        check(int'(line_right.b) == exp_rb && int'(line_right.theta) == exp_rt,
              $sformatf("frame %0d: right (%0d,%0d)", f, line_right.theta, line_right.b));
        check(line_right.m == COT_W'(rnd(cotr(exp_rt) * 4096.0)), "right m");
      end
      if (f < 2) check(exp_lv > 100 && exp_rv > 100, "test lines strong enough");
      check(!vote_lost, "no vote lost");
    end
    check(bank_seen[0] == 2 && bank_seen[1] == 1, "both banks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
