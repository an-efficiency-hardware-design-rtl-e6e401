// tb_lane_detector_top: the whole lane detector at its default size
// (1024 x 1024, one pixel per clock, frames back to back).
//
// Three synthetic road frames are generated on the fly: a noisy gray road
// (level 60 +- 8) with bright (230) lane markings 9 pixels wide with
// blurred edges (full brightness within 3.5 pixels of the line, fading to
// the road level at 5.5 pixels) around a line given by its normal angle
// theta and intercept b (b = cot(theta) * x + y on the line, centred y-down
// coordinates):
//   frame 0: left (40 deg, b = -30),  right (140 deg, b = -200)
//   frame 1: left (48 deg, b = 50),   right (135 deg, b = -150)
//   frame 2: empty road, both lines must come out invalid
// A detected line must be within 1 degree of the drawn one and its b within
// the half-width of the marking (divided by sin(theta)) plus 6, since the
// vote peak sits on one of the marking's two edges. m must equal
// cot(theta) in the ROM's fixed point. lines_valid must arrive 27 cycles
// after each frame's last pixel and therefore once every 1,048,576 cycles.
//
// It also counts each mechanism of the design and fails if one never
// happened: ROI row masking, edge detection, votes accepted and dropped by
// the ROI/angle/range filter, back-to-back votes to one cell served by the
// forwarding path, voting in both the even and the odd bank, accumulator
// clearing, left and right peaks, and a frame below the vote threshold.
module tb_lane_detector_top;
  import lane_pkg::*;
  localparam int W = IMG_W, H = IMG_H, FR = 3, LAT = 27;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_r = 0, in_g = 0, in_b = 0;
  logic lines_valid, vote_lost;
  lane_line_t line_left, line_right;
  logic [1:0] bank_ready;

  int checks = 0, failures = 0;
  longint cyc = 0, last_pix_cyc = 0, prev_valid_cyc = -1;
  int frames_out = 0;

  // mechanism counters
  int n_masked = 0, n_edges = 0, n_votes = 0, n_fwd = 0, n_clear = 0;
  int n_left = 0, n_right = 0, n_invalid = 0;
  int n_bank [2];
  logic [1:0] ready_q = '0;

  lane_detector_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (4 * W * H + 200000) @(posedge clk);
    failures++;
    $display("watchdog");
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
  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real sinr(input int t);
    return $sin(real'(t) * 3.14159265358979 / 180.0);
  endfunction

  int lt [FR], lb [FR], rt [FR], rb [FR];
  logic has_lines [FR];
  localparam real HW = 4.5;

  // Fraction of pixel (x, y) covered by the marking of line (t, b): 1 within
  // HW - 1 of the centre line, falling linearly to 0 at HW + 1 (a blurred
  // edge, as a camera delivers it).
  function automatic real coverage(input int t, input int b, input int x, input int y);
    real d;
    d = absr((cotr(t) * real'(x) + real'(y) - real'(b)) * sinr(t));
    if (d <= HW - 1.0) return 1.0;
    if (d >= HW + 1.0) return 0.0;
    return (HW + 1.0 - d) / 2.0;
  endfunction

  // Mechanism probes.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_gray.out_valid) begin
      int y;
      y = int'(dut.u_gray.out_row) - H / 2;
      if (y < ROI_Y_MIN || y > ROI_Y_MAX) begin
        n_masked++;
        if (dut.u_gray.out_gray != 0) begin failures++; $display("FAIL unmasked row %0d", y); end
      end
    end
    if (dut.e_edge) n_edges++;
    if (dut.u_hough.ag_vote) begin
      n_votes++;
      n_bank[dut.u_hough.parity]++;
    end
    if (dut.u_hough.g_bank[0].u_vote.s1_fwd || dut.u_hough.g_bank[1].u_vote.s1_fwd) n_fwd++;
    for (int k = 0; k < 2; k++) if (bank_ready[k] && !ready_q[k]) n_clear++;
    ready_q = bank_ready;
  end

  initial begin
    n_bank[0] = 0; n_bank[1] = 0;
    lt[0] = 40; lb[0] = -30;  rt[0] = 140; rb[0] = -200; has_lines[0] = 1;
    lt[1] = 48; lb[1] = 50;   rt[1] = 135; rb[1] = -150; has_lines[1] = 1;
    lt[2] = 0;  lb[2] = 0;    rt[2] = 0;   rb[2] = 0;    has_lines[2] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (bank_ready != 2'b11) @(negedge clk);
    for (int f = 0; f < FR; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int x, y, v;
          x = c - W / 2; y = r - H / 2;
          v = 60 + $urandom_range(0, 16) - 8;
          if (has_lines[f]) begin
            real cv;
            cv = coverage(lt[f], lb[f], x, y) + coverage(rt[f], rb[f], x, y);
            if (cv > 1.0) cv = 1.0;
            v = v + int'(cv * real'(230 - v));
          end
          @(negedge clk);
          in_valid = 1; in_r = 8'(v); in_g = 8'(v); in_b = 8'(v);
          if (r == H - 1 && c == W - 1) last_pix_cyc = cyc;
        end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 10) @(negedge clk);
    check(frames_out == FR, $sformatf("%0d frames reported", frames_out));
    $display("mechanisms: masked=%0d edges=%0d votes=%0d dropped=%0d forwarded=%0d even=%0d odd=%0d clears=%0d left=%0d right=%0d below_threshold=%0d",
             n_masked, n_edges, n_votes, n_edges - n_votes, n_fwd, n_bank[0], n_bank[1], n_clear, n_left, n_right, n_invalid);
    check(n_masked > 0, "ROI masking happened");
    check(n_edges > 0, "edges detected");
    check(n_votes > 0, "votes accepted");
    check(n_edges - n_votes > 0, "votes dropped outside the ROI");
    check(n_fwd > 0, "forwarding path used");
    check(n_bank[0] > 0 && n_bank[1] > 0, "even and odd banks both voted");
    check(n_clear >= 4, "accumulators cleared");
    check(n_left > 0 && n_right > 0, "left and right peaks");
    check(n_invalid > 0, "frame below the vote threshold");
    check(!vote_lost, "no vote lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(negedge clk) if (rst_n && lines_valid) begin
    int f;
    f = frames_out;
    $display("frame %0d: left valid=%0d theta=%0d b=%0d m=%0d votes=%0d | right valid=%0d theta=%0d b=%0d m=%0d votes=%0d",
             f, line_left.valid, int'(line_left.theta), int'(line_left.b), int'(line_left.m), int'(line_left.votes),
             line_right.valid, int'(line_right.theta), int'(line_right.b), int'(line_right.m), int'(line_right.votes));
    if (prev_valid_cyc >= 0)
      check(cyc - prev_valid_cyc == longint'(W) * H, $sformatf("frame period %0d", cyc - prev_valid_cyc));
    prev_valid_cyc = cyc;
    if (f == FR - 1) check(cyc - last_pix_cyc == LAT, $sformatf("latency %0d", cyc - last_pix_cyc));
    if (f < FR && has_lines[f]) begin
      real tol_l, tol_r;
      tol_l = HW / sinr(lt[f]) + 6.0;
      tol_r = HW / sinr(rt[f]) + 6.0;
      check(line_left.valid && line_right.valid, $sformatf("frame %0d: both lines found", f));
      check(int'(line_left.theta) >= lt[f] - 1 && int'(line_left.theta) <= lt[f] + 1,
            $sformatf("frame %0d: left theta %0d exp %0d", f, int'(line_left.theta), lt[f]));
      check(int'(line_right.theta) >= rt[f] - 1 && int'(line_right.theta) <= rt[f] + 1,
            $sformatf("frame %0d: right theta %0d exp %0d", f, int'(line_right.theta), rt[f]));
      check(absr(real'(line_left.b) - real'(lb[f])) <= tol_l,
            $sformatf("frame %0d: left b %0d exp %0d", f, int'(line_left.b), lb[f]));
      check(absr(real'(line_right.b) - real'(rb[f])) <= tol_r,
            $sformatf("frame %0d: right b %0d exp %0d", f, int'(line_right.b), rb[f]));
      check(absr(real'(line_left.m) - cotr(int'(line_left.theta)) * 4096.0) <= 1.0, "left m");
      check(absr(real'(line_right.m) - cotr(int'(line_right.theta)) * 4096.0) <= 1.0, "right m");
      if (line_left.valid) n_left++;
      if (line_right.valid) n_right++;
    end else begin
      check(!line_left.valid && !line_right.valid, $sformatf("frame %0d: no lines expected", f));
      if (!line_left.valid && !line_right.valid) n_invalid++;
    end
    frames_out++;
  end
endmodule
