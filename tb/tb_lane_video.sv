// tb_lane_video: detection-rate workload at the default 1024 x 1024 size.
//
// A short synthetic video, frames back to back, in three road types of four
// frames each (the kinds of footage lane detectors are usually scored on):
//   normal  clean solid markings, road 60 +- 8, markings 230
//   poor    worn dashed markings (20 px on, 20 px off), low contrast
//           (road 80 +- 20, markings 170)
//   urban   solid markings plus clutter: a bright vehicle-like box with
//           horizontal and vertical edges, a stop line across the road and
//           a short diagonal road arrow inside the left angle band
// The lane angles and intercepts change from frame to frame. A reported
// line counts as a true positive when it is valid, within 1 degree of the
// drawn angle and within the marking half-width / sin(theta) + 6 of the
// drawn intercept; a valid line elsewhere is a false positive, a missing or
// wrong line a false negative. Precision and recall are printed per road
// type. The checks: every lane in the normal and urban frames found, at
// least 6 of the 8 lanes in the poor frames found, and no false positives
// in the normal frames.
module tb_lane_video;
  import lane_pkg::*;
  localparam int W = IMG_W, H = IMG_H, NF = 12;
  localparam real HW = 4.5, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_r = 0, in_g = 0, in_b = 0;
  logic lines_valid, vote_lost;
  lane_line_t line_left, line_right;
  logic [1:0] bank_ready;

  int checks = 0, failures = 0, frames_out = 0;
  int lt [NF], lb [NF], rt [NF], rb [NF], kind [NF];
  int tp [3], fp [3], fn [3];
  string kname [3] = '{"normal", "poor", "urban"};

  lane_detector_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat ((NF + 2) * W * H) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Coverage of a blurred marking whose signed distance from the centre line is d.
  function automatic real cov(input real d);
    d = absr(d);
    if (d <= HW - 1.0) return 1.0;
    if (d >= HW + 1.0) return 0.0;
    return (HW + 1.0 - d) / 2.0;
  endfunction

  initial begin
    for (int f = 0; f < NF; f++) begin
      kind[f] = f / 4;
      lt[f] = 34 + 4 * (f % 4) + (f / 4);          // 34..47
      lb[f] = -80 + 40 * (f % 4);                   // -80..40
      rt[f] = 146 - 4 * (f % 4) - (f / 4);          // 146..133
      rb[f] = -220 + 50 * (f % 4);                  // -220..-70
    end
    for (int k = 0; k < 3; k++) begin tp[k] = 0; fp[k] = 0; fn[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (bank_ready != 2'b11) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      real cl, sl, cr, sr;
      int road, mark, noise;
      cl = $cos(real'(lt[f]) * PI / 180.0) / $sin(real'(lt[f]) * PI / 180.0);
      sl = $sin(real'(lt[f]) * PI / 180.0);
      cr = $cos(real'(rt[f]) * PI / 180.0) / $sin(real'(rt[f]) * PI / 180.0);
      sr = $sin(real'(rt[f]) * PI / 180.0);
      road  = (kind[f] == 1) ? 80 : 60;
      mark  = (kind[f] == 1) ? 190 : 230;
      noise = (kind[f] == 1) ? 16 : 8;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int x, y, v;
          real cv;
          x = c - W / 2; y = r - H / 2;
          v = road + $urandom_range(0, 2 * noise) - noise;
          cv = 0.0;
          if (y >= 90 && y <= 410) begin
            cv = cov((cl * real'(x) + real'(y) - real'(lb[f])) * sl)
               + cov((cr * real'(x) + real'(y) - real'(rb[f])) * sr);
            if (kind[f] == 1 && ((y + 7 * f) % 40) >= 20) cv = 0.0;
            if (kind[f] == 2) begin
              // vehicle-like box, stop line and a short arrow stroke at 40 deg
              if (x >= -60 && x <= 40 && y >= 120 && y <= 170) cv = 1.0;
              if (y >= 380 && y <= 390 && x >= -200 && x <= 200) cv = 1.0;
              if (y >= 300 && y <= 330)
                cv = cv + cov((1.1918 * real'(x) + real'(y) - 250.0) * 0.6428);
            end
          end
          if (cv > 1.0) cv = 1.0;
          v = v + int'(cv * real'(mark - v));
          if (v < 0) v = 0;
          if (v > 255) v = 255;
          @(negedge clk);
          in_valid = 1; in_r = 8'(v); in_g = 8'(v); in_b = 8'(v);
        end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(negedge clk);
    check(frames_out == NF, $sformatf("%0d frames reported", frames_out));
    for (int k = 0; k < 3; k++) begin
      real p, rc;
      p  = (tp[k] + fp[k] > 0) ? 100.0 * real'(tp[k]) / real'(tp[k] + fp[k]) : 0.0;
      rc = (tp[k] + fn[k] > 0) ? 100.0 * real'(tp[k]) / real'(tp[k] + fn[k]) : 0.0;
      $display("%-6s: TP=%0d FP=%0d FN=%0d precision=%0.1f%% recall=%0.1f%%", kname[k], tp[k], fp[k], fn[k], p, rc);
    end
    check(tp[0] == 8 && fp[0] == 0, "normal road: all 8 lanes found, no false lines");
    check(tp[1] >= 6, "poor road: at least 6 of 8 lanes found");
    check(tp[2] == 8, "urban road: all 8 lanes found");
    check(!vote_lost, "no vote lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic hit(input lane_line_t l, input int t, input int b);
    real tol;
    tol = HW / $sin(real'(t) * PI / 180.0) + 6.0;
    return l.valid && int'(l.theta) >= t - 1 && int'(l.theta) <= t + 1
        && absr(real'(int'(l.b)) - real'(b)) <= tol;
  endfunction

  always @(negedge clk) if (rst_n && lines_valid) begin
    int f, k;
    logic hl, hr;
    f = frames_out;
    k = kind[f];
    hl = hit(line_left, lt[f], lb[f]);
    hr = hit(line_right, rt[f], rb[f]);
    $display("frame %0d (%s): left %0d/%0d got %0d/%0d x%0d %s | right %0d/%0d got %0d/%0d x%0d %s",
             f, kname[k], lt[f], lb[f], int'(line_left.theta), int'(line_left.b), int'(line_left.votes), hl ? "ok" : "MISS",
             rt[f], rb[f], int'(line_right.theta), int'(line_right.b), int'(line_right.votes), hr ? "ok" : "MISS");
    if (hl) tp[k]++; else begin fn[k]++; if (line_left.valid) fp[k]++; end
    if (hr) tp[k]++; else begin fn[k]++; if (line_right.valid) fp[k]++; end
    frames_out++;
  end
endmodule
