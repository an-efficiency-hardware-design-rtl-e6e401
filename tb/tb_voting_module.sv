// tb_voting_module: drives a small-range voting bank (b in -5..4, 480 cells)
// through four frames and compares it with a software accumulator:
//  - frame 1: random votes, many back to back on the same cell (forwarding)
//  - frame 2: must start from a cleared RAM; one cell hit 600 times
//             (saturation at 511) on the left, a few right votes under the
//             threshold (right peak not valid)
//  - frame 3: votes sent while the bank is still clearing must be dropped
//    and flagged on lost
//  - frame 4: no votes at all, both peaks invalid
// Checks the running left/right peak (first cell to reach the highest
// count), the threshold flag, done two cycles after frame_end, the clear
// time of DEPTH cycles, and the count of forwarded votes.
module tb_voting_module;
  import lane_pkg::*;
  localparam int BL = -5, BH = 4, SPAN = BH - BL + 1, DEPTH = N_ROWS * SPAN, TH = 3;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, vote = 0, frame_end = 0;
  logic [AW-1:0] addr = 0;
  logic signed [B_W-1:0] b = 0;
  logic [THETA_W-1:0] theta = 0;
  logic ready, lost, done;
  logic peak_left_valid, peak_right_valid;
  logic signed [B_W-1:0] peak_left_b, peak_right_b;
  logic [THETA_W-1:0] peak_left_theta, peak_right_theta;
  logic [VOTE_W-1:0] peak_left_votes, peak_right_votes;

  int checks = 0, failures = 0, cyc = 0, fwd_votes = 0;
  int cnt [DEPTH];
  int ml, mr, bl_, br_, tl, tr;
  int last_addr = -1;

  voting_module #(.B_LO(BL), .B_HI(BH), .VOTE_TH(TH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic model_reset();
    foreach (cnt[i]) cnt[i] = 0;
    ml = 0; mr = 0; bl_ = 0; br_ = 0; tl = 0; tr = 0;
    last_addr = -1;
  endtask

  // One vote for (theta, b) on the next clock edge, optionally with frame_end.
  task automatic send(input int t, input int bb, input logic fe);
    int row, a;
    row = (t < 90) ? t - 30 : 24 + t - 130;
    a = row * SPAN + bb - BL;
    @(negedge clk);
    vote = 1; addr = AW'(a); b = B_W'(bb); theta = 8'(t); frame_end = fe;
    if (a == last_addr) fwd_votes++;
    last_addr = a;
    if (cnt[a] < 511) cnt[a]++;
    if (t < 90 && cnt[a] > ml) begin ml = cnt[a]; bl_ = bb; tl = t; end
    if (t > 90 && cnt[a] > mr) begin mr = cnt[a]; br_ = bb; tr = t; end
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    vote = 0; frame_end = 0; last_addr = -1;
    repeat (n - 1) @(negedge clk);
  endtask

  task automatic end_frame_and_check(input string name);
    int t0;
    @(negedge clk);
    vote = 0; frame_end = 1; t0 = cyc;
    @(negedge clk);
    frame_end = 0;
    check(!ready, {name, ": ready must fall after frame_end"});
    while (!done) @(negedge clk);
    check(cyc - t0 == 3, $sformatf("%s: done %0d cycles after frame_end", name, cyc - t0));
    check(int'(peak_left_votes) == ml && int'(peak_right_votes) == mr,
          $sformatf("%s: votes L %0d/%0d R %0d/%0d", name, peak_left_votes, ml, peak_right_votes, mr));
    if (ml > 0) check(int'(peak_left_b) == bl_ && int'(peak_left_theta) == tl,
          $sformatf("%s: left peak (%0d,%0d) exp (%0d,%0d)", name, peak_left_b, peak_left_theta, bl_, tl));
    if (mr > 0) check(int'(peak_right_b) == br_ && int'(peak_right_theta) == tr,
          $sformatf("%s: right peak (%0d,%0d) exp (%0d,%0d)", name, peak_right_b, peak_right_theta, br_, tr));
    check(peak_left_valid == (ml >= TH) && peak_right_valid == (mr >= TH), {name, ": threshold flags"});
  endtask

  task automatic wait_ready(input string name, input logic check_time);
    int t0;
    t0 = cyc;
    while (!ready) @(negedge clk);
    if (check_time) check(cyc - t0 >= DEPTH - 1 && cyc - t0 <= DEPTH + 2,
                          $sformatf("%s: clear took %0d cycles", name, cyc - t0));
  endtask

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_ready("reset", 1'b1);

    // Frame 1: random votes in a narrow window so counts build up.
    for (int k = 0; k < 400; k++) begin
      int t, bb;
      t  = ($urandom_range(0, 1) != 0) ? 30 + $urandom_range(0, 2) : 150 + $urandom_range(0, 2);
      bb = $urandom_range(0, 3) - 2;
      send(t, bb, 1'b0);
      if ($urandom_range(0, 2) == 0) send(t, bb, 1'b0);           // same cell again
      if ($urandom_range(0, 9) == 0) idle($urandom_range(1, 3));
    end
    end_frame_and_check("frame 1");
    check(fwd_votes > 50, $sformatf("forwarded votes %0d", fwd_votes));
    wait_ready("frame 1", 1'b1);

    // Frame 2: saturation, and a right peak below threshold.
    model_reset();
    for (int k = 0; k < 600; k++) send(41, 3, 1'b0);
    send(135, -4, 1'b0);
    send(136, -4, 1'b0);
    send(137, 0, 1'b1);      // last vote carries frame_end
    idle(1);
    while (!done) @(negedge clk);
    check(int'(peak_left_votes) == 511 && peak_left_valid && int'(peak_left_b) == 3
          && int'(peak_left_theta) == 41, $sformatf("saturated peak %0d", peak_left_votes));
    check(int'(peak_right_votes) == 1 && !peak_right_valid && int'(peak_right_theta) == 135,
          "right peak under threshold");

    // Frame 3: votes during clearing are lost.
    @(negedge clk);
    vote = 1; addr = 0; theta = 30; b = 0;
    @(posedge clk); #1;
    check(lost, "lost flagged while clearing");
    idle(1);
    model_reset();
    wait_ready("frame 2", 1'b0);
    send(31, 1, 1'b0); send(31, 1, 1'b0); send(31, 1, 1'b0); send(140, 2, 1'b0);
    end_frame_and_check("frame 3");
    wait_ready("frame 3", 1'b0);

    // Frame 4: empty frame.
    model_reset();
    end_frame_and_check("frame 4");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
