// tb_peak_delay: peak_delay together with theta_select and the cot ROM, as in
// the Hough output path. For random peaks the assembled lines must carry
// the peak b, theta, votes and valid flag and m = cot(theta) from the ROM
// for the right lane of each, with out_valid exactly 4 cycles after start,
// and hold until the next result.
module tb_peak_delay;
  import lane_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  lane_line_t pl, pr, line_left, line_right;
  logic [THETA_W-1:0] sel_theta;
  logic sel_valid, sel_right, out_valid;
  logic signed [COT_W-1:0] cot_a, cot_b;
  int checks = 0, failures = 0;

  cot_lut u_rom (.clk, .theta_a(8'd0), .cot_a, .theta_b(sel_theta), .cot_b);
  theta_select u_sel (.clk, .rst_n, .start, .theta_left(pl.theta), .theta_right(pr.theta),
                      .theta_out(sel_theta), .sel_valid, .sel_right);
  peak_delay #(.ROM_LAT(1)) dut (.clk, .rst_n, .start, .peak_left(pl), .peak_right(pr),
                                 .sel_valid, .sel_right, .m_in(cot_b), .out_valid,
                                 .line_left, .line_right);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cotq(input int t);
    real r;
    r = real'(t) * 3.14159265358979 / 180.0;
    return int'($cos(r) / $sin(r) * 4096.0);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      lane_line_t el, er;
      int n;
      el = '{valid: 1'($urandom), theta: 8'($urandom_range(30, 53)), b: B_W'($urandom_range(0, 1260) - 860),
             m: '0, votes: VOTE_W'($urandom)};
      er = '{valid: 1'($urandom), theta: 8'($urandom_range(130, 153)), b: B_W'($urandom_range(0, 1260) - 860),
             m: '0, votes: VOTE_W'($urandom)};
      @(negedge clk);
      start = 1; pl = el; pr = er;
      pl.m = 16'h1234; pr.m = 16'h4321;       // must be ignored
      n = 0;
      @(negedge clk);
      start = 0; pl = '0; pr = '0;
      n = 1;
      while (!out_valid && n < 10) begin @(negedge clk); n++; end
      check(n == 4, $sformatf("out_valid after %0d cycles", n));
      el.m = COT_W'(cotq(el.theta));
      er.m = COT_W'(cotq(er.theta));
      check(line_left == el, $sformatf("left line theta %0d m %0d exp %0d", line_left.theta, line_left.m, el.m));
      check(line_right == er, $sformatf("right line theta %0d m %0d exp %0d", line_right.theta, line_right.m, er.m));
      repeat (3) @(negedge clk);
      check(!out_valid && line_left == el && line_right == er, "lines held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
