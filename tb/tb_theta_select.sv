// tb_theta_select: after a start pulse the left angle must be on theta_out
// for exactly the next cycle (sel_right low) and the right angle on the
// cycle after (sel_right high), then sel_valid must drop.
module tb_theta_select;
  import lane_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [THETA_W-1:0] theta_left = 0, theta_right = 0, theta_out;
  logic sel_valid, sel_right;
  int checks = 0, failures = 0;

  theta_select dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      int l, r;
      l = $urandom_range(30, 53); r = $urandom_range(130, 153);
      @(negedge clk);
      start = 1; theta_left = 8'(l); theta_right = 8'(r);
      check(!sel_valid, "idle before start");
      @(negedge clk);
      start = 0; theta_left = 0; theta_right = 0;   // inputs may change after start
      check(sel_valid && !sel_right && int'(theta_out) == l, $sformatf("left %0d exp %0d", theta_out, l));
      @(negedge clk);
      check(sel_valid && sel_right && int'(theta_out) == r, $sformatf("right %0d exp %0d", theta_out, r));
      @(negedge clk);
      check(!sel_valid, "done after two cycles");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
