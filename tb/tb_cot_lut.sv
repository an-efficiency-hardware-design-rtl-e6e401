// tb_cot_lut: every angle 0..179 on both ports; in-band angles must read
// cot(theta) * 4096 (within 1 LSB of the real value), out-of-band angles 0,
// with one cycle of read latency. Also checks the two printed end points
// cot(30) = 1.732 and cot(153) = -1.9626.
module tb_cot_lut;
  import lane_pkg::*;
  logic clk = 0;
  logic [THETA_W-1:0] theta_a = 0, theta_b = 0;
  logic signed [COT_W-1:0] cot_a, cot_b;
  int checks = 0, failures = 0;

  cot_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expect_cot(input int t);
    real r;
    if (!((t >= 30 && t <= 53) || (t >= 130 && t <= 153))) return 0.0;
    r = real'(t) * 3.14159265358979 / 180.0;
    return $cos(r) / $sin(r) * 4096.0;
  endfunction

  initial begin
    for (int t = 0; t < 180; t++) begin
      real ea, eb;
      @(negedge clk);
      theta_a = 8'(t);
      theta_b = 8'(179 - t);
      @(negedge clk);
      ea = expect_cot(t);
      eb = expect_cot(179 - t);
      checks += 2;
      if (real'(cot_a) > ea + 1.0 || real'(cot_a) < ea - 1.0) begin
        failures++; $display("FAIL port a theta %0d: %0d exp %f", t, cot_a, ea);
      end
      if (real'(cot_b) > eb + 1.0 || real'(cot_b) < eb - 1.0) begin
        failures++; $display("FAIL port b theta %0d: %0d exp %f", 179 - t, cot_b, eb);
      end
    end
    @(negedge clk); theta_a = 30; theta_b = 153;
    @(negedge clk);
    checks += 2;
    if (cot_a < 7090 || cot_a > 7098) begin failures++; $display("FAIL cot30 %0d", cot_a); end
    if (cot_b < -8042 || cot_b > -8035) begin failures++; $display("FAIL cot153 %0d", cot_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
