// tb_vectoring_cordic: random gradient vectors streamed one per clock; the
// angle must match atan2 folded to 0..179 degrees within 1 degree (with the
// 0/180 wrap) and the magnitude the Euclidean norm within 2% + 2. The
// latency of ITER + 2 cycles is checked on the first vector.
module tb_vectoring_cordic;
  import lane_pkg::*;
  localparam int ITER = 12, N = 2000, LAT = ITER + 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [GRAD_W-1:0] gx = 0, gy = 0;
  logic [15:0] in_user = 0, out_user;
  logic [THETA_W-1:0] theta;
  logic [MAG_W-1:0] mag;
  int checks = 0, failures = 0;
  int vx [N], vy [N];
  int sent_cycle, got_cycle, cyc = 0;

  vectoring_cordic #(.ITER(ITER), .USER_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      vx[i] = $urandom_range(0, 2040) - 1020;
      vy[i] = $urandom_range(0, 2040) - 1020;
      if (i % 7 == 0) begin vx[i] = vx[i] / 16; vy[i] = vy[i] / 16; end
    end
    vx[0] = 1000; vy[0] = 0;      // 0 degrees
    vx[1] = 0;    vy[1] = 500;    // 90
    vx[2] = -700; vy[2] = 0;      // 180 -> 0
    vx[3] = 300;  vy[3] = -300;   // -45 -> 135
    vx[4] = -300; vy[4] = -300;   // -135 -> 45
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; gx = GRAD_W'(vx[i]); gy = GRAD_W'(vy[i]); in_user = 16'(i);
      if (i == 0) sent_cycle = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int i;
    real a, m, d;
    i = int'(out_user);
    if (i == 0) begin
      checks++;
      if (cyc - sent_cycle != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - sent_cycle);
      end
    end
    a = $atan2(real'(vy[i]), real'(vx[i])) * 180.0 / 3.14159265358979;
    if (a < 0) a += 180.0;
    if (a >= 179.5) a -= 180.0;
    m = $sqrt(real'(vx[i] * vx[i] + vy[i] * vy[i]));
    d = real'(theta) - a;
    if (d > 90) d -= 180; else if (d < -90) d += 180;
    checks++;
    if (d > 1.01 || d < -1.01 || real'(mag) > m * 1.02 + 2 || real'(mag) < m * 0.98 - 2) begin
      failures++;
      $display("FAIL vec %0d (%0d,%0d): theta %0d exp %f mag %0d exp %f", i, vx[i], vy[i], theta, a, mag, m);
    end
  end
endmodule
