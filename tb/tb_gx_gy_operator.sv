// tb_gx_gy_operator: random and extreme 3x3 windows; Gx and Gy compared with
// the Sobel sums written out element by element, one-cycle latency.
module tb_gx_gy_operator;
  import lane_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] w00, w01, w02, w10, w12, w20, w21, w22;
  logic [3:0] in_user, out_user;
  logic signed [GRAD_W-1:0] gx, gy;
  int checks = 0, failures = 0;

  gx_gy_operator #(.USER_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int ex, ey;
      @(negedge clk);
      if (k < 4) begin
        // full-scale steps in each direction
        {w00, w01, w02, w10, w12, w20, w21, w22} = '0;
        case (k)
          0: {w02, w12, w22} = {3{8'd255}};
          1: {w00, w10, w20} = {3{8'd255}};
          2: {w20, w21, w22} = {3{8'd255}};
          default: {w00, w01, w02} = {3{8'd255}};
        endcase
      end else begin
        {w00, w01, w02, w10, w12, w20, w21, w22} = 64'({$urandom, $urandom});
      end
      in_user = 4'(k);
      in_valid = 1;
      ex = int'(w02) + 2 * int'(w12) + int'(w22) - int'(w00) - 2 * int'(w10) - int'(w20);
      ey = int'(w20) + 2 * int'(w21) + int'(w22) - int'(w00) - 2 * int'(w01) - int'(w02);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(gx) != ex || int'(gy) != ey || out_user != 4'(k)) begin
        failures++;
        $display("FAIL k=%0d gx=%0d/%0d gy=%0d/%0d", k, gx, ex, gy, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
