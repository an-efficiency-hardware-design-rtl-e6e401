// tb_masking_grayscale: checks gray conversion, ROI row masking, the raster
// counters and the end-of-frame flag of masking_grayscale on a small 8x8
// frame (rows 3..6 in the ROI), two frames of random pixels with random
// gaps in the stream. Latency 1 is checked for every pixel.
module tb_masking_grayscale;
  import lane_pkg::*;
  localparam int W = 8, H = 8, YLO = -1, YHI = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_r = 0, in_g = 0, in_b = 0;
  logic out_valid, out_eof;
  logic [7:0] out_gray;
  logic [2:0] out_col, out_row;
  int checks = 0, failures = 0;

  masking_grayscale #(.W(W), .H(H), .ROI_Y_LO(YLO), .ROI_Y_HI(YHI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 2 * W * H) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_r = 8'($urandom); in_g = 8'($urandom); in_b = 8'($urandom);
      if (in_valid) begin
        int c, r, y, exp_g;
        c = n % W; r = (n / W) % H;
        y = r - H / 2;
        exp_g = (y >= YLO && y <= YHI) ? (77 * in_r + 150 * in_g + 29 * in_b + 128) / 256 : 0;
        @(negedge clk);
        check(out_valid, "valid");
        check(out_gray == 8'(exp_g), $sformatf("gray pix %0d got %0d exp %0d", n, out_gray, exp_g));
        check(out_col == 3'(c) && out_row == 3'(r), "position");
        check(out_eof == (c == W - 1 && r == H - 1), "eof");
        in_valid = 0;
        n++;
      end
    end
    @(negedge clk);
    check(!out_valid && !out_eof, "idle after stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
