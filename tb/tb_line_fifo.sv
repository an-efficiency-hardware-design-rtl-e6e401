// tb_line_fifo: the RAM delay line must return every word exactly DEPTH
// enables after it went in, whatever the gaps between enables.
module tb_line_fifo;
  localparam int WIDTH = 8, DEPTH = 13;
  logic clk = 0, rst_n = 0, en = 0;
  logic [WIDTH-1:0] din = 0, dout;
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  line_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
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
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      din = WIDTH'($urandom);
      if (en) begin
        hist.push_back(din);
        @(negedge clk);
        en = 0;
        if (hist.size() > DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - 1 - DEPTH]) begin
            failures++;
            $display("FAIL enable %0d: got %0h exp %0h", hist.size(), dout, hist[hist.size() - 1 - DEPTH]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
