// line_fifo: memory-based row buffer of the Sobel window.
//
// A fixed-length delay line built on a RAM instead of a chain of registers:
// every enabled cycle the word written DEPTH enables earlier is read out and
// the new word is written into the same location, so the RAM acts as a
// first-in first-out queue that is always full. In the Sobel window it turns
// the pixel leaving the last window register of one row into the first
// window pixel of the row above (see sobel_edge_detection; DEPTH = W - 3
// there, the output register making up the rest of the row). Using a RAM here
// rather than W flip-flops per row is the point of this block.
//
// Interface: en advances the queue; dout is registered and changes only on
// enabled cycles. Timing: dout after the k-th enable equals din of enable
// k - DEPTH. Contents are undefined until DEPTH words have been written.
module line_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1021
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

  // Read-before-write on the same address: the old word leaves, the new one
  // takes its place.
  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end
endmodule
