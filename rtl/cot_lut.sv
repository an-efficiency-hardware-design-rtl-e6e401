// cot_lut: dual-port ROM of cot(theta) for the two ROI angle bands.
//
// Only the angles a lane can have are stored: 30..53 degrees (rows 0..23)
// and 130..153 degrees (rows 24..47), 48 words instead of a sine and a
// cosine table over 0..179. Each word is cot(theta) in signed fixed point
// with COT_FRAC = 12 fractional bits, computed at elaboration time as
// round(cos(theta)/sin(theta) * 2^12); e.g. cot(30) = 1.7321 -> 7094,
// cot(153) = -1.9626 -> -8039. Port a serves the intercept computation
// b = cot(theta) * x + y, port b turns the winning angle into the slope m of
// the output line. An angle outside both bands reads as 0. The single cot
// table, its two angle bands and its two ports follow the original
// architecture; the fixed-point format is this design's choice.
//
// Timing: both ports registered, read latency 1 cycle, one read per port
// per clock.
module cot_lut
  import lane_pkg::*;
(
  input  logic                    clk,
  input  logic [THETA_W-1:0]      theta_a,
  output logic signed [COT_W-1:0] cot_a,
  input  logic [THETA_W-1:0]      theta_b,
  output logic signed [COT_W-1:0] cot_b
);
  typedef logic signed [COT_W-1:0] rom_t [N_ROWS];

  function automatic rom_t fill_rom();
    rom_t r;
    for (int t = THETA_L_MIN; t <= THETA_L_MAX; t++) r[theta_row(t)] = COT_W'(cot_fixed(t));
    for (int t = THETA_R_MIN; t <= THETA_R_MAX; t++) r[theta_row(t)] = COT_W'(cot_fixed(t));
    return r;
  endfunction

  localparam rom_t ROM = fill_rom();

  function automatic logic signed [COT_W-1:0] lookup(input logic [THETA_W-1:0] theta);
    if (theta_in_roi(int'(theta))) return ROM[theta_row(int'(theta))];
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    cot_a <= lookup(theta_a);
    cot_b <= lookup(theta_b);
  end
endmodule
