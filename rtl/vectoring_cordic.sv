// vectoring_cordic: gradient orientation and magnitude of a Sobel vector.
//
// A fully pipelined CORDIC in vectoring mode. The vector (gx, gy) is first
// folded into the right half-plane (negating both components when gx < 0,
// which changes the angle by 180 degrees and therefore nothing modulo 180),
// then ITER micro-rotations by +-atan(2^-i) drive y to zero while an angle
// accumulator in 1/256 degree sums the rotations. The result is
//   theta = round(atan2(gy, gx)) mod 180, in whole degrees 0..179, and
//   mag   = |(gx, gy)|, with the CORDIC gain removed by a 311/512 multiply.
// theta is the direction of the image gradient, i.e. the normal of the edge,
// which is the angle the Hough transform votes with. The micro-rotation
// angles are computed at elaboration time from atan(2^-i).
//
// The CORDIC itself follows the edge-detector structure; the iteration
// count, the angle unit and the fixed-point widths are this design's choice.
//
// Timing: one vector per clock, latency ITER + 2 cycles; in_user travels
// alongside with the same latency.
module vectoring_cordic
  import lane_pkg::*;
#(
  parameter int ITER   = 12,
  parameter int USER_W = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [GRAD_W-1:0] gx,
  input  logic signed [GRAD_W-1:0] gy,
  input  logic [USER_W-1:0]        in_user,
  output logic                     out_valid,
  output logic [THETA_W-1:0]       theta,
  output logic [MAG_W-1:0]         mag,
  output logic [USER_W-1:0]        out_user
);
  localparam int GUARD = 6;              // fractional guard bits on x, y
  localparam int XW    = GRAD_W + 2 + GUARD;  // room for the CORDIC gain
  localparam int ZW    = 18;             // angle, 1/256 degree, signed

  function automatic int atan_q8(input int i);
    return int'($atan(1.0 / real'(2 ** i)) * 180.0 / 3.14159265358979323846 * 256.0);
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];
  logic [USER_W-1:0]    us [ITER+1];

  // Stage 0: fold into the right half-plane and scale by the guard bits.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      us[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      us[0] <= in_user;
      zs[0] <= '0;
      if (gx < 0) begin
        xs[0] <= -(XW'(gx) <<< GUARD);
        ys[0] <= -(XW'(gy) <<< GUARD);
      end else begin
        xs[0] <=  (XW'(gx) <<< GUARD);
        ys[0] <=  (XW'(gy) <<< GUARD);
      end
    end
  end

  // Micro-rotation stages.
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN_I = ZW'(atan_q8(i));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        us[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        us[i+1] <= us[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN_I;
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN_I;
        end
      end
    end
  end

  // Output stage: round the angle to whole degrees, wrap to 0..179 and
  // remove the CORDIC gain (1/1.6468 ~ 311/512) from the magnitude.
  logic signed [ZW-1:0]  z_round;
  logic signed [ZW-1:0]  z_wrap;
  logic [XW+9-1:0]       x_scaled;

  assign z_round  = (zs[ITER] + ZW'(128)) >>> 8;
  assign z_wrap   = (z_round < 0) ? z_round + ZW'(180) : z_round;
  assign x_scaled = (XW+9)'(xs[ITER]) * (XW+9)'(311);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      theta     <= '0;
      mag       <= '0;
      out_user  <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_user  <= us[ITER];
      theta     <= (z_wrap >= ZW'(180)) ? '0 : THETA_W'(z_wrap);
      mag       <= MAG_W'(x_scaled >> (9 + GUARD));
    end
  end
endmodule
