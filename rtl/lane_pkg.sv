// lane_pkg: constants and types shared by the lane detector.
//
// Image geometry, region of interest (ROI) and accumulator layout of the
// (b, theta) Hough transform. Pixel coordinates are centred on the image
// (x = column - W/2, y = row - H/2, y growing downwards), so a 1024x1024 frame
// spans -512..511 on both axes. The ROI rows y = 100..400, the two angle bands
// 30..53 and 130..153 degrees and the intercept range -860..400 are the
// figures used throughout the design; everything else (word widths, the
// fixed-point format of cot) is this design's own choice.
package lane_pkg;

  // Default image size.
  localparam int IMG_W = 1024;
  localparam int IMG_H = 1024;

  localparam int PIX_W   = 8;   // grayscale sample width
  localparam int COORD_W = 12;  // signed centred coordinate
  localparam int THETA_W = 8;   // angle in whole degrees, 0..179
  localparam int GRAD_W  = 11;  // signed Sobel gradient (|G| <= 1020)
  localparam int MAG_W   = 12;  // gradient magnitude

  // ROI rows (centred y) and the two angle bands.
  localparam int ROI_Y_MIN   = 100;
  localparam int ROI_Y_MAX   = 400;
  localparam int THETA_L_MIN = 30;
  localparam int THETA_L_MAX = 53;
  localparam int THETA_R_MIN = 130;
  localparam int THETA_R_MAX = 153;

  // Intercept range kept in the accumulator.
  localparam int B_MIN = -860;
  localparam int B_MAX = 400;
  localparam int B_W   = 12;    // signed intercept width

  // cot(theta) in signed fixed point with COT_FRAC fractional bits.
  localparam int COT_W    = 16;
  localparam int COT_FRAC = 12;

  localparam int VOTE_W = 9;    // accumulator cell width (saturating)

  // Accumulator rows: one per whole degree of the two bands, left band first.
  localparam int N_ROWS_L = THETA_L_MAX - THETA_L_MIN + 1;   // 24
  localparam int N_ROWS_R = THETA_R_MAX - THETA_R_MIN + 1;   // 24
  localparam int N_ROWS   = N_ROWS_L + N_ROWS_R;             // 48

  // Lines with theta below 90 degrees are the left lane in the centred,
  // y-down frame (their pixels lie at x < 0 under the vanishing point).
  localparam int THETA_SPLIT = 90;

  function automatic logic theta_in_roi(input int theta);
    return (theta >= THETA_L_MIN && theta <= THETA_L_MAX) ||
           (theta >= THETA_R_MIN && theta <= THETA_R_MAX);
  endfunction

  // Row of the accumulator (and index of the cot table) for an in-ROI angle.
  function automatic int theta_row(input int theta);
    return (theta < THETA_SPLIT) ? theta - THETA_L_MIN
                                 : N_ROWS_L + theta - THETA_R_MIN;
  endfunction

  // cot(theta) rounded to COT_FRAC fractional bits; used to fill the ROM
  // at elaboration time.
  function automatic int cot_fixed(input int theta);
    real rad;
    rad = real'(theta) * 3.14159265358979323846 / 180.0;
    return int'($cos(rad) / $sin(rad) * real'(1 << COT_FRAC));
  endfunction

  // One line of the output: y = b - m*x in the centred frame of the image,
  // i.e. b = m*x + y for every pixel (x, y) on the line.
  typedef struct packed {
    logic                     valid;   // peak reached the vote threshold
    logic        [THETA_W-1:0] theta;  // degrees
    logic signed [B_W-1:0]     b;      // intercept
    logic signed [COT_W-1:0]   m;      // cot(theta), COT_FRAC fractional bits
    logic        [VOTE_W-1:0]  votes;  // height of the peak
  } lane_line_t;

endpackage
