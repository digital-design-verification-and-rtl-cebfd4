// Lane detection: shared constants, types and helper functions.
//
// Image geometry, fixed-point formats, region-of-interest (ROI) bounds and the
// CORDIC angle unit used by every block of the lane detector live here.
//
// Coordinates: X is the image row (0 = top) and Y the column, as in the
// position counters. A lane line is y = b - x*cot (left lane, cot > 0) or
// y = b + x*|cot| (right lane, cot < 0); the Hough space is (b, theta).
//
// Angles out of the CORDIC are integers in units of atan(2^-15) rad, so 90
// degrees is 51472 and a degree is about 571.9 units (17 bits cover 0..180).
//
// From the document: 512x512 8-bit image, Sobel threshold 210, 10 CORDIC
// iterations, theta ROIs right -70..-35 deg and left -145..-110 deg at 1 degree
// (36 angles each), b ROIs right -52..180 and left 336..566 with a b step of 2,
// cot stored as 24-bit 10.14 unsigned. Own choices: 16-bit vote counters,
// 13-bit signed b, 1024-deep edge FIFO.
//
// Each module uses only some of these constants, so a lint run on one module
// lists the others as unused parameters of the package; that is expected.
package ld_pkg;

  localparam int FRAME_W = 512;
  localparam int FRAME_H = 512;
  localparam int PIX_W   = 8;
  localparam int COORD_W = 10;   // X / Y width (10-bit integer part in the document)
  localparam int G_W     = 11;   // signed Sobel gradient, |G| <= 4*255
  localparam int SOBEL_TH = 210;

  // CORDIC
  localparam int CORDIC_ITER = 10;
  localparam int THETA_W     = 17;
  localparam real ANG_UNIT   = 3.0517578115e-5;      // atan(2^-15) in rad
  localparam real DEG2UNIT   = 3.14159265358979 / 180.0 / ANG_UNIT;
  localparam int  TH_90      = int'(90.0 * DEG2UNIT); // 51472

  // Edge-orientation ROIs, theta folded into [0,180) degrees.
  // Right: -70..-35 deg  == 110..145 deg;  left: -145..-110 deg == 35..70 deg.
  localparam int TH_R_MIN = int'(110.0 * DEG2UNIT);
  localparam int TH_R_MAX = int'(145.0 * DEG2UNIT);
  localparam int TH_L_MIN = int'(35.0 * DEG2UNIT);
  localparam int TH_L_MAX = int'(70.0 * DEG2UNIT);

  // Hough space
  localparam int N_THETA = 36;           // angles per region, 1 degree step
  localparam int IDX_W   = 6;
  localparam int COT_W   = 24;           // 10.14 fixed point
  localparam int COT_Q   = 14;
  localparam int B_W     = 13;           // signed y-intercept
  localparam int B_MIN_R = -52;
  localparam int B_MAX_R = 180;
  localparam int B_MIN_L = 336;
  localparam int B_MAX_L = 566;
  localparam int B_SHIFT = 1;            // b step = 2^B_SHIFT
  localparam int NB_R    = ((B_MAX_R - B_MIN_R) >> B_SHIFT) + 1;   // 117 b bins
  localparam int NB_L    = ((B_MAX_L - B_MIN_L) >> B_SHIFT) + 1;   // 116 b bins
  localparam int ACC_OFFSET_L = NB_R * N_THETA;                    // 4212
  localparam int ACC_DEPTH = (NB_R + NB_L) * N_THETA;              // 8388
  localparam int ACC_AW  = $clog2(ACC_DEPTH);
  localparam int VOTE_W  = 16;

  // One edge on its way from theta detection to the Hough transform.
  typedef struct packed {
    logic               lr;   // 1 = right region, 0 = left region
    logic [COORD_W-1:0] x;    // row
    logic [COORD_W-1:0] y;    // column
  } edge_t;

  // One detected line: votes, y-intercept and theta index (0..35 within region).
  typedef struct packed {
    logic [VOTE_W-1:0]  votes;
    logic signed [B_W-1:0] b;
    logic [IDX_W-1:0]   idx;
  } line_t;

  // The lane detector's answer: two lines per region.
  typedef struct packed {
    line_t l1, l2, r1, r2;
  } lanes_t;

  // atan(2^-i) in units of atan(2^-15), i = 0..15.
  function automatic logic [THETA_W-1:0] cordic_angle(input int i);
    case (i)
      0: return 17'd25736;   1: return 17'd15193;   2: return 17'd8027;
      3: return 17'd4075;    4: return 17'd2045;    5: return 17'd1024;
      6: return 17'd512;     7: return 17'd256;     8: return 17'd128;
      9: return 17'd64;     10: return 17'd32;     11: return 17'd16;
     12: return 17'd8;      13: return 17'd4;      14: return 17'd2;
      default: return 17'd1;
    endcase
  endfunction

  // |cot(phi)| * 2^14 for phi = 35 + k degrees, k = 0..35 (rounded).
  // Right-region angle theta = -70 + i has |cot| = cot(70 - i) -> k = 35 - i;
  // left-region angle theta = -145 + i has cot = cot(35 + i)   -> k = i.
  function automatic logic [COT_W-1:0] cot_table(input logic [IDX_W-1:0] k);
    case (k)
       0: return 24'd23399;  1: return 24'd22551;  2: return 24'd21742;
       3: return 24'd20971;  4: return 24'd20233;  5: return 24'd19526;
       6: return 24'd18848;  7: return 24'd18196;  8: return 24'd17570;
       9: return 24'd16966; 10: return 24'd16384; 11: return 24'd15822;
      12: return 24'd15278; 13: return 24'd14752; 14: return 24'd14242;
      15: return 24'd13748; 16: return 24'd13268; 17: return 24'd12801;
      18: return 24'd12346; 19: return 24'd11904; 20: return 24'd11472;
      21: return 24'd11051; 22: return 24'd10640; 23: return 24'd10238;
      24: return 24'd9845;  25: return 24'd9459;  26: return 24'd9082;
      27: return 24'd8712;  28: return 24'd8348;  29: return 24'd7991;
      30: return 24'd7640;  31: return 24'd7295;  32: return 24'd6955;
      33: return 24'd6620;  34: return 24'd6289;  default: return 24'd5963;
    endcase
  endfunction

  // Default ROM picture: a dark road (ROAD_DARK) with two bright (ROAD_LIGHT)
  // lane stripes below the vanishing point. Left stripe centred on
  // y = 520 - x (theta -135 deg), right stripe on y = 60 + 0.7002*x
  // (theta -55 deg), both 5 pixels wide, rows 290..511. road_left/road_right
  // give a stripe's centre column for a row.
  localparam int ROAD_ROW0   = 290;
  localparam int ROAD_BL     = 520;
  localparam int ROAD_BR     = 60;
  localparam int ROAD_CR_NUM = 7002;      // cot(55 deg) * 10000
  localparam int ROAD_HALF   = 2;
  localparam logic [PIX_W-1:0] ROAD_DARK  = 8'd50;
  localparam logic [PIX_W-1:0] ROAD_LIGHT = 8'd210;
  function automatic int road_left(input int row);
    return ROAD_BL - row;
  endfunction
  function automatic int road_right(input int row);
    return ROAD_BR + (row * ROAD_CR_NUM) / 10000;
  endfunction

endpackage
