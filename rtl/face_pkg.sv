// face_pkg: sizes and types shared by the Gabor / nearest-neighbour face
// recognition datapath.
//
// The image, region, filter-bank and database sizes are the ones the design
// is built around: a 112x92 grey-scale face, 40 Gabor kernels (5 scales x 8
// orientations) of 32x32 = 1024 coefficients, feature vectors of 40 values
// and a database of 100 training vectors. Word widths (8-bit pixels, 16-bit
// fixed-point coefficients and features) are this design's choice; the
// reference flow used double-precision floating point throughout.
package face_pkg;

  // Input image (row-major stream, rows x columns).
  localparam int unsigned IMG_ROWS    = 112;
  localparam int unsigned IMG_COLS    = 92;
  localparam int unsigned PIX_W       = 8;

  // Gabor filter bank.
  localparam int unsigned NUM_SCALES  = 5;
  localparam int unsigned NUM_ORIENTS = 8;
  localparam int unsigned NUM_FILTERS = NUM_SCALES * NUM_ORIENTS;   // 40
  localparam int unsigned TAPS        = 1024;                       // 32 x 32 kernel, order 1023
  localparam int unsigned COEF_W      = 16;                         // signed Q1.15
  localparam int unsigned DA_K        = 4;                          // taps per DA look-up table
  localparam int unsigned DA_BPC      = 1;                          // pixel bits per clock (1 = bit-serial)
  localparam int unsigned ACC_W       = 36;                         // signed FIR output

  // Feature vectors and classifier.
  localparam int unsigned FEAT_W      = 16;                         // unsigned feature value
  localparam int unsigned OUT_SHIFT   = 15;                         // drops the coefficient fraction
  localparam int unsigned FEAT_LEN    = NUM_FILTERS;                // 40
  localparam int unsigned N_TRAIN     = 100;
  localparam int unsigned DIST_W      = FEAT_W + $clog2(FEAT_LEN) + 1;  // 22

  // Region buffer (BANK 0): large enough for the biggest window (21 x 86).
  localparam int unsigned BANK_DEPTH  = 2048;
  localparam int unsigned BANK_AW     = $clog2(BANK_DEPTH);

  typedef enum logic [1:0] {
    REG_EYE   = 2'd0,
    REG_NOSE  = 2'd1,
    REG_MOUTH = 2'd2
  } region_e;

  // Window of the image, 0-based inclusive bounds.
  typedef struct packed {
    logic [7:0] row_lo;
    logic [7:0] row_hi;
    logic [7:0] col_lo;
    logic [7:0] col_hi;
  } window_t;

  // Eye I(40:60,5:90), nose I(60:80,21:77), mouth I(80:98,19:77), 1-based
  // inclusive (row, column) ranges, converted here to 0-based.
  function automatic window_t region_window(region_e r);
    case (r)
      REG_EYE:   return '{row_lo: 8'd39, row_hi: 8'd59, col_lo: 8'd4,  col_hi: 8'd89};
      REG_NOSE:  return '{row_lo: 8'd59, row_hi: 8'd79, col_lo: 8'd20, col_hi: 8'd76};
      default:   return '{row_lo: 8'd79, row_hi: 8'd97, col_lo: 8'd18, col_hi: 8'd76};
    endcase
  endfunction

endpackage
