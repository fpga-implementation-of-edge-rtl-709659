// Shared types and constants of the edge-adaptive 2x video scaler.
//
// The scaler works on 8-bit luminance. The interpolation circuit looks at a
// 6x6 window of original pixels: the inner 4x4 is the "sliding block" O(i,j)
// of the algorithm (i = column, j = row, O(1,1) is the anchor pixel), and the
// outer ring is needed so that every one of the 16 block pixels has the full
// 3x3 neighbourhood used by the Sobel gradients and the local-gradient
// (complexity) sum. Window element win[r][c] is original pixel at row r,
// column c of the window, so O(i,j) = win[j+1][i+1].
//
// Weights of the edge-adaptive interpolator are signed fixed point with a
// resolution of 1/256; the width (10 bits, range -2 .. +2) is this design's
// choice.
package scaler_pkg;

  typedef logic [7:0] pixel_t;

  // 6x6 window of original pixels, [row][column].
  typedef pixel_t win6_t [6][6];

  // 4x4 sliding block, [row j][column i]: blk[j][i] = O(i,j).
  typedef pixel_t blk4_t [4][4];

  // Decision of the fuzzy module: bilinear (BL) or edge-adaptive (AA).
  typedef enum logic {MODE_BL = 1'b0, MODE_AA = 1'b1} interp_mode_t;

  // States of the ITU-R.656 field tracker.
  typedef enum logic [1:0] {
    ITU_BLANK = 2'd0,
    ITU_ODD   = 2'd1,
    ITU_EVEN  = 2'd2
  } itu_state_t;

  // States of the data-flow controller.
  typedef enum logic [2:0] {
    DF_WAIT_FOR_START = 3'd0,
    DF_LOAD_MEM_36    = 3'd1,
    DF_LOAD_MEM_6     = 3'd2,
    DF_COMPUTE        = 3'd3,
    DF_DATA_OUT       = 3'd4,
    DF_CHECK_FINISH   = 3'd5
  } df_state_t;

  // Weight format: signed, 8 fractional bits (1/256 precision).
  localparam int WEIGHT_W    = 10;
  localparam int WEIGHT_FRAC = 8;
  typedef logic signed [WEIGHT_W-1:0] weight_t;

  // The three new pixels of one sliding block: P(1,0), P(0,-1), P(1,-1).
  localparam int NPOS = 3;
  typedef pixel_t trio_t [NPOS];

  // Eight orientation sectors of 22.5 degrees.
  localparam int NSECT = 8;

endpackage
