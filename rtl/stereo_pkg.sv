// stereo_pkg: constants and types shared by the census stereo matcher.
//
// The matcher transforms each image with a sparse 5x5 census transform
// (15 comparisons against the centre pixel), compares census words by
// counting equal bits, sums those counts over an 11x11 window and keeps,
// for every pixel, the disparity with the largest sum. Eight disparities are
// evaluated per pass and four passes give 32 disparities. Window sizes, the
// 15-bit census word, 8 disparities per pass and 4 passes follow the
// original system; which 15 of the 24 neighbours are compared, and the bit
// widths derived below, are this design's choices.
package stereo_pkg;

  localparam int unsigned PIX_W       = 8;   // grey-level pixel
  localparam int unsigned CWIN        = 5;   // census window edge
  localparam int unsigned CENSUS_BITS = 15;  // comparisons per census word
  localparam int unsigned MWIN        = 11;  // matching window edge
  localparam int unsigned NDISP       = 8;   // disparities per pass
  localparam int unsigned NPASS       = 4;   // matching passes
  localparam int unsigned DISP_W      = 5;   // 0..31
  localparam int unsigned MATCH_W     = 4;   // 0..15 equal bits
  localparam int unsigned COL_W       = 8;   // column sum, at most 11*15 = 165
  localparam int unsigned SCORE_W     = 11;  // window sum, at most 121*15 = 1815

  // Census sampling pattern. Bit r*5+c is set when window position (row r,
  // column c) takes part; row 0 is the oldest (top) line, column 0 the
  // leftmost pixel, (2,2) is the centre. The pattern is the eight pixels of
  // the inner 3x3 ring plus seven pixels of the outer ring:
  //   X . X . X
  //   . X X X .
  //   X X c X X
  //   . X X X .
  //   X . . . X
  // Census bit k belongs to the k-th set bit of the mask, counting from bit 0.
  localparam logic [CWIN*CWIN-1:0] CENSUS_MASK = 25'h1176DD5;

  typedef logic [PIX_W-1:0]       pix_t;
  typedef logic [CENSUS_BITS-1:0] census_t;
  typedef logic [MATCH_W-1:0]     match_t;
  typedef logic [COL_W-1:0]       colsum_t;
  typedef logic [SCORE_W-1:0]     score_t;
  typedef logic [DISP_W-1:0]      disp_t;

  // Best match kept per pixel across the matching passes (16 bits, the size
  // of two 8-bit frame-store locations).
  typedef struct packed {
    score_t score;
    disp_t  disp;
  } best_t;

  // Activity of the processing boards during one pass.
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_CENSUS = 2'd1,  // board 1 computes census words (board 2 may output)
    PH_MATCH  = 2'd2,  // board 1 streams census words, board 2 matches
    PH_OUTPUT = 2'd3   // board 2 only writes the disparity image out
  } phase_e;

endpackage
