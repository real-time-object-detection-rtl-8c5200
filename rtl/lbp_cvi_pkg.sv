// lbp_cvi_pkg: types and constants shared by the two custom vector
// instructions (CVIs) of the MB-LBP face detector.
//
// A feature of the boosted cascade is a 256-entry, 1-bit pass table indexed by
// the 8-bit LBP pattern, plus two signed 8-bit scores, PASS and FAIL. Two
// features share one 544-bit row of the feature memory so that one lookup
// instruction evaluates a pair of features in every byte lane. The field order
// inside a row is this design's choice. The LBP pattern CVI works on three
// block sizes (1x1, 2x2, 4x4), selected by lbp_mode_e.
package lbp_cvi_pkg;

  localparam int unsigned LUT_ENTRIES = 256;  // one entry per 8-bit pattern
  localparam int unsigned SCORE_W     = 8;    // PASS / FAIL / stage total width
  localparam int unsigned FEATURE_W   = LUT_ENTRIES + 2 * SCORE_W;  // 272
  localparam int unsigned ROW_W       = 2 * FEATURE_W;              // 544
  localparam int unsigned MAX_BLOCK   = 4;    // largest MB-LBP block edge
  localparam int unsigned BSUM_W      = 12;   // 16 pixels x 255 = 4080

  typedef struct packed {
    logic [LUT_ENTRIES-1:0] lut;   // bit p = 1: pattern p passes
    logic [SCORE_W-1:0]     pass;  // score added when the pattern passes
    logic [SCORE_W-1:0]     fail;  // score added when it fails
  } feature_t;

  // Feature A in the low half, feature B in the high half.
  typedef struct packed {
    feature_t b;
    feature_t a;
  } lut_row_t;

  typedef enum logic [1:0] {
    BLK_1X1 = 2'd0,
    BLK_2X2 = 2'd1,
    BLK_4X4 = 2'd2
  } lbp_mode_e;

  typedef enum logic {
    OP_LUT = 1'b0,   // LBP table lookup (VCUSTOM0)
    OP_LBP = 1'b1    // LBP pattern computation
  } cvi_op_e;

  // Edge length in pixels of the blocks of a mode.
  function automatic int unsigned block_size(lbp_mode_e m);
    case (m)
      BLK_1X1: return 1;
      BLK_2X2: return 2;
      default: return 4;
    endcase
  endfunction

endpackage
