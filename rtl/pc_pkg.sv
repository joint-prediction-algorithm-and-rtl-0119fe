// Shared types and constants of the stereo prediction core.
//
// The core matches blocks at three levels of a hierarchy: level 2 works on
// the 4x4 current block down-sampled by 4, level 1 on the 8x8 block
// down-sampled by 2, level 0 on the full 16x16 block. The numbers below are
// the published configuration: 128 processing elements, a 16x16 macroblock,
// eight joint-block weights in steps of 1/8 and the NOCR thresholds of 4
// (x) and 2 (y). Widths of SADs and vectors are this design's own choice.
package pc_pkg;

  localparam int unsigned PIX_W  = 8;    // luminance sample width
  localparam int unsigned MB     = 16;   // macroblock edge
  localparam int unsigned NPE    = 128;  // processing elements of the adder tree
  localparam int unsigned SAD_W  = 16;   // 16x16x255 = 65280 fits in 16 bits
  localparam int unsigned MV_W   = 8;    // signed vector component
  localparam int unsigned NJB    = 8;    // joint-block modes evaluated by the JBG

  // RSRN geometry: 8 columns along the fetch direction, 16 rows per fetched
  // column, plus 8 rows of prefetch registers below the array.
  localparam int unsigned RS_COLS = 8;
  localparam int unsigned RS_ROWS = 16;
  localparam int unsigned RS_PRE  = 8;
  localparam int unsigned RS_H    = RS_ROWS + RS_PRE;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [SAD_W-1:0] sad_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Level of the hierarchical block-matching process.
  typedef enum logic [1:0] {
    LV0 = 2'd0,   // 16x16, half a candidate per cycle
    LV1 = 2'd1,   // 8x8, two candidates per cycle
    LV2 = 2'd2    // 4x4, eight candidates per cycle
  } level_e;

  // RSRN operation, named by the way the window moves over the search window.
  typedef enum logic [1:0] {
    RS_HOLD  = 2'd0,
    RS_RIGHT = 2'd1,  // new column enters at the right edge, contents move left
    RS_LEFT  = 2'd2,  // new column enters at the left edge, contents move right
    RS_DOWN  = 2'd3   // contents move up by the level's vertical step
  } rs_op_e;

  // Targets of the host write port and sources of search-window data.
  typedef enum logic [2:0] {
    SEL_L2   = 3'd0,   // RAM_L2
    SEL_L011 = 3'd1,   // RAM_L01_1
    SEL_L012 = 3'd2,   // RAM_L01_2
    SEL_MC   = 3'd3,   // RAM_MC
    SEL_CRS  = 3'd4    // current register set
  } sel_e;

  // Block edge of a level.
  function automatic int unsigned blk_of(level_e lv);
    case (lv)
      LV2:     return 4;
      LV1:     return 8;
      default: return 16;
    endcase
  endfunction

  // Vertically adjacent candidates evaluated together (one for level 0,
  // where a candidate takes two cycles).
  function automatic int unsigned vstep_of(level_e lv);
    case (lv)
      LV2:     return 8;
      LV1:     return 2;
      default: return 1;
    endcase
  endfunction

  // Width of the reference window held in the RSRN for a level.
  function automatic int unsigned win_of(level_e lv);
    case (lv)
      LV2:     return 4;
      LV1:     return 8;
      default: return 8;
    endcase
  endfunction

endpackage
