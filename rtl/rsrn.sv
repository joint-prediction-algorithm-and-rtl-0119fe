// Reference shift register network (RSRN).
//
// A reconfigurable array of 8-bit registers that holds the reference pixels
// of the candidates being matched. The core array is 128 registers: 8
// columns along the fetch direction by 16 rows. Below it sit 8 rows of
// prefetch registers that shift together with the array; they catch the
// pixels under the window while a sweep runs, so that the window can step
// down without a bubble cycle.
//
// Operations (op, applied at the clock edge):
//   RS_RIGHT  one search-window column (col_in, 24 pixels, top row first)
//             enters at column W-1 and the first W columns move one place
//             towards column 0: the window moves one column right.
//   RS_LEFT   the column enters at column 0 and the first W columns move one
//             place towards column W-1: the window moves one column left.
//   RS_DOWN   all rows move up by the level's vertical step (8, 2 or 1):
//             the window moves down by that many rows.
// W is the window width of the level: 4 at level 2, 8 at levels 1 and 0.
//
// ref_px presents the window to the 128 PEs. Level 2: eight 4x4 candidates
// at vertical offsets 0..7 (element 16k+4i+j = row k+i, column j). Level 1:
// two 8x8 candidates at offsets 0 and 1 (element 64k+8i+j). Level 0: a
// 16-row by 8-column half candidate (element 8i+j).
//
// The shift directions and the 128-register count follow the published
// design; the 8x16 orientation, the prefetch rows and the window layouts are
// this design's own.
module rsrn
  import pc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_e level,
  input  rs_op_e op,
  input  pix_t   col_in [RS_H],
  output pix_t   ref_px [NPE]
);

  pix_t a [RS_H][RS_COLS];   // [row][column]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < RS_H; r++)
        for (int c = 0; c < RS_COLS; c++)
          a[r][c] <= '0;
    end else begin
      case (op)
        RS_RIGHT: begin
          for (int r = 0; r < RS_H; r++) begin
            for (int c = 0; c < RS_COLS - 1; c++)
              if (c < int'(win_of(level)) - 1) a[r][c] <= a[r][c+1];
            a[r][win_of(level) - 1] <= col_in[r];
          end
        end
        RS_LEFT: begin
          for (int r = 0; r < RS_H; r++) begin
            for (int c = 1; c < RS_COLS; c++)
              if (c < int'(win_of(level))) a[r][c] <= a[r][c-1];
            a[r][0] <= col_in[r];
          end
        end
        RS_DOWN: begin
          for (int r = 0; r < RS_H; r++)
            if (r + int'(vstep_of(level)) < RS_H)
              a[r] <= a[r + vstep_of(level)];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < NPE; k++) ref_px[k] = '0;
    case (level)
      LV2:
        for (int k = 0; k < 8; k++)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              ref_px[16*k + 4*i + j] = a[k+i][j];
      LV1:
        for (int k = 0; k < 2; k++)
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              ref_px[64*k + 8*i + j] = a[k+i][j];
      default:
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 8; j++)
            ref_px[8*i + j] = a[i][j];
    endcase
  end

endmodule
