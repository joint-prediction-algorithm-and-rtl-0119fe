// Right-view MV predictor from the left view.
//
// Because a background object keeps about the same disparity from frame to
// frame, the MV of a right-view block is close to the MV of the left-view
// block it shows: the block displaced by the global disparity GD. The MVs
// of the left frame are stored per macroblock as the left frame is coded
// (wr_en, wr_bx, wr_by, wr_mv). For a right-view block at (rd_bx, rd_by)
// the predictor is the stored MV of the left block in column
// rd_bx + round(gd / 16), clamped to the frame; pred_mv is registered and
// valid one cycle after rd_en. The right-view ME then searches a small
// window around it.
//
// The use of the left MV at the GD-displaced block follows the published
// algorithm; the per-macroblock store sized for 720x480 (45 x 30 blocks)
// and the rounding of GD to whole blocks are this design's choices.
module mv_predictor
  import pc_pkg::*;
#(
  parameter int unsigned BW = 45,   // macroblocks per row
  parameter int unsigned BH = 30    // macroblock rows
) (
  input  logic clk,
  input  logic wr_en,
  input  logic [5:0] wr_bx,
  input  logic [4:0] wr_by,
  input  mv_t  wr_mv,
  input  logic rd_en,
  input  logic [5:0] rd_bx,
  input  logic [4:0] rd_by,
  input  logic signed [MV_W-1:0] gd,
  output mv_t  pred_mv,
  output logic [5:0] pred_bx
);

  mv_t store [BH*BW];

  logic signed [8:0] off;
  logic signed [8:0] col;
  logic [5:0]        colc;

  always_comb begin
    off  = 9'((10'(gd) + 10'sd8) >>> 4);
    col  = $signed({3'b000, rd_bx}) + off;
    if (col < 0)                 colc = '0;
    else if (col > 9'(BW - 1))   colc = 6'(BW - 1);
    else                         colc = col[5:0];
  end

  always_ff @(posedge clk) begin
    if (wr_en) store[int'(wr_by) * BW + int'(wr_bx)] <= wr_mv;
    if (rd_en) begin
      pred_mv <= store[int'(rd_by) * BW + int'(colc)];
      pred_bx <= colc;
    end
  end

endmodule
