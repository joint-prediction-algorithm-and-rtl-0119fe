// Current register set.
//
// Holds the 16x16 current macroblock while it is matched at all three
// levels, together with its down-sampled 8x8 and 4x4 versions. The block is
// written one 16-pixel row per cycle (wr_en, wr_row, wr_data). The coarse
// versions are formed by the down-sample unit from the stored block and are
// valid one cycle after the last row is written. The published design only
// names this register set; the row-wise write port is this design's choice.
module crs
  import pc_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_row,
  input  pix_t       wr_data [MB],
  output pix_t       blk  [MB][MB],
  output pix_t       ds2  [MB/2][MB/2],
  output pix_t       ds4  [MB/4][MB/4]
);

  always_ff @(posedge clk) begin
    if (wr_en) blk[wr_row] <= wr_data;
  end

  downsample u_ds (.blk(blk), .ds2(ds2), .ds4(ds4));

endmodule
