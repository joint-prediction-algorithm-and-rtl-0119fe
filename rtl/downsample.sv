// Down-sample unit.
//
// Produces the two coarse versions of the 16x16 current block used by the
// hierarchical search: an 8x8 block down-sampled by 2 (level 1) and a 4x4
// block down-sampled by 4 (level 2). Each coarse pixel is the rounded mean
// of the 2x2 or 4x4 full-resolution pixels it covers; the published design
// names the unit but not its filter, so the rounded mean is this design's
// choice. The same filter must be applied to the reference frames that are
// stored for levels 1 and 2.
//
// Purely combinational: outputs follow the input block in the same cycle.
module downsample
  import pc_pkg::*;
(
  input  pix_t blk  [MB][MB],       // [row][col]
  output pix_t ds2  [MB/2][MB/2],
  output pix_t ds4  [MB/4][MB/4]
);

  always_comb begin
    for (int r = 0; r < MB/2; r++)
      for (int c = 0; c < MB/2; c++) begin
        logic [PIX_W+1:0] s;
        s = 10'(blk[2*r][2*c]) + 10'(blk[2*r][2*c+1])
          + 10'(blk[2*r+1][2*c]) + 10'(blk[2*r+1][2*c+1]) + 10'd2;
        ds2[r][c] = s[PIX_W+1:2];
      end
  end

  always_comb begin
    for (int r = 0; r < MB/4; r++)
      for (int c = 0; c < MB/4; c++) begin
        logic [PIX_W+3:0] s;
        s = 12'd8;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            s += 12'(blk[4*r+i][4*c+j]);
        ds4[r][c] = s[PIX_W+3:4];
      end
  end

endmodule
