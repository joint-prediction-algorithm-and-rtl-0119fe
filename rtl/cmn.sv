// Current MUX network (CMN).
//
// Presents the current block of the active level to the 128 PEs so that
// each PE meets the current pixel matching the reference pixel the RSRN
// gives it. Level 2: the 4x4 block repeated for eight candidates (element
// 16k+4i+j = ds4[i][j]). Level 1: the 8x8 block repeated for two candidates
// (element 64k+8i+j = ds2[i][j]). Level 0: the left (half=0) or right
// (half=1) 16x8 half of the full block (element 8i+j = blk[i][8*half+j]).
// The published design gives the function (three kinds of current blocks
// for the three levels); the element layout is this design's own and must
// match the RSRN's. Purely combinational.
module cmn
  import pc_pkg::*;
(
  input  level_e level,
  input  logic   half,
  input  pix_t   blk [MB][MB],
  input  pix_t   ds2 [MB/2][MB/2],
  input  pix_t   ds4 [MB/4][MB/4],
  output pix_t   cur [NPE]
);

  always_comb begin
    for (int k = 0; k < NPE; k++) cur[k] = '0;
    case (level)
      LV2:
        for (int k = 0; k < 8; k++)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              cur[16*k + 4*i + j] = ds4[i][j];
      LV1:
        for (int k = 0; k < 2; k++)
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              cur[64*k + 8*i + j] = ds2[i][j];
      default:
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 8; j++)
            cur[8*i + j] = half ? blk[i][8 + j] : blk[i][j];
    endcase
  end

endmodule
