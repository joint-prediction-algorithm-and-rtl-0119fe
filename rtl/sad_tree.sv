// 128-PE adder tree.
//
// Every cycle 128 processing elements each form |cur - ref| for one pixel
// pair. Eight 16-to-1 adder trees reduce groups of 16 differences: each group
// is one 4x4 candidate of level 2, so eight level-2 SADs come out per cycle.
// Two 4-to-1 adder trees then add four of those sums each, giving the SADs
// of two 8x8 level-1 candidates, and a final adder adds the two into the
// SAD of 128 pixels, half of a 16x16 level-0 candidate.
//
// Pixel k of the input vectors belongs to group k/16, so the caller (the
// current MUX network and the RSRN) places candidate j of level 2 in
// elements 16j..16j+15 and candidate j of level 1 in 64j..64j+63.
//
// Timing: the three result sets are registered, one cycle after the inputs.
// in_valid is carried alongside as out_valid. The tree structure follows the
// published figure; the single pipeline stage is this design's choice.
module sad_tree
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t cur [NPE],
  input  pix_t ref_px [NPE],
  output logic out_valid,
  output sad_t sad_l2 [8],     // eight 4x4 SADs
  output sad_t sad_l1 [2],     // two 8x8 SADs
  output sad_t sad_l0h         // SAD of 128 pixels (half a 16x16 block)
);

  logic [PIX_W-1:0] ad [NPE];
  sad_t s16 [8];
  sad_t s64 [2];

  // Processing elements: absolute difference.
  always_comb begin
    for (int k = 0; k < NPE; k++)
      ad[k] = (cur[k] > ref_px[k]) ? cur[k] - ref_px[k] : ref_px[k] - cur[k];
  end

  // 16-to-1 trees.
  always_comb begin
    for (int g = 0; g < 8; g++) begin
      s16[g] = '0;
      for (int k = 0; k < 16; k++)
        s16[g] += sad_t'(ad[16*g + k]);
    end
  end

  // 4-to-1 trees.
  always_comb begin
    for (int h = 0; h < 2; h++)
      s64[h] = s16[4*h] + s16[4*h+1] + s16[4*h+2] + s16[4*h+3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sad_l0h   <= '0;
      for (int g = 0; g < 8; g++) sad_l2[g] <= '0;
      for (int h = 0; h < 2; h++) sad_l1[h] <= '0;
    end else begin
      out_valid <= in_valid;
      sad_l2    <= s16;
      sad_l1    <= s64;
      sad_l0h   <= s64[0] + s64[1];
    end
  end

endmodule
