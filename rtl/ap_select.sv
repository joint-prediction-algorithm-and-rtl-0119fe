// Advanced-prediction (AP) mode vector selection.
//
// In the AP mode of MPEG-4 a macroblock may carry four motion vectors, one
// per 8x8 quarter, instead of one. During the level-0 search the adder
// tree forms the SAD of a 16x8 half candidate, and its two 64-input
// partial sums are exactly the SADs of the half's upper and lower 8x8
// quarters. This unit keeps, for each quarter, the smallest quarter SAD
// seen during the search and its vector, so that the four AP vectors come
// out of the same search as the 16x16 vector at no extra cycles.
//
// Interface: clear (with the search start) sets every SAD to its maximum
// and every ok flag low. in_valid marks a half result: half = 0 for the
// left half (quarters 0 top-left and 2 bottom-left), 1 for the right half
// (quarters 1 top-right and 3 bottom-right); sad_top and sad_bot are the
// upper and lower quarter SADs and mv the candidate's vector. A strictly
// smaller SAD replaces the kept one, so the earliest candidate wins a tie.
// Outputs are registered: they include a result from the cycle after it
// is offered.
//
// The published flow only names the AP mode as part of the 16x16 block
// matching step; taking the quarter SADs from the tree's partial sums and
// the per-quarter minimum search are this design's own.
module ap_select
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic half,
  input  mv_t  mv,
  input  sad_t sad_top,
  input  sad_t sad_bot,
  output sad_t q_sad [4],
  output mv_t  q_mv  [4],
  output logic q_ok  [4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) begin q_sad[q] <= '1; q_mv[q] <= '0; q_ok[q] <= 1'b0; end
    end else if (clear) begin
      for (int q = 0; q < 4; q++) begin q_sad[q] <= '1; q_mv[q] <= '0; q_ok[q] <= 1'b0; end
    end else if (in_valid) begin
      // top quarter of this half: 0 or 1; bottom quarter: 2 or 3
      if (!q_ok[{1'b0, half}] || sad_top < q_sad[{1'b0, half}]) begin
        q_sad[{1'b0, half}] <= sad_top;
        q_mv[{1'b0, half}]  <= mv;
        q_ok[{1'b0, half}]  <= 1'b1;
      end
      if (!q_ok[{1'b1, half}] || sad_bot < q_sad[{1'b1, half}]) begin
        q_sad[{1'b1, half}] <= sad_bot;
        q_mv[{1'b1, half}]  <= mv;
        q_ok[{1'b1, half}]  <= 1'b1;
      end
    end
  end

endmodule
