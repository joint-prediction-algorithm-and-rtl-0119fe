// Half-pel refinement SADs.
//
// After the level-0 search, the best integer vector (bx,by) is refined to
// half-pel precision by matching the eight half-pel neighbours
// (bx + hx/2, by + hy/2), hx, hy in {-1,0,+1} and not both 0. The 18x18
// window around the integer block (frame columns bx-1..bx+16, rows
// by-1..by+16) streams one column per cycle through the interpolation unit
// (IU). For each pair of adjacent window columns (c-1, c) the IU gives the
// horizontal samples hpel[r] between them, the vertical samples vpel[r]
// between rows r and r+1 of column c, and the diagonal samples dpel[r].
// This unit keeps the previous IU output, so that with outputs for the
// column pairs (j, j+1) and (j+1, j+2) it holds every half-pel sample that
// column j of the eight candidate blocks needs:
//   (-1,-1) dpel_p[i]    (0,-1) vpel_p[i]    (+1,-1) dpel[i]
//   (-1, 0) hpel_p[i+1]                      (+1, 0) hpel[i+1]
//   (-1,+1) dpel_p[i+1]  (0,+1) vpel_p[i+1]  (+1,+1) dpel[i+1]
// (_p = previous output, i = block row). Each cycle 8 x 16 absolute
// differences against column j of the current block are added to eight
// accumulators.
//
// Interface: start clears the accumulators. in_valid marks an IU output;
// the first one of a block only fills the previous-output register, and
// the next 16 are accumulated for block columns 0..15. done pulses one
// cycle after the 17th output, with sad[] (order (-1,-1), (0,-1), (+1,-1),
// (-1,0), (+1,0), (-1,+1), (0,+1), (+1,+1)) valid until the next start.
//
// The published design only says that the IU produces the sub-pixels used
// in the half-pel refinement. The eight-neighbour pattern, the column
// stream and this accumulation are this design's own.
module hpel_refine
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  pix_t cur [MB][MB],
  input  logic in_valid,
  input  pix_t hpel [MB+2],
  input  pix_t vpel [MB+1],
  input  pix_t dpel [MB+1],
  output logic done,
  output sad_t sad [8]
);

  pix_t hpel_p [MB+2];
  pix_t vpel_p [MB+1];
  pix_t dpel_p [MB+1];
  logic [4:0] n;              // IU outputs seen since start

  function automatic sad_t ad(pix_t a, pix_t b);
    return (a > b) ? sad_t'(pix_t'(a - b)) : sad_t'(pix_t'(b - a));
  endfunction

  // per-candidate sum of one column
  sad_t col_sad [8];
  logic [3:0] j;

  assign j = 4'(n - 5'd1);

  always_comb begin
    for (int k = 0; k < 8; k++) col_sad[k] = '0;
    for (int i = 0; i < int'(MB); i++) begin
      pix_t c;
      c = cur[i][j];
      col_sad[0] += ad(c, dpel_p[i]);
      col_sad[1] += ad(c, vpel_p[i]);
      col_sad[2] += ad(c, dpel[i]);
      col_sad[3] += ad(c, hpel_p[i+1]);
      col_sad[4] += ad(c, hpel[i+1]);
      col_sad[5] += ad(c, dpel_p[i+1]);
      col_sad[6] += ad(c, vpel_p[i+1]);
      col_sad[7] += ad(c, dpel[i+1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; done <= 1'b0;
      for (int k = 0; k < 8; k++) sad[k] <= '0;
      for (int i = 0; i < int'(MB) + 2; i++) hpel_p[i] <= '0;
      for (int i = 0; i < int'(MB) + 1; i++) begin vpel_p[i] <= '0; dpel_p[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (start) begin
        n <= '0;
        for (int k = 0; k < 8; k++) sad[k] <= '0;
      end else if (in_valid && n <= 5'd16) begin
        hpel_p <= hpel; vpel_p <= vpel; dpel_p <= dpel;
        n <= n + 5'd1;
        if (n != '0)
          for (int k = 0; k < 8; k++) sad[k] <= sad[k] + col_sad[k];
        if (n == 5'd16) done <= 1'b1;
      end
    end
  end

endmodule
