// Mode pre-decision and background detection for a right-view macroblock.
//
// The frame difference F_diff is the SAD between the current block and the
// block at the same place in the previous right frame. It is accumulated
// from one 16-pixel row pair per cycle (row_valid), 16 rows per block
// (clear before the first row). From it and the minimum ME SAD:
//   skip       = F_diff < th_skip_fdiff and sad_me < th_skip_sad
//                (disparity estimation of this block can be skipped)
//   background = the block's MV is (0,0) or F_diff < th_bg
// The thresholds are inputs because they depend on the sequence and the
// rate point; 600 and 1200 are the published values for one test sequence.
//
// Timing: fdiff is registered; done pulses the cycle after the 16th row,
// with skip and background valid (combinational on fdiff, sad_me and mv)
// from then until the next clear. The equations follow the published
// algorithm; the row-serial accumulation is this design's choice.
module mode_predecision
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic row_valid,
  input  pix_t cur_row  [MB],
  input  pix_t prev_row [MB],
  input  sad_t sad_me,
  input  mv_t  mv_me,
  input  sad_t th_skip_fdiff,
  input  sad_t th_skip_sad,
  input  sad_t th_bg,
  output sad_t fdiff,
  output logic done,
  output logic skip,
  output logic background
);

  logic [4:0] nrow;
  sad_t       row_sad;

  always_comb begin
    row_sad = '0;
    for (int i = 0; i < int'(MB); i++)
      row_sad += sad_t'(pix_t'((cur_row[i] > prev_row[i]) ? cur_row[i] - prev_row[i]
                                                          : prev_row[i] - cur_row[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fdiff <= '0; nrow <= '0; done <= 1'b0;
    end else if (clear) begin
      fdiff <= '0; nrow <= '0; done <= 1'b0;
    end else begin
      done <= row_valid && (nrow == 5'(MB - 1));
      if (row_valid) begin
        fdiff <= fdiff + row_sad;
        nrow  <= nrow + 5'd1;
      end
    end
  end

  assign skip       = (fdiff < th_skip_fdiff) && (sad_me < th_skip_sad);
  assign background = (mv_me.x == '0 && mv_me.y == '0) || (fdiff < th_bg);

endmodule
