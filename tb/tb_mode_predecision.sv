// Test of mode pre-decision: random and near-identical block pairs are
// streamed row by row; F_diff must equal the SAD formed here, done must
// come after the 16th row, and skip/background must follow the two
// equations for thresholds 600 and 1200 and several ME results.
module tb_mode_predecision;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, row_valid = 0, done, skip, background;
  pix_t cur_row [16], prev_row [16];
  sad_t sad_me = '0, th_skip_fdiff = 16'd600, th_skip_sad = 16'd1200, th_bg = 16'd600, fdiff;
  mv_t  mv_me = '0;
  mode_predecision dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin cur_row[i] = '0; prev_row[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int e, amp;
      amp = (t % 3 == 0) ? 255 : (t % 3 == 1) ? 4 : 2;
      clear = 1; @(negedge clk); clear = 0;
      e = 0;
      for (int r = 0; r < 16; r++) begin
        row_valid = 1;
        for (int i = 0; i < 16; i++) begin
          int a, b;
          a = $urandom_range(0, 255);
          b = a + $urandom_range(0, amp) - amp / 2;
          if (b < 0) b = 0;
          if (b > 255) b = 255;
          cur_row[i] = pix_t'(a); prev_row[i] = pix_t'(b);
          e += (a > b) ? a - b : b - a;
        end
        @(negedge clk);
        checks++; if (done != (r == 15)) failures++;
      end
      row_valid = 0;
      checks++; if (int'(fdiff) != e) failures++;
      sad_me = sad_t'($urandom_range(0, 2400));
      mv_me.x = 8'($urandom_range(0, 2) - 1); mv_me.y = 8'($urandom_range(0, 1));
      #1;
      checks++; if (skip != (e < 600 && int'(sad_me) < 1200)) failures++;
      checks++; if (background != ((mv_me.x == 0 && mv_me.y == 0) || e < 600)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
