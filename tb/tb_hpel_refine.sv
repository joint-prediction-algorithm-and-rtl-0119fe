// Testbench for hpel_refine.
//
// A random 18x18 window and a random current block are made for each
// trial, and the stream of interpolation-unit outputs for the 17 column
// pairs of the window is driven, with random idle cycles in between. The
// eight half-pel SADs are compared with a model that forms every half-pel
// sample directly from the window at half-pel coordinates (rounded
// bilinear averages). In some trials the current block is a copy of one
// half-pel candidate, whose SAD must then be zero. done must come exactly
// one cycle after the last output.
module tb_hpel_refine;
  import pc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 0, in_valid = 0, done;
  pix_t cur  [16][16];
  pix_t hpel [18];
  pix_t vpel [17];
  pix_t dpel [17];
  sad_t sad  [8];

  hpel_refine dut (.*);

  int W [18][18];
  int HX [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
  int HY [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // window sample at half-pel coordinates (y2, x2)
  function automatic int samp(int y2, int x2);
    int y0, x0;
    y0 = y2 / 2; x0 = x2 / 2;
    if (y2 % 2 == 0 && x2 % 2 == 0) return W[y0][x0];
    if (y2 % 2 == 0) return (W[y0][x0] + W[y0][x0+1] + 1) / 2;
    if (x2 % 2 == 0) return (W[y0][x0] + W[y0+1][x0] + 1) / 2;
    return (W[y0][x0] + W[y0][x0+1] + W[y0+1][x0] + W[y0+1][x0+1] + 2) / 4;
  endfunction

  function automatic int cand_pix(int k, int i, int j);
    return samp(2 * (i + 1) + HY[k], 2 * (j + 1) + HX[k]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 18; r++) hpel[r] = '0;
    for (int r = 0; r < 17; r++) begin vpel[r] = '0; dpel[r] = '0; end
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) cur[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 24; t++) begin
      int exp_s [8], copy;
      for (int y = 0; y < 18; y++)
        for (int x = 0; x < 18; x++) W[y][x] = $urandom_range(0, 255);
      copy = (t % 3 == 0) ? (t / 3) % 8 : -1;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          cur[i][j] = pix_t'((copy >= 0) ? cand_pix(copy, i, j) : $urandom_range(0, 255));
      for (int k = 0; k < 8; k++) begin
        exp_s[k] = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) exp_s[k] += iabs(int'(cur[i][j]) - cand_pix(k, i, j));
      end

      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 1; c < 18; c++) begin
        // IU output for the column pair (c-1, c)
        for (int r = 0; r < 18; r++) hpel[r] = pix_t'((W[r][c-1] + W[r][c] + 1) / 2);
        for (int r = 0; r < 17; r++) begin
          vpel[r] = pix_t'((W[r][c] + W[r+1][c] + 1) / 2);
          dpel[r] = pix_t'((W[r][c-1] + W[r+1][c-1] + W[r][c] + W[r+1][c] + 2) / 4);
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if (c == 17) check(done, "done one cycle after the last output");
        else         check(!done, "no early done");
        if (c < 17 && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      for (int k = 0; k < 8; k++)
        check(int'(sad[k]) == exp_s[k],
              $sformatf("trial %0d sad %0d = %0d expected %0d", t, k, sad[k], exp_s[k]));
      if (copy >= 0) check(sad[copy] == '0, "copied candidate has zero SAD");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
