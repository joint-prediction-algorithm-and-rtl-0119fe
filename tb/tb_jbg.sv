// Test of the joint block generator: a random current, MC and DC block are
// streamed in as 16 columns; done must come one cycle after the last
// column with the eight joint-block SADs equal to the ones computed here.
module tb_jbg;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, col_valid = 0, done;
  pix_t cur_col [16], mc_col [16], dc_col [16];
  sad_t sad [8];
  int C [16][16], M [16][16], D [16][16];
  jbg dut (.*);

  function automatic int wpart(int p, int w);
    int s; s = 0;
    if (w >= 8) return p;
    if (w & 4) s += p >> 1;
    if (w & 2) s += p >> 2;
    if (w & 1) s += p >> 3;
    return s;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin cur_col[i] = '0; mc_col[i] = '0; dc_col[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int e [8];
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
        C[i][j] = $urandom_range(0, 255); M[i][j] = $urandom_range(0, 255);
        D[i][j] = (run == 1) ? M[i][j] : $urandom_range(0, 255);
      end
      for (int n = 0; n < 8; n++) begin
        e[n] = 0;
        for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
          int d; d = C[i][j] - (wpart(D[i][j], n) + wpart(M[i][j], 8 - n));
          e[n] += (d < 0) ? -d : d;
        end
      end
      start = 1; @(negedge clk); start = 0;
      for (int c = 0; c < 16; c++) begin
        col_valid = 1;
        for (int i = 0; i < 16; i++) begin
          cur_col[i] = pix_t'(C[i][c]); mc_col[i] = pix_t'(M[i][c]); dc_col[i] = pix_t'(D[i][c]);
        end
        @(negedge clk);
        checks++; if (done) failures++;   // not before the last column
      end
      col_valid = 0;
      checks--;                           // the last check above is the done cycle
      if (done) failures--;
      checks++; if (!done) failures++;
      for (int n = 0; n < 8; n++) begin checks++; if (int'(sad[n]) != e[n]) failures++; end
      @(negedge clk);
      checks++; if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
