// Test of the current register set: a block written row by row is read
// back, with its down-sampled versions checked against means formed here.
module tb_crs;
  import pc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = '0;
  pix_t wr_data [16];
  pix_t blk [16][16];
  pix_t ds2 [8][8];
  pix_t ds4 [4][4];
  int m [16][16];
  crs dut (.*);

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 4'(i);
      for (int j = 0; j < 16; j++) begin m[i][j] = $urandom_range(0, 255); wr_data[j] = pix_t'(m[i][j]); end
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin checks++; if (int'(blk[i][j]) != m[i][j]) failures++; end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (int'(ds2[i][j]) != (m[2*i][2*j] + m[2*i][2*j+1] + m[2*i+1][2*j] + m[2*i+1][2*j+1] + 2) / 4) failures++;
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int s; s = 8;
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) s += m[4*i+a][4*j+b];
        checks++; if (int'(ds4[i][j]) != s / 16) failures++;
      end
    // a write with wr_en low changes nothing
    @(negedge clk);
    wr_row = 4'd3; for (int j = 0; j < 16; j++) wr_data[j] = ~pix_t'(m[3][j]);
    @(negedge clk);
    checks++; if (int'(blk[3][5]) != m[3][5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
