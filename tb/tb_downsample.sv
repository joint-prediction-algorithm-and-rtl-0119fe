// Test of the down-sample unit: random 16x16 blocks, every 8x8 and 4x4
// output compared with rounded means computed here.
module tb_downsample;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  pix_t blk [16][16];
  pix_t ds2 [8][8];
  pix_t ds4 [4][4];
  downsample dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) blk[i][j] = (t == 0) ? 8'd255 : pix_t'($urandom_range(0, 255));
      #1;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          int s; s = blk[2*i][2*j] + blk[2*i][2*j+1] + blk[2*i+1][2*j] + blk[2*i+1][2*j+1];
          checks++; if (int'(ds2[i][j]) != (s + 2) / 4) failures++;
        end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int s; s = 0;
          for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) s += blk[4*i+a][4*j+b];
          checks++; if (int'(ds4[i][j]) != (s + 8) / 16) failures++;
        end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
