// Test of the current MUX network: for each level the 128 outputs are
// compared with the element layout the RSRN uses.
module tb_cmn;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  level_e level = LV2;
  logic half = 0;
  pix_t blk [16][16];
  pix_t ds2 [8][8];
  pix_t ds4 [4][4];
  pix_t cur [128];
  cmn dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) blk[i][j] = pix_t'($urandom_range(0, 255));
    for (int i = 0; i < 8; i++)  for (int j = 0; j < 8; j++)  ds2[i][j] = pix_t'($urandom_range(0, 255));
    for (int i = 0; i < 4; i++)  for (int j = 0; j < 4; j++)  ds4[i][j] = pix_t'($urandom_range(0, 255));
    level = LV2; #1;
    for (int k = 0; k < 128; k++) begin checks++; if (cur[k] != ds4[(k % 16) / 4][k % 4]) failures++; end
    level = LV1; #1;
    for (int k = 0; k < 128; k++) begin checks++; if (cur[k] != ds2[(k % 64) / 8][k % 8]) failures++; end
    level = LV0; half = 0; #1;
    for (int k = 0; k < 128; k++) begin checks++; if (cur[k] != blk[k / 8][k % 8]) failures++; end
    half = 1; #1;
    for (int k = 0; k < 128; k++) begin checks++; if (cur[k] != blk[k / 8][8 + k % 8]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
