// Test of the RSRN: a random search window S is streamed in column by
// column as the controller would do it (fill, rightward, downward,
// leftward), for each level, and after every step all 128 outputs are
// compared with the pixels of S that the window position should show.
module tb_rsrn;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  level_e level = LV1;
  rs_op_e op = RS_HOLD;
  pix_t col_in [24];
  pix_t ref_px [128];
  int S [48][48];
  rsrn dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(rs_op_e o, int col, int y0);
    @(negedge clk);
    op = o;
    for (int r = 0; r < 24; r++) col_in[r] = pix_t'(S[y0 + r][col]);
    @(negedge clk);
    op = RS_HOLD;
  endtask

  task automatic expect_win(int p, int y);
    case (level)
      LV2: for (int k = 0; k < 8; k++) for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
             checks++; if (int'(ref_px[16*k+4*i+j]) != S[y+k+i][p+j]) failures++; end
      LV1: for (int k = 0; k < 2; k++) for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
             checks++; if (int'(ref_px[64*k+8*i+j]) != S[y+k+i][p+j]) failures++; end
      default: for (int i = 0; i < 16; i++) for (int j = 0; j < 8; j++) begin
             checks++; if (int'(ref_px[8*i+j]) != S[y+i][p+j]) failures++; end
    endcase
  endtask

  // fill, sweep right over np positions, step down, sweep left back to 0
  task automatic snake(level_e lv, int w, int v, int np);
    int p;
    level = lv;
    for (int c = 0; c < w; c++) step(RS_RIGHT, c, 0);
    expect_win(0, 0);
    for (p = 1; p < np; p++) begin step(RS_RIGHT, p + w - 1, 0); expect_win(p, 0); end
    p = np - 1;
    step(RS_DOWN, 0, 0);
    expect_win(p, v);
    for (p = np - 2; p >= 0; p--) begin step(RS_LEFT, p, v); expect_win(p, v); end
    step(RS_DOWN, 0, 0);
    expect_win(0, 2 * v);
    for (p = 1; p < np; p++) begin step(RS_RIGHT, p + w - 1, 2 * v); expect_win(p, 2 * v); end
  endtask

  initial begin
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) S[y][x] = $urandom_range(0, 255);
    for (int r = 0; r < 24; r++) col_in[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    snake(LV1, 8, 2, 13);
    snake(LV2, 4, 8, 9);
    snake(LV0, 8, 1, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
