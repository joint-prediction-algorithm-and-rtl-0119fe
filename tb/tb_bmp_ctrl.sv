// Test of the block-matching controller. For several levels and window
// sizes it checks that every candidate position is reported exactly once
// (levels 2 and 1) or exactly once per half (level 0), that the SW column
// addresses stay inside the window, that candidates come out in every
// cycle between the first and the last (no bubbles; level 0 every cycle
// gives a half), and that done comes after the published-style cycle count
// (W - 1) + sweeps * NP + 4 or 7 + ny * 2 * (nx + 8) + 4 cycles.
module tb_bmp_ctrl;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  level_e start_level = LV2;
  logic [6:0] nx = '0, ny = '0;
  mv_t origin = '0;
  logic [6:0] col_base = '0;
  level_e level;
  logic busy, done, ram_rd, cur_half, l0_row_start, l0_half;
  logic [6:0] ram_addr, row0, l0_x;
  rs_op_e rs_op;
  logic cand_valid [8];
  mv_t  cand_mv [8];
  bmp_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(level_e lv, int nxv, int nyv, int ox, int oy, int base);
    int hits [64][64];
    int t, first, last, gaps, bad_addr, b, w, vs, nsw, exp_cyc;
    b  = (lv == LV2) ? 4 : (lv == LV1) ? 8 : 16;
    w  = (lv == LV2) ? 4 : 8;
    vs = (lv == LV2) ? 8 : (lv == LV1) ? 2 : 1;
    nsw = (nyv + vs - 1) / vs;
    exp_cyc = (lv == LV0) ? 7 + nyv * 2 * (nxv + 8) + 4 : (w - 1) + nsw * nxv + 4;
    for (int i = 0; i < 64; i++) for (int j = 0; j < 64; j++) hits[i][j] = 0;
    @(negedge clk);
    start = 1; start_level = lv; nx = 7'(nxv); ny = 7'(nyv);
    origin.x = 8'(ox); origin.y = 8'(oy); col_base = 7'(base);
    @(negedge clk);
    start = 0;
    t = 1; first = -1; last = -1; gaps = 0; bad_addr = 0;
    while (!done) begin
      bit any;
      any = 0;
      if (ram_rd && (int'(ram_addr) < base || int'(ram_addr) >= base + nxv + b - 1)) bad_addr++;
      for (int k = 0; k < 8; k++)
        if (cand_valid[k]) begin
          any = 1;
          hits[int'(cand_mv[k].y) - oy][int'(cand_mv[k].x) - ox]++;
        end
      // at level 0 a half that belongs to no candidate is still a busy cycle
      if (lv == LV0 && dut.ev_d3.ev) any = 1;
      if (any) begin
        if (first < 0) first = t;
        else if (t != last + 1) gaps++;
        last = t;
      end
      @(negedge clk);
      t++;
    end
    checks++; if (t != exp_cyc) begin failures++; $display("cycles %0d expected %0d", t, exp_cyc); end
    checks++; if (gaps != 0) begin failures++; $display("bubbles %0d", gaps); end
    checks++; if (bad_addr != 0) failures++;
    for (int y = 0; y < nyv; y++)
      for (int x = 0; x < nxv; x++) begin
        checks++;
        if (hits[y][x] != ((lv == LV0) ? 2 : 1)) begin
          failures++; $display("lv%0d cand (%0d,%0d) hits %0d", lv, x, y, hits[y][x]);
        end
      end
    @(negedge clk);
    checks++; if (busy) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(LV2, 32, 16, -16, -8, 0);
    run(LV2, 32, 8, -16, -4, 35);
    run(LV1, 13, 13, -6, -6, 0);
    run(LV1, 5, 5, -2, -2, 3);
    run(LV0, 5, 5, -2, -2, 0);
    run(LV0, 9, 4, -4, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
