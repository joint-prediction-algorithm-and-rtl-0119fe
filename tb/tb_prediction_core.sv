// End-to-end test of the prediction core at its default sizes.
//
// A smooth synthetic reference frame (a random 21x13 grid, bilinearly
// enlarged by 8) is built in the testbench, and the current 16x16 block is
// cut from it at a known displacement. The testbench plays the host: it
// loads the level-2 search window (frame down-sampled by 4), runs the full
// level-2 search ([-16,+15] x [-8,+7]), loads the level-1 window given by
// the NOCRC union of the three best candidates, runs level 1, loads the
// level-0 window around the best level-1 vector and runs level 0 (+-2). It
// then copies the best block into RAM_MC and runs the joint block
// generator against a block of a second (left-view) frame.
//
// Every search is checked against a model computed here: the three SADs
// reported must be the three smallest SADs of the candidate set, each
// reported vector must have the SAD reported for it, and the search must
// take the bubble-free cycle count. The final vector must be the true
// displacement. The NOCRC output, the eight joint-block SADs and mode, and
// the first half-pel samples are checked too. A second, noisy frame is
// searched at level 2 so that the NOCRC also sees far-apart candidates.
// Mechanisms counted (each must occur): downward and leftward RSRN steps,
// searches at each level, a single-window NOCRC union, a NOCRC result with
// several windows, the RAM_MC copy, a JBG decision, half-pel output, the
// mode pre-decision, a global-disparity estimate and an MV prediction.
module tb_prediction_core;
  import pc_pkg::*;

  localparam int FW = 160, FH = 96;
  localparam int CX = 64,  CY = 36;           // current block position
  localparam int TDX = 13, TDY = -6;          // true displacement

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DUT signals
  logic        wr_en = 0;
  sel_e        wr_sel = SEL_L2;
  logic [6:0]  wr_addr = '0;
  pix_t        wr_data [28];
  logic        bmp_start = 0;
  level_e      bmp_level = LV2;
  logic [6:0]  bmp_nx = '0, bmp_ny = '0;
  mv_t         bmp_origin = '0;
  sel_e        bmp_src = SEL_L2;
  logic [6:0]  bmp_col_base = '0;
  logic        bmp_busy, bmp_done;
  sad_t        best_sad [3];
  mv_t         best_mv  [3];
  logic        best_ok  [3];
  logic        nocrc_valid;
  logic [2:0]  nocrc_pair_near;
  logic        nocrc_grp_valid [3];
  mv_t         nocrc_grp_pose  [3];
  logic [7:0]  nocrc_grp_ext_x [3];
  logic [7:0]  nocrc_grp_ext_y [3];
  logic [1:0]  nocrc_n_windows;
  logic        mc_start = 0;
  sel_e        mc_src = SEL_L012;
  logic [6:0]  mc_col_base = '0;
  logic [6:0]  mc_row0 = '0;
  logic        mc_done;
  logic        jbg_start = 0;
  sel_e        jbg_src = SEL_L011;
  logic [6:0]  jbg_col_base = '0;
  logic [6:0]  jbg_row0 = '0;
  logic        jbg_done;
  sad_t        jbg_sad [8];
  logic [2:0]  jbg_mode;
  sad_t        jbg_best_sad;
  logic        iu_valid;
  pix_t        iu_hpel [18];
  pix_t        iu_vpel [17];
  pix_t        iu_dpel [17];
  sad_t        ap_sad [4];
  mv_t         ap_mv  [4];
  logic        ap_ok  [4];
  logic        hp_start = 0;
  sel_e        hp_src = SEL_L012;
  logic [6:0]  hp_col_base = '0;
  logic [6:0]  hp_row0 = '0;
  logic        hp_done;
  sad_t        hp_sad [8];
  logic [2:0]  hp_best;
  sad_t        hp_best_sad;

  logic        mpd_clear = 0, mpd_row_valid = 0;
  logic [3:0]  mpd_row = '0;
  pix_t        mpd_prev_row [16];
  sad_t        th_skip_fdiff = 16'd600, th_skip_sad = 16'd1200, th_bg = 16'd600;
  sad_t        mpd_fdiff;
  logic        mpd_done, mpd_skip, mpd_background;
  logic        gd_clear = 0, gd_sample = 0, gd_find = 0, gd_busy, gd_done;
  logic signed [7:0] gd;
  logic [10:0] gd_count;
  logic        mvp_store = 0, mvp_rd = 0;
  logic [5:0]  mvp_bx = '0, mvp_pred_bx;
  logic [4:0]  mvp_by = '0;
  mv_t         mvp_pred_mv;

  prediction_core dut (.*);

  // ------------------------------------------------------------- model
  int F  [FH][FW];      // reference frame (right view, previous)
  int G  [FH][FW];      // left view
  int D2 [FH/2][FW/2];
  int D4 [FH/4][FW/4];
  int C  [16][16];
  int C2 [8][8];
  int C4 [4][4];

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic build_frames(bit noisy);
    int grid [13][21];
    for (int gy = 0; gy < 13; gy++)
      for (int gx = 0; gx < 21; gx++) grid[gy][gx] = $urandom_range(0, 255);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int gx, gy, fx, fy, v;
        gx = x / 8; gy = y / 8; fx = x % 8; fy = y % 8;
        v = (grid[gy][gx] * (8-fx) * (8-fy) + grid[gy][gx+1] * fx * (8-fy)
           + grid[gy+1][gx] * (8-fx) * fy + grid[gy+1][gx+1] * fx * fy) / 64;
        if (noisy) v = $urandom_range(0, 255);
        F[y][x] = v;
        G[y][x] = (v + ((x * 7 + y * 3) % 23)) % 256;
      end
    for (int y = 0; y < FH/2; y++)
      for (int x = 0; x < FW/2; x++)
        D2[y][x] = (F[2*y][2*x] + F[2*y][2*x+1] + F[2*y+1][2*x] + F[2*y+1][2*x+1] + 2) / 4;
    for (int y = 0; y < FH/4; y++)
      for (int x = 0; x < FW/4; x++) begin
        int s; s = 8;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += F[4*y+i][4*x+j];
        D4[y][x] = s / 16;
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) C[i][j] = F[CY + TDY + i][CX + TDX + j];
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        C2[i][j] = (C[2*i][2*j] + C[2*i][2*j+1] + C[2*i+1][2*j] + C[2*i+1][2*j+1] + 2) / 4;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int s; s = 8;
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) s += C[4*i+a][4*j+b];
        C4[i][j] = s / 16;
      end
  endtask

  // SAD of the candidate with vector (mx,my) at a level
  function automatic int model_sad(int lv, int mx, int my);
    int s; s = 0;
    case (lv)
      2: for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
           s += iabs(C4[i][j] - D4[CY/4 + my + i][CX/4 + mx + j]);
      1: for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
           s += iabs(C2[i][j] - D2[CY/2 + my + i][CX/2 + mx + j]);
      default: for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
           s += iabs(C[i][j] - F[CY + my + i][CX + mx + j]);
    endcase
    return s;
  endfunction

  function automatic int pix_at(int lv, int y, int x);
    case (lv)
      2: return D4[y][x];
      1: return D2[y][x];
      default: return F[y][x];
    endcase
  endfunction

  // ------------------------------------------------------------ host ops
  task automatic write_col(sel_e sel, int addr, int vals [28]);
    @(negedge clk);
    wr_en = 1; wr_sel = sel; wr_addr = 7'(addr);
    for (int i = 0; i < 28; i++) wr_data[i] = pix_t'(vals[i]);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic load_cur();
    int v [28];
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 28; j++) v[j] = (j < 16) ? C[i][j] : 0;
      write_col(SEL_CRS, i, v);
    end
  endtask

  // SW of a level: columns for nx+B-1 positions, rows for ny+B-1
  task automatic load_sw(sel_e sel, int base, int lv, int ox, int oy, int nx, int ny);
    int b, v [28];
    b = (lv == 2) ? 4 : (lv == 1) ? 8 : 16;
    for (int c = 0; c < nx + b - 1; c++) begin
      for (int r = 0; r < 28; r++) begin
        int bx, by;
        bx = (lv == 2) ? CX/4 : (lv == 1) ? CX/2 : CX;
        by = (lv == 2) ? CY/4 : (lv == 1) ? CY/2 : CY;
        v[r] = (r < ny + b - 1) ? pix_at(lv, by + oy + r, bx + ox + c) : 0;
      end
      write_col(sel, base + c, v);
    end
  endtask

  int n_down = 0, n_left = 0, n_lv [3] = '{0, 0, 0};
  int n_mpd = 0, n_gd = 0, n_mvp = 0;
  int n_ap = 0, n_hp = 0, n_union1 = 0, n_multi = 0, n_mc = 0, n_jbg = 0, n_iu = 0;
  always @(posedge clk) begin
    if (dut.rs_op == RS_DOWN) n_down++;
    if (dut.rs_op == RS_LEFT) n_left++;
    if (mc_done) n_mc++;
    if (iu_valid) n_iu++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_bmp(int lv, sel_e src, int base, int ox, int oy, int nx, int ny);
    int t0, t1, exp_cyc, sads [$], w;
    @(negedge clk);
    bmp_start = 1; bmp_level = level_e'(lv); bmp_nx = 7'(nx); bmp_ny = 7'(ny);
    bmp_origin.x = 8'(ox); bmp_origin.y = 8'(oy); bmp_src = src; bmp_col_base = 7'(base);
    t0 = cyc;
    @(negedge clk);
    bmp_start = 0;
    while (!bmp_done) @(negedge clk);
    t1 = cyc;
    n_lv[lv]++;
    // bubble-free cycle count
    w = (lv == 2) ? 4 : 8;
    if (lv == 0) exp_cyc = 8 + ny * 2 * (nx + 8) + 3;
    else         exp_cyc = w + ((ny + ((lv == 2) ? 7 : 1)) / ((lv == 2) ? 8 : 2)) * nx + 3;
    check(t1 - t0 == exp_cyc, $sformatf("level %0d cycles %0d expected %0d", lv, t1 - t0, exp_cyc));
    // three smallest SADs
    for (int y = 0; y < ny; y++)
      for (int x = 0; x < nx; x++) sads.push_back(model_sad(lv, ox + x, oy + y));
    sads.sort();
    for (int i = 0; i < 3; i++) begin
      check(best_ok[i], $sformatf("level %0d best %0d valid", lv, i));
      check(int'(best_sad[i]) == sads[i],
            $sformatf("level %0d best %0d sad %0d expected %0d", lv, i, best_sad[i], sads[i]));
      check(int'(best_mv[i].x) >= ox && int'(best_mv[i].x) < ox + nx &&
            int'(best_mv[i].y) >= oy && int'(best_mv[i].y) < oy + ny,
            $sformatf("level %0d best %0d vector in range", lv, i));
      check(model_sad(lv, best_mv[i].x, best_mv[i].y) == int'(best_sad[i]),
            $sformatf("level %0d best %0d (%0d,%0d) has its sad", lv, i, best_mv[i].x, best_mv[i].y));
    end
  endtask

  task automatic check_nocrc();
    int xmin, xmax, ymin, ymax;
    bit nr [3];
    @(negedge clk);
    check(nocrc_valid, "nocrc valid after the search");
    nr[0] = iabs(best_mv[0].x - best_mv[1].x) < 4 && iabs(best_mv[0].y - best_mv[1].y) < 2;
    nr[1] = iabs(best_mv[0].x - best_mv[2].x) < 4 && iabs(best_mv[0].y - best_mv[2].y) < 2;
    nr[2] = iabs(best_mv[1].x - best_mv[2].x) < 4 && iabs(best_mv[1].y - best_mv[2].y) < 2;
    check(nocrc_pair_near == {nr[2], nr[1], nr[0]}, "nocrc pair flags");
    if (nr[0] && nr[1] && nr[2]) begin
      n_union1++;
      xmin = best_mv[0].x; xmax = xmin; ymin = best_mv[0].y; ymax = ymin;
      for (int i = 1; i < 3; i++) begin
        if (best_mv[i].x < xmin) xmin = best_mv[i].x;
        if (best_mv[i].x > xmax) xmax = best_mv[i].x;
        if (best_mv[i].y < ymin) ymin = best_mv[i].y;
        if (best_mv[i].y > ymax) ymax = best_mv[i].y;
      end
      check(nocrc_n_windows == 1, "one union window");
      check(int'(nocrc_grp_pose[0].x) == xmin && int'(nocrc_grp_pose[0].y) == ymin, "union pose");
      check(int'(nocrc_grp_ext_x[0]) == xmax - xmin && int'(nocrc_grp_ext_y[0]) == ymax - ymin, "union extent");
    end else begin
      n_multi++;
      check(nocrc_n_windows == ((nr[0] || nr[1] || nr[2]) ? 2 : 3), "window count");
    end
  endtask

  // joint pel model: DC weight n/8, MC weight (8-n)/8, per-term truncation
  function automatic int wpart(int p, int w);
    int s; s = 0;
    if (w >= 8) return p;
    if (w & 4) s += p >> 1;
    if (w & 2) s += p >> 2;
    if (w & 1) s += p >> 3;
    return s;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o1x, o1y, n1x, n1y, b1x, b1y, o0x, o0y, bx, by;
    for (int i = 0; i < 28; i++) wr_data[i] = '0;
    for (int i = 0; i < 16; i++) mpd_prev_row[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- scenario 1: smooth frame, full hierarchy
    build_frames(1'b0);
    load_cur();
    load_sw(SEL_L2, 0, 2, -16, -8, 32, 16);
    run_bmp(2, SEL_L2, 0, -16, -8, 32, 16);
    check_nocrc();

    // level 1 over the union (or the best candidate's own) window
    o1x = 2 * int'(nocrc_grp_pose[0].x) - 2;
    o1y = 2 * int'(nocrc_grp_pose[0].y) - 2;
    n1x = 2 * int'(nocrc_grp_ext_x[0]) + 5;
    n1y = 2 * int'(nocrc_grp_ext_y[0]) + 5;
    load_sw(SEL_L011, 0, 1, o1x, o1y, n1x, n1y);
    run_bmp(1, SEL_L011, 0, o1x, o1y, n1x, n1y);
    b1x = best_mv[0].x; b1y = best_mv[0].y;
    check_nocrc();

    // level 0 around the best level-1 vector
    o0x = 2 * b1x - 2; o0y = 2 * b1y - 2;
    load_sw(SEL_L012, 0, 0, o0x, o0y, 5, 5);
    run_bmp(0, SEL_L012, 0, o0x, o0y, 5, 5);
    check(int'(best_mv[0].x) == TDX && int'(best_mv[0].y) == TDY,
          $sformatf("final vector (%0d,%0d) expected (%0d,%0d)", best_mv[0].x, best_mv[0].y, TDX, TDY));
    bx = best_mv[0].x; by = best_mv[0].y;

    // ---------------- AP mode: best vector of each 8x8 quarter
    for (int q = 0; q < 4; q++) begin
      int qy, qx, ms;
      qy = (q / 2) * 8; qx = (q % 2) * 8;
      ms = 1 << 30;
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++) begin
          int e; e = 0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              e += iabs(C[qy + i][qx + j] - F[CY + o0y + y + qy + i][CX + o0x + x + qx + j]);
          if (e < ms) ms = e;
        end
      check(ap_ok[q] && int'(ap_sad[q]) == ms, $sformatf("AP quarter %0d sad %0d expected %0d", q, ap_sad[q], ms));
      begin
        int e; e = 0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            e += iabs(C[qy + i][qx + j] - F[CY + int'(ap_mv[q].y) + qy + i][CX + int'(ap_mv[q].x) + qx + j]);
        check(e == ms, $sformatf("AP quarter %0d vector (%0d,%0d) has its sad", q, ap_mv[q].x, ap_mv[q].y));
      end
      n_ap++;
    end

    // ---------------- half-pel refinement around the integer vector
    begin
      int exp_s [8], ms, t0;
      int hx [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
      int hy [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
      ms = 1 << 30;
      for (int k = 0; k < 8; k++) begin
        exp_s[k] = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int y2, x2, y0, x0, p;
            y2 = 2 * (CY + by + i) + hy[k]; x2 = 2 * (CX + bx + j) + hx[k];
            y0 = y2 >>> 1; x0 = x2 >>> 1;
            if (y2 % 2 == 0 && x2 % 2 == 0) p = F[y0][x0];
            else if (y2 % 2 == 0) p = (F[y0][x0] + F[y0][x0+1] + 1) / 2;
            else if (x2 % 2 == 0) p = (F[y0][x0] + F[y0+1][x0] + 1) / 2;
            else p = (F[y0][x0] + F[y0][x0+1] + F[y0+1][x0] + F[y0+1][x0+1] + 2) / 4;
            exp_s[k] += iabs(C[i][j] - p);
          end
        if (exp_s[k] < ms) ms = exp_s[k];
      end
      @(negedge clk);
      hp_start = 1; hp_src = SEL_L012; hp_col_base = 7'(bx - 1 - o0x); hp_row0 = 7'(by - 1 - o0y);
      t0 = cyc;
      @(negedge clk);
      hp_start = 0;
      while (!hp_done) @(negedge clk);
      check(cyc - t0 == 21, $sformatf("half-pel latency %0d", cyc - t0));
      n_hp++;
      for (int k = 0; k < 8; k++)
        check(int'(hp_sad[k]) == exp_s[k], $sformatf("half-pel sad %0d = %0d expected %0d", k, hp_sad[k], exp_s[k]));
      @(negedge clk);
      check(int'(hp_best_sad) == ms && int'(hp_sad[hp_best]) == ms, "half-pel best");
      check(int'(best_mv[0].x) == bx && int'(best_mv[0].y) == by, "search result kept over the half-pel step");
    end

    // ---------------- mode pre-decision against the co-located block
    begin
      int e;
      e = 0;
      @(negedge clk);
      mpd_clear = 1;
      @(negedge clk);
      mpd_clear = 0;
      for (int r = 0; r < 16; r++) begin
        mpd_row_valid = 1; mpd_row = 4'(r);
        for (int j = 0; j < 16; j++) begin
          mpd_prev_row[j] = pix_t'(F[CY + r][CX + j]);
          e += iabs(C[r][j] - F[CY + r][CX + j]);
        end
        @(negedge clk);
      end
      mpd_row_valid = 0;
      check(int'(mpd_fdiff) == e, $sformatf("F_diff %0d expected %0d", mpd_fdiff, e));
      check(mpd_skip == (e < 600 && int'(best_sad[0]) < 1200), "skip decision");
      check(mpd_background == (e < 600), "background decision (vector is not zero)");
      n_mpd++;
      // force background so that the GD histogram counts this block
      th_bg = 16'hFFFF;
      @(negedge clk);
      gd_clear = 1; @(negedge clk); gd_clear = 0;
      repeat (3) begin gd_sample = 1; @(negedge clk); gd_sample = 0; @(negedge clk); end
      gd_find = 1; @(negedge clk); gd_find = 0;
      while (!gd_done) @(negedge clk);
      check(int'(gd) == bx && gd_count == 3, $sformatf("GD %0d count %0d", gd, gd_count));
      n_gd++;
      // store the vector as a left MV of block (3,2); block 3 - round(gd/16)
      // of the right view must be predicted from it
      mvp_store = 1; mvp_bx = 6'd3; mvp_by = 5'd2; @(negedge clk); mvp_store = 0;
      mvp_rd = 1; mvp_bx = 6'(3 - (bx + 8) / 16); @(negedge clk); mvp_rd = 0;
      check(mvp_pred_bx == 6'd3 && int'(mvp_pred_mv.x) == bx && int'(mvp_pred_mv.y) == by, "MV predictor");
      n_mvp++;
      th_bg = 16'd600;
    end

    // ---------------- copy the best ME block into RAM_MC
    @(negedge clk);
    mc_start = 1; mc_src = SEL_L012; mc_col_base = 7'(bx - o0x); mc_row0 = 7'(by - o0y);
    @(negedge clk);
    mc_start = 0;
    repeat (20) @(negedge clk);
    for (int c = 0; c < 16; c++)
      for (int r = 0; r < 16; r++)
        check(int'(dut.u_ram_mc.mem[c][r*8 +: 8]) == F[CY + by + r][CX + bx + c], "RAM_MC pixel");

    // ---------------- joint block mode decision against a left-view block
    begin
      int v [28], exp_s [8], bm, bs;
      for (int c = 0; c < 20; c++) begin
        for (int r = 0; r < 28; r++) v[r] = (r < 20) ? G[CY - 2 + r][CX + 5 + c] : 0;
        write_col(SEL_L011, c, v);
      end
      for (int n = 0; n < 8; n++) begin
        exp_s[n] = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int dc, mc, jp;
            dc = G[CY - 2 + 3 + i][CX + 5 + 1 + j];
            mc = F[CY + by + i][CX + bx + j];
            jp = wpart(dc, n) + wpart(mc, 8 - n);
            exp_s[n] += iabs(C[i][j] - jp);
          end
      end
      bm = 0; bs = exp_s[0];
      for (int n = 1; n < 8; n++) if (exp_s[n] < bs) begin bs = exp_s[n]; bm = n; end
      @(negedge clk);
      jbg_start = 1; jbg_src = SEL_L011; jbg_col_base = 7'd1; jbg_row0 = 7'd3;
      @(negedge clk);
      jbg_start = 0;
      begin
        int t0; t0 = cyc;
        while (!jbg_done) @(negedge clk);
        check(cyc - t0 == 17, $sformatf("JBG latency %0d", cyc - t0));
      end
      n_jbg++;
      for (int n = 0; n < 8; n++)
        check(int'(jbg_sad[n]) == exp_s[n], $sformatf("JBG sad %0d = %0d expected %0d", n, jbg_sad[n], exp_s[n]));
      @(negedge clk);
      check(int'(jbg_mode) == bm && int'(jbg_best_sad) == bs, "JBG best mode");
    end

    // ---------------- half-pel samples of a level-0 search
    begin
      int first [17], second [17];
      for (int r = 0; r < 17; r++) begin
        first[r]  = F[CY + o0y + r][CX + o0x];
        second[r] = F[CY + o0y + r][CX + o0x + 1];
      end
      @(negedge clk);
      bmp_start = 1; bmp_level = LV0; bmp_src = SEL_L012; bmp_nx = 7'd5; bmp_ny = 7'd5;
      bmp_origin.x = 8'(o0x); bmp_origin.y = 8'(o0y); bmp_col_base = '0;
      @(negedge clk);
      bmp_start = 0;
      while (!iu_valid) @(negedge clk);
      for (int r = 0; r < 17; r++)
        check(int'(iu_hpel[r]) == (first[r] + second[r] + 1) / 2, "half-pel sample");
      while (!bmp_done) @(negedge clk);
    end

    // ---------------- scenario 2: noisy frame, level 2 only
    build_frames(1'b1);
    load_cur();
    load_sw(SEL_L2, 35, 2, -16, -8, 32, 16);
    run_bmp(2, SEL_L2, 35, -16, -8, 32, 16);
    check_nocrc();

    // ---------------- every mechanism must have happened
    check(n_down > 0,   "RSRN downward step seen");
    check(n_left > 0,   "RSRN leftward sweep seen");
    check(n_lv[2] > 0 && n_lv[1] > 0 && n_lv[0] > 0, "searches at all levels");
    check(n_union1 > 0, "NOCRC single union window seen");
    check(n_multi > 0,  "NOCRC several windows seen");
    check(n_mc > 0,     "RAM_MC copy seen");
    check(n_jbg > 0,    "JBG decision seen");
    check(n_iu > 0,     "half-pel output seen");
    check(n_hp > 0,     "half-pel refinement seen");
    check(n_ap > 0,     "AP quarter vectors seen");
    check(n_mpd > 0 && n_gd > 0 && n_mvp > 0, "pre-decision, GD and predictor seen");
    $display("mechanisms: down=%0d left=%0d lv2=%0d lv1=%0d lv0=%0d union1=%0d multi=%0d mc=%0d jbg=%0d iu=%0d hp=%0d",
             n_down, n_left, n_lv[2], n_lv[1], n_lv[0], n_union1, n_multi, n_mc, n_jbg, n_iu, n_hp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
