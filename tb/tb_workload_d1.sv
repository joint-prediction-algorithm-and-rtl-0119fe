// Workload test: the per-macroblock schedule of stereo coding, for D1 and
// for 320x240 frames.
//
// At 720x480 and 30 frames/s in both views the core must finish the work of
// one macroblock position, which is left-view ME, right-view ME, right-view
// DE, the copy of the best ME block into RAM_MC and the joint-block
// decision, within 100 MHz / (1350 * 30) = 2469 cycles. This testbench
// plays the host through that whole schedule on one macroblock, with the
// published search ranges:
//   ME  [-64,+63] x [-32,+31]  (level 2: 32 x 16 positions)
//   DE  [-64,+63] x [-16,+15]  (level 2: 32 x 8 positions)
// The same schedule is then run with the ranges used for 320x240 frames,
// ME [-32,+31] x [-16,+15] and DE [-32,+31] x [-8,+7], against a budget of
// 100 MHz / (300 * 30) = 11111 cycles (30 frames/s assumed).
// the three-candidate refinement of +-2 at levels 1 and 0, and a half-pel
// refinement of each search's winner. It takes the worst case for loading:
// every refinement window is loaded on its own (no NOCRC merge), and every
// search-window column and current-block row costs one port cycle. The
// best ME and DE blocks, and each winner's half-pel window, are reloaded
// into a free refinement RAM before they are used.
//
// Checks: every search against the model (three smallest SADs, cycle
// count), the half-pel SADs, the final ME vectors against the true
// displacement, the SAD of the DE result against the model, the
// joint-block SADs and mode, and the sum of search, copy, decision,
// half-pel and load cycles against the frame-rate budget. The DE
// reference is a second frame, the ME frame with a fixed texture added,
// so that the joint blocks differ from both of their sources.
module tb_workload_d1;
  import pc_pkg::*;

  localparam int FW = 160, FH = 96;
  localparam int CX = 64,  CY = 36;           // current block position
  localparam int TDX = 13, TDY = -6;          // true displacement

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int bmp_cycles = 0, load_cycles = 0, other_cycles = 0;
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
  int G2 [FH/2][FW/2];
  int G4 [FH/4][FW/4];
  bit use_g = 1'b0;     // search the left view (DE) instead of F (ME)
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
    for (int y = 0; y < FH/2; y++)
      for (int x = 0; x < FW/2; x++)
        G2[y][x] = (G[2*y][2*x] + G[2*y][2*x+1] + G[2*y+1][2*x] + G[2*y+1][2*x+1] + 2) / 4;
    for (int y = 0; y < FH/4; y++)
      for (int x = 0; x < FW/4; x++) begin
        int s; s = 8;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += G[4*y+i][4*x+j];
        G4[y][x] = s / 16;
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

  function automatic int pix_at(int lv, int y, int x);
    case (lv)
      2: return use_g ? G4[y][x] : D4[y][x];
      1: return use_g ? G2[y][x] : D2[y][x];
      default: return use_g ? G[y][x] : F[y][x];
    endcase
  endfunction

  // SAD of the candidate with vector (mx,my) at a level
  function automatic int model_sad(int lv, int mx, int my);
    int s; s = 0;
    case (lv)
      2: for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
           s += iabs(C4[i][j] - pix_at(2, CY/4 + my + i, CX/4 + mx + j));
      1: for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
           s += iabs(C2[i][j] - pix_at(1, CY/2 + my + i, CX/2 + mx + j));
      default: for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
           s += iabs(C[i][j] - pix_at(0, CY + my + i, CX + mx + j));
    endcase
    return s;
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
      load_cycles++;
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
      load_cycles++;
    end
  endtask

  int n_down = 0, n_left = 0, n_lv [3] = '{0, 0, 0};
  int n_mpd = 0, n_gd = 0, n_mvp = 0;
  int n_union1 = 0, n_multi = 0, n_mc = 0, n_jbg = 0, n_iu = 0;
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
    bmp_cycles += t1 - t0;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one three-level search: level 2 over the window, level 1 around each
  // of the three level-2 winners, level 0 around the best of each level-1
  // search; returns the best level-0 vector and SAD
  task automatic search(int nx2, int ny2, output int fx, output int fy, output int fs);
    int v2x [3], v2y [3], v1x [3], v1y [3], oy2, ox2;
    oy2 = -ny2 / 2; ox2 = -nx2 / 2;
    load_sw(SEL_L2, 0, 2, ox2, oy2, nx2, ny2);
    run_bmp(2, SEL_L2, 0, ox2, oy2, nx2, ny2);
    check_nocrc();
    for (int k = 0; k < 3; k++) begin v2x[k] = best_mv[k].x; v2y[k] = best_mv[k].y; end
    for (int k = 0; k < 3; k++) begin
      sel_e ram;
      ram = (k % 2 == 0) ? SEL_L011 : SEL_L012;
      load_sw(ram, 0, 1, 2 * v2x[k] - 2, 2 * v2y[k] - 2, 5, 5);
      run_bmp(1, ram, 0, 2 * v2x[k] - 2, 2 * v2y[k] - 2, 5, 5);
      v1x[k] = best_mv[0].x; v1y[k] = best_mv[0].y;
    end
    fs = 1 << 30; fx = 0; fy = 0;
    for (int k = 0; k < 3; k++) begin
      sel_e ram;
      ram = (k % 2 == 0) ? SEL_L012 : SEL_L011;
      load_sw(ram, 0, 0, 2 * v1x[k] - 2, 2 * v1y[k] - 2, 5, 5);
      run_bmp(0, ram, 0, 2 * v1x[k] - 2, 2 * v1y[k] - 2, 5, 5);
      if (int'(best_sad[0]) < fs) begin
        fs = int'(best_sad[0]); fx = best_mv[0].x; fy = best_mv[0].y;
      end
    end
    half_pel(fx, fy);
  endtask

  // sample of the searched frame at half-pel coordinates
  function automatic int hsamp(int y2, int x2);
    int y0, x0;
    y0 = y2 >>> 1; x0 = x2 >>> 1;
    if (y2 % 2 == 0 && x2 % 2 == 0) return pix_at(0, y0, x0);
    if (y2 % 2 == 0) return (pix_at(0, y0, x0) + pix_at(0, y0, x0 + 1) + 1) / 2;
    if (x2 % 2 == 0) return (pix_at(0, y0, x0) + pix_at(0, y0 + 1, x0) + 1) / 2;
    return (pix_at(0, y0, x0) + pix_at(0, y0, x0 + 1) + pix_at(0, y0 + 1, x0)
            + pix_at(0, y0 + 1, x0 + 1) + 2) / 4;
  endfunction

  // half-pel refinement of the winner: its 18x18 window is reloaded into a
  // free refinement RAM and matched; the SADs are checked against the model
  task automatic half_pel(int fx, int fy);
    int v [28], hx [8], hy [8], t0;
    hx = '{-1, 0, 1, -1, 1, -1, 0, 1};
    hy = '{-1, -1, -1, 0, 0, 1, 1, 1};
    for (int c = 0; c < 18; c++) begin
      for (int r = 0; r < 28; r++) v[r] = (r < 18) ? pix_at(0, CY + fy - 1 + r, CX + fx - 1 + c) : 0;
      write_col(SEL_L011, c, v);
      load_cycles++;
    end
    @(negedge clk);
    hp_start = 1; hp_src = SEL_L011; hp_col_base = '0; hp_row0 = '0;
    t0 = cyc;
    @(negedge clk);
    hp_start = 0;
    while (!hp_done) @(negedge clk);
    other_cycles += cyc - t0;
    for (int k = 0; k < 8; k++) begin
      int e; e = 0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          e += iabs(C[i][j] - hsamp(2 * (CY + fy + i) + hy[k], 2 * (CX + fx + j) + hx[k]));
      check(int'(hp_sad[k]) == e, $sformatf("half-pel sad %0d = %0d expected %0d", k, hp_sad[k], e));
    end
  endtask

  // put the 16x16 block of vector (mx,my) at column 0, row 0 of a RAM
  task automatic load_block(sel_e sel, int mx, int my);
    int v [28];
    for (int c = 0; c < 16; c++) begin
      for (int r = 0; r < 28; r++) v[r] = (r < 16) ? pix_at(0, CY + my + r, CX + mx + c) : 0;
      write_col(sel, c, v);
      load_cycles++;
    end
  endtask

  // the whole schedule of one macroblock position: level-2 window of nx2
  // positions by ny_me (ME) or ny_de (DE) rows of positions
  task automatic schedule(string name, int nx2, int ny_me, int ny_de, int mb_per_s);
    int lx, ly, ls, rx, ry, rs, dx, dy, ds, total, t0, budget, lv_before [3];
    bmp_cycles = 0; load_cycles = 0; other_cycles = 0;
    for (int l = 0; l < 3; l++) lv_before[l] = n_lv[l];
    budget = 100_000_000 / mb_per_s;
    use_g = 1'b0;

    // left-view ME (the same synthetic content stands for the left view)
    load_cur();
    search(nx2, ny_me, lx, ly, ls);
    check(lx == TDX && ly == TDY, $sformatf("%s left ME (%0d,%0d)", name, lx, ly));

    // right-view ME
    load_cur();
    search(nx2, ny_me, rx, ry, rs);
    check(rx == TDX && ry == TDY, $sformatf("%s right ME (%0d,%0d)", name, rx, ry));
    load_block(SEL_L012, rx, ry);
    @(negedge clk);
    mc_start = 1; mc_src = SEL_L012; mc_col_base = '0; mc_row0 = '0;
    t0 = cyc;
    @(negedge clk);
    mc_start = 0;
    while (!mc_done) @(negedge clk);
    other_cycles += cyc - t0;

    // right-view DE over the left view; the winner's SAD is checked here,
    // every search step inside it by run_bmp
    use_g = 1'b1;
    search(nx2, ny_de, dx, dy, ds);
    check(model_sad(0, dx, dy) == ds, $sformatf("%s DE (%0d,%0d) sad %0d", name, dx, dy, ds));

    // joint-block decision: DC block reloaded into a free RAM
    load_block(SEL_L011, dx, dy);
    begin
      int exp_s [8], bm, bs;
      for (int n = 0; n < 8; n++) begin
        exp_s[n] = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int dc, mc, jp;
            dc = G[CY + dy + i][CX + dx + j];
            mc = F[CY + ry + i][CX + rx + j];
            jp = wpart(dc, n) + wpart(mc, 8 - n);
            exp_s[n] += iabs(C[i][j] - jp);
          end
      end
      bm = 0; bs = exp_s[0];
      for (int n = 1; n < 8; n++) if (exp_s[n] < bs) begin bs = exp_s[n]; bm = n; end
      @(negedge clk);
      jbg_start = 1; jbg_src = SEL_L011; jbg_col_base = '0; jbg_row0 = '0;
      t0 = cyc;
      @(negedge clk);
      jbg_start = 0;
      while (!jbg_done) @(negedge clk);
      other_cycles += cyc - t0;
      n_jbg++;
      for (int n = 0; n < 8; n++)
        check(int'(jbg_sad[n]) == exp_s[n], $sformatf("%s JBG sad %0d = %0d expected %0d", name, n, jbg_sad[n], exp_s[n]));
      @(negedge clk);
      check(int'(jbg_mode) == bm && int'(jbg_best_sad) == bs, "JBG best mode");
    end

    total = bmp_cycles + other_cycles + load_cycles;
    $display("%s per macroblock: search %0d + copy/JBG/half-pel %0d + load %0d = %0d cycles, budget %0d",
             name, bmp_cycles, other_cycles, load_cycles, total, budget);
    check(n_lv[2] - lv_before[2] == 3 && n_lv[1] - lv_before[1] == 9 && n_lv[0] - lv_before[0] == 9,
          "search count of 2 ME + 1 DE");
    check(total <= budget, $sformatf("%s budget: %0d cycles of %0d", name, total, budget));
  endtask

  initial begin
    for (int i = 0; i < 28; i++) wr_data[i] = '0;
    for (int i = 0; i < 16; i++) mpd_prev_row[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_frames(1'b0);
    // D1: ME [-64,+63] x [-32,+31], DE [-64,+63] x [-16,+15], 1350 MBs at 30 fps
    schedule("D1", 32, 16, 8, 1350 * 30);
    // 320x240: ME [-32,+31] x [-16,+15], DE [-32,+31] x [-8,+7], 300 MBs at 30 fps
    schedule("320x240", 16, 8, 4, 300 * 30);
    check(n_down > 0 && n_left > 0, "snake scan steps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
