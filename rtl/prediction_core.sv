// Stereo video prediction core.
//
// One hardware engine does the motion estimation (ME) of both views and the
// disparity estimation (DE) of the right view, plus the joint-block mode
// decision of the right view. Block matching is hierarchical: a level-2
// search over the whole range on 4x4 blocks down-sampled by 4 keeps the
// three best vectors; each is refined by a level-1 search (8x8, down-sampled
// by 2) and a level-0 search (16x16, full resolution). The near-overlapped
// candidates reuse checker (NOCRC) tells the host, after a level-2 or
// level-1 search, which of the three refinement windows overlap enough to
// be loaded once as their union.
//
// Data path (as in the published block diagram): host bus -> RAM_L2 /
// RAM_L01_1 / RAM_L01_2 / RAM_MC and the current register set (CRS, with
// its down-sample unit); a MUX picks the RAM of the running search and
// feeds one SW column per cycle to the reference shift register network
// (RSRN) and to the interpolation unit (IU); the current MUX network (CMN)
// lines the current block up with the RSRN; the 128-PE adder tree forms
// the SADs, the comparison tree (CT) keeps the best three and hands them to
// the NOCRC; the joint block generator (JBG) matches the eight weighted
// mixes of the best ME block (RAM_MC) and the best DE block; the half-pel
// refinement unit matches the IU's samples around the best integer vector.
//
// Host interface, all synchronous to clk:
//   wr_en/wr_sel/wr_addr/wr_data  write one SW column into a RAM (word =
//       column, top row first) or one 16-pixel row into the CRS (wr_addr =
//       row, wr_data[0..15]).
//   bmp_start + bmp_level/nx/ny/origin/src/col_base  run one search of nx by
//       ny candidates whose top-left candidate has vector bmp_origin, over
//       the SW stored from column col_base of RAM src. bmp_done pulses when
//       best_* hold the three best candidates; nocrc_* follow one cycle
//       later for levels 2 and 1.
//   mc_start + mc_src/col_base/row0  copy the 16x16 block at that column and
//       row of a refinement RAM into RAM_MC (17 cycles, mc_done).
//   jbg_start + jbg_src/col_base/row0  match the joint blocks of RAM_MC and
//       the DC block at that position (18 cycles, jbg_done with jbg_sad[],
//       jbg_mode and jbg_best_sad).
//   hp_start + hp_src/col_base/row0  stream the 18x18 window around an
//       integer vector (its block starts at col_base+1, row0+1) through
//       the IU and match the eight half-pel neighbours (21 cycles, hp_done
//       with hp_sad[], hp_best and hp_best_sad; order as in hpel_refine).
//   ap_*  after a level-0 search, the best vector and SAD of each 8x8
//       quarter (0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right)
//       for the AP (four-vector) mode.
//   iu_*  half-pel samples of the columns fetched during a level-0 search
//       or a half-pel refinement.
//   mpd_*  frame difference of the CRS block against host-supplied rows of
//       the previous frame, with the skip-DE and background decisions
//       (the ME SAD and MV are the CT's best).
//   gd_*  histogram of the CT's best horizontal vector (a DV after a DE
//       search) over background blocks; gd is its most frequent value.
//   mvp_*  store the CT's best vector as a left-view MV, or read the
//       predictor of a right-view block displaced by gd.
// Only one of bmp, mc, jbg and hp may run at a time, and the host must not
// write a RAM that is being read.
//
// The unit list, the RAM roles, the 128 PEs, the per-level throughput and
// the NOCR thresholds follow the published design. Command-driven
// sequencing by a host (loading of windows from the frame buffer, the
// choice of search origins, the level order) is this design's own: the
// published control unit decides these itself, but its policy is not given.
module prediction_core
  import pc_pkg::*;
#(
  parameter int unsigned L2_H      = 19,   // rows of a level-2 SW
  parameter int unsigned L2_DEPTH  = 70,   // columns: two SWs of 35
  parameter int unsigned L01_H     = 28,   // rows of a refinement SW
  parameter int unsigned L01_DEPTH = 28,   // columns of a refinement SW
  parameter int unsigned ADDR_W    = 7,
  parameter int unsigned CNT_W     = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  // host write port
  input  logic              wr_en,
  input  sel_e              wr_sel,
  input  logic [ADDR_W-1:0] wr_addr,
  input  pix_t              wr_data [L01_H],
  // block-matching command
  input  logic              bmp_start,
  input  level_e            bmp_level,
  input  logic [CNT_W-1:0]  bmp_nx,
  input  logic [CNT_W-1:0]  bmp_ny,
  input  mv_t               bmp_origin,
  input  sel_e              bmp_src,
  input  logic [ADDR_W-1:0] bmp_col_base,
  output logic              bmp_busy,
  output logic              bmp_done,
  output sad_t              best_sad [3],
  output mv_t               best_mv  [3],
  output logic              best_ok  [3],
  // NOCRC result
  output logic              nocrc_valid,
  output logic [2:0]        nocrc_pair_near,
  output logic              nocrc_grp_valid [3],
  output mv_t               nocrc_grp_pose  [3],
  output logic [MV_W-1:0]   nocrc_grp_ext_x [3],
  output logic [MV_W-1:0]   nocrc_grp_ext_y [3],
  output logic [1:0]        nocrc_n_windows,
  // copy of the best ME block into RAM_MC
  input  logic              mc_start,
  input  sel_e              mc_src,
  input  logic [ADDR_W-1:0] mc_col_base,
  input  logic [CNT_W-1:0]  mc_row0,
  output logic              mc_done,
  // joint block mode decision
  input  logic              jbg_start,
  input  sel_e              jbg_src,
  input  logic [ADDR_W-1:0] jbg_col_base,
  input  logic [CNT_W-1:0]  jbg_row0,
  output logic              jbg_done,
  output sad_t              jbg_sad [NJB],
  output logic [2:0]        jbg_mode,
  output sad_t              jbg_best_sad,
  // half-pel samples
  // AP mode: best vector of each 8x8 quarter over the last level-0 search
  output sad_t              ap_sad [4],
  output mv_t               ap_mv  [4],
  output logic              ap_ok  [4],
  output logic              iu_valid,
  output pix_t              iu_hpel [MB+2],
  output pix_t              iu_vpel [MB+1],
  output pix_t              iu_dpel [MB+1],
  // half-pel refinement around an integer vector
  input  logic              hp_start,
  input  sel_e              hp_src,
  input  logic [ADDR_W-1:0] hp_col_base,
  input  logic [CNT_W-1:0]  hp_row0,
  output logic              hp_done,
  output sad_t              hp_sad [8],
  output logic [2:0]        hp_best,
  output sad_t              hp_best_sad,
  // mode pre-decision (current rows from the CRS, previous rows from host)
  input  logic              mpd_clear,
  input  logic              mpd_row_valid,
  input  logic [3:0]        mpd_row,
  input  pix_t              mpd_prev_row [MB],
  input  sad_t              th_skip_fdiff,
  input  sad_t              th_skip_sad,
  input  sad_t              th_bg,
  output sad_t              mpd_fdiff,
  output logic              mpd_done,
  output logic              mpd_skip,
  output logic              mpd_background,
  // global disparity (DV = best vector of the last search)
  input  logic              gd_clear,
  input  logic              gd_sample,
  input  logic              gd_find,
  output logic              gd_busy,
  output logic              gd_done,
  output logic signed [MV_W-1:0] gd,
  output logic [10:0]       gd_count,
  // MV predictor (left MV = best vector of the last search)
  input  logic              mvp_store,
  input  logic              mvp_rd,
  input  logic [5:0]        mvp_bx,
  input  logic [4:0]        mvp_by,
  output mv_t               mvp_pred_mv,
  output logic [5:0]        mvp_pred_bx
);

  // ---------------------------------------------------------------- CRS
  pix_t crs_blk [MB][MB];
  pix_t crs_ds2 [MB/2][MB/2];
  pix_t crs_ds4 [MB/4][MB/4];
  pix_t crs_row [MB];

  always_comb
    for (int i = 0; i < int'(MB); i++) crs_row[i] = wr_data[i];

  crs u_crs (
    .clk(clk), .wr_en(wr_en && wr_sel == SEL_CRS), .wr_row(wr_addr[3:0]),
    .wr_data(crs_row), .blk(crs_blk), .ds2(crs_ds2), .ds4(crs_ds4)
  );

  // ------------------------------------------------------ BMP controller
  level_e           lv;
  logic             rd_bmp;
  logic [ADDR_W-1:0] addr_bmp;
  rs_op_e           rs_op;
  logic [CNT_W-1:0] row0;
  logic             cur_half;
  logic             cand_valid [8];
  mv_t              cand_mv    [8];
  logic [CNT_W-1:0] l0_x;
  logic             l0_row_start;
  logic             l0_half;
  sel_e             bmp_src_r;

  bmp_ctrl #(.ADDR_W(ADDR_W), .CNT_W(CNT_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(bmp_start), .start_level(bmp_level),
    .nx(bmp_nx), .ny(bmp_ny), .origin(bmp_origin), .col_base(bmp_col_base),
    .level(lv), .busy(bmp_busy), .done(bmp_done),
    .ram_rd(rd_bmp), .ram_addr(addr_bmp), .rs_op(rs_op), .row0(row0),
    .cur_half(cur_half), .cand_valid(cand_valid), .cand_mv(cand_mv),
    .l0_x(l0_x), .l0_row_start(l0_row_start), .l0_half(l0_half)
  );

  // ------------------------------------- MC copy and JBG column sequencer
  typedef enum logic [1:0] {X_IDLE, X_MC, X_JBG, X_HP} xfer_e;
  xfer_e            xf;
  logic [4:0]       xcnt;
  logic [4:0]       xlast;       // number of columns of the transfer
  sel_e             x_src;
  logic [ADDR_W-1:0] x_base;
  logic [CNT_W-1:0] x_row0;
  logic             x_rd;        // read issued this cycle
  logic             x_rd_d;      // data of that read available
  logic [4:0]       x_col_d;
  xfer_e            xf_d;

  assign xlast = (xf == X_HP) ? 5'd18 : 5'd16;
  assign x_rd  = (xf != X_IDLE) && (xcnt < xlast);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xf <= X_IDLE; xcnt <= '0; x_src <= SEL_L011; x_base <= '0; x_row0 <= '0;
      x_rd_d <= 1'b0; x_col_d <= '0; xf_d <= X_IDLE;
    end else begin
      x_rd_d  <= x_rd;
      x_col_d <= xcnt;
      xf_d    <= xf;
      case (xf)
        X_IDLE: begin
          xcnt <= '0;
          if (mc_start) begin
            xf <= X_MC; x_src <= mc_src; x_base <= mc_col_base; x_row0 <= mc_row0;
          end else if (jbg_start) begin
            xf <= X_JBG; x_src <= jbg_src; x_base <= jbg_col_base; x_row0 <= jbg_row0;
          end else if (hp_start) begin
            xf <= X_HP; x_src <= hp_src; x_base <= hp_col_base; x_row0 <= hp_row0;
          end
        end
        default: begin
          xcnt <= xcnt + 5'd1;
          if (xcnt == xlast) xf <= X_IDLE;
        end
      endcase
    end
  end

  assign mc_done = (xf == X_MC) && (xcnt == 5'd16);

  // ------------------------------------------------------------ the RAMs
  pix_t l2_q   [L2_H];
  pix_t l011_q [L01_H];
  pix_t l012_q [L01_H];
  pix_t mc_q   [MB];
  pix_t l2_wd  [L2_H];
  pix_t mc_wd  [MB];
  pix_t src_col [L01_H];       // word read from the selected refinement RAM

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bmp_src_r <= SEL_L2;
    else if (bmp_start) bmp_src_r <= bmp_src;
  end

  always_comb begin
    for (int i = 0; i < int'(L2_H); i++) l2_wd[i] = wr_data[i];
  end

  // the copy into RAM_MC takes rows x_row0.. of the word read a cycle before
  always_comb begin
    for (int i = 0; i < int'(MB); i++) begin
      mc_wd[i] = wr_data[i];
      if (xf_d == X_MC && x_rd_d)
        mc_wd[i] = (int'(x_row0) + i < int'(L01_H)) ? src_col[int'(x_row0) + i] : '0;
    end
  end

  logic              l2_en, l011_en, l012_en, mc_en, mc_we;
  logic [ADDR_W-1:0] l2_a, l011_a, l012_a, mc_a;

  always_comb begin
    l2_en = 1'b0; l011_en = 1'b0; l012_en = 1'b0; mc_en = 1'b0; mc_we = 1'b0;
    l2_a = addr_bmp; l011_a = addr_bmp; l012_a = addr_bmp; mc_a = '0;
    // search reads
    if (rd_bmp) begin
      case (bmp_src_r)
        SEL_L2:   l2_en   = 1'b1;
        SEL_L011: l011_en = 1'b1;
        SEL_L012: l012_en = 1'b1;
        default: ;
      endcase
    end
    // MC copy and JBG reads
    if (x_rd) begin
      if (x_src == SEL_L011) begin l011_en = 1'b1; l011_a = x_base + ADDR_W'(xcnt); end
      if (x_src == SEL_L012) begin l012_en = 1'b1; l012_a = x_base + ADDR_W'(xcnt); end
      if (xf == X_JBG) begin mc_en = 1'b1; mc_a = ADDR_W'(xcnt); end
    end
    if (xf_d == X_MC && x_rd_d) begin
      mc_en = 1'b1; mc_we = 1'b1; mc_a = ADDR_W'(x_col_d[3:0]);
    end
    // host writes
    if (wr_en) begin
      case (wr_sel)
        SEL_L2:   begin l2_en   = 1'b1; l2_a   = wr_addr; end
        SEL_L011: begin l011_en = 1'b1; l011_a = wr_addr; end
        SEL_L012: begin l012_en = 1'b1; l012_a = wr_addr; end
        SEL_MC:   begin mc_en   = 1'b1; mc_we  = 1'b1; mc_a = wr_addr; end
        default: ;
      endcase
    end
  end

  sw_ram #(.WORD_PIX(L2_H), .DEPTH(L2_DEPTH)) u_ram_l2 (
    .clk(clk), .en(l2_en), .we(wr_en && wr_sel == SEL_L2),
    .addr(l2_a[$clog2(L2_DEPTH)-1:0]), .wdata(l2_wd), .rdata(l2_q));
  sw_ram #(.WORD_PIX(L01_H), .DEPTH(L01_DEPTH)) u_ram_l01_1 (
    .clk(clk), .en(l011_en), .we(wr_en && wr_sel == SEL_L011),
    .addr(l011_a[$clog2(L01_DEPTH)-1:0]), .wdata(wr_data), .rdata(l011_q));
  sw_ram #(.WORD_PIX(L01_H), .DEPTH(L01_DEPTH)) u_ram_l01_2 (
    .clk(clk), .en(l012_en), .we(wr_en && wr_sel == SEL_L012),
    .addr(l012_a[$clog2(L01_DEPTH)-1:0]), .wdata(wr_data), .rdata(l012_q));
  sw_ram #(.WORD_PIX(MB), .DEPTH(MB)) u_ram_mc (
    .clk(clk), .en(mc_en), .we(mc_we),
    .addr(mc_a[$clog2(MB)-1:0]), .wdata(mc_wd), .rdata(mc_q));

  // refinement RAM word for the MC copy and the JBG
  always_comb begin
    for (int i = 0; i < int'(L01_H); i++)
      src_col[i] = (x_src == SEL_L012) ? l012_q[i] : l011_q[i];
  end

  // ------------------------------------------- MUX: SW column to the RSRN
  pix_t rs_col [RS_H];

  always_comb begin
    for (int r = 0; r < int'(RS_H); r++) begin
      int idx;
      idx = int'(row0) + r;
      rs_col[r] = '0;
      case (bmp_src_r)
        SEL_L2:   if (idx < int'(L2_H))  rs_col[r] = l2_q[idx];
        SEL_L012: if (idx < int'(L01_H)) rs_col[r] = l012_q[idx];
        default:  if (idx < int'(L01_H)) rs_col[r] = l011_q[idx];
      endcase
    end
  end

  // ------------------------------------------------ RSRN, CMN, adder tree
  pix_t ref_px [NPE];
  pix_t cur_px [NPE];
  sad_t sad_l2 [8];
  sad_t sad_l1 [2];
  sad_t sad_l0h;
  logic tree_valid;

  rsrn u_rsrn (.clk(clk), .rst_n(rst_n), .level(lv), .op(rs_op),
               .col_in(rs_col), .ref_px(ref_px));

  cmn u_cmn (.level(lv), .half(cur_half), .blk(crs_blk), .ds2(crs_ds2),
             .ds4(crs_ds4), .cur(cur_px));

  sad_tree u_tree (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .cur(cur_px),
                   .ref_px(ref_px), .out_valid(tree_valid), .sad_l2(sad_l2),
                   .sad_l1(sad_l1), .sad_l0h(sad_l0h));

  // --------------------------- level 0: pair the two halves of a candidate
  localparam int unsigned NX0 = L01_DEPTH;
  sad_t hbuf [NX0];
  logic hseen [NX0];
  logic l0_full;
  sad_t l0_sad;
  logic [$clog2(NX0)-1:0] l0_i;

  assign l0_i = l0_x[$clog2(NX0)-1:0];

  always_comb begin
    l0_full = 1'b0;
    l0_sad  = sad_l0h;
    if (lv == LV0 && cand_valid[0] && !l0_row_start && hseen[l0_i]) begin
      l0_full = 1'b1;
      l0_sad  = hbuf[l0_i] + sad_l0h;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NX0); i++) begin hbuf[i] <= '0; hseen[i] <= 1'b0; end
    end else if (lv == LV0) begin
      if (l0_row_start)
        for (int i = 0; i < int'(NX0); i++) hseen[i] <= 1'b0;
      if (cand_valid[0] && !l0_full) begin
        hbuf[l0_i]  <= sad_l0h;
        hseen[l0_i] <= 1'b1;
      end
    end
  end

  // ------------------------- AP mode: quarter SADs are the 64-input sums
  ap_select u_ap (
    .clk(clk), .rst_n(rst_n), .clear(bmp_start),
    .in_valid(lv == LV0 && cand_valid[0] && tree_valid), .half(l0_half),
    .mv(cand_mv[0]), .sad_top(sad_l1[0]), .sad_bot(sad_l1[1]),
    .q_sad(ap_sad), .q_mv(ap_mv), .q_ok(ap_ok)
  );

  // ---------------------------------------------------- comparison tree
  logic ct_valid [8];
  sad_t ct_sad   [8];
  mv_t  ct_mv    [8];
  logic [2:0] ct_min_idx;
  sad_t ct_min_sad;
  logic ct_min_ok;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      ct_mv[k] = cand_mv[k];
      case (lv)
        LV2:     begin ct_valid[k] = cand_valid[k] && tree_valid; ct_sad[k] = sad_l2[k]; end
        LV1:     begin ct_valid[k] = (k < 2) && cand_valid[k] && tree_valid;
                       ct_sad[k] = (k < 2) ? sad_l1[k % 2] : '1; end
        default: begin ct_valid[k] = (k == 0) && l0_full; ct_sad[k] = l0_sad; end
      endcase
      if (jbg_done) begin
        ct_valid[k] = 1'b1;
        ct_sad[k]   = jbg_sad[k];
        ct_mv[k]    = '0;
      end
      if (hp_done) begin
        ct_valid[k] = 1'b1;
        ct_sad[k]   = hp_sad[k];
        ct_mv[k]    = '0;
      end
    end
  end

  comparison_tree #(.N(8)) u_ct (
    .clk(clk), .rst_n(rst_n), .clear(bmp_start), .upd(!jbg_done && !hp_done),
    .in_valid(ct_valid), .in_sad(ct_sad), .in_mv(ct_mv),
    .best_sad(best_sad), .best_mv(best_mv), .best_ok(best_ok),
    .min_idx(ct_min_idx), .min_sad(ct_min_sad), .min_ok(ct_min_ok)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jbg_mode <= '0; jbg_best_sad <= '0;
    end else if (jbg_done && ct_min_ok) begin
      jbg_mode <= ct_min_idx; jbg_best_sad <= ct_min_sad;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp_best <= '0; hp_best_sad <= '0;
    end else if (hp_done && ct_min_ok) begin
      hp_best <= ct_min_idx; hp_best_sad <= ct_min_sad;
    end
  end

  // --------------------------------------------------------------- NOCRC
  nocrc u_nocrc (
    .clk(clk), .rst_n(rst_n), .in_valid(bmp_done && lv != LV0),
    .mv(best_mv), .mv_ok(best_ok), .out_valid(nocrc_valid),
    .pair_near(nocrc_pair_near), .grp_valid(nocrc_grp_valid),
    .grp_pose(nocrc_grp_pose), .grp_ext_x(nocrc_grp_ext_x),
    .grp_ext_y(nocrc_grp_ext_y), .n_windows(nocrc_n_windows)
  );

  // ----------------------------------------------------------------- JBG
  pix_t jb_cur [MB];
  pix_t jb_mc  [MB];
  pix_t jb_dc  [MB];

  always_comb begin
    for (int i = 0; i < int'(MB); i++) begin
      jb_cur[i] = crs_blk[i][x_col_d[3:0]];
      jb_mc[i]  = mc_q[i];
      jb_dc[i]  = (int'(x_row0) + i < int'(L01_H)) ? src_col[int'(x_row0) + i] : '0;
    end
  end

  jbg u_jbg (
    .clk(clk), .rst_n(rst_n), .start(jbg_start && xf == X_IDLE),
    .col_valid(xf_d == X_JBG && x_rd_d), .cur_col(jb_cur), .mc_col(jb_mc),
    .dc_col(jb_dc), .done(jbg_done), .sad(jbg_sad)
  );

  // ------------------------------------------------------------------ IU
  // Fed by the level-0 fetch stream during a search, and by the 18-column
  // window read by a half-pel refinement transfer.
  pix_t iu_col [MB+2];
  logic iu_in;

  always_comb begin
    iu_in = lv == LV0 && (rs_op == RS_RIGHT || rs_op == RS_LEFT);
    for (int i = 0; i < int'(MB) + 2; i++) iu_col[i] = rs_col[i];
    if (xf_d == X_HP && x_rd_d) begin
      iu_in = 1'b1;
      for (int i = 0; i < int'(MB) + 2; i++)
        iu_col[i] = (int'(x_row0) + i < int'(L01_H)) ? src_col[int'(x_row0) + i] : '0;
    end
  end

  interp_unit #(.N(MB+2)) u_iu (
    .clk(clk), .rst_n(rst_n), .clear(bmp_start || (hp_start && xf == X_IDLE)),
    .col_valid(iu_in), .col_in(iu_col), .out_valid(iu_valid), .hpel(iu_hpel),
    .vpel(iu_vpel), .dpel(iu_dpel)
  );

  hpel_refine u_hp (
    .clk(clk), .rst_n(rst_n), .start(hp_start && xf == X_IDLE), .cur(crs_blk),
    .in_valid(iu_valid && xf_d == X_HP), .hpel(iu_hpel), .vpel(iu_vpel),
    .dpel(iu_dpel), .done(hp_done), .sad(hp_sad)
  );


  // ------------------------------------- JPA: pre-decision, GD, predictor
  mode_predecision u_mpd (
    .clk(clk), .rst_n(rst_n), .clear(mpd_clear), .row_valid(mpd_row_valid),
    .cur_row(crs_blk[mpd_row]), .prev_row(mpd_prev_row), .sad_me(best_sad[0]),
    .mv_me(best_mv[0]), .th_skip_fdiff(th_skip_fdiff), .th_skip_sad(th_skip_sad),
    .th_bg(th_bg), .fdiff(mpd_fdiff), .done(mpd_done), .skip(mpd_skip),
    .background(mpd_background)
  );

  gd_estimator u_gd (
    .clk(clk), .rst_n(rst_n), .clear(gd_clear), .dv_valid(gd_sample),
    .background(mpd_background), .dv_x(best_mv[0].x), .find(gd_find),
    .busy(gd_busy), .done(gd_done), .gd(gd), .gd_count(gd_count)
  );

  mv_predictor u_mvp (
    .clk(clk), .wr_en(mvp_store), .wr_bx(mvp_bx), .wr_by(mvp_by),
    .wr_mv(best_mv[0]), .rd_en(mvp_rd), .rd_bx(mvp_bx), .rd_by(mvp_by),
    .gd(gd), .pred_mv(mvp_pred_mv), .pred_bx(mvp_pred_bx)
  );

  // ---------------------------------------------------------- assertions
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(bmp_start && bmp_busy)) else $error("bmp_start while busy");
      assert (!(xf != X_IDLE && bmp_busy)) else $error("MC copy, JBG or half-pel transfer during a search");
    end
  end

endmodule
