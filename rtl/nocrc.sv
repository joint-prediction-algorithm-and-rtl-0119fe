// Near-overlapped candidates reuse checker (NOCRC).
//
// After a level-2 or level-1 block-matching process the three best
// candidate vectors are refined at the next finer level, each in its own
// small search window. When two or three of those windows overlap heavily
// they are loaded from the off-chip frame buffer once, as their union.
//
// Three threshold units compare the pairs (1,2), (1,3) and (2,3): a pair is
// near when |dx| < TH_X and |dy| < TH_Y (4 and 2 by default). The offset
// MV logic then groups the candidates:
//   all three pairs near          -> one window for all three
//   otherwise the first near pair
//   in the order (1,2),(1,3),(2,3) -> one window for the pair, one alone
//   no pair near                   -> three windows
// For every window it gives the pose vector (the smallest x and the
// smallest y of the members, i.e. the top-left candidate of the union) and
// the union's extra size ext_x/ext_y (largest minus smallest member), so a
// window of (W + ext_x) by (H + ext_y) pixels is loaded at the pose.
// A candidate with its valid bit low is never grouped and yields no window.
//
// Timing: registered, out_valid one cycle after in_valid.
// The pairwise absolute differences, the thresholds of 4 and 2 and the
// single load when all three pairs are near follow the published design.
// The grouping order for a partial overlap and the pose/extent encoding are
// this design's own.
module nocrc
  import pc_pkg::*;
#(
  parameter int unsigned TH_X = 4,
  parameter int unsigned TH_Y = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  mv_t        mv    [3],
  input  logic       mv_ok [3],
  output logic       out_valid,
  output logic [2:0] pair_near,         // {p23, p13, p12}
  output logic       grp_valid [3],
  output mv_t        grp_pose  [3],
  output logic [MV_W-1:0] grp_ext_x [3],
  output logic [MV_W-1:0] grp_ext_y [3],
  output logic [1:0] n_windows
);

  function automatic logic [MV_W:0] absdiff(logic signed [MV_W-1:0] a,
                                           logic signed [MV_W-1:0] b);
    logic signed [MV_W:0] d;
    d = (MV_W+1)'(a) - (MV_W+1)'(b);
    return d[MV_W] ? -d : d;
  endfunction

  function automatic logic is_near(mv_t a, mv_t b);
    return (absdiff(a.x, b.x) < (MV_W+1)'(TH_X)) &&
           (absdiff(a.y, b.y) < (MV_W+1)'(TH_Y));
  endfunction

  logic [2:0] nr;
  logic [2:0] gmask [3];   // members of each window, bit i = candidate i

  always_comb begin
    nr[0] = mv_ok[0] && mv_ok[1] && is_near(mv[0], mv[1]);
    nr[1] = mv_ok[0] && mv_ok[2] && is_near(mv[0], mv[2]);
    nr[2] = mv_ok[1] && mv_ok[2] && is_near(mv[1], mv[2]);
    gmask[0] = 3'b000; gmask[1] = 3'b000; gmask[2] = 3'b000;
    if (nr == 3'b111) begin
      gmask[0] = 3'b111;
    end else if (nr[0]) begin
      gmask[0] = 3'b011; gmask[1] = {mv_ok[2], 2'b00};
    end else if (nr[1]) begin
      gmask[0] = 3'b101; gmask[1] = {1'b0, mv_ok[1], 1'b0};
    end else if (nr[2]) begin
      gmask[0] = {2'b00, mv_ok[0]}; gmask[1] = 3'b110;
    end else begin
      gmask[0] = {2'b00, mv_ok[0]};
      gmask[1] = {1'b0, mv_ok[1], 1'b0};
      gmask[2] = {mv_ok[2], 2'b00};
    end
  end

  mv_t              pose  [3];
  logic [MV_W-1:0]  ex    [3];
  logic [MV_W-1:0]  ey    [3];
  logic             gv    [3];
  logic [1:0]       nwin;

  always_comb begin
    nwin = '0;
    for (int g = 0; g < 3; g++) begin
      logic signed [MV_W-1:0] xmin, xmax, ymin, ymax;
      logic first;
      first = 1'b1;
      xmin = '0; xmax = '0; ymin = '0; ymax = '0;
      for (int i = 0; i < 3; i++) begin
        if (gmask[g][i]) begin
          if (first || mv[i].x < xmin) xmin = mv[i].x;
          if (first || mv[i].x > xmax) xmax = mv[i].x;
          if (first || mv[i].y < ymin) ymin = mv[i].y;
          if (first || mv[i].y > ymax) ymax = mv[i].y;
          first = 1'b0;
        end
      end
      gv[g]     = (gmask[g] != 3'b000);
      pose[g].x = xmin;
      pose[g].y = ymin;
      ex[g]     = MV_W'(xmax - xmin);
      ey[g]     = MV_W'(ymax - ymin);
      if (gv[g]) nwin = nwin + 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pair_near <= '0;
      n_windows <= '0;
      for (int g = 0; g < 3; g++) begin
        grp_valid[g] <= 1'b0; grp_pose[g] <= '0;
        grp_ext_x[g] <= '0;   grp_ext_y[g] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pair_near <= nr;
        n_windows <= nwin;
        grp_valid <= gv;
        grp_pose  <= pose;
        grp_ext_x <= ex;
        grp_ext_y <= ey;
      end
    end
  end

endmodule
