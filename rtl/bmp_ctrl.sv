// Block-matching process controller (control unit with address generator).
//
// Runs one block-matching process (BMP) of one level over a search window
// (SW) held in an on-chip RAM whose words are SW columns. Candidates are
// visited in a snake order that keeps the 128 PEs busy every cycle after
// the initial fill: the RSRN is filled with the first W columns, then the
// window sweeps right one column per cycle, steps down by the level's
// vertical step in one cycle using the prefetched rows, sweeps left, steps
// down, and so on.
//
//   level 2: W = 4,  8 vertically adjacent 4x4 candidates per cycle
//   level 1: W = 8,  2 vertically adjacent 8x8 candidates per cycle
//   level 0: W = 8,  half a 16x16 candidate per cycle; each window
//            position is held for two cycles, first matched against the
//            left half of the current block (candidate x = p), then
//            against the right half (candidate x = p - 8)
//
// With nx by ny candidate positions the SW is (nx + B - 1) columns wide
// (B = block edge), a sweep has NP = nx (levels 2, 1) or nx + 8 (level 0)
// window positions and there are ceil(ny / V) sweeps (V = 8, 2, 1), so the
// BMP takes (W - 1) + sweeps * NP cycles at levels 2 and 1 and
// 7 + ny * 2 * (nx + 8) at level 0, plus three cycles of pipeline latency.
// Level 2 needs nx >= 5 so that every sweep refetches the columns whose
// prefetch rows are used at the next downward step.
//
// Interface: start (with level, nx, ny, origin, col_base) begins a BMP;
// busy stays high until done pulses. ram_rd/ram_addr read one SW column;
// rs_op and row0 (first SW row to put into the RSRN column) are aligned
// with the RAM data one cycle later; cur_half is aligned with the RSRN
// contents two cycles after the step; cand_* describe the SADs that leave
// the adder tree three cycles after the step (cand_mv = origin + offset;
// at level 0 cand_valid[0] marks a half SAD of candidate l0_x, and l0_half
// tells whether it is the right half).
//
// The per-level candidate counts per cycle, the column-per-cycle fetch,
// the right/down/left snake and the absence of bubbles come from the
// published data flow; the exact step list is this design's own.
module bmp_ctrl
  import pc_pkg::*;
#(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned CNT_W  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  level_e            start_level,
  input  logic [CNT_W-1:0]  nx,
  input  logic [CNT_W-1:0]  ny,
  input  mv_t               origin,
  input  logic [ADDR_W-1:0] col_base,
  output level_e            level,
  output logic              busy,
  output logic              done,
  output logic              ram_rd,
  output logic [ADDR_W-1:0] ram_addr,
  output rs_op_e            rs_op,
  output logic [CNT_W-1:0]  row0,
  output logic              cur_half,
  output logic              cand_valid [8],
  output mv_t               cand_mv    [8],
  output logic [CNT_W-1:0]  l0_x,
  output logic              l0_row_start,
  output logic              l0_half
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SWEEP, S_DRAIN} state_e;

  typedef struct packed {
    logic             ev;      // a window position is evaluated
    logic             half;    // level 0: right half of the current block
    logic             rowst;   // first evaluation of a sweep
    logic [CNT_W-1:0] p;       // window position
    logic [CNT_W-1:0] y;       // first vertical candidate offset
  } ev_t;

  state_e           st;
  logic [CNT_W-1:0] nx_r, ny_r, np_r, s, p, cnt;
  logic             dir_r, sub;
  logic [1:0]       drain;
  mv_t              org_r;
  logic [ADDR_W-1:0] base_r;
  logic [CNT_W-1:0] vstep, wwin;

  assign vstep = CNT_W'(vstep_of(level));
  assign wwin  = CNT_W'(win_of(level));

  // Current step (combinational).
  rs_op_e           op_now;
  logic             rd_now;
  logic [CNT_W-1:0] col_now;
  ev_t              ev_now;
  logic             last_now;

  always_comb begin
    op_now   = RS_HOLD;
    rd_now   = 1'b0;
    col_now  = '0;
    ev_now   = '0;
    last_now = 1'b0;
    case (st)
      S_FILL: begin
        op_now  = RS_RIGHT;
        rd_now  = 1'b1;
        col_now = cnt;
        if (cnt == wwin - 1) begin
          ev_now.ev = 1'b1; ev_now.rowst = 1'b1;
          ev_now.p = '0;    ev_now.y = '0;
        end
      end
      S_SWEEP: begin
        if (level == LV0 && sub) begin
          ev_now.ev = 1'b1; ev_now.half = 1'b1;
          ev_now.p = p;     ev_now.y = s * vstep;
        end else if (dir_r && p < np_r - 1) begin
          op_now  = RS_RIGHT; rd_now = 1'b1; col_now = p + wwin;
          ev_now.ev = 1'b1; ev_now.p = p + 1; ev_now.y = s * vstep;
        end else if (!dir_r && p > 0) begin
          op_now  = RS_LEFT; rd_now = 1'b1; col_now = p - 1;
          ev_now.ev = 1'b1; ev_now.p = p - 1; ev_now.y = s * vstep;
        end else if ((s + 1) * vstep < ny_r) begin
          op_now  = RS_DOWN;
          ev_now.ev = 1'b1; ev_now.rowst = 1'b1;
          ev_now.p = p; ev_now.y = (s + 1) * vstep;
        end else begin
          last_now = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; level <= LV2; nx_r <= '0; ny_r <= '0; np_r <= '0;
      s <= '0; p <= '0; cnt <= '0; dir_r <= 1'b1; sub <= 1'b0;
      drain <= '0; org_r <= '0; base_r <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          st     <= S_FILL;
          level  <= start_level;
          nx_r   <= nx;
          ny_r   <= ny;
          np_r   <= (start_level == LV0) ? nx + CNT_W'(8) : nx;
          org_r  <= origin;
          base_r <= col_base;
          cnt    <= '0; s <= '0; p <= '0; dir_r <= 1'b1; sub <= 1'b0;
        end
        S_FILL: begin
          cnt <= cnt + 1;
          if (cnt == wwin - 1) begin
            st  <= S_SWEEP;
            sub <= (level == LV0);
          end
        end
        S_SWEEP: begin
          if (level == LV0 && sub) begin
            sub <= 1'b0;
          end else if (last_now) begin
            st    <= S_DRAIN;
            drain <= '0;
          end else begin
            sub <= (level == LV0);
            case (op_now)
              RS_RIGHT: p <= p + 1;
              RS_LEFT:  p <= p - 1;
              default: begin s <= s + 1; dir_r <= !dir_r; end
            endcase
          end
        end
        S_DRAIN: begin
          drain <= drain + 1;
          if (drain == 2'd2) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy     = (st != S_IDLE);
  assign done     = (st == S_DRAIN) && (drain == 2'd2);
  assign ram_rd   = rd_now;
  assign ram_addr = base_r + ADDR_W'(col_now);

  // Alignment pipeline: step -> RAM data (1) -> RSRN contents (2) -> SAD (3).
  ev_t    ev_d1, ev_d2, ev_d3;
  rs_op_e op_d1;
  logic [CNT_W-1:0] row_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_d1 <= '0; ev_d2 <= '0; ev_d3 <= '0;
      op_d1 <= RS_HOLD; row_d1 <= '0;
    end else begin
      ev_d1  <= ev_now;
      ev_d2  <= ev_d1;
      ev_d3  <= ev_d2;
      op_d1  <= op_now;
      row_d1 <= (st == S_SWEEP && op_now == RS_DOWN) ? (s + 1) * vstep : s * vstep;
    end
  end

  assign rs_op    = op_d1;
  assign row0     = row_d1;
  assign cur_half = ev_d2.half;

  // Candidate description of the SADs now leaving the adder tree.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      cand_valid[k] = 1'b0;
      cand_mv[k]    = '0;
    end
    l0_x         = '0;
    l0_row_start = ev_d3.ev && ev_d3.rowst;
    l0_half      = ev_d3.half;
    if (ev_d3.ev) begin
      if (level == LV0) begin
        // left half at p is candidate p, right half at p is candidate p-8
        l0_x = ev_d3.half ? ev_d3.p - CNT_W'(8) : ev_d3.p;
        cand_valid[0] = ev_d3.half ? (ev_d3.p >= CNT_W'(8)) : (ev_d3.p < nx_r);
        cand_mv[0].x  = org_r.x + MV_W'(l0_x);
        cand_mv[0].y  = org_r.y + MV_W'(ev_d3.y);
      end else begin
        for (int k = 0; k < 8; k++) begin
          if (k < int'(vstep)) begin
            cand_valid[k] = (ev_d3.y + CNT_W'(k) < ny_r);
            cand_mv[k].x  = org_r.x + MV_W'(ev_d3.p);
            cand_mv[k].y  = org_r.y + MV_W'(ev_d3.y + CNT_W'(k));
          end
        end
      end
    end
  end

endmodule
