// Comparison tree (CT).
//
// Takes the SADs produced in one cycle (up to eight candidates, each with
// its motion or disparity vector and a valid bit) and, in that same cycle,
// merges them into a running list of the three best candidates, kept sorted
// by SAD (best[0] is the smallest). A strictly smaller SAD is needed to
// displace an entry, so among equal SADs the candidate seen first wins.
// clear empties the list (all SADs at their maximum, all valid bits low)
// at the start of a block-matching process; the list only changes while
// upd is high.
//
// The same inputs also drive a plain minimum: min_idx/min_sad give the best
// valid candidate of the current cycle, used for the joint-block mode
// decision.
//
// Timing: best/best_ok are registered and include the inputs of a cycle one
// clock later; min_idx/min_sad are combinational. Keeping the best three
// follows the published design (three candidates are refined); the
// insertion ordering is this design's own.
module comparison_tree
  import pc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        upd,
  input  logic        in_valid [N],
  input  sad_t        in_sad   [N],
  input  mv_t         in_mv    [N],
  output sad_t        best_sad [3],
  output mv_t         best_mv  [3],
  output logic        best_ok  [3],
  output logic [$clog2(N)-1:0] min_idx,
  output sad_t        min_sad,
  output logic        min_ok
);

  sad_t nsad [3];
  mv_t  nmv  [3];
  logic nok  [3];

  always_comb begin
    nsad = best_sad;
    nmv  = best_mv;
    nok  = best_ok;
    for (int n = 0; n < int'(N); n++) begin
      if (in_valid[n]) begin
        if (!nok[0] || in_sad[n] < nsad[0]) begin
          nsad[2] = nsad[1]; nmv[2] = nmv[1]; nok[2] = nok[1];
          nsad[1] = nsad[0]; nmv[1] = nmv[0]; nok[1] = nok[0];
          nsad[0] = in_sad[n]; nmv[0] = in_mv[n]; nok[0] = 1'b1;
        end else if (!nok[1] || in_sad[n] < nsad[1]) begin
          nsad[2] = nsad[1]; nmv[2] = nmv[1]; nok[2] = nok[1];
          nsad[1] = in_sad[n]; nmv[1] = in_mv[n]; nok[1] = 1'b1;
        end else if (!nok[2] || in_sad[n] < nsad[2]) begin
          nsad[2] = in_sad[n]; nmv[2] = in_mv[n]; nok[2] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        best_sad[i] <= '1; best_mv[i] <= '0; best_ok[i] <= 1'b0;
      end
    end else if (clear) begin
      for (int i = 0; i < 3; i++) begin
        best_sad[i] <= '1; best_mv[i] <= '0; best_ok[i] <= 1'b0;
      end
    end else if (upd) begin
      best_sad <= nsad;
      best_mv  <= nmv;
      best_ok  <= nok;
    end
  end

  always_comb begin
    min_idx = '0;
    min_sad = '1;
    min_ok  = 1'b0;
    for (int n = 0; n < int'(N); n++) begin
      if (in_valid[n] && (!min_ok || in_sad[n] < min_sad)) begin
        min_idx = $clog2(N)'(n);
        min_sad = in_sad[n];
        min_ok  = 1'b1;
      end
    end
  end

endmodule
