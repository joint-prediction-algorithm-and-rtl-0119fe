// Global disparity estimator.
//
// The cameras are parallel, so the background of the two views is offset
// by one global horizontal disparity GD. GD is the most frequent
// horizontal disparity among the blocks classified as background:
// GD = argmax over d of Num(d), Num being the histogram of the background
// blocks' DVs.
//
// Each block's DV (dv_x, range -64..+63) is offered with dv_valid; it is
// counted in its bin when background is high. clear empties the histogram.
// find starts a scan of the 128 bins, one bin per cycle; done pulses after
// the last bin with gd holding the disparity of the largest bin (the most
// negative one on a tie) and gd_count its count. Counters saturate.
//
// The histogram and the argmax follow the published algorithm; the bin
// range (the published DE search range), the counter width (enough for
// the 1350 macroblocks of a 720x480 frame) and the serial scan are this
// design's choices.
module gd_estimator
  import pc_pkg::*;
#(
  parameter int unsigned CNT_BITS = 11
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic dv_valid,
  input  logic background,
  input  logic signed [MV_W-1:0] dv_x,
  input  logic find,
  output logic busy,
  output logic done,
  output logic signed [MV_W-1:0] gd,
  output logic [CNT_BITS-1:0] gd_count
);

  localparam int unsigned NBIN = 128;

  logic [CNT_BITS-1:0] hist [NBIN];
  logic [6:0]          scan;
  logic                scanning;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NBIN); b++) hist[b] <= '0;
      scanning <= 1'b0; scan <= '0; done <= 1'b0;
      gd <= '0; gd_count <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        for (int b = 0; b < int'(NBIN); b++) hist[b] <= '0;
      end else if (dv_valid && background && !scanning) begin
        // bin = dv_x + 64
        if (hist[7'(dv_x) ^ 7'h40] != '1)
          hist[7'(dv_x) ^ 7'h40] <= hist[7'(dv_x) ^ 7'h40] + 1'b1;
      end
      if (find && !scanning) begin
        scanning <= 1'b1; scan <= '0; gd_count <= '0; gd <= -8'sd64;
      end else if (scanning) begin
        if (hist[scan] > gd_count) begin
          gd_count <= hist[scan];
          gd       <= MV_W'(signed'({1'b0, scan}) - 64);
        end
        scan <= scan + 7'd1;
        if (scan == 7'(NBIN - 1)) begin
          scanning <= 1'b0;
          done     <= 1'b1;
        end
      end
    end
  end

  assign busy = scanning;

endmodule
