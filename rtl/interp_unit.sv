// Interpolation unit (IU) with its shift register set.
//
// Generates half-pixel samples for the half-pel refinement at level 0.
// Integer pixels arrive one column of N pixels per cycle (col_valid,
// col_in, top row first). The shift register set keeps the previous
// column, and from the previous column p and the new column q the unit
// forms, for row i:
//   hpel[i] = (p[i] + q[i] + 1) >> 1                         horizontal
//   vpel[i] = (q[i] + q[i+1] + 1) >> 1                       vertical
//   dpel[i] = (p[i] + p[i+1] + q[i] + q[i+1] + 2) >> 2       diagonal
// i.e. the samples midway between the two columns and below each pixel of
// the new column. These are the usual bilinear half-pel filters with
// rounding towards plus infinity; the published design names the unit and
// its task but not its filter, so the filter is this design's choice.
//
// Timing: outputs are registered; out_valid rises one cycle after the
// second column, and follows col_valid from then on.
module interp_unit
  import pc_pkg::*;
#(
  parameter int unsigned N = 17
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic col_valid,
  input  pix_t col_in [N],
  output logic out_valid,
  output pix_t hpel [N],
  output pix_t vpel [N-1],
  output pix_t dpel [N-1]
);

  pix_t prev [N];
  logic have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      out_valid <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        prev[i] <= '0; hpel[i] <= '0;
      end
      for (int i = 0; i < int'(N) - 1; i++) begin
        vpel[i] <= '0; dpel[i] <= '0;
      end
    end else if (clear) begin
      have_prev <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= col_valid && have_prev;
      if (col_valid) begin
        have_prev <= 1'b1;
        prev      <= col_in;
        for (int i = 0; i < int'(N); i++) begin
          logic [PIX_W:0] s;
          s = (PIX_W+1)'(prev[i]) + (PIX_W+1)'(col_in[i]) + 1;
          hpel[i] <= s[PIX_W:1];
        end
        for (int i = 0; i < int'(N) - 1; i++) begin
          logic [PIX_W:0]   sv;
          logic [PIX_W+1:0] sd;
          sv = (PIX_W+1)'(col_in[i]) + (PIX_W+1)'(col_in[i+1]) + 1;
          sd = (PIX_W+2)'(prev[i]) + (PIX_W+2)'(prev[i+1])
             + (PIX_W+2)'(col_in[i]) + (PIX_W+2)'(col_in[i+1]) + 2;
          vpel[i] <= sv[PIX_W:1];
          dpel[i] <= sd[PIX_W+1:2];
        end
      end
    end
  end

endmodule
