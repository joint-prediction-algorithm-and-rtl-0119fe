// Joint block generator (JBG).
//
// Sixteen JBG units work side by side, unit i on row i of the macroblock.
// Each cycle one 16-pixel column of the current block, of the best ME
// block (MC, from RAM_MC) and of the best DE block (DC) streams in, so
// every unit forms one pixel of each of the eight joint blocks per cycle.
// After 16 columns the units' accumulators are added, giving the SADs of
// the eight joint-block modes; the comparison tree then picks the best.
//
// Interface: start clears the accumulators and the column count; col_valid
// marks a column. done pulses for one cycle after the 16th column, with
// sad[] valid from then until the next start. Throughput: 16 cycles per
// macroblock plus one, as published ("after 16 cycles, eight SADs").
module jbg
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic col_valid,
  input  pix_t cur_col [MB],
  input  pix_t mc_col  [MB],
  input  pix_t dc_col  [MB],
  output logic done,
  output sad_t sad [NJB]
);

  sad_t acc   [MB][NJB];
  pix_t jpel  [MB][NJB];
  logic [4:0] ncol;

  for (genvar i = 0; i < MB; i++) begin : g_unit
    jbg_unit u_unit (
      .clk(clk), .rst_n(rst_n), .clear(start), .en(col_valid),
      .cur(cur_col[i]), .mc(mc_col[i]), .dc(dc_col[i]),
      .jpel(jpel[i]), .acc(acc[i])
    );
  end

  always_comb begin
    for (int n = 0; n < int'(NJB); n++) begin
      sad[n] = '0;
      for (int i = 0; i < MB; i++) sad[n] += acc[i][n];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncol <= '0;
      done <= 1'b0;
    end else if (start) begin
      ncol <= '0;
      done <= 1'b0;
    end else begin
      done <= col_valid && (ncol == 5'(MB - 1));
      if (col_valid) ncol <= ncol + 5'd1;
    end
  end

endmodule
