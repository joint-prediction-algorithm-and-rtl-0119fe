// Single-port on-chip SRAM.
//
// One word is one search-window column of WORD_PIX pixels, so a whole
// column can be fetched into the RSRN in one cycle. One access per cycle:
// a write when we is high, otherwise a read whose data appears on rdata
// one cycle later (synchronous read). The core uses four of these: RAM_L2
// (level-2 search windows of both channels), RAM_L01_1 and RAM_L01_2
// (level-1/level-0 refinement windows, used in ping-pong) and RAM_MC (the
// best ME block of the right channel). Single-port SRAM follows the
// published chip; the column-wide word is this design's choice.
module sw_ram
  import pc_pkg::*;
#(
  parameter int unsigned WORD_PIX = 28,
  parameter int unsigned DEPTH    = 28
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  pix_t                     wdata [WORD_PIX],
  output pix_t                     rdata [WORD_PIX]
);

  logic [WORD_PIX*PIX_W-1:0] mem [DEPTH];
  logic [WORD_PIX*PIX_W-1:0] q;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int i = 0; i < int'(WORD_PIX); i++)
          mem[addr][i*PIX_W +: PIX_W] <= wdata[i];
      end else begin
        q <= mem[addr];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(WORD_PIX); i++) rdata[i] = q[i*PIX_W +: PIX_W];
  end

endmodule
