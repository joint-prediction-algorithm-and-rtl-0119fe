// One joint block generation (JBG) unit.
//
// For one pixel position it builds the eight joint pels
//     J-pel n = n/8 * DC + (8-n)/8 * MC,   n = 0..7,
// from the disparity-compensated (DC) and motion-compensated (MC) pels
// using only right shifts by 1, 2 and 3 and adders: the weight n/8 is
// split into its binary digits, digit b2 selects DC>>1, b1 DC>>2 and b0
// DC>>3, and the complementary weight (8-n)/8 is formed the same way from
// MC (MC itself for n = 0). Each term is truncated by its shift before the
// addition, as the shifters sit in front of the adder. Each joint pel's
// absolute difference with the current pel is added into its own
// accumulator, so after a whole block has streamed through, acc[n] holds
// this unit's share of the SAD of joint mode n.
//
// Interface: clear zeroes the accumulators; en adds the current pels.
// jpel is combinational, acc is registered.
//
// The shifters, the joint-pel adders, the eight ABS units and the eight
// accumulators follow the published unit. The mapping of J-pel n to weight
// n/8 (mode 0 = MC block alone, pure DC left to the DE result) is this
// design's choice.
module jbg_unit
  import pc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  pix_t cur,
  input  pix_t mc,
  input  pix_t dc,
  output pix_t jpel [NJB],
  output sad_t acc  [NJB]
);

  function automatic logic [PIX_W+1:0] wsum(pix_t p, logic [3:0] w);
    // w/8 * p with per-term truncation; w = 8 gives p.
    logic [PIX_W+1:0] s;
    s = '0;
    if (w[3]) s += (PIX_W+2)'(p);
    if (w[2]) s += (PIX_W+2)'(p >> 1);
    if (w[1]) s += (PIX_W+2)'(p >> 2);
    if (w[0]) s += (PIX_W+2)'(p >> 3);
    return s;
  endfunction

  always_comb begin
    for (int n = 0; n < int'(NJB); n++) begin
      logic [PIX_W+1:0] s;
      s = wsum(dc, 4'(n)) + wsum(mc, 4'(8 - n));
      jpel[n] = s[PIX_W-1:0];   // never exceeds 255: each term is rounded down
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(NJB); n++) acc[n] <= '0;
    end else if (clear) begin
      for (int n = 0; n < int'(NJB); n++) acc[n] <= '0;
    end else if (en) begin
      for (int n = 0; n < int'(NJB); n++)
        acc[n] <= acc[n] + sad_t'(pix_t'((cur > jpel[n]) ? cur - jpel[n] : jpel[n] - cur));
    end
  end

endmodule
