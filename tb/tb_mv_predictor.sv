// Test of the MV predictor: a random left-frame MV field is stored; for
// random right blocks and GDs the predictor must be the stored MV of the
// block at column bx + round(gd/16), clamped to the frame.
module tb_mv_predictor;
  import pc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0;
  logic [5:0] wr_bx = '0, rd_bx = '0, pred_bx;
  logic [4:0] wr_by = '0, rd_by = '0;
  mv_t wr_mv = '0, pred_mv;
  logic signed [7:0] gd = '0;
  int mx [30][45], my [30][45];
  mv_predictor dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int y = 0; y < 30; y++)
      for (int x = 0; x < 45; x++) begin
        @(negedge clk);
        mx[y][x] = $urandom_range(0, 255) - 128; my[y][x] = $urandom_range(0, 63) - 32;
        wr_en = 1; wr_bx = 6'(x); wr_by = 5'(y); wr_mv.x = 8'(mx[y][x]); wr_mv.y = 8'(my[y][x]);
      end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int bx, by, g, c;
      bx = $urandom_range(0, 44); by = $urandom_range(0, 29); g = $urandom_range(0, 127) - 64;
      if (t == 0) begin bx = 0; g = -64; end
      if (t == 1) begin bx = 44; g = 63; end
      c = bx + $floor((g + 8) / 16.0);
      if (c < 0) c = 0;
      if (c > 44) c = 44;
      rd_en = 1; rd_bx = 6'(bx); rd_by = 5'(by); gd = 8'(g);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (int'(pred_bx) != c || int'(pred_mv.x) != mx[by][c] || int'(pred_mv.y) != my[by][c]) begin
        failures++; $display("bx %0d gd %0d: col %0d expected %0d", bx, g, pred_bx, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
