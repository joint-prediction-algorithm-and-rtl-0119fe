// Test of the global disparity estimator: random DVs with random
// background flags are counted; after the scan, gd must be the most
// frequent background DV (most negative on a tie) with its count, and
// done must come 128 cycles after find.
module tb_gd_estimator;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, dv_valid = 0, background = 0, find = 0, busy, done;
  logic signed [7:0] dv_x = '0, gd;
  logic [10:0] gd_count;
  gd_estimator dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int h [128], peak, eg, ec, t;
      for (int b = 0; b < 128; b++) h[b] = 0;
      clear = 1; @(negedge clk); clear = 0;
      peak = $urandom_range(0, 60) - 40;
      for (int n = 0; n < 600; n++) begin
        int d;
        d = ($urandom_range(0, 2) == 0) ? peak : $urandom_range(0, 127) - 64;
        dv_valid = 1; dv_x = 8'(d); background = ($urandom_range(0, 3) != 0);
        if (background) h[d + 64]++;
        @(negedge clk);
      end
      dv_valid = 0;
      eg = -64; ec = 0;
      for (int b = 0; b < 128; b++) if (h[b] > ec) begin ec = h[b]; eg = b - 64; end
      find = 1; @(negedge clk); find = 0;
      t = 1;
      while (!done) begin @(negedge clk); t++; end
      checks++; if (t != 129) begin failures++; $display("scan %0d cycles", t); end
      checks++; if (int'(gd) != eg) begin failures++; $display("gd %0d expected %0d", gd, eg); end
      checks++; if (int'(gd_count) != ec) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
