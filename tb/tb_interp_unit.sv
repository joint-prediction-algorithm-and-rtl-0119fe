// Test of the interpolation unit: random columns are streamed in; from the
// second column on, the horizontal, vertical and diagonal half-pel samples
// must equal the rounded bilinear means of the two latest columns.
module tb_interp_unit;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, col_valid = 0, out_valid;
  pix_t col_in [17];
  pix_t hpel [17], vpel [16], dpel [16];
  int P [17], Q [17];
  interp_unit #(.N(17)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 17; i++) col_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      P = Q;
      for (int i = 0; i < 17; i++) begin Q[i] = $urandom_range(0, 255); col_in[i] = pix_t'(Q[i]); end
      col_valid = 1;
      @(negedge clk);
      col_valid = 0;
      checks++; if (out_valid != (t > 0)) failures++;
      if (t > 0) begin
        for (int i = 0; i < 17; i++) begin checks++; if (int'(hpel[i]) != (P[i] + Q[i] + 1) / 2) failures++; end
        for (int i = 0; i < 16; i++) begin
          checks++; if (int'(vpel[i]) != (Q[i] + Q[i+1] + 1) / 2) failures++;
          checks++; if (int'(dpel[i]) != (P[i] + P[i+1] + Q[i] + Q[i+1] + 2) / 4) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
