// Test of the 128-PE adder tree: random pixel vectors, the three SAD sets
// compared with sums formed here, one cycle after the inputs.
module tb_sad_tree;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  pix_t cur [128], ref_px [128];
  sad_t sad_l2 [8], sad_l1 [2], sad_l0h;
  sad_tree dut (.*);

  initial begin
    repeat (100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e2 [8], e1 [2], e0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < 128; k++) begin
        cur[k]    = (t == 0) ? 8'd255 : pix_t'($urandom_range(0, 255));
        ref_px[k] = (t == 0) ? 8'd0   : pix_t'($urandom_range(0, 255));
      end
      in_valid = 1;
      e0 = 0; e1 = '{0, 0};
      for (int g = 0; g < 8; g++) begin
        e2[g] = 0;
        for (int k = 0; k < 16; k++) begin
          int d; d = int'(cur[16*g+k]) - int'(ref_px[16*g+k]);
          e2[g] += (d < 0) ? -d : d;
        end
        e1[g/4] += e2[g];
        e0 += e2[g];
      end
      @(negedge clk);
      checks++; if (!out_valid) failures++;
      for (int g = 0; g < 8; g++) begin checks++; if (int'(sad_l2[g]) != e2[g]) failures++; end
      for (int h = 0; h < 2; h++) begin checks++; if (int'(sad_l1[h]) != e1[h]) failures++; end
      checks++; if (int'(sad_l0h) != e0) begin failures++; $display("l0h %0d vs %0d", sad_l0h, e0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
