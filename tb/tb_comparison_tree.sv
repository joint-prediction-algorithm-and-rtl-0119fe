// Test of the comparison tree: random SAD batches with random valid bits
// are fed for many cycles; the best three must equal the three smallest
// SADs seen (tracked here with a sorted queue), and the per-cycle minimum
// must be the first smallest valid entry. Batches with upd low must leave
// the list alone.
module tb_comparison_tree;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, upd = 1;
  logic in_valid [8];
  sad_t in_sad [8];
  mv_t  in_mv [8];
  sad_t best_sad [3];
  mv_t  best_mv [3];
  logic best_ok [3];
  logic [2:0] min_idx;
  sad_t min_sad;
  logic min_ok;
  comparison_tree #(.N(8)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int seen [$];
    int mi, ms;
    for (int k = 0; k < 8; k++) begin in_valid[k] = 0; in_sad[k] = '0; in_mv[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      clear = 1; @(negedge clk); clear = 0;
      seen.delete();
      for (int t = 0; t < 40; t++) begin
        upd = (t % 7 != 3);
        mi = -1; ms = 0;
        for (int k = 0; k < 8; k++) begin
          in_valid[k] = ($urandom_range(0, 3) != 0);
          in_sad[k]   = sad_t'($urandom_range(0, 5000));
          in_mv[k].x  = 8'(k); in_mv[k].y = 8'(t);
          if (in_valid[k]) begin
            if (upd) seen.push_back(int'(in_sad[k]));
            if (mi < 0 || int'(in_sad[k]) < ms) begin mi = k; ms = in_sad[k]; end
          end
        end
        #1;
        checks++;
        if ((mi >= 0) != min_ok || (mi >= 0 && (int'(min_idx) != mi || int'(min_sad) != ms))) failures++;
        @(negedge clk);
        seen.sort();
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (i < seen.size()) begin
            if (!best_ok[i] || int'(best_sad[i]) != seen[i]) failures++;
          end else if (best_ok[i]) failures++;
        end
      end
      for (int k = 0; k < 8; k++) in_valid[k] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
