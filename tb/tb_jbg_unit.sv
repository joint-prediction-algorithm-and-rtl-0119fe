// Test of one JBG unit: random MC, DC and current pels; the eight joint
// pels are checked against n/8*DC + (8-n)/8*MC built from truncated
// shifts, and the accumulators against running sums kept here.
module tb_jbg_unit;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, en = 0;
  pix_t cur, mc, dc;
  pix_t jpel [8];
  sad_t acc [8];
  jbg_unit dut (.*);

  function automatic int wpart(int p, int w);
    int s; s = 0;
    if (w >= 8) return p;
    if (w & 4) s += p >> 1;
    if (w & 2) s += p >> 2;
    if (w & 1) s += p >> 3;
    return s;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e [8];
    cur = '0; mc = '0; dc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      clear = 1; @(negedge clk); clear = 0;
      e = '{default: 0};
      for (int t = 0; t < 16; t++) begin
        cur = pix_t'($urandom_range(0, 255)); mc = pix_t'($urandom_range(0, 255));
        dc = pix_t'($urandom_range(0, 255));
        if (run == 0 && t == 0) begin mc = 8'd255; dc = 8'd255; end
        en = 1;
        #1;
        for (int n = 0; n < 8; n++) begin
          int jp, d;
          jp = wpart(dc, n) + wpart(mc, 8 - n);
          checks++; if (int'(jpel[n]) != jp) failures++;
          d = int'(cur) - jp; e[n] += (d < 0) ? -d : d;
        end
        @(negedge clk);
      end
      en = 0;
      for (int n = 0; n < 8; n++) begin checks++; if (int'(acc[n]) != e[n]) failures++; end
      // idle cycle keeps the sums
      @(negedge clk);
      checks++; if (int'(acc[3]) != e[3]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
