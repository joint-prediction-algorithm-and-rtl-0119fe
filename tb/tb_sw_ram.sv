// Test of the single-port RAM: random words written to every address and
// read back one cycle after the read address; a cycle with en low leaves
// the read register unchanged.
module tb_sw_ram;
  import pc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, we = 0;
  logic [4:0] addr = '0;
  pix_t wdata [28], rdata [28];
  int m [28][28];
  sw_ram #(.WORD_PIX(28), .DEPTH(28)) dut (.*);

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 28; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 5'(a);
      for (int i = 0; i < 28; i++) begin m[a][i] = $urandom_range(0, 255); wdata[i] = pix_t'(m[a][i]); end
    end
    for (int a = 27; a >= 0; a--) begin
      @(negedge clk);
      en = 1; we = 0; addr = 5'(a);
      @(negedge clk);
      en = 0;
      for (int i = 0; i < 28; i++) begin checks++; if (int'(rdata[i]) != m[a][i]) failures++; end
      @(negedge clk);
      checks++; if (int'(rdata[0]) != m[a][0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
