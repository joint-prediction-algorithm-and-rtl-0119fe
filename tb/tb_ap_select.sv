// Testbench for ap_select.
//
// Random streams of half results (random half, vector and quarter SADs,
// with idle cycles and ties on purpose) are offered between clears. A
// model keeps the first smallest SAD of each quarter and its vector;
// after every cycle the unit's four outputs must equal the model.
module tb_ap_select;
  import pc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic clear = 0, in_valid = 0, half = 0;
  mv_t  mv = '0;
  sad_t sad_top = '0, sad_bot = '0;
  sad_t q_sad [4];
  mv_t  q_mv  [4];
  logic q_ok  [4];

  ap_select dut (.*);

  int  m_sad [4];
  int  m_x [4], m_y [4];
  bit  m_ok [4];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      clear = 1;
      for (int q = 0; q < 4; q++) begin m_ok[q] = 0; m_sad[q] = 0; m_x[q] = 0; m_y[q] = 0; end
      @(negedge clk);
      clear = 0;
      for (int n = 0; n < 60; n++) begin
        int st, sb, h, x, y;
        bit v;
        v  = $urandom_range(0, 4) != 0;
        h  = $urandom_range(0, 1);
        x  = $signed($urandom_range(0, 255)) - 128;
        y  = $signed($urandom_range(0, 63)) - 32;
        st = (run % 2 != 0) ? $urandom_range(0, 20) : $urandom_range(0, 16000);
        sb = (run % 2 != 0) ? $urandom_range(0, 20) : $urandom_range(0, 16000);
        in_valid = v; half = h[0]; mv.x = 8'(x); mv.y = 8'(y);
        sad_top = sad_t'(st); sad_bot = sad_t'(sb);
        if (v) begin
          if (!m_ok[h] || st < m_sad[h]) begin m_ok[h] = 1; m_sad[h] = st; m_x[h] = x; m_y[h] = y; end
          if (!m_ok[h+2] || sb < m_sad[h+2]) begin m_ok[h+2] = 1; m_sad[h+2] = sb; m_x[h+2] = x; m_y[h+2] = y; end
        end
        @(negedge clk);
        in_valid = 0;
        for (int q = 0; q < 4; q++) begin
          check(q_ok[q] == m_ok[q], $sformatf("run %0d quarter %0d ok", run, q));
          if (m_ok[q])
            check(int'(q_sad[q]) == m_sad[q] && int'(q_mv[q].x) == m_x[q] && int'(q_mv[q].y) == m_y[q],
                  $sformatf("run %0d quarter %0d sad %0d (%0d,%0d) expected %0d (%0d,%0d)",
                            run, q, q_sad[q], q_mv[q].x, q_mv[q].y, m_sad[q], m_x[q], m_y[q]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
