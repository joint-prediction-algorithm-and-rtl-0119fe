// Test of the NOCRC: hand-picked and random vector triples. Pair flags are
// checked against |dx| < 4 and |dy| < 2; the number of windows, and the
// pose and extent of the union when all three pairs are near, against
// values worked out here.
module tb_nocrc;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  mv_t  mv [3];
  logic mv_ok [3];
  logic [2:0] pair_near;
  logic grp_valid [3];
  mv_t  grp_pose [3];
  logic [7:0] grp_ext_x [3], grp_ext_y [3];
  logic [1:0] n_windows;
  nocrc dut (.*);

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic try(int x0, int y0, int x1, int y1, int x2, int y2);
    int xs [3], ys [3];
    bit n [3];
    int nw;
    xs = '{x0, x1, x2}; ys = '{y0, y1, y2};
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin mv[i].x = 8'(xs[i]); mv[i].y = 8'(ys[i]); mv_ok[i] = 1; end
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    n[0] = iabs(x0 - x1) < 4 && iabs(y0 - y1) < 2;
    n[1] = iabs(x0 - x2) < 4 && iabs(y0 - y2) < 2;
    n[2] = iabs(x1 - x2) < 4 && iabs(y1 - y2) < 2;
    nw = (n[0] && n[1] && n[2]) ? 1 : (n[0] || n[1] || n[2]) ? 2 : 3;
    checks++; if (!out_valid) failures++;
    checks++; if (pair_near != {n[2], n[1], n[0]}) failures++;
    checks++; if (int'(n_windows) != nw) failures++;
    if (nw == 1) begin
      int xmin, xmax, ymin, ymax;
      xmin = xs.min()[0]; xmax = xs.max()[0]; ymin = ys.min()[0]; ymax = ys.max()[0];
      checks++;
      if (!grp_valid[0] || int'(grp_pose[0].x) != xmin || int'(grp_pose[0].y) != ymin ||
          int'(grp_ext_x[0]) != xmax - xmin || int'(grp_ext_y[0]) != ymax - ymin) failures++;
    end
    if (nw == 3) begin
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (!grp_valid[i] || int'(grp_pose[i].x) != xs[i] || int'(grp_pose[i].y) != ys[i] ||
            grp_ext_x[i] != 0) failures++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    try(0, 0, 1, 0, 3, 1);      // all near: one window 
    try(-5, 2, -3, 2, -2, 1);   // all near, negative
    try(0, 0, 4, 0, 1, 0);      // dx = 4 is not near
    try(0, 0, 1, 2, 2, 0);      // dy = 2 is not near
    try(0, 0, 10, 5, -9, -7);   // none near
    for (int t = 0; t < 60; t++)
      try($urandom_range(0, 12) - 6, $urandom_range(0, 4) - 2, $urandom_range(0, 12) - 6,
          $urandom_range(0, 4) - 2, $urandom_range(0, 12) - 6, $urandom_range(0, 4) - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
