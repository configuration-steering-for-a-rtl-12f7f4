// tb_min_err_select: check of the minimal error selection over all 4096
// combinations of four three-bit errors, each with random reconfiguration
// costs (zero for the current configuration). The expected choice is the
// smallest error; among equal errors the smallest cost, so the current
// configuration (0) wins any tie with it; then the lower index.
module tb_min_err_select;
  import steer_pkg::*;
  cnt_t     err [4];
  cost_t    cost [4];
  cfg_sel_t sel;
  int checks = 0, failures = 0, ties_with_current = 0;

  min_err_select dut (.err(err), .cost(cost), .sel(sel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096 * 4; v++) begin
      int e [4];
      int k [4];
      int exp_sel, m, mc;
      for (int c = 0; c < 4; c++) begin
        e[c] = ((v % 4096) >> (3 * c)) & 7;
        err[c] = e[c][2:0];
        k[c] = (c == 0) ? 0 : int'($urandom_range(0, 3));
        cost[c] = cost_t'(k[c]);
      end
      m = e[0];
      for (int c = 1; c < 4; c++) if (e[c] < m) m = e[c];
      mc = 99;
      for (int c = 0; c < 4; c++) if (e[c] == m && k[c] < mc) mc = k[c];
      exp_sel = 3;
      for (int c = 3; c >= 0; c--) if (e[c] == m && k[c] == mc) exp_sel = c;
      if (exp_sel == 0 && (e[1] == m || e[2] == m || e[3] == m)) ties_with_current++;
      #1;
      checks++;
      if (int'(sel) != exp_sel) begin
        failures++;
        $display("FAIL err=%0d,%0d,%0d,%0d got %0d exp %0d", e[0], e[1], e[2], e[3], sel, exp_sel);
      end
    end
    checks++;
    if (ties_with_current == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
