// tb_cem: random check of the configuration error metric.
// Requirements are drawn so that they total at most seven (a full queue).
// The expected error is the sum over types of floor(required / d), d being
// the configured quantity rounded down to 1, 2 or 4. One instance takes its
// quantities at run time, one has hard-wired shifts (Configuration 1 of the
// architecture: 2, 2, 5, 1, 1 units).
module tb_cem;
  import steer_pkg::*;
  cnt_vec_t req, qty;
  cnt_t     err_dyn, err_fix;
  int checks = 0, failures = 0;

  cem #(.USE_QTY(1'b1)) dut_dyn (.req(req), .qty(qty), .err(err_dyn));
  cem #(.USE_QTY(1'b0), .SHIFTS({2'd0, 2'd0, 2'd2, 2'd1, 2'd1}))
      dut_fix (.req(req), .qty('0), .err(err_fix));

  function automatic int divisor(int q);
    if (q >= 4) return 4;
    if (q >= 2) return 2;
    return 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fixed_q [5] = '{2, 2, 5, 1, 1};
    for (int n = 0; n < 2000; n++) begin
      int left, e_dyn, e_fix;
      left = 7;
      for (int t = 0; t < 5; t++) begin
        int r;
        r = (left == 0) ? 0 : int'($urandom_range(0, left));
        left -= r;
        req[t] = r[2:0];
        qty[t] = 3'($urandom_range(0, 7));
      end
      e_dyn = 0; e_fix = 0;
      for (int t = 0; t < 5; t++) begin
        e_dyn += int'(req[t]) / divisor(int'(qty[t]));
        e_fix += int'(req[t]) / divisor(fixed_q[t]);
      end
      #1;
      checks += 2;
      if (int'(err_dyn) != e_dyn) begin
        failures++;
        $display("FAIL dyn req=%p qty=%p got %0d exp %0d", req, qty, err_dyn, e_dyn);
      end
      if (int'(err_fix) != e_fix) begin
        failures++;
        $display("FAIL fix req=%p got %0d exp %0d", req, err_fix, e_fix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
