// tb_cem_shift_ctrl: checks that every configured quantity 0..7 yields the
// shift of its power-of-two divisor (1 for 0..1, 2 for 2..3, 4 for 4..7).
module tb_cem_shift_ctrl;
  import steer_pkg::*;
  cnt_t       qty;
  logic [1:0] shift;
  int checks = 0, failures = 0;

  cem_shift_ctrl dut (.qty(qty), .shift(shift));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 8; q++) begin
      int exp_div, got_div;
      qty = q[2:0];
      exp_div = (q >= 4) ? 4 : (q >= 2) ? 2 : 1;
      #1;
      got_div = 1 << shift;
      checks++;
      if (got_div != exp_div) begin
        failures++;
        $display("FAIL qty=%0d shift=%0d exp divisor %0d", q, shift, exp_div);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
