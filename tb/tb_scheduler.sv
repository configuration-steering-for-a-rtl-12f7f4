// tb_scheduler: random check of the grant logic. Expected: per unit type at
// most one grant, to the lowest-numbered requesting entry of that type, only
// while the type is available; the unit given is the fixed unit of the type if
// it is idle, else the lowest idle slot whose code is the type.
module tb_scheduler;
  import steer_pkg::*;
  logic [IQ_DEPTH-1:0]  request, grant;
  unit_vec_t            unit_req [IQ_DEPTH];
  unit_vec_t            unit_avail;
  rav_t                 rav;
  logic [NUM_SLOTS-1:0] slot_avail;
  logic [NUM_FFU-1:0]   ffu_avail;
  logic [3:0]           grant_unit [IQ_DEPTH];
  int checks = 0, failures = 0, multi = 0;

  scheduler dut (.request, .unit_req, .unit_avail, .rav, .slot_avail, .ffu_avail,
                 .grant, .grant_unit);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      bit taken [5];
      int ng;
      request = 7'($urandom);
      for (int e = 0; e < IQ_DEPTH; e++) unit_req[e] = 5'(1 << $urandom_range(0, 4));
      for (int s = 0; s < NUM_SLOTS; s++) rav[s] = 3'($urandom_range(0, 7));
      slot_avail = 8'($urandom);
      ffu_avail  = 5'($urandom);
      for (int t = 0; t < 5; t++) begin
        logic a;
        a = ffu_avail[t];
        for (int s = 0; s < NUM_SLOTS; s++) if (int'(rav[s]) == t && slot_avail[s]) a = 1;
        unit_avail[t] = a;
      end
      #1;
      taken = '{0, 0, 0, 0, 0};
      ng = 0;
      for (int e = 0; e < IQ_DEPTH; e++) begin
        int t, u;
        bit exp_g;
        t = 0;
        for (int k = 0; k < 5; k++) if (unit_req[e][k]) t = k;
        exp_g = request[e] && unit_avail[t] && !taken[t];
        if (exp_g) taken[t] = 1;
        checks++;
        if (grant[e] !== exp_g) begin
          failures++; $display("FAIL grant[%0d] got %b exp %b", e, grant[e], exp_g);
        end
        if (exp_g) begin
          ng++;
          u = -1;
          if (ffu_avail[t]) u = t;
          else for (int s = NUM_SLOTS - 1; s >= 0; s--) if (int'(rav[s]) == t && slot_avail[s]) u = 5 + s;
          checks++;
          if (int'(grant_unit[e]) != u) begin
            failures++; $display("FAIL unit[%0d] got %0d exp %0d", e, grant_unit[e], u);
          end
        end
      end
      if (ng > 1) multi++;
    end
    checks++;
    if (multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
