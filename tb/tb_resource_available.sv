// tb_resource_available: random check of available(t) for all five types.
// The expected value is true when some fixed unit of type t is available or
// some slot whose allocation code equals t is available; slots holding the
// continuation code 111 or the empty code never count.
module tb_resource_available;
  import steer_pkg::*;
  rav_t                 rav;
  logic [NUM_SLOTS-1:0] slot_avail;
  logic [NUM_FFU-1:0]   ffu_avail;
  logic [4:0]           avail;
  int checks = 0, failures = 0, seen_true = 0;

  for (genvar t = 0; t < 5; t++) begin : g
    resource_available #(.TYPE(rtype_t'(t))) dut (
      .rav(rav), .slot_avail(slot_avail), .ffu_avail(ffu_avail), .available(avail[t]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int s = 0; s < NUM_SLOTS; s++) rav[s] = 3'($urandom_range(0, 7));
      slot_avail = 8'($urandom);
      // fixed units mostly busy so that slots decide the result
      ffu_avail  = ($urandom_range(0, 3) == 0) ? 5'($urandom) : '0;
      #1;
      for (int t = 0; t < 5; t++) begin
        logic e;
        e = ffu_avail[t];
        for (int s = 0; s < NUM_SLOTS; s++)
          if (int'(rav[s]) == t && slot_avail[s]) e = 1'b1;
        checks++;
        if (e) seen_true++;
        if (avail[t] !== e) begin
          failures++;
          $display("FAIL t=%0d rav=%p sa=%b fa=%b got %b", t, rav, slot_avail, ffu_avail, avail[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
