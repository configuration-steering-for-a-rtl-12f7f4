// tb_req_encoder: exhaustive check of the 7-bit unary to 3-bit binary
// requirements encoder against a bit-by-bit count.
module tb_req_encoder;
  logic [6:0] need;
  logic [2:0] count;
  int checks = 0, failures = 0;

  req_encoder #(.N(7), .CW(3)) dut (.need(need), .count(count));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n;
      need = v[6:0];
      n = 0;
      for (int b = 0; b < 7; b++) if (v[b]) n++;
      #1;
      checks++;
      if (int'(count) != n) begin
        failures++;
        $display("FAIL need=%b got %0d exp %0d", need, count, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
