// tb_unit_decoder: exhaustive check of the opcode-to-unit decoder.
// Every opcode is applied with the count enable high and low; the expected
// one-hot vector comes from the opcode ranges of the opcode map.
module tb_unit_decoder;
  import steer_pkg::*;
  logic             en;
  logic [OPC_W-1:0] opc;
  unit_vec_t        req;
  int checks = 0, failures = 0;

  unit_decoder dut (.count_en(en), .opcode(opc), .unit_req(req));

  function automatic unit_vec_t expect_of(logic e, int o);
    if (!e)                 return '0;
    if (o <= 7)             return 5'b00001;
    if (o <= 11)            return 5'b00010;
    if (o <= 13)            return 5'b00100;
    if (o >= 16 && o <= 19) return 5'b01000;
    if (o >= 20 && o <= 22) return 5'b10000;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int o = 0; o < 32; o++) begin
        en = e[0]; opc = o[OPC_W-1:0];
        #1;
        checks++;
        if (req !== expect_of(e[0], o)) begin
          failures++;
          $display("FAIL en=%0d opc=%0d got %b exp %b", e, o, req, expect_of(e[0], o));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
