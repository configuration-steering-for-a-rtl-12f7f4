// unit_decoder: maps the opcode of one instruction-queue entry to the
// functional unit it needs.
//
// The output is a one-hot five-bit vector (bit 0 Int-ALU, 1 Int-MDU, 2 LSU,
// 3 FP-ALU, 4 FP-MDU); it is all zero when the entry is not to be counted
// (`count_en` low: empty or already scheduled) or the opcode needs no unit
// (NOP or an unknown code). Each instruction needs exactly one unit type, as
// in the architecture described. The opcode map itself is this design's own
// (see steer_pkg). Purely combinational.
module unit_decoder
  import steer_pkg::*;
(
  input  logic              count_en,  // entry is counted by the selection
  input  logic [OPC_W-1:0]  opcode,
  output unit_vec_t         unit_req   // one-hot unit requirement
);

  always_comb begin
    unit_req = '0;
    if (count_en) begin
      case (opcode)
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
        OP_SHL, OP_SHR, OP_SLT:            unit_req[T_INT_ALU] = 1'b1;
        OP_MUL, OP_MULH, OP_DIV, OP_REM:   unit_req[T_INT_MDU] = 1'b1;
        OP_LOAD, OP_STORE:                 unit_req[T_LSU]     = 1'b1;
        OP_FADD, OP_FSUB, OP_FCMP, OP_FCVT: unit_req[T_FP_ALU] = 1'b1;
        OP_FMUL, OP_FDIV, OP_FSQRT:        unit_req[T_FP_MDU]  = 1'b1;
        default:                           unit_req = '0;
      endcase
    end
  end

endmodule
