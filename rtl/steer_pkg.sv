// steer_pkg: types and constants shared by the configuration-steering logic.
//
// The processor has five functional-unit types, each with a three-bit
// resource type encoding: Int-ALU 000, Int-MDU 001, LSU 010, FP-ALU 011,
// FP-MDU 100. A slot of reconfigurable logic that holds the second or later
// part of a multi-slot unit carries the continuation code 111. These codes,
// the five fixed units (one of each type), the eight reconfigurable slots and
// the three predefined steering configurations follow the architecture this
// RTL implements. The code 110 for an empty (unconfigured) slot, the slot
// order of each predefined configuration and the opcode map used by the unit
// decoders are this design's own choices.
package steer_pkg;

  // Number of functional-unit types and width of a type code.
  localparam int unsigned NUM_TYPES  = 5;
  localparam int unsigned TYPE_W     = 3;
  // Instruction-queue (and wake-up array) depth.
  localparam int unsigned IQ_DEPTH   = 7;
  // Reconfigurable slots and fixed functional units.
  localparam int unsigned NUM_SLOTS  = 8;
  localparam int unsigned NUM_FFU    = 5;
  // Width of a unit count / requirement / error value.
  localparam int unsigned CNT_W      = 3;
  // Opcode width and instruction-latency width.
  localparam int unsigned OPC_W      = 5;
  localparam int unsigned LAT_W      = 4;

  typedef logic [TYPE_W-1:0] rtype_t;

  localparam rtype_t T_INT_ALU = 3'b000;
  localparam rtype_t T_INT_MDU = 3'b001;
  localparam rtype_t T_LSU     = 3'b010;
  localparam rtype_t T_FP_ALU  = 3'b011;
  localparam rtype_t T_FP_MDU  = 3'b100;
  localparam rtype_t T_EMPTY   = 3'b110;   // unconfigured slot (own choice)
  localparam rtype_t T_CONT    = 3'b111;   // continuation of a multi-slot unit

  // One-hot unit-requirement vector: bit t set means unit type t is needed.
  typedef logic [NUM_TYPES-1:0] unit_vec_t;

  // Per-type counts (requirements or configured quantities).
  typedef logic [CNT_W-1:0] cnt_t;
  typedef cnt_t [NUM_TYPES-1:0] cnt_vec_t;

  // Resource allocation vector of the reconfigurable slots.
  typedef rtype_t [NUM_SLOTS-1:0] rav_t;

  // Reconfiguration cost: number of units that would have to be reloaded.
  typedef logic [$clog2(NUM_SLOTS+1)-1:0] cost_t;

  // Configuration selection: 0 = current, 1..3 = predefined steering configs.
  typedef logic [1:0] cfg_sel_t;

  // Slot layouts of the predefined steering configurations (slot 0 first).
  // Config 1: Int-ALU, Int-MDU, 4 x LSU.
  localparam rav_t LAYOUT_C1 = {T_LSU, T_LSU, T_LSU, T_LSU,
                                T_CONT, T_INT_MDU, T_CONT, T_INT_ALU};
  // Config 2: FP-ALU, FP-MDU, 2 x LSU.
  localparam rav_t LAYOUT_C2 = {T_LSU, T_LSU, T_CONT, T_CONT,
                                T_FP_MDU, T_CONT, T_CONT, T_FP_ALU};
  // Config 3: 2 x Int-ALU, 2 x Int-MDU.
  localparam rav_t LAYOUT_C3 = {T_CONT, T_INT_MDU, T_CONT, T_INT_MDU,
                                T_CONT, T_INT_ALU, T_CONT, T_INT_ALU};

  // Units available in each predefined configuration, fixed units included
  // (one FFU of each type plus the configuration's RFUs).
  // Index order: [4]=FP-MDU [3]=FP-ALU [2]=LSU [1]=Int-MDU [0]=Int-ALU.
  localparam cnt_vec_t QTY_C1 = {3'd1, 3'd1, 3'd5, 3'd2, 3'd2};
  localparam cnt_vec_t QTY_C2 = {3'd2, 3'd2, 3'd3, 3'd1, 3'd1};
  localparam cnt_vec_t QTY_C3 = {3'd1, 3'd1, 3'd1, 3'd3, 3'd3};

  // Opcode map used by the unit decoders (own choice, RISC-like).
  typedef enum logic [OPC_W-1:0] {
    OP_ADD   = 5'd0,  OP_SUB  = 5'd1,  OP_AND  = 5'd2,  OP_OR   = 5'd3,
    OP_XOR   = 5'd4,  OP_SHL  = 5'd5,  OP_SHR  = 5'd6,  OP_SLT  = 5'd7,
    OP_MUL   = 5'd8,  OP_MULH = 5'd9,  OP_DIV  = 5'd10, OP_REM  = 5'd11,
    OP_LOAD  = 5'd12, OP_STORE= 5'd13,
    OP_FADD  = 5'd16, OP_FSUB = 5'd17, OP_FCMP = 5'd18, OP_FCVT = 5'd19,
    OP_FMUL  = 5'd20, OP_FDIV = 5'd21, OP_FSQRT= 5'd22,
    OP_NOP   = 5'd31
  } opcode_e;

  // Hard-wired barrel-shifter control for a fixed quantity: the same
  // rounding to a power of two (1, 2 or 4) as cem_shift_ctrl.
  function automatic logic [1:0] shift_of(cnt_t q);
    return {q[2], ~q[2] & q[1]};
  endfunction

  function automatic logic [NUM_TYPES-1:0][1:0] shifts_of(cnt_vec_t q);
    logic [NUM_TYPES-1:0][1:0] s;
    for (int t = 0; t < NUM_TYPES; t++) s[t] = shift_of(q[t]);
    return s;
  endfunction

  // Number of slots a unit of a given type occupies.
  function automatic int unsigned unit_span(rtype_t t);
    case (t)
      T_INT_ALU, T_INT_MDU: return 2;
      T_LSU:                return 1;
      T_FP_ALU, T_FP_MDU:   return 3;
      default:              return 1;
    endcase
  endfunction

endpackage
