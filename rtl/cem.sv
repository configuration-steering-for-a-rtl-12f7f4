// cem: configuration error metric generator for one configuration.
//
// Error = sum over the five unit types of floor(required / available), where
// the division is approximated by a barrel shifter dividing by 4, 2 or 1. The
// five shifted values are summed as in the described circuit: one three-bit
// adder for the two integer types, one for the two floating-point types, and
// a three-bit, three-operand adder joining those with the LSU term. Because
// each term is at most the requirement and the queue holds seven instructions,
// the sum fits in three bits.
//
// For a predefined configuration the shift controls are constants
// (parameter SHIFTS); for the current configuration (USE_QTY = 1) they come
// from cem_shift_ctrl applied to the configured quantities `qty`. Purely
// combinational.
module cem
  import steer_pkg::*;
#(
  parameter bit                            USE_QTY = 1'b1,
  parameter logic [NUM_TYPES-1:0][1:0]     SHIFTS  = '0
) (
  input  cnt_vec_t req,    // required units of each type
  input  cnt_vec_t qty,    // configured units of each type (USE_QTY only)
  output cnt_t     err     // configuration error metric
);

  logic [NUM_TYPES-1:0][1:0] shift;
  cnt_vec_t                  term;

  for (genvar t = 0; t < NUM_TYPES; t++) begin : g_type
    if (USE_QTY) begin : g_dyn
      cem_shift_ctrl u_ctrl (.qty(qty[t]), .shift(shift[t]));
    end else begin : g_fix
      assign shift[t] = SHIFTS[t];
    end
    div_shifter u_shift (.value(req[t]), .shift(shift[t]), .result(term[t]));
  end

  cnt_t int_sum, fp_sum;
  assign int_sum = term[T_INT_ALU] + term[T_INT_MDU];
  assign fp_sum  = term[T_FP_ALU]  + term[T_FP_MDU];
  assign err     = int_sum + term[T_LSU] + fp_sum;

endmodule
