// div_shifter: barrel shifter that divides a three-bit requirement by 1, 2 or
// 4 (right shift by 0, 1 or 2), truncating. A shift code of 3 is treated as
// a division by 4 as well, since the shift controls never produce it.
// Combinational.
module div_shifter
  import steer_pkg::*;
(
  input  cnt_t       value,
  input  logic [1:0] shift,
  output cnt_t       result
);

  always_comb begin
    case (shift)
      2'd0:    result = value;
      2'd1:    result = value >> 1;
      default: result = value >> 2;
    endcase
  end

endmodule
