// cem_shift_ctrl: shift-control input for a barrel shifter of the current
// configuration's error metric.
//
// The quantity of a unit type currently configured (three bits) is reduced to
// a two-bit shift amount from its upper two bits: the high-order bit passes
// straight through as shift bit 1, and shift bit 0 is the next lower-order
// bit gated by the inverted high-order bit. The result is a shift of 2
// (divide by 4) for quantities 4..7, 1 (divide by 2) for 2..3 and 0 (divide by
// 1) for 0..1, i.e. the quantity rounded down to a power of two, never more
// than a division by 4. The lowest quantity bit is not needed and stays
// unconnected. The structure follows the described circuit; combinational.
module cem_shift_ctrl
  import steer_pkg::*;
(
  input  cnt_t       qty,        // units of this type currently configured
  output logic [1:0] shift       // 0: /1, 1: /2, 2: /4
);

  assign shift[1] = qty[2];
  assign shift[0] = ~qty[2] & qty[1];

endmodule
