// resource_available: availability of a functional-unit type t.
//
// available(t) = OR over every entry i of the resource allocation vector of
//   (type(i) == t, tested bitwise as the AND of three XNORs) AND availability(i).
// The vector covers the five fixed units, whose codes are hard-wired
// (000..100), and the reconfigurable slots, whose codes come from the
// configuration loader. A multi-slot unit carries its type code in one slot
// only (111 in the others), so each unit is considered once. The function
// follows the described equation and circuit; combinational.
module resource_available
  import steer_pkg::*;
#(
  parameter rtype_t TYPE = T_INT_ALU     // unit type this instance reports
) (
  input  rav_t                 rav,          // codes of the reconfigurable slots
  input  logic [NUM_SLOTS-1:0] slot_avail,   // availability(i) of each slot
  input  logic [NUM_FFU-1:0]   ffu_avail,    // availability(i) of each fixed unit
  output logic                 available     // a unit of type TYPE is free
);

  function automatic logic match(rtype_t code);
    logic m;
    m = 1'b1;
    for (int b = 0; b < TYPE_W; b++) m = m & ~(TYPE[b] ^ code[b]);
    return m;
  endfunction

  always_comb begin
    available = 1'b0;
    for (int f = 0; f < NUM_FFU; f++)
      available = available | (match(rtype_t'(f)) & ffu_avail[f]);
    for (int s = 0; s < NUM_SLOTS; s++)
      available = available | (match(rav[s]) & slot_avail[s]);
  end

endmodule
