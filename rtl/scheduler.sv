// scheduler: resolves contention between execution requests.
//
// The wake-up array only says which entries could run. Because availability
// is one line per unit type, this scheduler grants at most one instruction per
// unit type per cycle: among the requesting entries that need type t, the
// lowest-numbered one wins while available(t) is high. The granted entry is
// also given a unit to run on: the first idle unit of that type, looking at
// the fixed units first (unit numbers 0..4, numbered by type code) and then
// at the reconfigurable slots (unit number 5 + slot index of the unit's first
// slot). The whole block is this design's own choice: only its task is given.
// Combinational; grants take effect at the next clock edge in the queue.
module scheduler
  import steer_pkg::*;
(
  input  logic [IQ_DEPTH-1:0]  request,
  input  unit_vec_t            unit_req [IQ_DEPTH],
  input  unit_vec_t            unit_avail,            // available(t)
  input  rav_t                 rav,
  input  logic [NUM_SLOTS-1:0] slot_avail,
  input  logic [NUM_FFU-1:0]   ffu_avail,
  output logic [IQ_DEPTH-1:0]  grant,
  output logic [3:0]           grant_unit [IQ_DEPTH]  // unit chosen per granted entry
);

  // First idle unit of each type.
  logic [3:0] pick [NUM_TYPES];
  always_comb begin
    for (int t = 0; t < NUM_TYPES; t++) begin
      pick[t] = '0;
      for (int s = NUM_SLOTS - 1; s >= 0; s--)
        if (slot_avail[s] && rav[s] == rtype_t'(t)) pick[t] = 4'(NUM_FFU + s);
      if (ffu_avail[t]) pick[t] = 4'(t);
    end
  end

  always_comb begin
    unit_vec_t taken;
    taken = '0;
    grant = '0;
    for (int e = 0; e < IQ_DEPTH; e++) begin
      grant_unit[e] = '0;
      for (int t = 0; t < NUM_TYPES; t++) begin
        if (request[e] && unit_req[e][t] && unit_avail[t] && !taken[t]) begin
          grant[e]      = 1'b1;
          grant_unit[e] = pick[t];
          taken[t]      = 1'b1;
        end
      end
    end
  end

endmodule
