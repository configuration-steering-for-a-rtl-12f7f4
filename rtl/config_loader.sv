// config_loader: configuration loader with partial reconfiguration.
//
// The loader owns the resource allocation vector (RAV): one three-bit type
// code per reconfigurable slot. The first slot of a unit holds the unit's type
// code, the following slots of a multi-slot unit hold 111, and a slot that
// holds no unit holds 110 (own choice). Every cycle it compares (XOR) the slot
// layout of the configuration chosen by the selection unit with the RAV. A
// unit of the chosen configuration is loaded when at least one of its slots
// differs and every one of its slots reports `slot_avail` (the unit now in that
// slot is not busy and the slot is not being reconfigured). Busy slots are left
// alone and retried on later cycles, by which time another configuration may
// have been chosen; the active configuration therefore becomes a mix of the
// steering configurations. Choosing configuration 0 (the current one) loads
// nothing.
//
// When a load starts, the RAV entries of its slots take the new codes at the
// next clock edge, and any slot outside the span that belonged to a unit the
// load overwrites is marked empty (own choice, so that a half-overwritten unit
// is never counted). `load_valid`/`load_code` are a one-cycle request per slot
// to the reconfigurable fabric; the fabric is expected to hold the slot's
// `slot_avail` low until reconfiguration completes. `qty` gives the number of
// units of each type currently configured, the fixed unit of each type
// included; it feeds the current configuration's error metric. Reset empties
// every slot (own choice).
module config_loader
  import steer_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_sel_t             sel,                     // chosen configuration
  input  logic [NUM_SLOTS-1:0] slot_avail,              // slot's unit is idle
  output logic [NUM_SLOTS-1:0] load_valid,              // start reconfiguring slot
  output rtype_t               load_code [NUM_SLOTS],   // code loaded into slot
  output rav_t                 rav,                     // resource allocation vector
  output cnt_vec_t             qty                      // configured units per type
);

  rav_t target;
  always_comb begin
    case (sel)
      2'd1:    target = LAYOUT_C1;
      2'd2:    target = LAYOUT_C2;
      2'd3:    target = LAYOUT_C3;
      default: target = rav;
    endcase
  end

  // First slot of the unit that owns each slot, in the RAV and in the target.
  logic [$clog2(NUM_SLOTS)-1:0] cur_own [NUM_SLOTS];
  logic [$clog2(NUM_SLOTS)-1:0] tgt_own [NUM_SLOTS];
  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if (s == 0 || rav[s] != T_CONT)    cur_own[s] = $clog2(NUM_SLOTS)'(s);
      else                               cur_own[s] = cur_own[s-1];
      if (s == 0 || target[s] != T_CONT) tgt_own[s] = $clog2(NUM_SLOTS)'(s);
      else                               tgt_own[s] = tgt_own[s-1];
    end
  end

  // Per target unit (indexed by its first slot): differs, and all slots idle.
  logic [NUM_SLOTS-1:0] differs, idle, go;
  always_comb begin
    differs = '0;
    idle    = '1;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if ((rav[s] ^ target[s]) != '0) differs[tgt_own[s]] = 1'b1;
      if (!slot_avail[s])             idle[tgt_own[s]]    = 1'b0;
    end
    for (int h = 0; h < NUM_SLOTS; h++)
      go[h] = (sel != 2'd0) && (target[h] != T_CONT) && differs[h] && idle[h];
  end

  // Slots being loaded now, and units of the RAV that a load overwrites.
  logic [NUM_SLOTS-1:0] loading, hit_unit;
  always_comb begin
    hit_unit = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      loading[s] = go[tgt_own[s]];
      if (loading[s]) hit_unit[cur_own[s]] = 1'b1;
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      load_valid[s] = loading[s];
      load_code[s]  = target[s];
    end
  end

  rav_t rav_next;
  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if (loading[s])                rav_next[s] = target[s];
      else if (hit_unit[cur_own[s]]) rav_next[s] = T_EMPTY;
      else                           rav_next[s] = rav[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rav <= {NUM_SLOTS{T_EMPTY}};
    else        rav <= rav_next;
  end

  // Configured quantity per type: one fixed unit plus the RFU units whose
  // first slot carries the type code.
  always_comb begin
    for (int t = 0; t < NUM_TYPES; t++) begin
      qty[t] = cnt_t'(1);
      for (int s = 0; s < NUM_SLOTS; s++)
        if (rav[s] == rtype_t'(t)) qty[t] = qty[t] + cnt_t'(1);
    end
  end

  // A slot is only reconfigured while it reports itself available.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (load_valid & ~slot_avail) == '0);

endmodule
