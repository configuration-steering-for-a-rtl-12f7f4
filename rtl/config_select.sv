// config_select: configuration selection unit.
//
// Four stages, all combinational:
//   1. one unit decoder per instruction-queue entry turns the opcode of every
//      entry marked by count_en (ready to execute, not yet scheduled) into a
//      one-hot unit requirement;
//   2. one requirements encoder per unit type counts the entries needing it;
//   3. four error metric generators compare those counts with what each
//      configuration offers: configurations 1..3 use hard-wired shift controls
//      derived from their fixed unit counts (FFUs included), configuration 0
//      (the current one) uses the unit counts reported by the loader;
//   4. the minimal error selection outputs the two-bit index of the best
//      configuration; equal errors go to the configuration needing the fewest
//      units reconfigured, so the current one wins every tie it is part of.
// The stage structure follows the described unit; the queue depth is seven.
// The per-configuration reconfiguration count is formed here from the
// loader's resource allocation vector: a unit of a predefined layout needs
// reloading when any of its slots differs (XOR) from the vector.
module config_select
  import steer_pkg::*;
(
  input  logic [IQ_DEPTH-1:0]  count_en,            // entry is to be counted
  input  logic [OPC_W-1:0]     opcode [IQ_DEPTH],
  input  cnt_vec_t             cur_qty,             // units configured now, per type
  input  rav_t                 rav,                 // loader's resource allocation vector
  output cnt_vec_t             req,                 // required units per type
  output cnt_t                 err [4],             // error of configuration 0..3
  output cfg_sel_t             sel                  // configuration to load next
);

  unit_vec_t unit_req [IQ_DEPTH];

  for (genvar e = 0; e < IQ_DEPTH; e++) begin : g_dec
    unit_decoder u_dec (.count_en(count_en[e]), .opcode(opcode[e]), .unit_req(unit_req[e]));
  end

  for (genvar t = 0; t < NUM_TYPES; t++) begin : g_enc
    logic [IQ_DEPTH-1:0] col;
    for (genvar e = 0; e < IQ_DEPTH; e++) begin : g_col
      assign col[e] = unit_req[e][t];
    end
    req_encoder #(.N(IQ_DEPTH), .CW(CNT_W)) u_enc (.need(col), .count(req[t]));
  end

  cem #(.USE_QTY(1'b1))                         u_cem0 (.req(req), .qty(cur_qty), .err(err[0]));
  cem #(.USE_QTY(1'b0), .SHIFTS(shifts_of(QTY_C1))) u_cem1 (.req(req), .qty('0), .err(err[1]));
  cem #(.USE_QTY(1'b0), .SHIFTS(shifts_of(QTY_C2))) u_cem2 (.req(req), .qty('0), .err(err[2]));
  cem #(.USE_QTY(1'b0), .SHIFTS(shifts_of(QTY_C3))) u_cem3 (.req(req), .qty('0), .err(err[3]));

  // Reconfiguration cost of each configuration: units of its layout with at
  // least one slot that differs from the allocation vector.
  cost_t cost [4];
  function automatic cost_t units_to_load(rav_t cur, rav_t lay);
    cost_t n;
    logic  pend;
    n    = '0;
    pend = 1'b0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if (lay[s] != T_CONT) begin
        if (pend) n = n + cost_t'(1);
        pend = ((cur[s] ^ lay[s]) != '0);
      end else begin
        pend = pend | ((cur[s] ^ lay[s]) != '0);
      end
    end
    if (pend) n = n + cost_t'(1);
    return n;
  endfunction

  assign cost[0] = '0;
  assign cost[1] = units_to_load(rav, LAYOUT_C1);
  assign cost[2] = units_to_load(rav, LAYOUT_C2);
  assign cost[3] = units_to_load(rav, LAYOUT_C3);

  min_err_select u_sel (.err(err), .cost(cost), .sel(sel));

endmodule
