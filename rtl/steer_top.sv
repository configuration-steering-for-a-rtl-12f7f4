// steer_top: configuration steering and scheduling core of a reconfigurable
// superscalar processor.
//
// The processor has one fixed unit of each of five types and eight slots of
// reconfigurable logic. This core contains:
//   - the seven-entry instruction queue with its wake-up array;
//   - the configuration manager (selection + loader), which steers the slots
//     toward the best-matching of four configurations (the current one and
//     three predefined ones) and starts partial reconfiguration of idle slots;
//   - five availability circuits, one per unit type, which combine the
//     resource allocation vector with each unit's availability signal;
//   - a scheduler that grants wake-up requests and assigns units.
// The fetch/decode front end, the register update unit (which inserts,
// retires and reschedules instructions), the functional units themselves and
// the reconfigurable fabric are outside this core; their signals are ports.
//
// Timing: insert, grant, retire and reconfiguration start all take effect at
// the rising clock edge; requests, grants, the configuration choice and load
// requests are combinational within a cycle. Active-low asynchronous reset.
//
// COUNT_READY selects which queue entries the configuration selection counts:
// 1 (default) the instructions ready to execute (operands available, not yet
// scheduled); 0 every unscheduled instruction.
module steer_top
  import steer_pkg::*;
#(
  parameter bit COUNT_READY = 1'b1   // selection counts only operand-ready entries
)
(
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction insertion (from decoder / register update unit)
  input  logic                 ins_valid,
  input  logic [OPC_W-1:0]     ins_opcode,
  input  logic [IQ_DEPTH-1:0]  ins_dep,
  input  logic [LAT_W-1:0]     ins_lat,
  output logic                 ins_ready,
  output logic [2:0]           ins_idx,
  // completion control (from register update unit)
  input  logic [IQ_DEPTH-1:0]  retire,
  input  logic [IQ_DEPTH-1:0]  reschedule,
  output logic [IQ_DEPTH-1:0]  iq_valid,
  output logic [IQ_DEPTH-1:0]  result_avail,
  // execution grants (to the functional units)
  output logic [IQ_DEPTH-1:0]  grant,
  output logic [3:0]           grant_unit [IQ_DEPTH],
  // functional-unit availability
  input  logic [NUM_FFU-1:0]   ffu_avail,
  input  logic [NUM_SLOTS-1:0] slot_avail,
  // reconfigurable fabric
  output logic [NUM_SLOTS-1:0] load_valid,
  output rtype_t               load_code [NUM_SLOTS],
  // observation
  output cfg_sel_t             cfg_sel,
  output rav_t                 rav,
  output cnt_vec_t             cfg_qty,
  output cnt_vec_t             cfg_req,
  output cnt_t                 cfg_err [4],
  output logic [IQ_DEPTH-1:0]  iq_scheduled,
  output unit_vec_t            unit_avail
);

  logic [IQ_DEPTH-1:0] request, count_en;
  unit_vec_t           unit_req [IQ_DEPTH];
  logic [OPC_W-1:0]    opcode   [IQ_DEPTH];

  instr_queue #(.COUNT_READY(COUNT_READY)) u_iq (
    .clk, .rst_n,
    .ins_valid, .ins_opcode, .ins_dep, .ins_lat, .ins_ready, .ins_idx,
    .unit_avail, .grant, .reschedule, .retire,
    .request, .result_avail, .valid(iq_valid), .scheduled(iq_scheduled), .count_en,
    .unit_req, .opcode
  );

  config_manager u_cm (
    .clk, .rst_n, .count_en, .opcode, .slot_avail,
    .sel(cfg_sel), .req(cfg_req), .err(cfg_err), .qty(cfg_qty), .rav, .load_valid, .load_code
  );

  for (genvar t = 0; t < NUM_TYPES; t++) begin : g_avail
    resource_available #(.TYPE(rtype_t'(t))) u_avail (
      .rav, .slot_avail, .ffu_avail, .available(unit_avail[t])
    );
  end

  scheduler u_sched (
    .request, .unit_req, .unit_avail, .rav, .slot_avail, .ffu_avail,
    .grant, .grant_unit
  );

endmodule
