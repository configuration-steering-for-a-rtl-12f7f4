// rfu_fabric_model: behavioural model of the reconfigurable fabric and of
// the functional units, for testbenches only (not synthesizable intent).
//
// Reconfiguration: a slot whose `load_valid` is high at a clock edge is
// unavailable for RECONF_LAT cycles. Execution: a grant to unit u with
// latency L makes that unit busy for L cycles (units are not pipelined).
// Units 0..4 are the fixed units; unit 5+s is the reconfigurable unit whose
// first slot is s, and every slot of that unit reports the unit's state.
// `hold` forces slots unavailable, to imitate long-running instructions.
module rfu_fabric_model
  import steer_pkg::*;
#(
  parameter int RECONF_LAT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_SLOTS-1:0] load_valid,
  input  rav_t                 rav,
  input  logic [IQ_DEPTH-1:0]  grant,
  input  logic [3:0]           grant_unit [IQ_DEPTH],
  input  logic [LAT_W-1:0]     grant_lat  [IQ_DEPTH],
  input  logic [NUM_SLOTS-1:0] hold,
  output logic [NUM_SLOTS-1:0] slot_avail,
  output logic [NUM_FFU-1:0]   ffu_avail
);

  int reconf [NUM_SLOTS];
  int busy   [NUM_FFU + NUM_SLOTS];
  int owner  [NUM_SLOTS];

  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++)
      owner[s] = (s == 0 || rav[s] != T_CONT) ? s : owner[s-1];
    for (int s = 0; s < NUM_SLOTS; s++)
      slot_avail[s] = (reconf[s] == 0) && (busy[NUM_FFU + owner[s]] == 0) && !hold[s];
    for (int f = 0; f < NUM_FFU; f++)
      ffu_avail[f] = (busy[f] == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SLOTS; s++) reconf[s] <= 0;
      for (int u = 0; u < NUM_FFU + NUM_SLOTS; u++) busy[u] <= 0;
    end else begin
      for (int s = 0; s < NUM_SLOTS; s++)
        if (load_valid[s])      reconf[s] <= RECONF_LAT;
        else if (reconf[s] > 0) reconf[s] <= reconf[s] - 1;
      for (int u = 0; u < NUM_FFU + NUM_SLOTS; u++) begin
        int nb;
        nb = (busy[u] > 0) ? busy[u] - 1 : 0;
        for (int e = 0; e < IQ_DEPTH; e++)
          if (grant[e] && int'(grant_unit[e]) == u) nb = int'(grant_lat[e]) - 1;
        busy[u] <= nb;
      end
    end
  end

endmodule
