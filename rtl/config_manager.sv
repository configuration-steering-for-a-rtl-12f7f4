// config_manager: configuration manager of the reconfigurable processor.
//
// Joins the configuration selection unit and the configuration loader in a
// loop: selection reads the queue entries marked by count_en and the loader's count
// of currently configured units, and outputs which configuration to steer
// toward; the loader reconfigures the idle slots that differ from it and
// updates the resource allocation vector, which changes the counts seen by
// the selection on the next cycle. Selection is combinational; the loader's
// allocation vector is the only state. The loop follows the described
// architecture.
module config_manager
  import steer_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IQ_DEPTH-1:0]  count_en,
  input  logic [OPC_W-1:0]     opcode [IQ_DEPTH],
  input  logic [NUM_SLOTS-1:0] slot_avail,
  output cfg_sel_t             sel,
  output cnt_vec_t             req,
  output cnt_t                 err [4],
  output cnt_vec_t             qty,
  output rav_t                 rav,
  output logic [NUM_SLOTS-1:0] load_valid,
  output rtype_t               load_code [NUM_SLOTS]
);

  config_select u_select (
    .count_en, .opcode, .cur_qty(qty), .rav, .req, .err, .sel
  );

  config_loader u_loader (
    .clk, .rst_n, .sel, .slot_avail, .load_valid, .load_code, .rav, .qty
  );

endmodule
