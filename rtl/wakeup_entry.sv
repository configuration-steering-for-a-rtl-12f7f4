// wakeup_entry: one resource vector (row) of the wake-up array.
//
// A row stores which unit type the instruction needs (one-hot) and which
// queue entries it needs results from. It requests execution when it is valid,
// not yet scheduled, and for every column either the bit is clear or the
// matching "available" line is high (a per-column OR, all columns ANDed).
// The scheduled bit is set by an execution grant and cleared by reschedule,
// so that a granted instruction stops requesting while it runs.
// `operands_ready` is the dependency half of the request alone (every needed
// result available); the configuration selection counts rows by it.
//
// Result timing: a grant loads a count-down timer with latency-1. The row's
// own result-available line is a register that is set at the grant edge for a
// one-cycle instruction and otherwise at the edge where the timer holds one,
// so a dependent instruction can be granted exactly `latency` cycles after
// its producer. Retiring the row clears it; the queue also clears, in every
// row, the column of each retired entry (`clear_dep`), so later instructions
// never wait on a retired one. Insertion, grant and retire of the same row in
// one cycle are not expected; retire wins over grant, insert over both.
// The request logic and scheduled bit follow the described circuit; the timer
// register placement, the valid bit and the priorities are own choices.
module wakeup_entry
  import steer_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // insertion of a new instruction into this row
  input  logic                insert,
  input  unit_vec_t           ins_unit,     // one-hot unit type required
  input  logic [IQ_DEPTH-1:0] ins_dep,      // entries whose results are needed
  input  logic [LAT_W-1:0]    ins_lat,      // execution latency in cycles (>= 1)
  // availability lines passing through the array
  input  unit_vec_t           unit_avail,   // unit type t is available
  input  logic [IQ_DEPTH-1:0] result_avail, // result of entry j is available
  input  logic [IQ_DEPTH-1:0] clear_dep,    // entries being retired this cycle
  // scheduling control for this row
  input  logic                grant,        // execution grant
  input  logic                reschedule,   // clear the scheduled bit
  input  logic                retire,       // remove the instruction
  // state and outputs
  output logic                valid,
  output logic                scheduled,
  output unit_vec_t           unit_req,
  output logic [IQ_DEPTH-1:0] dep,
  output logic                operands_ready, // all needed results available
  output logic                request,      // request execution
  output logic                result_ready  // this entry's result-available line
);

  logic [LAT_W-1:0] lat_q, timer;
  logic             res_q;

  always_comb begin
    logic ops, units;
    ops   = 1'b1;
    units = 1'b1;
    for (int j = 0; j < IQ_DEPTH; j++)  ops   = ops   & (~dep[j] | result_avail[j]);
    for (int t = 0; t < NUM_TYPES; t++) units = units & (~unit_req[t] | unit_avail[t]);
    operands_ready = ops;
    request        = valid & ~scheduled & ops & units;
  end

  assign result_ready = valid & res_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= 1'b0;
      scheduled <= 1'b0;
      unit_req  <= '0;
      dep       <= '0;
      lat_q     <= '0;
      timer     <= '0;
      res_q     <= 1'b0;
    end else if (insert) begin
      valid     <= 1'b1;
      scheduled <= 1'b0;
      unit_req  <= ins_unit;
      dep       <= ins_dep & ~clear_dep;
      lat_q     <= ins_lat;
      timer     <= '0;
      res_q     <= 1'b0;
    end else if (retire) begin
      valid     <= 1'b0;
      scheduled <= 1'b0;
      unit_req  <= '0;
      dep       <= '0;
      timer     <= '0;
      res_q     <= 1'b0;
    end else begin
      dep <= dep & ~clear_dep;
      if (reschedule) begin
        scheduled <= 1'b0;
        timer     <= '0;
        res_q     <= 1'b0;
      end else if (grant) begin
        scheduled <= 1'b1;
        if (lat_q <= LAT_W'(1)) begin
          timer <= '0;
          res_q <= 1'b1;
        end else begin
          timer <= lat_q - LAT_W'(1);
          res_q <= 1'b0;
        end
      end else if (timer != '0) begin
        timer <= timer - LAT_W'(1);
        if (timer == LAT_W'(1)) res_q <= 1'b1;
      end
    end
  end

  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n)
                                grant |-> request);

endmodule
