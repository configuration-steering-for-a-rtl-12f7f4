// instr_queue: seven-entry instruction queue with its wake-up array.
//
// Each entry keeps the instruction's opcode and one wake-up row
// (wakeup_entry): the one-hot unit type it needs, the entries it needs
// results from, its scheduled bit and its result timer. New instructions are
// written into the lowest free entry (`ins_idx`, valid while `ins_ready`); the
// producer of the instruction names its source entries in `ins_dep`, one bit
// per entry, so the dependency columns are entry numbers as in the described
// wake-up array. The unit requirement of a new row is produced by a unit
// decoder from its opcode. The availability lines crossing the array are the
// five unit-type lines (`unit_avail`) and the seven result lines, which are
// the rows' own result-available outputs. Retiring entries clears their rows
// and their column in every row in the same edge.
//
// `count_en` marks the entries the configuration selection unit inspects:
// the instructions that are ready to be executed, i.e. valid, not yet
// scheduled and with every needed result available (whether their unit type
// is available is deliberately not part of it, so that missing units are
// asked for). With COUNT_READY = 0 every valid, unscheduled entry is counted
// instead. One instruction may be inserted per cycle. Free-entry allocation
// is this design's own choice.
module instr_queue
  import steer_pkg::*;
#(
  parameter bit COUNT_READY = 1'b1   // count only operand-ready entries
)
(
  input  logic                clk,
  input  logic                rst_n,
  // insertion
  input  logic                ins_valid,
  input  logic [OPC_W-1:0]    ins_opcode,
  input  logic [IQ_DEPTH-1:0] ins_dep,
  input  logic [LAT_W-1:0]    ins_lat,
  output logic                ins_ready,     // a free entry exists
  output logic [2:0]          ins_idx,       // entry the next insert goes to
  // scheduling
  input  unit_vec_t           unit_avail,
  input  logic [IQ_DEPTH-1:0] grant,
  input  logic [IQ_DEPTH-1:0] reschedule,
  input  logic [IQ_DEPTH-1:0] retire,
  output logic [IQ_DEPTH-1:0] request,
  output logic [IQ_DEPTH-1:0] result_avail,
  output logic [IQ_DEPTH-1:0] valid,
  output logic [IQ_DEPTH-1:0] scheduled,
  output logic [IQ_DEPTH-1:0] count_en,
  output unit_vec_t           unit_req [IQ_DEPTH],
  output logic [OPC_W-1:0]    opcode   [IQ_DEPTH]
);

  // Lowest free entry.
  always_comb begin
    ins_ready = 1'b0;
    ins_idx   = '0;
    for (int e = IQ_DEPTH - 1; e >= 0; e--) begin
      if (!valid[e]) begin
        ins_ready = 1'b1;
        ins_idx   = 3'(e);
      end
    end
  end

  unit_vec_t ins_unit;
  unit_decoder u_ins_dec (.count_en(1'b1), .opcode(ins_opcode), .unit_req(ins_unit));

  logic [IQ_DEPTH-1:0] ins_sel;
  always_comb begin
    ins_sel = '0;
    if (ins_valid && ins_ready) ins_sel[ins_idx] = 1'b1;
  end


  logic [IQ_DEPTH-1:0] ops_ready;

  for (genvar e = 0; e < IQ_DEPTH; e++) begin : g_row
    wakeup_entry u_row (
      .clk, .rst_n,
      .insert      (ins_sel[e]),
      .ins_unit    (ins_unit),
      .ins_dep     (ins_dep),
      .ins_lat     (ins_lat),
      .unit_avail  (unit_avail),
      .result_avail(result_avail),
      .clear_dep   (retire),
      .grant       (grant[e]),
      .reschedule  (reschedule[e]),
      .retire      (retire[e]),
      .valid       (valid[e]),
      .scheduled   (scheduled[e]),
      .unit_req    (unit_req[e]),
      .dep         (),
      .operands_ready(ops_ready[e]),
      .request     (request[e]),
      .result_ready(result_avail[e])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          opcode[e] <= OP_NOP;
      else if (ins_sel[e]) opcode[e] <= ins_opcode;
    end
  end

  assign count_en = valid & ~scheduled & (COUNT_READY ? ops_ready : '1);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  ins_valid |-> ins_ready);

endmodule
