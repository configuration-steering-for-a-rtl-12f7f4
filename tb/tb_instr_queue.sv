// tb_instr_queue: runs the seven-instruction dependency example
//   Shift -> Add, Shift -> Sub -> Mul, Load -> FPMul -> FPAdd
// through the queue with every unit type available and every request
// granted (no contention). Latencies: 1 for integer ALU work, 2 for the load,
// 3 for the multiply, 4 for FPMul, 2 for FPAdd. Expected grant cycles follow
// from "a dependent starts when its producer's latency has elapsed":
//   Shift 0, Load 0, Add 1, Sub 1, Mul 2, FPMul 2, FPAdd 6.
// Also checked: entry allocation order, the dependency-column contents, that
// a full queue reports not ready, that retiring clears columns, and the
// count_en vector: by default only operand-ready, unscheduled entries; a
// second queue built with COUNT_READY = 0 counts every unscheduled entry.
module tb_instr_queue;
  import steer_pkg::*;
  logic                clk = 0, rst_n = 0;
  logic                ins_valid = 0;
  logic [OPC_W-1:0]    ins_opcode = '0;
  logic [IQ_DEPTH-1:0] ins_dep = '0;
  logic [LAT_W-1:0]    ins_lat = '0;
  logic                ins_ready;
  logic [2:0]          ins_idx;
  unit_vec_t           unit_avail = '1;
  logic [IQ_DEPTH-1:0] grant, reschedule = '0, retire = '0;
  logic [IQ_DEPTH-1:0] request, result_avail, valid, scheduled, count_en;
  logic [IQ_DEPTH-1:0] count_all, req_all, res_all, valid_all, sched_all;
  logic                ready_all;
  logic [2:0]          idx_all;
  unit_vec_t           ureq_all [IQ_DEPTH];
  logic [OPC_W-1:0]    opc_all  [IQ_DEPTH];
  unit_vec_t           unit_req [IQ_DEPTH];
  logic [OPC_W-1:0]    opcode   [IQ_DEPTH];
  int checks = 0, failures = 0;
  int cycle = 0;
  int grant_cycle [IQ_DEPTH];
  logic run = 0;

  instr_queue dut (.clk, .rst_n, .ins_valid, .ins_opcode, .ins_dep, .ins_lat, .ins_ready,
                   .ins_idx, .unit_avail, .grant, .reschedule, .retire, .request,
                   .result_avail, .valid, .scheduled, .count_en, .unit_req, .opcode);

  // Same stimulus, counting every unscheduled entry.
  instr_queue #(.COUNT_READY(1'b0)) dut_all (
    .clk, .rst_n, .ins_valid, .ins_opcode, .ins_dep, .ins_lat, .ins_ready(ready_all),
    .ins_idx(idx_all), .unit_avail, .grant, .reschedule, .retire, .request(req_all),
    .result_avail(res_all), .valid(valid_all), .scheduled(sched_all), .count_en(count_all),
    .unit_req(ureq_all), .opcode(opc_all));

  always #5 clk = ~clk;
  assign grant = run ? request : '0;

  always @(posedge clk) begin
    if (run) begin
      for (int e = 0; e < IQ_DEPTH; e++) if (grant[e]) grant_cycle[e] = cycle;
      cycle++;
    end
  end

  task automatic push(opcode_e op, logic [6:0] d, int lat, int exp_idx);
    @(negedge clk);
    checks++;
    if (!ins_ready || int'(ins_idx) != exp_idx) begin
      failures++; $display("FAIL alloc: ready %b idx %0d exp %0d", ins_ready, ins_idx, exp_idx);
    end
    ins_valid = 1; ins_opcode = op; ins_dep = d; ins_lat = LAT_W'(lat);
    @(negedge clk);
    ins_valid = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c [IQ_DEPTH] = '{0, 1, 1, 3, 0, 2, 6};
    for (int e = 0; e < IQ_DEPTH; e++) grant_cycle[e] = -1;
    #12 rst_n = 1;
    // Entries 0..6 = Shift, Sub, Add, Mul, Load, FPMul, FPAdd.
    push(OP_SHL,  7'b0000000, 1, 0);
    push(OP_SUB,  7'b0000001, 1, 1);
    push(OP_ADD,  7'b0000001, 1, 2);
    push(OP_MUL,  7'b0000010, 3, 3);
    push(OP_LOAD, 7'b0000000, 2, 4);
    push(OP_FMUL, 7'b0010000, 4, 5);
    push(OP_FADD, 7'b0100000, 2, 6);
    @(negedge clk);
    checks++;
    if (ins_ready) begin failures++; $display("FAIL full queue reports ready"); end
    checks++;
    // Only Shift (entry 0) and Load (entry 4) have no pending producers.
    if (count_en != 7'b0010001) begin failures++; $display("FAIL count_en %b", count_en); end
    checks++;
    if (count_all != 7'h7F) begin failures++; $display("FAIL count_all %b", count_all); end
    checks++;
    if (unit_req[3] != 5'b00010 || unit_req[4] != 5'b00100 || unit_req[5] != 5'b10000 ||
        unit_req[6] != 5'b01000 || unit_req[0] != 5'b00001) begin
      failures++; $display("FAIL unit rows");
    end
    checks++;
    if (opcode[5] != OP_FMUL) begin failures++; $display("FAIL opcode storage"); end
    run = 1;
    repeat (10) @(negedge clk);
    run = 0;
    // Mul depends on Sub (granted cycle 1, latency 1) so it goes at cycle 2.
    exp_c[3] = 2;
    for (int e = 0; e < IQ_DEPTH; e++) begin
      checks++;
      if (grant_cycle[e] != exp_c[e]) begin
        failures++; $display("FAIL entry %0d granted at %0d exp %0d", e, grant_cycle[e], exp_c[e]);
      end
    end
    checks++;
    if (count_en != '0 || count_all != '0) begin
      failures++; $display("FAIL count_en after issue %b %b", count_en, count_all);
    end
    // Retire Load (entry 4): FPMul's column for entry 4 clears, so once
    // rescheduled it requests although entry 4's result line is now low;
    // entry 4 is the lowest free entry again.
    retire = 7'b0010000;
    @(negedge clk);
    retire = '0;
    reschedule = 7'b0100000;
    @(negedge clk);
    reschedule = '0; #1;
    checks++;
    if (result_avail[4] || !request[5] || count_en != 7'b0100000) begin
      failures++; $display("FAIL column not cleared: res4 %b req5 %b", result_avail[4], request[5]);
    end
    checks++;
    if (!ins_ready || ins_idx != 3'd4) begin failures++; $display("FAIL realloc idx %0d", ins_idx); end
    // Reschedule FPAdd: it is unscheduled again but must not request, since
    // its producer FPMul was rescheduled and its result line is low.
    reschedule = 7'b1000000;
    @(negedge clk);
    reschedule = '0; #1;
    checks++;
    if (request[6] || count_en[6] || !count_all[6] || result_avail[5]) begin
      failures++; $display("FAIL reschedule");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
