// tb_config_manager: closed-loop test of selection plus loader with the
// fabric model (reconfiguration takes three cycles).
//   1. Load/store-heavy queue from reset: configuration 1 is chosen, all
//      eight slots start loading in that same cycle, the allocation vector is
//      configuration 1 one edge later, and from then on the current
//      configuration is kept (no further loads).
//   2. Floating-point-heavy queue while slot 4 is held busy: configuration 2
//      is chosen; the FP-ALU loads at once, the FP-MDU only after slot 4 is
//      released; the vector ends as configuration 2.
//   3. Empty queue: the current configuration is kept, nothing loads.
module tb_config_manager;
  import steer_pkg::*;
  logic                 clk = 0, rst_n = 0;
  logic [IQ_DEPTH-1:0]  count_en = '0;
  logic [OPC_W-1:0]     opcode [IQ_DEPTH];
  logic [NUM_SLOTS-1:0] slot_avail, load_valid, hold = '0;
  logic [NUM_FFU-1:0]   ffu_avail;
  cfg_sel_t             sel;
  cnt_vec_t             req, qty;
  cnt_t                 err [4];
  rav_t                 rav;
  rtype_t               load_code [NUM_SLOTS];
  logic [IQ_DEPTH-1:0]  no_grant = '0;
  logic [3:0]           g_unit [IQ_DEPTH];
  logic [LAT_W-1:0]     g_lat  [IQ_DEPTH];
  int checks = 0, failures = 0, loads = 0;

  config_manager dut (.clk, .rst_n, .count_en, .opcode, .slot_avail, .sel, .req, .err, .qty,
                      .rav, .load_valid, .load_code);
  rfu_fabric_model #(.RECONF_LAT(3)) u_fab (.clk, .rst_n, .load_valid, .rav, .grant(no_grant),
      .grant_unit(g_unit), .grant_lat(g_lat), .hold, .slot_avail, .ffu_avail);

  always #5 clk = ~clk;
  always @(posedge clk) loads <= loads + $countones(load_valid);

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (sel %0d rav %h lv %b)", what, sel, rav, load_valid); end
  endtask

  task automatic fill(opcode_e a, opcode_e b, opcode_e c, opcode_e d, opcode_e e, opcode_e f, opcode_e g);
    opcode = '{a, b, c, d, e, f, g};
    count_en = '1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < IQ_DEPTH; e++) begin opcode[e] = OP_NOP; g_unit[e] = '0; g_lat[e] = '0; end
    #12 rst_n = 1;
    @(negedge clk);
    // 1. load/store heavy
    fill(OP_LOAD, OP_STORE, OP_LOAD, OP_LOAD, OP_STORE, OP_ADD, OP_MUL);
    #1;
    chk("sel 1", sel == 2'd1);
    chk("all slots load", load_valid == 8'hFF);
    @(negedge clk);
    chk("rav is config 1", rav == LAYOUT_C1);
    chk("keep after load", sel == 2'd0 && load_valid == '0);
    chk("slots reconfiguring", slot_avail == '0);
    repeat (4) @(negedge clk);
    chk("slots ready", slot_avail == '1);
    chk("loads counted", loads == 8);
    // 2. floating-point heavy with slot 4 busy
    hold = 8'h10;
    fill(OP_FADD, OP_FMUL, OP_FSUB, OP_FDIV, OP_FMUL, OP_FADD, OP_LOAD);
    #1;
    chk("sel 2", sel == 2'd2);
    chk("FP-ALU loads", load_valid == 8'b0000_0111);
    repeat (3) begin
      @(negedge clk); #1;
      chk("FP-MDU waits", (load_valid & 8'b0011_1000) == '0);
    end
    hold = '0; #1;
    chk("sel still 2", sel == 2'd2);
    chk("FP-MDU loads", load_valid == 8'b0011_1000);
    @(negedge clk);
    chk("rav is config 2", rav == LAYOUT_C2);
    chk("keep config 2", sel == 2'd0);
    // 3. empty queue
    count_en = '0;
    repeat (5) begin
      @(negedge clk); #1;
      chk("idle keeps", sel == 2'd0 && load_valid == '0);
    end
    chk("total loads", loads == 8 + 3 + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
