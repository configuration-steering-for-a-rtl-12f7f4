// tb_config_loader: directed sequence through the partial reconfiguration
// rules. Slot availability is driven directly. Expected allocation vectors
// are written out by hand from the slot layouts (slot 0 first):
//   config 1: ALU ALU' MDU MDU' LSU LSU LSU LSU
//   config 2: FPA FPA' FPA' FPM FPM' FPM' LSU LSU
//   config 3: ALU ALU' ALU ALU' MDU MDU' MDU MDU'
// (' = continuation code 111, E = empty code 110).
module tb_config_loader;
  import steer_pkg::*;
  logic                 clk = 0, rst_n = 0;
  cfg_sel_t             sel;
  logic [NUM_SLOTS-1:0] slot_avail, load_valid;
  rtype_t               load_code [NUM_SLOTS];
  rav_t                 rav;
  cnt_vec_t             qty;
  int checks = 0, failures = 0;
  int blocked_seen = 0, hybrid_seen = 0, orphan_seen = 0;

  config_loader dut (.clk, .rst_n, .sel, .slot_avail, .load_valid, .load_code, .rav, .qty);

  always #5 clk = ~clk;

  localparam rtype_t A = 3'b000, M = 3'b001, L = 3'b010, FA = 3'b011, FM = 3'b100,
                     C = 3'b111, E = 3'b110;

  task automatic expect_rav(string what, rtype_t s0, rtype_t s1, rtype_t s2, rtype_t s3,
                            rtype_t s4, rtype_t s5, rtype_t s6, rtype_t s7);
    rtype_t exp_v [8];
    exp_v = '{s0, s1, s2, s3, s4, s5, s6, s7};
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (rav[s] !== exp_v[s]) begin
        failures++; $display("FAIL %s: slot %0d code %b exp %b", what, s, rav[s], exp_v[s]);
      end
    end
  endtask

  task automatic expect_qty(string what, int a, int m, int l, int fa, int fm);
    int e [5];
    e = '{a, m, l, fa, fm};
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (int'(qty[t]) != e[t]) begin
        failures++; $display("FAIL %s: qty[%0d]=%0d exp %0d", what, t, qty[t], e[t]);
      end
    end
  endtask

  task automatic expect_loads(string what, logic [7:0] exp_v);
    checks++;
    if (load_valid !== exp_v) begin
      failures++; $display("FAIL %s: load_valid %b exp %b", what, load_valid, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 2'd0; slot_avail = '1;
    #12 rst_n = 1;
    @(negedge clk);
    expect_rav("reset", E, E, E, E, E, E, E, E);
    expect_qty("reset", 1, 1, 1, 1, 1);
    expect_loads("reset", 8'h00);
    // Steer to config 1 with every slot idle: all eight slots load at once.
    sel = 2'd1; #1;
    expect_loads("c1 start", 8'hFF);
    checks++;
    if (load_code[0] !== A || load_code[1] !== C || load_code[2] !== M || load_code[4] !== L) begin
      failures++; $display("FAIL load codes");
    end
    @(negedge clk);
    expect_rav("c1", A, C, M, C, L, L, L, L);
    expect_qty("c1", 2, 2, 5, 1, 1);
    expect_loads("c1 settled", 8'h00);
    // Config 2 while slot 4 (an LSU) is busy: FP-ALU loads over slots 0-2,
    // which overwrites Int-ALU and half of Int-MDU (slot 3 becomes empty);
    // FP-MDU (slots 3-5) waits for slot 4; LSUs in 6-7 already match.
    sel = 2'd2; slot_avail = 8'b1110_1111; #1;
    expect_loads("c2 partial", 8'b0000_0111);
    @(negedge clk);
    expect_rav("c2 partial", FA, C, C, E, L, L, L, L);
    expect_qty("c2 partial", 1, 1, 5, 2, 1);
    blocked_seen++; orphan_seen++;
    // Still busy: nothing more happens.
    @(negedge clk);
    expect_loads("c2 waiting", 8'h00);
    expect_rav("c2 waiting", FA, C, C, E, L, L, L, L);
    // Slot 4 frees: FP-MDU loads.
    slot_avail = '1; #1;
    expect_loads("c2 rest", 8'b0011_1000);
    @(negedge clk);
    expect_rav("c2", FA, C, C, FM, C, C, L, L);
    expect_qty("c2", 1, 1, 3, 2, 2);
    // Current configuration chosen: no reconfiguration at all.
    sel = 2'd0; #1;
    expect_loads("keep", 8'h00);
    @(negedge clk);
    expect_rav("keep", FA, C, C, FM, C, C, L, L);
    // Config 3 while the FP-ALU (slots 0-2) is busy: only the two Int-MDUs
    // in slots 4-7 load; the FP-MDU they overwrite leaves slot 3 empty.
    sel = 2'd3; slot_avail = 8'b1111_1000; #1;
    expect_loads("c3 partial", 8'b1111_0000);
    @(negedge clk);
    expect_rav("hybrid 2/3", FA, C, C, E, M, C, M, C);
    expect_qty("hybrid 2/3", 1, 3, 1, 2, 1);
    hybrid_seen++;
    // Now config 1 with everything idle except slots 4-5: Int-ALU 0-1,
    // Int-MDU 2-3 and LSUs 6, 7 load; slots 4-5 keep an Int-MDU from config 3.
    sel = 2'd1; slot_avail = 8'b1100_1111; #1;
    expect_loads("c1 partial", 8'b1100_1111);
    @(negedge clk);
    expect_rav("hybrid 1/3", A, C, M, C, M, C, L, L);
    expect_qty("hybrid 1/3", 2, 3, 3, 1, 1);
    hybrid_seen++;
    checks++;
    if (blocked_seen == 0 || hybrid_seen == 0 || orphan_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
