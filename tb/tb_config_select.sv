// tb_config_select: checks the whole selection unit against a reference
// written from the selection rules: count the instructions marked by
// count_en for each unit type, compute the error of each configuration with power-of-two
// divisors (1, 2 or 4) of its unit counts, fixed units included, and pick the
// smallest error with ties going to the current configuration, then to the
// lower index. Equal errors are resolved by the number of units of the
// configuration's layout that have a slot differing from the allocation
// vector (zero for the current one).
// Directed cases first, then random queue contents and current
// unit counts.
module tb_config_select;
  import steer_pkg::*;
  logic [IQ_DEPTH-1:0] count_en;
  logic [OPC_W-1:0]    opcode [IQ_DEPTH];
  cnt_vec_t            cur_qty, req;
  rav_t                rav;
  cnt_t                err [4];
  cfg_sel_t            sel;
  int checks = 0, failures = 0;
  int sel_seen [4] = '{0, 0, 0, 0};

  config_select dut (.count_en, .opcode, .cur_qty, .rav, .req, .err, .sel);

  // Unit counts of the predefined configurations, FFUs included
  // (Int-ALU, Int-MDU, LSU, FP-ALU, FP-MDU).
  int cfg_q [4][5] = '{'{0, 0, 0, 0, 0}, '{2, 2, 5, 1, 1}, '{1, 1, 3, 2, 2}, '{3, 3, 1, 1, 1}};
  // Slot layouts, slot 0 first (0 ALU, 1 MDU, 2 LSU, 3 FPA, 4 FPM, 7 cont.).
  int lay [4][8] = '{'{0, 0, 0, 0, 0, 0, 0, 0},
                     '{0, 7, 1, 7, 2, 2, 2, 2},
                     '{3, 7, 7, 4, 7, 7, 2, 2},
                     '{0, 7, 0, 7, 1, 7, 1, 7}};
  // One representative opcode per unit type.
  int rep_op [5] = '{0, 8, 12, 16, 20};

  function automatic int divisor(int q);
    if (q >= 4) return 4;
    if (q >= 2) return 2;
    return 1;
  endfunction

  task automatic check_now();
    int r [5];
    int e [4];
    int m, es, mc;
    int k [4];
    for (int t = 0; t < 5; t++) r[t] = 0;
    for (int i = 0; i < IQ_DEPTH; i++)
      if (count_en[i]) begin
        int o;
        o = int'(opcode[i]);
        if (o <= 7) r[0]++;
        else if (o <= 11) r[1]++;
        else if (o <= 13) r[2]++;
        else if (o >= 16 && o <= 19) r[3]++;
        else if (o >= 20 && o <= 22) r[4]++;
      end
    for (int c = 0; c < 4; c++) begin
      e[c] = 0;
      for (int t = 0; t < 5; t++)
        e[c] += r[t] / divisor(c == 0 ? int'(cur_qty[t]) : cfg_q[c][t]);
    end
    for (int c = 0; c < 4; c++) begin
      k[c] = 0;
      if (c != 0) begin
        // walk the layout unit by unit
        int s;
        s = 0;
        while (s < 8) begin
          bit d;
          int s2;
          d = (int'(rav[s]) != lay[c][s]);
          s2 = s + 1;
          while (s2 < 8 && lay[c][s2] == 7) begin
            if (int'(rav[s2]) != 7) d = 1;
            s2++;
          end
          if (d) k[c]++;
          s = s2;
        end
      end
    end
    m = e[0]; es = 0; mc = 0;
    for (int c = 1; c < 4; c++)
      if (e[c] < m || (e[c] == m && k[c] < mc)) begin m = e[c]; mc = k[c]; es = c; end
    #1;
    checks++;
    for (int t = 0; t < 5; t++) if (int'(req[t]) != r[t]) begin
      failures++; $display("FAIL req[%0d] got %0d exp %0d", t, req[t], r[t]);
    end
    for (int c = 0; c < 4; c++) if (int'(err[c]) != e[c]) begin
      failures++; $display("FAIL err[%0d] got %0d exp %0d", c, err[c], e[c]);
    end
    if (int'(sel) != es) begin
      failures++; $display("FAIL sel got %0d exp %0d (errs %0d %0d %0d %0d)", sel, es, e[0], e[1], e[2], e[3]);
    end
    sel_seen[es]++;
  endtask

  task automatic fill(int n_alu, int n_mdu, int n_lsu, int n_fpa, int n_fpm);
    int k;
    int n [5];
    n = '{n_alu, n_mdu, n_lsu, n_fpa, n_fpm};
    k = 0;
    count_en = '0;
    for (int t = 0; t < 5; t++)
      for (int j = 0; j < n[t]; j++) begin
        opcode[k] = OPC_W'(rep_op[t]); count_en[k] = 1'b1; k++;
      end
    for (int i = k; i < IQ_DEPTH; i++) opcode[i] = OP_NOP;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: only fixed units configured (1 of each type).
    cur_qty = {3'd1, 3'd1, 3'd1, 3'd1, 3'd1};
    for (int s = 0; s < 8; s++) rav[s] = T_EMPTY;
    fill(1, 1, 5, 0, 0); check_now();          // load heavy -> config 1
    if (sel != 2'd1) begin failures++; $display("FAIL load-heavy sel %0d", sel); end
    fill(0, 0, 1, 3, 3); check_now();          // FP heavy -> config 2
    if (sel != 2'd2) begin failures++; $display("FAIL fp-heavy sel %0d", sel); end
    // Integer heavy: configs 1 and 3 tie (2 and 3 units both divide by 2);
    // from empty slots config 3 loads four units and config 1 six: config 3.
    fill(4, 3, 0, 0, 0); check_now();
    if (sel != 2'd3) begin failures++; $display("FAIL int-heavy sel %0d", sel); end
    // From a mix of configs 2 and 3 (FPA FPA' FPA' E MDU MDU' MDU MDU'),
    // config 3 reloads two units and config 1 six: config 3.
    rav = '{3'b111, 3'b001, 3'b111, 3'b001, 3'b110, 3'b111, 3'b111, 3'b011};
    cur_qty = {3'd1, 3'd2, 3'd1, 3'd3, 3'd1};
    check_now();
    if (sel != 2'd3) begin failures++; $display("FAIL int-heavy from hybrid sel %0d", sel); end
    cur_qty = {3'd1, 3'd1, 3'd1, 3'd1, 3'd1};
    for (int s = 0; s < 8; s++) rav[s] = T_EMPTY;
    fill(0, 0, 0, 0, 0); check_now();          // empty queue -> keep current
    if (sel != 2'd0) begin failures++; $display("FAIL empty sel %0d", sel); end
    // Current configuration equals config 1: a tie keeps the current one.
    cur_qty = {3'd1, 3'd1, 3'd5, 3'd2, 3'd2};
    fill(1, 1, 5, 0, 0); check_now();
    if (sel != 2'd0) begin failures++; $display("FAIL tie sel %0d", sel); end
    // Random.
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < IQ_DEPTH; i++) begin
        opcode[i]   = 5'($urandom);
        count_en[i] = ($urandom_range(0, 3) != 0);
      end
      for (int t = 0; t < 5; t++) cur_qty[t] = 3'($urandom_range(1, 5));
      for (int s = 0; s < 8; s++) rav[s] = 3'($urandom_range(0, 7));
      check_now();
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (sel_seen[c] == 0) begin failures++; $display("FAIL config %0d never chosen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
