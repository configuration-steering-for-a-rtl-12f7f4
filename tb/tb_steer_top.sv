// tb_steer_top: end-to-end test of the steering and scheduling core at its
// default sizes (seven-entry queue, five fixed units, eight slots).
//
// The testbench plays the parts outside the core: it inserts a program of
// instructions in phases (integer heavy, load/store heavy, floating-point
// heavy, mixed), each depending on up to two instructions still in the queue;
// it retires instructions in program order once their results are available;
// it occasionally reschedules a running instruction; and the fabric model
// reconfigures slots and keeps units busy while they execute.
//
// Checked on every cycle: a grant goes to a unit of the right type that is
// configured and idle; no instruction starts before the latency of each of its
// producers has elapsed; each result line rises exactly `latency` cycles after
// its grant; every instruction completes. Checked per phase: the allocation
// vector reaches configuration 3 in the integer phase and configuration 2 in
// the floating-point phase; in the load/store phase configuration 1 is chosen
// and at least two reconfigurable LSUs get loaded. (Loads there seldom become
// ready in bunches, so the slots usually settle on a hybrid that already
// matches them rather than on configuration 1 itself.) Counted,
// and a failure if never seen: choice of each of configurations 0..3 while
// instructions wait, reconfiguration
// started, reconfiguration held back by a busy slot, a unit left empty by a
// partial load, a mixed (hybrid) configuration, grants to fixed and to
// reconfigurable units, an instruction waiting for a unit type, one waiting
// for a result, a reschedule, a full queue.
module tb_steer_top;
  import steer_pkg::*;

  localparam int N_PER_PHASE = 60;
  localparam int N_PHASES    = 4;
  localparam int N_TOTAL     = N_PER_PHASE * N_PHASES;

  logic                 clk = 0, rst_n = 0;
  logic                 ins_valid;
  logic [OPC_W-1:0]     ins_opcode;
  logic [IQ_DEPTH-1:0]  ins_dep;
  logic [LAT_W-1:0]     ins_lat;
  logic                 ins_ready;
  logic [2:0]           ins_idx;
  logic [IQ_DEPTH-1:0]  retire, reschedule, iq_valid, result_avail, grant, iq_scheduled;
  logic [3:0]           grant_unit [IQ_DEPTH];
  logic [NUM_FFU-1:0]   ffu_avail;
  logic [NUM_SLOTS-1:0] slot_avail, load_valid, hold;
  rtype_t               load_code [NUM_SLOTS];
  cfg_sel_t             cfg_sel;
  rav_t                 rav;
  cnt_vec_t             cfg_qty, cfg_req;
  cnt_t                 cfg_err [4];
  unit_vec_t            unit_avail;
  logic [LAT_W-1:0]     ent_lat [IQ_DEPTH];

  steer_top dut (.*);

  rfu_fabric_model #(.RECONF_LAT(4)) u_fab (
    .clk, .rst_n, .load_valid, .rav, .grant, .grant_unit, .grant_lat(ent_lat), .hold,
    .slot_avail, .ffu_avail);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Per-entry bookkeeping of the instruction held in each entry.
  int  e_type   [IQ_DEPTH];
  int  e_lat    [IQ_DEPTH];
  int  e_grant  [IQ_DEPTH];   // cycle of the last grant, -1 if none
  int  e_prod   [IQ_DEPTH][$];
  int  e_pid    [IQ_DEPTH];   // program index
  int  prod_done_at [int];    // program index -> cycle its result is usable
  int  order [$];             // entries in program order

  // Mechanism counters.
  int n_sel [4] = '{0, 0, 0, 0};
  int n_load_start = 0, n_load_blocked = 0, n_orphan = 0, n_hybrid = 0;
  int n_grant_ffu = 0, n_grant_rfu = 0, n_wait_unit = 0, n_wait_dep = 0;
  int n_resched = 0, n_full = 0, n_retired = 0, n_issued = 0;
  int seen_c3_in_int = 0, seen_c1_in_ls = 0, seen_c1_sel_ls = 0, seen_c2_in_fp = 0;

  function automatic int type_of_op(int op);
    if (op <= 7)  return 0;
    if (op <= 11) return 1;
    if (op <= 13) return 2;
    if (op <= 19) return 3;
    return 4;
  endfunction

  function automatic int lat_of_op(int op);
    case (op)
      OP_MUL, OP_MULH:          return 3;
      OP_DIV, OP_REM:           return 6;
      OP_LOAD, OP_STORE:        return 2;
      OP_FADD, OP_FSUB, OP_FCMP, OP_FCVT: return 3;
      OP_FMUL:                  return 5;
      OP_FDIV, OP_FSQRT:        return 9;
      default:                  return 1;
    endcase
  endfunction

  // Opcode drawn for a phase: 0 integer, 1 load/store heavy, 2 FP heavy, 3 mixed.
  function automatic int pick_op(int phase);
    int r;
    int alu [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    r = $urandom_range(0, 99);
    case (phase)
      1: if (r < 65) return ($urandom_range(0, 1) == 0) ? OP_LOAD : OP_STORE;
         else if (r < 85) return alu[$urandom_range(0, 7)];
         else return OP_MUL;
      2: if (r < 40) return ($urandom_range(0, 1) == 0) ? OP_FADD : OP_FSUB;
         else if (r < 75) return ($urandom_range(0, 2) == 0) ? OP_FDIV : OP_FMUL;
         else return OP_LOAD;
      0: if (r < 55) return alu[$urandom_range(0, 7)];
         else return ($urandom_range(0, 3) == 0) ? OP_DIV : OP_MUL;
      default: return $urandom_range(0, 22) > 13 ? 16 + $urandom_range(0, 6) : $urandom_range(0, 13);
    endcase
  endfunction

  function automatic bit is_layout(rav_t r);
    return r == LAYOUT_C1 || r == LAYOUT_C2 || r == LAYOUT_C3;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog: cycle %0d retired %0d", cycle, n_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int pid = 0;
    int phase;
    int prev_res [IQ_DEPTH];
    rav_t prev_rav;
    for (int e = 0; e < IQ_DEPTH; e++) begin e_grant[e] = -1; prev_res[e] = 0; ent_lat[e] = '0; end
    ins_valid = 0; ins_opcode = '0; ins_dep = '0; ins_lat = '0;
    retire = '0; reschedule = '0; hold = '0;
    #12 rst_n = 1;
    prev_rav = rav;

    while (n_retired < N_TOTAL && cycle < 20000) begin
      @(negedge clk);
      cycle++;
      phase = pid / N_PER_PHASE;

      // ---- observe the state left by the last edge ----
      for (int e = 0; e < IQ_DEPTH; e++) begin
        if (iq_valid[e] && result_avail[e] && !prev_res[e]) begin
          checks++;
          if (e_grant[e] < 0 || cycle - e_grant[e] != e_lat[e]) begin
            failures++;
            $display("FAIL entry %0d result at cycle %0d, grant %0d lat %0d", e, cycle, e_grant[e], e_lat[e]);
          end
          prod_done_at[e_pid[e]] = cycle;
        end
        prev_res[e] = iq_valid[e] && result_avail[e];
      end
      for (int s = 0; s < NUM_SLOTS; s++)
        if (rav[s] == T_EMPTY && prev_rav[s] != T_EMPTY && cycle > 1) n_orphan++;
      // Hybrid: the configured units cannot all come from one layout.
      begin
        bit fits_one;
        rav_t lays [3];
        lays = '{LAYOUT_C1, LAYOUT_C2, LAYOUT_C3};
        fits_one = 0;
        for (int c = 0; c < 3; c++) begin
          bit ok;
          ok = 1;
          for (int s = 0; s < NUM_SLOTS; s++)
            if (rav[s] != T_EMPTY && rav[s] != lays[c][s]) ok = 0;
          if (ok) fits_one = 1;
        end
        if (!fits_one) n_hybrid++;
      end
      if (phase == 0 && rav == LAYOUT_C3) seen_c3_in_int++;
      if (phase == 1 && cfg_sel == 2'd1 && cfg_req != '0) seen_c1_sel_ls++;
      if (phase == 1 && cfg_qty[T_LSU] >= 3'd3) seen_c1_in_ls++;
      if (phase == 2 && rav == LAYOUT_C2) seen_c2_in_fp++;
      prev_rav = rav;

      // ---- drive this cycle's inputs ----
      retire = '0; reschedule = '0; ins_valid = 0; ins_dep = '0;
      // Retire in program order.
      while (order.size() > 0 && result_avail[order[0]] && iq_valid[order[0]]) begin
        int h;
        h = order.pop_front();
        retire[h] = 1'b1;
        n_retired++;
      end
      // Occasionally reschedule a running instruction whose result is not out.
      if ($urandom_range(0, 29) == 0) begin
        for (int e = 0; e < IQ_DEPTH; e++)
          if (reschedule == '0 && iq_valid[e] && iq_scheduled[e] && !result_avail[e] && !retire[e]) begin
            reschedule[e] = 1'b1;
            e_grant[e] = -1;
            n_resched++;
          end
      end
      // Imitate long-running work: now and then hold slot 4 or slots 0-2.
      case ($urandom_range(0, 9))
        0:       hold = 8'h10;
        1:       hold = 8'h07;
        default: hold = '0;
      endcase
      // Insert.
      if (!ins_ready) n_full++;
      if (ins_ready && pid < N_TOTAL && $urandom_range(0, 3) != 0) begin
        int op, e, np;
        op = pick_op(pid / N_PER_PHASE);
        e  = int'(ins_idx);
        ins_valid  = 1;
        ins_opcode = OPC_W'(op);
        ins_lat    = LAT_W'(lat_of_op(op));
        e_type[e]  = type_of_op(op);
        e_lat[e]   = lat_of_op(op);
        e_grant[e] = -1;
        e_pid[e]   = pid;
        e_prod[e].delete();
        np = $urandom_range(0, 2);
        for (int k = 0; k < np && order.size() > 0; k++) begin
          int p;
          p = order[$urandom_range(0, order.size() - 1)];
          if (!retire[p] && !ins_dep[p]) begin
            ins_dep[p] = 1'b1;
            e_prod[e].push_back(e_pid[p]);
          end
        end
        ent_lat[e] = ins_lat;
        order.push_back(e);
        pid++;
      end
      #1;

      // ---- check this cycle's combinational decisions ----
      if (cfg_req != '0) n_sel[cfg_sel]++;
      if (load_valid != '0) n_load_start++;
      if (cfg_sel != 2'd0) begin
        rav_t tgt;
        tgt = (cfg_sel == 2'd1) ? LAYOUT_C1 : (cfg_sel == 2'd2) ? LAYOUT_C2 : LAYOUT_C3;
        for (int s = 0; s < NUM_SLOTS; s++)
          if (rav[s] != tgt[s] && !slot_avail[s] && !load_valid[s]) begin
            n_load_blocked++;
            break;
          end
      end
      for (int e = 0; e < IQ_DEPTH; e++) begin
        if (iq_valid[e] && !iq_scheduled[e] && !retire[e] && !reschedule[e]) begin
          bit deps_ok;
          deps_ok = 1;
          foreach (e_prod[e][k])
            if (prod_done_at.exists(e_prod[e][k]) == 0) deps_ok = 0;
          if (!deps_ok) n_wait_dep++;
          else if (!unit_avail[e_type[e]]) n_wait_unit++;
        end
        if (grant[e]) begin
          int u;
          u = int'(grant_unit[e]);
          n_issued++;
          checks++;
          if (u < NUM_FFU) begin
            n_grant_ffu++;
            if (u != e_type[e] || !ffu_avail[u]) begin
              failures++; $display("FAIL grant entry %0d to fixed unit %0d", e, u);
            end
          end else begin
            n_grant_rfu++;
            if (int'(rav[u - NUM_FFU]) != e_type[e] || !slot_avail[u - NUM_FFU]) begin
              failures++; $display("FAIL grant entry %0d to slot unit %0d (code %b)", e, u, rav[u - NUM_FFU]);
            end
          end
          checks++;
          foreach (e_prod[e][k])
            if (!prod_done_at.exists(e_prod[e][k]) || prod_done_at[e_prod[e][k]] > cycle) begin
              failures++; $display("FAIL entry %0d granted before producer %0d", e, e_prod[e][k]);
            end
          e_grant[e] = cycle;
        end
      end
    end

    checks++;
    if (n_retired != N_TOTAL) begin failures++; $display("FAIL retired %0d of %0d", n_retired, N_TOTAL); end
    checks++;
    if (seen_c3_in_int == 0) begin failures++; $display("FAIL config 3 never reached in integer phase"); end
    checks++;
    if (seen_c1_sel_ls == 0) begin failures++; $display("FAIL config 1 never chosen in load/store phase"); end
    checks++;
    if (seen_c1_in_ls == 0) begin failures++; $display("FAIL no LSUs loaded in load/store phase"); end
    checks++;
    if (seen_c2_in_fp == 0) begin failures++; $display("FAIL config 2 never reached in FP phase"); end
    begin
      int m [14];
      string nm [14];
      m  = '{n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_load_start, n_load_blocked, n_orphan, n_hybrid,
             n_grant_ffu, n_grant_rfu, n_wait_unit, n_wait_dep, n_resched, n_full};
      nm = '{"keep current", "select config 1", "select config 2", "select config 3",
             "reconfiguration start",
             "reconfiguration blocked", "unit left empty", "hybrid configuration",
             "grant to fixed unit", "grant to slot unit", "wait for unit", "wait for result",
             "reschedule", "queue full"};
      for (int i = 0; i < 14; i++) begin
        checks++;
        $display("  %-24s %0d", nm[i], m[i]);
        if (m[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", nm[i]); end
      end
    end
    $display("cycles %0d, instructions %0d, grants %0d", cycle, n_retired, n_issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
