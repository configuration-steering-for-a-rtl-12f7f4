// tb_wakeup_entry: directed checks of one wake-up row.
//   - request needs the unit line and every needed result line, and nothing
//     that is not needed;
//   - a grant sets the scheduled bit and stops the request; reschedule
//     restarts it;
//   - the result line rises exactly `latency` cycles after the grant edge
//     (latencies 1, 2 and 5 are measured);
//   - clearing a dependency column (retire of the producer) releases the row;
//   - retire empties the row;
//   - operands_ready follows the result lines only, not the unit line.
module tb_wakeup_entry;
  import steer_pkg::*;
  logic                clk = 0, rst_n = 0;
  logic                insert = 0, grant = 0, reschedule = 0, retire = 0;
  unit_vec_t           ins_unit = '0, unit_avail = '0, unit_req;
  logic [IQ_DEPTH-1:0] ins_dep = '0, result_avail = '0, clear_dep = '0, dep;
  logic [LAT_W-1:0]    ins_lat = '0;
  logic                valid, scheduled, request, result_ready, operands_ready;
  int checks = 0, failures = 0;

  wakeup_entry dut (.clk, .rst_n, .insert, .ins_unit, .ins_dep, .ins_lat, .unit_avail,
                    .result_avail, .clear_dep, .grant, .reschedule, .retire, .valid,
                    .scheduled, .unit_req, .dep, .operands_ready, .request, .result_ready);

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++; $display("FAIL %s: got %b exp %b", what, got, exp_v);
    end
  endtask

  task automatic load(unit_vec_t u, logic [6:0] d, int lat);
    @(negedge clk);
    insert = 1; ins_unit = u; ins_dep = d; ins_lat = LAT_W'(lat);
    @(negedge clk);
    insert = 0;
  endtask

  // Grant at a negedge-aligned cycle and count cycles until result_ready.
  task automatic measure(int lat);
    int n;
    load(5'b00010, '0, lat);
    unit_avail = 5'b00010; #1;
    chk("req before grant", request, 1'b1);
    grant = 1;
    @(negedge clk);
    grant = 0;
    chk("scheduled", scheduled, 1'b1);
    chk("no req when scheduled", request, 1'b0);
    n = 1;
    while (!result_ready && n < 20) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != lat) begin
      failures++; $display("FAIL latency %0d: result after %0d cycles", lat, n);
    end
    @(negedge clk);
    chk("result stays", result_ready, 1'b1);
    retire = 1;
    @(negedge clk);
    retire = 0;
    chk("retired", valid, 1'b0);
    chk("retired result", result_ready, 1'b0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    // Needs the LSU and results of entries 1 and 3.
    load(5'b00100, 7'b0001010, 3);
    #1;
    chk("valid", valid, 1'b1);
    chk("no unit", request, 1'b0);
    unit_avail = 5'b11011; #1;
    chk("other units only", request, 1'b0);
    unit_avail = 5'b00100; #1;
    chk("deps missing", request, 1'b0);
    chk("operands not ready", operands_ready, 1'b0);
    result_avail = 7'b0000010; #1;
    chk("one dep missing", request, 1'b0);
    chk("one operand missing", operands_ready, 1'b0);
    result_avail = 7'b1110101; #1;
    chk("wrong deps", request, 1'b0);
    chk("wrong operands", operands_ready, 1'b0);
    result_avail = 7'b0001010; #1;
    chk("all ready", request, 1'b1);
    unit_avail = 5'b00000; #1;
    chk("operands ready without unit", operands_ready, 1'b1);
    chk("no unit, operands ready", request, 1'b0);
    unit_avail = 5'b00100; #1;
    // Grant, then reschedule.
    @(negedge clk);
    grant = 1;
    @(negedge clk);
    grant = 0;
    chk("scheduled", scheduled, 1'b1);
    chk("no request", request, 1'b0);
    reschedule = 1;
    @(negedge clk);
    reschedule = 0;
    chk("rescheduled", scheduled, 1'b0);
    chk("requests again", request, 1'b1);
    // Producer 1 and 3 retire: their columns clear.
    result_avail = '0; clear_dep = 7'b0001010;
    @(negedge clk);
    clear_dep = '0; #1;
    chk("deps cleared", dep == '0, 1'b1);
    chk("released", request, 1'b1);
    retire = 1;
    @(negedge clk);
    retire = 0;
    chk("empty", valid, 1'b0);
    chk("empty no request", request, 1'b0);
    measure(1);
    measure(2);
    measure(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
