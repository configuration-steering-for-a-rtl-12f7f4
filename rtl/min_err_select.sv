// min_err_select: minimal error selection.
//
// Picks, among the current configuration (index 0) and the three predefined
// steering configurations (1..3), the one with the smallest error metric and
// outputs its two-bit index. Equal errors are resolved toward the
// configuration that needs the least reconfiguration: `cost[c]` is the number
// of functional units that would have to be reloaded for configuration c
// (always zero for the current configuration, which therefore wins every tie
// it is part of). Remaining ties go to the lower index. Measuring
// reconfiguration in units is this design's own choice. Combinational.
module min_err_select
  import steer_pkg::*;
(
  input  cnt_t     err  [4],   // error metric of configuration 0..3
  input  cost_t    cost [4],   // units to reload for configuration 0..3
  output cfg_sel_t sel
);

  always_comb begin
    cnt_t  best_e;
    cost_t best_c;
    best_e = err[0];
    best_c = cost[0];
    sel    = 2'd0;
    for (int c = 1; c < 4; c++) begin
      if (err[c] < best_e || (err[c] == best_e && cost[c] < best_c)) begin
        best_e = err[c];
        best_c = cost[c];
        sel    = cfg_sel_t'(c);
      end
    end
  end

endmodule
