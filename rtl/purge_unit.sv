// purge_unit: the T-algorithm's purge decision.
//
// A new state stays enabled when it was reached by a live path and its path
// metric does not exceed the threshold PM_opt + T from the threshold generator
// (one 2-input comparison per state, wrap-around compare). All other states are
// purged (flag 0): their ACS, survivor-memory row and metric are unused in the
// next step.
//
// Because the threshold is pre-computed from metrics two steps back, it can in
// rare cases fall below every surviving metric. This design then keeps every
// reached state for that step instead of losing the whole trellis, and reports
// it on keep_all. That safeguard is this design's own addition. Combinational.
module purge_unit
  import tcm_pkg::*;
(
  input  pm_t  pm_new [NSTATE],
  input  logic val    [NSTATE],
  input  pm_t  thr,
  input  logic thr_valid,
  output logic flag   [NSTATE],      // 1 = state enabled at step n
  output logic keep_all              // no state met the threshold
);
  logic pass [NSTATE];
  logic any;

  always_comb begin
    any = 1'b0;
    for (int j = 0; j < NSTATE; j++) begin
      pass[j] = val[j] && (!thr_valid || !pm_lt(thr, pm_new[j]));
      any     = any | pass[j];
    end
    keep_all = !any;
    for (int j = 0; j < NSTATE; j++)
      flag[j] = any ? pass[j] : val[j];
  end
endmodule
