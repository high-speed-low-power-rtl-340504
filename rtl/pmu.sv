// pmu: path-metric unit, the state registers of the ACS recursion.
//
// Holds the 64 path metrics and the 64 state enable flags. On a step it loads the
// new metrics from the ACSU and the flags from the purge unit; a purged state's
// metric register is not loaded (its clock can be gated), since no later step
// reads it. The unit itself is the decoder's standard metric store; the load
// enable and the reset values are this design's choices. Reset (synchronous, active low) enables every state with metric 0,
// so decoding may start in any encoder state.
module pmu
  import tcm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  pm_t  pm_new  [NSTATE],
  input  logic flag_new[NSTATE],
  output pm_t  pm      [NSTATE],
  output logic en      [NSTATE]
);
  for (genvar j = 0; j < NSTATE; j++) begin : g_st
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        pm[j] <= '0;
        en[j] <= 1'b1;
      end else if (step) begin
        en[j] <= flag_new[j];
        if (flag_new[j]) pm[j] <= pm_new[j];
      end
    end
  end
endmodule
