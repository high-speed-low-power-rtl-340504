// min16: minimum of the 16 path metrics of one state cluster.
//
// Built, as in the threshold generator's MIN16 unit, from two stages of 4-input
// comparators: four min4 units on groups of four inputs, then one min4 on their
// results. Inputs carry a valid flag (the state's enable flag); purged states are
// ignored, and y_v is low only if all 16 are purged. Combinational.
module min16
  import tcm_pkg::*;
(
  input  pm_t  a   [16],
  input  logic a_v [16],
  output pm_t  y,
  output logic y_v
);
  pm_t  s1   [4];
  logic s1_v [4];

  for (genvar g = 0; g < 4; g++) begin : g_s1
    min4 u_min4 (
      .a   (a  [4*g +: 4]),
      .a_v (a_v[4*g +: 4]),
      .y   (s1  [g]),
      .y_v (s1_v[g])
    );
  end

  min4 u_min4_s2 (.a(s1), .a_v(s1_v), .y(y), .y_v(y_v));
endmodule
