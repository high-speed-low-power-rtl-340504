// min4: 4-input comparator for path metrics that carry a valid flag.
//
// Returns the smallest valid metric of four (wrap-around comparison,
// tcm_pkg::pm_lt) and whether any input was valid; invalid inputs are ignored.
// Two levels of 2-input comparisons, combinational. Building block of min16 and
// of the threshold generator.
module min4
  import tcm_pkg::*;
(
  input  pm_t  a     [4],
  input  logic a_v   [4],
  output pm_t  y,
  output logic y_v
);
  pm_t  m01, m23;
  logic v01, v23;

  always_comb begin
    if (a_v[1] && (!a_v[0] || pm_lt(a[1], a[0]))) m01 = a[1]; else m01 = a[0];
    if (a_v[3] && (!a_v[2] || pm_lt(a[3], a[2]))) m23 = a[3]; else m23 = a[2];
    v01 = a_v[0] | a_v[1];
    v23 = a_v[2] | a_v[3];
    if (v23 && (!v01 || pm_lt(m23, m01))) y = m23; else y = m01;
    y_v = v01 | v23;
  end
endmodule
