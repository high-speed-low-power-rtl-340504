// tgu: threshold generator, the 2-step pre-computation of PM_opt(n) + T.
//
// Instead of searching the minimum of the new path metrics inside the ACS loop,
// the optimal metric of step n is computed from the metrics two steps earlier:
//
//   PM_opt(n) = min( min_c{ min(cluster_c(n-2)) + min(BMG_e(c)(n-1)) } + min(even BMs(n)),
//                    min_c{ min(cluster_c(n-2)) + min(BMG_o(c)(n-1)) } + min(odd BMs(n)) )
//
// with clusters 0..3 the states whose number mod 4 is 0, 2, 1, 3, and the BM group
// pairing e = (0,1,3,2), o = (1,0,2,3): from a state in cluster c the branches into
// even states use BMG e(c) and those into odd states BMG o(c).
//
// Stage 1 (cycle of step n-1, registered when step is high): four min16 units
// over the live PMs(n-2) of each cluster, then eight adders with the BMG minima of
// step n-1. Stage 2 (cycle of step n, combinational): two 4-input minima, each
// added to T + min(even/odd BMs(n)), and a final 2-input minimum. The adders,
// MIN16/MIN4/MIN2 units and their pairing follow the threshold generator drawing;
// placing the stage-1 register after the BMG adders is this design's choice.
// After reset stage 1 holds zeros, as if every metric two steps back were 0,
// which gives a valid lower bound for the first step.
module tgu
  import tcm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     step,                 // a trellis step is taken this cycle
  input  pm_t      pm       [NSTATE],    // PMU contents during this step: PMs(n-1)
  input  logic     en       [NSTATE],
  input  bm_t      bm_grp_min [4],       // min BMG0..3 of this step
  input  bm_t      bm_even_min,          // min even / odd BMs of this step
  input  bm_t      bm_odd_min,
  input  logic [T_W-1:0] t_off,          // threshold offset T
  output pm_t      thr,                  // PM_opt(n) + T for this step
  output logic     thr_valid
);
  localparam int unsigned CL_RES [4] = '{0, 2, 1, 3};   // state mod 4 of cluster c
  localparam int unsigned E_GRP  [4] = '{0, 1, 3, 2};
  localparam int unsigned O_GRP  [4] = '{1, 0, 2, 3};

  // ---- stage 1 ----
  pm_t  cmin   [4];
  logic cmin_v [4];
  pm_t  e_d [4], o_d [4];
  pm_t  e_q [4], o_q [4];
  logic v_q [4];

  for (genvar c = 0; c < 4; c++) begin : g_cl
    pm_t  cl_pm [16];
    logic cl_en [16];
    always_comb
      for (int i = 0; i < 16; i++) begin
        cl_pm[i] = pm[4*i + CL_RES[c]];
        cl_en[i] = en[4*i + CL_RES[c]];
      end
    min16 u_min16 (.a(cl_pm), .a_v(cl_en), .y(cmin[c]), .y_v(cmin_v[c]));
    assign e_d[c] = cmin[c] + pm_t'(bm_grp_min[E_GRP[c]]);
    assign o_d[c] = cmin[c] + pm_t'(bm_grp_min[O_GRP[c]]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q <= '{default: '0};
      o_q <= '{default: '0};
      v_q <= '{default: 1'b1};
    end else if (step) begin
      e_q <= e_d;
      o_q <= o_d;
      v_q <= cmin_v;
    end
  end

  // ---- stage 2 ----
  pm_t  me, mo, se, so;
  logic me_v, mo_v;

  min4 u_min4_even (.a(e_q), .a_v(v_q), .y(me), .y_v(me_v));
  min4 u_min4_odd  (.a(o_q), .a_v(v_q), .y(mo), .y_v(mo_v));

  always_comb begin
    se = me + (pm_t'(t_off) + pm_t'(bm_even_min));
    so = mo + (pm_t'(t_off) + pm_t'(bm_odd_min));
    thr       = (mo_v && (!me_v || pm_lt(so, se))) ? so : se;
    thr_valid = me_v | mo_v;
  end
endmodule
