// acsu: add-compare-select unit for the 64-state rate-3/4 trellis.
//
// Every state j receives p = 8 candidate paths, one per input word x = {x3,x2,x1}:
// from predecessor tcm_pkg::pred_state(j, x) with branch metric BM[{x, j[5]}] (the
// coded bit z0 of all branches into j equals j[5]). Each candidate is the sum of
// the predecessor's path metric and the branch metric; candidates whose
// predecessor was purged by the T-algorithm (en = 0) take no part. The 8-input
// comparator is a three-level tree of 2-input comparisons; on equal metrics the
// lower x wins. Metrics wrap modulo 2^12 and are compared with tcm_pkg::pm_lt.
//
// Outputs per state: the new path metric, the decision (the surviving x, which is
// also the decoded input of that branch), and valid (some predecessor was live).
// Purely combinational; the path-metric registers are in pmu.
// Eight candidates per state and skipping purged states follow the T-algorithm
// decoder's structure; the comparator tree, the tie rule and the meaning of the
// decision bits are this design's choices.
module acsu
  import tcm_pkg::*;
(
  input  pm_t    pm     [NSTATE],   // PMs(n-1)
  input  logic   en     [NSTATE],   // enable flags of the states at n-1
  input  bm_t    bm     [NBM],      // BMs(n)
  output pm_t    pm_new [NSTATE],   // PMs(n)
  output xin_t   dec    [NSTATE],   // decision bits
  output logic   val    [NSTATE]    // state reached by at least one live path
);
  typedef struct packed {
    logic v;
    pm_t  m;
    xin_t x;
  } cand_t;

  // Keep a unless b is valid and strictly smaller (or a is not valid).
  function automatic cand_t sel(cand_t a, cand_t b);
    return (b.v && (!a.v || pm_lt(b.m, a.m))) ? b : a;
  endfunction

  for (genvar j = 0; j < NSTATE; j++) begin : g_state
    cand_t c [NPRED];
    cand_t l1 [4];
    cand_t l2 [2];
    cand_t w;

    always_comb begin
      for (int x = 0; x < NPRED; x++) begin
        state_t pr;
        pr      = pred_state(state_t'(j), xin_t'(x));
        c[x].v  = en[pr];
        c[x].m  = pm[pr] + pm_t'(bm[{xin_t'(x), 1'(j >> 5)}]);
        c[x].x  = xin_t'(x);
      end
      for (int i = 0; i < 4; i++) l1[i] = sel(c[2*i], c[2*i+1]);
      for (int i = 0; i < 2; i++) l2[i] = sel(l1[2*i], l1[2*i+1]);
      w = sel(l2[0], l2[1]);
    end

    assign pm_new[j] = w.m;
    assign dec[j]    = w.x;
    assign val[j]    = w.v;
  end
endmodule
