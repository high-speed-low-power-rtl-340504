// vd_ref_pkg: step-by-step software model of the decoder, for the testbenches.
//
// vd_ref models the T-algorithm decoder one trellis step at a time with plain
// loops: branch metrics straight from the per-bit distances, ACS by a linear
// search over the 8 incoming branches (first minimum wins), the 2-step threshold
// from the previous step's metrics, the purge rule with its keep-all safeguard,
// and a register-exchange survivor memory read from the lowest-numbered live
// state. It is written independently of the RTL and shares with it only the
// trellis functions of tcm_pkg (next_state, pred_state, pm_lt).
// gen_symbol turns an encoded word into four noisy 7-bit soft values.
package vd_ref_pkg;
  import tcm_pkg::*;

  function automatic int unsigned ref_bm(int unsigned m, soft_t r[4]);
    int unsigned s = 0;
    for (int i = 0; i < 4; i++) s += (((m >> i) & 1) != 0) ? (127 - int'(r[i])) : int'(r[i]);
    return s;
  endfunction

  function automatic pm_t pmin(pm_t a, pm_t b);
    return pm_lt(b, a) ? b : a;
  endfunction

  // Gaussian sample (Box-Muller) with standard deviation sigma.
  function automatic real gauss(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1)) / 1000001.0);
    u2 = (real'($urandom_range(1000000, 0)) / 1000001.0);
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic void gen_symbol(logic [3:0] z, real sigma, output soft_t r[4]);
    for (int i = 0; i < 4; i++) begin
      real v;
      v = (z[i] ? 127.0 : 0.0) + gauss(sigma);
      if (v < 0.0) v = 0.0;
      if (v > 127.0) v = 127.0;
      r[i] = soft_t'($rtoi(v + 0.5));
    end
  endfunction

  class vd_ref;
    pm_t  pm [NSTATE];
    bit   en [NSTATE];
    pm_t  e_q [4], o_q [4];
    bit   v_q [4];
    xin_t row [NSTATE][SURV_LEN];
    int   fill;
    // what the last step did
    bit   last_keep_all;
    int   last_live;
    int   last_purged;
    int   last_out_state;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (pm[j]) begin pm[j] = 0; en[j] = 1; end
      foreach (e_q[c]) begin e_q[c] = 0; o_q[c] = 0; v_q[c] = 1; end
      foreach (row[j, i]) row[j][i] = 0;
      fill = 0;
    endfunction

    // One trellis step. Returns 1 and the decoded word of the step SURV_LEN
    // steps back once the survivor memory is full.
    function bit step(soft_t r[4], int unsigned t_off, output xin_t out);
      int unsigned bm [NBM];
      int unsigned gmin [4], emin, omin;
      int unsigned res [4] = '{0, 2, 1, 3};
      int unsigned eg [4] = '{0, 1, 3, 2};
      int unsigned og [4] = '{1, 0, 2, 3};
      pm_t  npm [NSTATE];
      bit   nval [NSTATE], pass [NSTATE], flag [NSTATE];
      xin_t ndec [NSTATE];
      pm_t  me, mo, se, so, thr;
      bit   me_v, mo_v, any, got;
      pm_t  ne [4], no [4];
      bit   nv [4];
      xin_t nrow [NSTATE][SURV_LEN];

      for (int m = 0; m < NBM; m++) bm[m] = ref_bm(m, r);
      emin = 1 << 30; omin = 1 << 30;
      foreach (gmin[g]) gmin[g] = 1 << 30;
      for (int m = 0; m < NBM; m++) begin
        for (int g = 0; g < 4; g++) if (m % 4 == res[g] && bm[m] < gmin[g]) gmin[g] = bm[m];
        if (m % 2 == 0 && bm[m] < emin) emin = bm[m];
        if (m % 2 == 1 && bm[m] < omin) omin = bm[m];
      end

      // ACS
      for (int j = 0; j < NSTATE; j++) begin
        nval[j] = 0; npm[j] = 0; ndec[j] = 0;
        for (int x = 0; x < NPRED; x++) begin
          state_t p;
          pm_t c;
          p = pred_state(state_t'(j), xin_t'(x));
          c = pm[p] + pm_t'(bm[(x << 1) | (j >> 5)]);
          if (en[p] && (!nval[j] || pm_lt(c, npm[j]))) begin
            nval[j] = 1; npm[j] = c; ndec[j] = xin_t'(x);
          end
        end
      end

      // threshold from the stage-1 values of the previous step
      me_v = 0; mo_v = 0; me = 0; mo = 0;
      for (int c = 0; c < 4; c++) if (v_q[c]) begin
        me = me_v ? pmin(me, e_q[c]) : e_q[c]; me_v = 1;
        mo = mo_v ? pmin(mo, o_q[c]) : o_q[c]; mo_v = 1;
      end
      se = me + pm_t'(t_off) + pm_t'(emin);
      so = mo + pm_t'(t_off) + pm_t'(omin);
      thr = (mo_v && (!me_v || pm_lt(so, se))) ? so : se;

      // purge
      any = 0;
      for (int j = 0; j < NSTATE; j++) begin
        pass[j] = nval[j] && ((!me_v && !mo_v) || !pm_lt(thr, npm[j]));
        any |= pass[j];
      end
      last_keep_all = !any;
      last_live = 0; last_purged = 0;
      for (int j = 0; j < NSTATE; j++) begin
        flag[j] = any ? pass[j] : nval[j];
        last_live += flag[j];
        if (nval[j] && !flag[j]) last_purged++;
      end

      // stage 1 for the next step, from the current metrics
      for (int c = 0; c < 4; c++) begin
        pm_t cm; bit cv;
        cv = 0; cm = 0;
        for (int j = 0; j < NSTATE; j++)
          if (j % 4 == res[c] && en[j]) begin cm = cv ? pmin(cm, pm[j]) : pm[j]; cv = 1; end
        ne[c] = cm + pm_t'(gmin[eg[c]]);
        no[c] = cm + pm_t'(gmin[og[c]]);
        nv[c] = cv;
      end

      // survivor output from the lowest live state before the update
      got = 0; out = 0; last_out_state = 0;
      if (fill == SURV_LEN) begin
        for (int j = NSTATE - 1; j >= 0; j--) if (en[j]) last_out_state = j;
        out = row[last_out_state][SURV_LEN - 1];
        got = 1;
      end
      for (int j = 0; j < NSTATE; j++) begin
        if (flag[j]) begin
          state_t p;
          p = pred_state(state_t'(j), ndec[j]);
          nrow[j][0] = ndec[j];
          for (int i = 1; i < SURV_LEN; i++) nrow[j][i] = row[p][i-1];
        end else begin
          for (int i = 0; i < SURV_LEN; i++) nrow[j][i] = row[j][i];
        end
      end
      row = nrow;
      for (int j = 0; j < NSTATE; j++) begin
        if (flag[j]) pm[j] = npm[j];
        en[j] = flag[j];
      end
      e_q = ne; o_q = no; v_q = nv;
      if (fill < SURV_LEN) fill++;
      return got;
    endfunction
  endclass
endpackage
