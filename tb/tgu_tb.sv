// tgu_tb: checks the pre-computed threshold against a brute-force search.
//
// Each cycle the testbench presents random path metrics, enable flags, BM group
// minima and even/odd BM minima, and a random step strobe. On a step n the
// expected threshold is the minimum, over every live state s of the metrics
// latched at step n-1 and every input word x, of
//   PM_s + minBMG[group of branch (s,x)](n-1) + T + min(even or odd BMs(n)),
// even or odd by the last bit of next_state(s, x). That search uses no cluster
// or BM-group pairing table, so it also checks the pairing.
module tgu_tb;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  pm_t  pm [NSTATE];
  logic en [NSTATE];
  bm_t  bm_grp_min [4];
  bm_t  bm_even_min = '0, bm_odd_min = '0;
  logic [T_W-1:0] t_off = '0;
  pm_t  thr;
  logic thr_valid;
  int checks = 0, failures = 0;

  tgu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // latched at the previous step
  pm_t  l_pm [NSTATE];
  logic l_en [NSTATE];
  int   l_bmg [4];
  bit   first;

  initial begin
    foreach (pm[j]) begin pm[j] = '0; en[j] = 1'b1; end
    foreach (bm_grp_min[g]) bm_grp_min[g] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    first = 1;
    for (int n = 0; n < 3000; n++) begin
      pm_t base;
      int dens;
      base = pm_t'($urandom);
      dens = (n % 7 == 0) ? 3 : $urandom_range(100);
      for (int j = 0; j < NSTATE; j++) begin
        pm[j] = base + pm_t'($urandom_range(600));
        en[j] = ($urandom_range(99) < dens);
      end
      en[$urandom_range(63)] = 1'b1;
      for (int g = 0; g < 4; g++) bm_grp_min[g] = bm_t'($urandom_range(508));
      bm_even_min = bm_t'($urandom_range(508));
      bm_odd_min  = bm_t'($urandom_range(508));
      t_off = T_W'($urandom);
      step = ($urandom_range(3) != 0);
      #1;
      if (step) begin
        pm_t best;
        bit v;
        if (first) begin
          best = pm_t'(t_off) + ((bm_even_min < bm_odd_min) ? pm_t'(bm_even_min) : pm_t'(bm_odd_min));
        end else begin
          v = 0; best = 0;
          for (int s = 0; s < NSTATE; s++) if (l_en[s])
            for (int x = 0; x < NPRED; x++) begin
              int gi; pm_t c; state_t ns;
              gi = x[0] ? (s[0] ? 3 : 1) : (s[0] ? 2 : 0);
              ns = next_state(state_t'(s), xin_t'(x));
              c = l_pm[s] + pm_t'(l_bmg[gi]) + pm_t'(t_off)
                  + (ns[0] ? pm_t'(bm_odd_min) : pm_t'(bm_even_min));
              if (!v || pm_lt(c, best)) begin v = 1; best = c; end
            end
        end
        check(thr_valid, "thr_valid");
        check(thr == best, "threshold");
        l_pm = pm; l_en = en;
        for (int g = 0; g < 4; g++) l_bmg[g] = int'(bm_grp_min[g]);
        first = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
