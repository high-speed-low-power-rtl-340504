// acsu_tb: random path metrics around a random (wrapping) base, random enable
// flags and branch metrics; checks every state's new metric, decision and valid
// flag against a linear search over the 8 incoming branches (first minimum wins).
module acsu_tb;
  import tcm_pkg::*;
  pm_t  pm [NSTATE], pm_new [NSTATE];
  logic en [NSTATE], val [NSTATE];
  bm_t  bm [NBM];
  xin_t dec [NSTATE];
  int checks = 0, failures = 0;

  acsu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      pm_t base;
      int dens;
      base = pm_t'($urandom);
      dens = $urandom_range(100);
      for (int j = 0; j < NSTATE; j++) begin
        pm[j] = base + pm_t'($urandom_range((n % 2 != 0) ? 30 : 1000));
        en[j] = ($urandom_range(99) < dens);
      end
      for (int m = 0; m < NBM; m++) bm[m] = bm_t'($urandom_range(n % 3 == 0 ? 8 : 508));
      #1;
      for (int j = 0; j < NSTATE; j++) begin
        bit v; pm_t best; int bx;
        v = 0; best = 0; bx = 0;
        for (int x = 0; x < 8; x++) begin
          state_t p; pm_t c;
          p = pred_state(state_t'(j), xin_t'(x));
          c = pm[p] + pm_t'(bm[x * 2 + j / 32]);
          if (en[p] && (!v || pm_lt(c, best))) begin v = 1; best = c; bx = x; end
        end
        check(val[j] == v, "valid");
        if (v) begin
          check(pm_new[j] == best, "path metric");
          check(int'(dec[j]) == bx, "decision");
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
