// purge_unit_tb: random new metrics, reach flags and thresholds, including
// thresholds below every metric; checks each flag (reached and not above the
// threshold) and the keep-all fallback (every reached state kept).
module purge_unit_tb;
  import tcm_pkg::*;
  pm_t  pm_new [NSTATE];
  logic val [NSTATE], flag [NSTATE];
  pm_t  thr;
  logic thr_valid, keep_all;
  int checks = 0, failures = 0;
  int n_keep = 0, n_purged = 0;

  purge_unit dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      pm_t base;
      bit pass [NSTATE];
      bit any;
      base = pm_t'($urandom);
      for (int j = 0; j < NSTATE; j++) begin
        pm_new[j] = base + pm_t'($urandom_range(800));
        val[j]    = ($urandom_range(9) != 0);
      end
      thr = base + pm_t'($urandom_range(900)) - ((n % 5 == 0) ? pm_t'(300) : pm_t'(0));
      thr_valid = (n % 50 != 7);
      #1;
      any = 0;
      for (int j = 0; j < NSTATE; j++) begin
        int d;
        d = int'(pm_t'(pm_new[j] - thr));
        pass[j] = val[j] && (!thr_valid || d == 0 || d >= 2048);
        any |= pass[j];
      end
      check(keep_all == !any, "keep_all");
      if (!any) n_keep++;
      for (int j = 0; j < NSTATE; j++) begin
        check(flag[j] == (any ? pass[j] : val[j]), "flag");
        if (val[j] && !flag[j]) n_purged++;
      end
      #1;
    end
    check(n_keep > 0 && n_purged > 0, "both cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
