// min16_tb: random metrics around a wrapping base with random valid flags;
// checks the minimum and the valid output against a linear search.
module min16_tb;
  import tcm_pkg::*;
  pm_t  a [16], y;
  logic a_v [16], y_v;
  int checks = 0, failures = 0;

  min16 dut (.*);

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
    for (int n = 0; n < 3000; n++) begin
      pm_t base, best;
      bit v;
      int dens;
      base = pm_t'($urandom);
      dens = (n % 10 == 0) ? 0 : $urandom_range(100);
      for (int i = 0; i < 16; i++) begin
        a[i]   = base + pm_t'($urandom_range(1500));
        a_v[i] = ($urandom_range(99) < dens);
      end
      #1;
      v = 0; best = 0;
      for (int i = 0; i < 16; i++) if (a_v[i] && (!v || pm_lt(a[i], best))) begin v = 1; best = a[i]; end
      check(y_v == v, "valid");
      if (v) check(y == best, "minimum");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
