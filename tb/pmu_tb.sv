// pmu_tb: reset state (all enabled, metrics 0), then random steps: flags follow
// the new flags, metrics load only for enabled states and hold otherwise and
// while step is low.
module pmu_tb;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  pm_t  pm_new [NSTATE], pm [NSTATE];
  logic flag_new [NSTATE], en [NSTATE];
  int checks = 0, failures = 0;
  pm_t  m_pm [NSTATE];
  bit   m_en [NSTATE];

  pmu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (pm_new[j]) begin pm_new[j] = '0; flag_new[j] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NSTATE; j++) begin
      m_pm[j] = 0; m_en[j] = 1;
      check(pm[j] == 0 && en[j], "reset value");
    end
    for (int n = 0; n < 1000; n++) begin
      step = ($urandom_range(3) != 0);
      for (int j = 0; j < NSTATE; j++) begin
        pm_new[j]   = pm_t'($urandom);
        flag_new[j] = ($urandom_range(1) != 0);
      end
      @(negedge clk);
      if (step)
        for (int j = 0; j < NSTATE; j++) begin
          m_en[j] = flag_new[j];
          if (flag_new[j]) m_pm[j] = pm_new[j];
        end
      for (int j = 0; j < NSTATE; j++) begin
        check(en[j] == m_en[j], "flag");
        check(pm[j] == m_pm[j], "metric");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
