// smu_re_tb: random decisions, new flags, current flags and step strobes;
// a software copy of the 64 survivor rows predicts every output word, the state
// it is read from (lowest current flag) and when out_valid rises (after 42 steps).
module smu_re_tb;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  xin_t dec [NSTATE];
  logic flag_new [NSTATE], en [NSTATE];
  logic out_valid;
  xin_t out_bits;
  state_t out_state;
  int checks = 0, failures = 0;
  xin_t m_row [NSTATE][SURV_LEN];
  int   m_fill;
  int   n_out = 0;

  smu_re dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (dec[j]) begin dec[j] = '0; flag_new[j] = 1'b0; en[j] = 1'b1; end
    foreach (m_row[j, i]) m_row[j][i] = '0;
    m_fill = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit exp_v;
      xin_t exp_b;
      int exp_s;
      xin_t nrow [NSTATE][SURV_LEN];
      int dens;
      step = ($urandom_range(4) != 0);
      dens = $urandom_range(100);
      for (int j = 0; j < NSTATE; j++) begin
        dec[j]      = xin_t'($urandom);
        flag_new[j] = ($urandom_range(99) < dens);
        en[j]       = ($urandom_range(99) < dens);
      end
      en[$urandom_range(63)] = 1'b1;
      exp_s = 0;
      for (int j = NSTATE - 1; j >= 0; j--) if (en[j]) exp_s = j;
      exp_v = step && (m_fill == SURV_LEN);
      exp_b = m_row[exp_s][SURV_LEN-1];
      if (step) begin
        for (int j = 0; j < NSTATE; j++)
          if (flag_new[j]) begin
            state_t p;
            p = pred_state(state_t'(j), dec[j]);
            nrow[j][0] = dec[j];
            for (int i = 1; i < SURV_LEN; i++) nrow[j][i] = m_row[p][i-1];
          end else nrow[j] = m_row[j];
        m_row = nrow;
        if (m_fill < SURV_LEN) m_fill++;
      end
      @(negedge clk);
      check(out_valid == exp_v, "out_valid");
      if (exp_v) begin
        n_out++;
        check(out_bits == exp_b, "decoded word");
        check(int'(out_state) == exp_s, "read state");
      end
    end
    check(n_out > 1000, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
