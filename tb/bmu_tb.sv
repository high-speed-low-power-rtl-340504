// bmu_tb: random soft inputs; checks the 16 branch metrics, the four BM group
// minima and the even/odd minima one cycle after acceptance, that out_valid
// follows in_valid by one cycle, and that outputs hold while in_valid is low.
module bmu_tb;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  soft_t r [4] = '{default: '0};
  bm_t bm [NBM];
  bm_t bm_grp_min [4];
  bm_t bm_even_min, bm_odd_min;
  int checks = 0, failures = 0;

  bmu dut (.*);
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

  int exp_bm [NBM];
  int exp_g [4], exp_e, exp_o;
  localparam int RES [4] = '{0, 2, 1, 3};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit acc;
      acc = ($urandom_range(3) != 0);
      in_valid = acc;
      for (int i = 0; i < 4; i++)
        r[i] = (n < 16) ? ((n[i]) ? 7'd127 : 7'd0) : soft_t'($urandom);
      if (acc) begin
        for (int m = 0; m < NBM; m++) begin
          exp_bm[m] = 0;
          for (int i = 0; i < 4; i++) exp_bm[m] += m[i] ? 127 - int'(r[i]) : int'(r[i]);
        end
        foreach (exp_g[g]) exp_g[g] = 9999;
        exp_e = 9999; exp_o = 9999;
        for (int m = 0; m < NBM; m++) begin
          for (int g = 0; g < 4; g++) if (m % 4 == RES[g] && exp_bm[m] < exp_g[g]) exp_g[g] = exp_bm[m];
          if (m % 2 == 0 && exp_bm[m] < exp_e) exp_e = exp_bm[m];
          if (m % 2 == 1 && exp_bm[m] < exp_o) exp_o = exp_bm[m];
        end
      end
      @(negedge clk);
      check(out_valid == acc, "out_valid latency");
      if (n > 0 || acc) begin
        for (int m = 0; m < NBM; m++) check(int'(bm[m]) == exp_bm[m], "bm");
        for (int g = 0; g < 4; g++) check(int'(bm_grp_min[g]) == exp_g[g], "group min");
        check(int'(bm_even_min) == exp_e, "even min");
        check(int'(bm_odd_min) == exp_o, "odd min");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
