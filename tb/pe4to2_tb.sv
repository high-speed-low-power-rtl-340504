// pe4to2_tb: all 16 input patterns against the lowest-set-bit rule.
module pe4to2_tb;
  logic [3:0] i;
  logic [1:0] o;
  int checks = 0, failures = 0;

  pe4to2 dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int e;
      i = 4'(v);
      #1;
      e = 0;
      for (int b = 3; b >= 0; b--) if (v[b]) e = b;
      checks++;
      if (int'(o) != e) begin failures++; $display("FAIL in=%b out=%0d exp=%0d", i, o, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
