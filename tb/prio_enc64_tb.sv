// prio_enc64_tb: every one-hot and every "lowest bit k plus random higher bits"
// pattern, the empty pattern and random dense and sparse patterns; checks the
// index of the lowest set flag and the valid output.
module prio_enc64_tb;
  logic [63:0] flag;
  logic [5:0]  index;
  logic        valid;
  int checks = 0, failures = 0;

  prio_enc64 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [63:0] f);
    int e;
    flag = f;
    #1;
    e = 0;
    for (int b = 63; b >= 0; b--) if (f[b]) e = b;
    checks += 2;
    if (valid != (f != 0)) begin failures++; $display("FAIL valid %h", f); end
    if (f != 0 && int'(index) != e) begin failures++; $display("FAIL %h -> %0d exp %0d", f, index, e); end
    #1;
  endtask

  initial begin
    try('0);
    for (int k = 0; k < 64; k++) begin
      try(64'd1 << k);
      try(({$urandom, $urandom} << k) | (64'd1 << k));
    end
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] f;
      f = {$urandom, $urandom};
      if (n % 2 != 0) f = f & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      try(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
