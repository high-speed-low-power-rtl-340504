// conv_enc34_tb: checks the encoder against a delay-line model written element
// by element, and checks that tcm_pkg::pred_state inverts next_state for every
// state and input word (the decoder relies on it).
module conv_enc34_tb;
  import tcm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  xin_t x = '0;
  logic [3:0] z;
  state_t state;
  int checks = 0, failures = 0;

  conv_enc34 dut (.*);
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

  // d[0] is the left-most delay element, d[5] the right-most
  bit d [6];

  initial begin
    for (int s = 0; s < NSTATE; s++)
      for (int xi = 0; xi < NPRED; xi++)
        check(pred_state(next_state(state_t'(s), xin_t'(xi)), xin_t'(xi)) == state_t'(s), "pred_state");
    foreach (d[i]) d[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      bit [3:0] ez;
      bit nd [6];
      in_valid = ($urandom_range(3) != 0);
      x = xin_t'($urandom);
      #1;
      ez = {x, d[5]};
      check(z == ez, "coded word");
      check(state == {d[0], d[1], d[2], d[3], d[4], d[5]}, "state numbering");
      nd[0] = d[5];
      nd[1] = d[0] ^ x[2];
      nd[2] = d[1] ^ x[1];
      nd[3] = d[2] ^ x[2];
      nd[4] = d[3] ^ x[0] ^ x[1];
      nd[5] = d[4] ^ x[0] ^ d[5];
      @(negedge clk);
      if (in_valid) d = nd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
