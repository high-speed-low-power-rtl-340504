// vd_tsweep_tb: the decoder on the 1133-step stream of the power comparison,
// repeated for a sweep of thresholds T (in path-metric LSBs), from one that
// keeps practically every state down to a small one. For each T it checks all
// decoded words against the software model vd_ref and reports the average
// number of live states per step (the share of ACS and survivor rows that
// work, the quantity behind the power saving) and the word errors. The live
// state average must not grow as T shrinks and must drop well below 64.
module vd_tsweep_tb;
  import tcm_pkg::*;
  import vd_ref_pkg::*;

  localparam int NSTEP = 1133;
  localparam int NT = 5;
  localparam int unsigned TV [NT] = '{1023, 384, 256, 160, 96};
  localparam real SIGMA = 24.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  soft_t r [4] = '{default: '0};
  logic [T_W-1:0] t_off = '0;
  logic dec_valid, keep_all, enc_valid = 0;
  xin_t dec_bits, enc_x = '0;
  logic [6:0] live_states;
  state_t dec_state, enc_state;
  logic [3:0] enc_z;

  vd_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vd_ref rm = new();
  xin_t exp_bits [$];
  xin_t tx [$];
  int   n_err, n_out;
  longint live_sum;
  int   live_n;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dec_valid) begin
    xin_t e, t;
    checks++;
    if (exp_bits.size() == 0) failures++;
    else begin
      e = exp_bits.pop_front();
      t = tx.pop_front();
      if (dec_bits != e) failures++;
      if (dec_bits != t) n_err++;
      n_out++;
    end
  end

  always @(posedge clk) if (rst_n && dut.step) begin
    live_sum += longint'(live_states);
    live_n++;
  end

  real avg [NT];

  initial begin
    // the same stream for every T
    xin_t xs [NSTEP + SURV_LEN];
    soft_t rs [NSTEP + SURV_LEN][4];
    state_t es;
    es = '0;
    for (int s = 0; s < NSTEP + SURV_LEN; s++) begin
      soft_t v [4];
      xs[s] = xin_t'($urandom);
      gen_symbol({xs[s], es[0]}, SIGMA, v);
      rs[s] = v;
      es = next_state(es, xs[s]);
    end
    for (int k = 0; k < NT; k++) begin
      rst_n = 0; in_valid = 0; t_off = T_W'(TV[k]);
      rm.reset();
      exp_bits.delete(); tx.delete();
      n_err = 0; n_out = 0; live_sum = 0; live_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int s = 0; s < NSTEP + SURV_LEN; s++) begin
        xin_t o;
        if (s < NSTEP) tx.push_back(xs[s]);
        if (rm.step(rs[s], TV[k], o)) exp_bits.push_back(o);
        in_valid = 1; r = rs[s];
        @(negedge clk);
      end
      in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (n_out != NSTEP || exp_bits.size() != 0) failures++;
      avg[k] = real'(live_sum) / real'(live_n);
      $display("T=%0d: average live states %0.2f of 64 (%0.1f%%), word errors %0d of %0d",
               TV[k], avg[k], 100.0 * avg[k] / 64.0, n_err, NSTEP);
    end
    for (int k = 1; k < NT; k++) begin
      checks++;
      if (avg[k] > avg[k-1] + 0.01) begin failures++; $display("FAIL live states grew at T=%0d", TV[k]); end
    end
    checks++;
    if (avg[NT-1] > 32.0) begin failures++; $display("FAIL smallest T keeps too many states"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
