// vd_top_tb: end-to-end test of the decoder at its full size.
//
// Random input words are encoded with the code's trellis, sent through a
// Gaussian channel as 7-bit soft values and decoded. Every decoded word, the
// survivor state it was read from, the number of live states after every step
// and the keep-all flag are compared with the software model vd_ref; decoded
// words are also compared with the transmitted ones, and the top's encoder
// output with the trellis model (required to match in the
// low-noise phase, counted as bit errors elsewhere). Phases, each after a reset:
//   A  T = 1023, low noise, in_valid always high: one step per cycle is checked
//   B  T = 40, moderate noise, random stalls (1133 steps, the length of the power run)
//   C  T = 0, heavy noise: frequent purging and the keep-all safeguard
// The test counts stalls, purges, keep-all steps, path-metric wrap-arounds and
// outputs read from a state other than 0, and fails if any never happened.
module vd_top_tb;
  import tcm_pkg::*;
  import vd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
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
  int n_stall = 0, n_purge = 0, n_keep = 0, n_wrap = 0, n_nz_state = 0;
  int cycles = 0;

  vd_ref rm = new();
  xin_t   exp_bits [$];
  int     exp_state [$];
  xin_t   tx [$];
  int     exp_live [$];
  bit     exp_keep [$];
  int     n_out, bit_err;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  // monitor: decoded words and per-step state
  always @(posedge clk) if (rst_n) begin
    if (dut.step) begin
      if (exp_keep.size() == 0) check(0, "unexpected step");
      else begin
        bit ek;
        ek = exp_keep.pop_front();
        check(keep_all == ek, "keep_all");
        if (keep_all) n_keep++;
      end
    end
    if (dec_valid) begin
      if (exp_bits.size() == 0) check(0, "unexpected output");
      else begin
        xin_t eb, tb;
        int es;
        eb = exp_bits.pop_front();
        es = exp_state.pop_front();
        tb = tx.pop_front();
        check(dec_bits == eb, "decoded word vs model");
        check(int'(dec_state) == es, "survivor state vs model");
        if (dec_state != 0) n_nz_state++;
        if (dec_bits != tb) bit_err++;
        n_out++;
      end
    end
  end

  logic step_q;
  always @(posedge clk) step_q <= rst_n && dut.step;
  always @(negedge clk) if (step_q) begin
    if (exp_live.size() == 0) check(0, "live count underflow");
    else check(int'(live_states) == exp_live.pop_front(), "live states");
  end

  task automatic run_phase(string name, int unsigned t, real sigma, int nsteps,
                           int stall_pct, bit must_match);
    state_t es;
    int first_out, last_out, outs_at_start;
    pm_t prev_min;
    es = '0;
    rst_n = 0; in_valid = 0; t_off = T_W'(t);
    exp_bits.delete(); exp_state.delete(); tx.delete(); exp_live.delete(); exp_keep.delete();
    rm.reset();
    n_out = 0; bit_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_min = 0;
    for (int s = 0; s < nsteps + SURV_LEN; s++) begin
      xin_t x;
      soft_t rs [4];
      xin_t o;
      pm_t mn;
      while (stall_pct > 0 && $urandom_range(99) < stall_pct) begin
        in_valid = 0; enc_valid = 0;
        n_stall++;
        @(negedge clk);
      end
      x = xin_t'($urandom);
      // the top's own encoder runs in step with the model's trellis
      enc_valid = 1; enc_x = x;
      #1;
      check(enc_z == {x, es[0]} && enc_state == es, "encoder output");
      gen_symbol({x, es[0]}, sigma, rs);
      es = next_state(es, x);
      if (s < nsteps) tx.push_back(x);
      in_valid = 1; r = rs;
      if (rm.step(rs, t, o)) begin
        exp_bits.push_back(o);
        exp_state.push_back(rm.last_out_state);
      end
      exp_live.push_back(rm.last_live);
      exp_keep.push_back(rm.last_keep_all);
      if (rm.last_purged > 0) n_purge++;
      mn = '0;
      for (int j = NSTATE - 1; j >= 0; j--) if (rm.en[j]) mn = rm.pm[j];
      if (mn < prev_min && prev_min - mn > 2048) n_wrap++;
      prev_min = mn;
      @(negedge clk);
    end
    in_valid = 0; enc_valid = 0;
    repeat (5) @(negedge clk);
    check(exp_bits.size() == 0 && exp_live.size() == 0, {name, ": all outputs seen"});
    check(n_out == nsteps, {name, ": output count"});
    if (must_match) check(bit_err == 0, {name, ": decoded words equal transmitted words"});
    $display("phase %s: T=%0d sigma=%0.1f steps=%0d word errors=%0d", name, t, sigma, nsteps, bit_err);
  endtask

  // rate: with in_valid held high, one decoded word per cycle
  int rate_first, rate_last, rate_cnt;
  always @(posedge clk) if (dec_valid) begin
    if (rate_cnt == 0) rate_first = cycles;
    rate_last = cycles;
    rate_cnt++;
  end

  initial begin
    rate_cnt = 0;
    run_phase("A", 1023, 10.0, 300, 0, 1);
    check(rate_last - rate_first == rate_cnt - 1, "one step per cycle");
    run_phase("B", 40, 20.0, 1133, 20, 0);
    run_phase("C", 0, 40.0, 600, 5, 0);
    $display("stalls=%0d purge steps=%0d keep_all=%0d pm wraps=%0d nonzero out states=%0d",
             n_stall, n_purge, n_keep, n_wrap, n_nz_state);
    check(n_stall > 0, "stall happened");
    check(n_purge > 0, "purge happened");
    check(n_keep > 0, "keep_all happened");
    check(n_wrap > 0, "path metric wrap happened");
    check(n_nz_state > 0, "output from non-zero state happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
