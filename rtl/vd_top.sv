// vd_top: low-power Viterbi decoder for the rate-3/4, 64-state TCM code, using the
// T-algorithm with a 2-step pre-computed threshold, plus the code's encoder.
//
// Decoder datapath, one trellis step per cycle:
//   bmu        soft inputs -> 16 branch metrics, BM group and even/odd minima (registered)
//   acsu       PMs(n-1) + BMs(n) -> PMs(n), decisions; purged states skipped
//   tgu        PM_opt(n) + T, pre-computed from PMs(n-2) outside the ACS loop
//   purge_unit PMs(n) against PM_opt(n) + T -> state enable flags
//   pmu        metric and flag registers
//   smu_re     register-exchange survivor memory, purged rows held, output from
//              the lowest-numbered live state
// The loop through acsu, purge_unit and pmu holds one p-input comparison and one
// 2-input comparison, the iteration bound of the T-algorithm; the threshold search
// sits in the tgu pipeline.
//
// Interface: present the four soft values of one step on r with in_valid high;
// in_valid may be low in any cycle (the decoder then stalls). A step enters the
// ACS loop one cycle after acceptance; its decoded word {x3,x2,x1} leaves on
// dec_bits with dec_valid 42 steps later, in the order of the input steps.
// t_off is the threshold T in path-metric LSBs (one soft-value step of one bit
// is one LSB); keep it stable while decoding. A T of 1023 keeps, in practice,
// every reached state (full-trellis behaviour).
// Debug outputs: the number of live states, and keep_all, high on a step in
// which the threshold would have purged every state.
//
// The encoder (conv_enc34) has its own ports and is not connected to the decoder.
module vd_top
  import tcm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // decoder
  input  logic           in_valid,
  input  soft_t          r [4],
  input  logic [T_W-1:0] t_off,
  output logic           dec_valid,
  output xin_t           dec_bits,
  output logic [6:0]     live_states,
  output logic           keep_all,
  output state_t         dec_state,      // live state whose survivor row was read
  // encoder
  input  logic           enc_valid,
  input  xin_t           enc_x,
  output logic [3:0]     enc_z,
  output state_t         enc_state
);
  logic  step;
  bm_t   bm [NBM];
  bm_t   bm_grp_min [4];
  bm_t   bm_even_min, bm_odd_min;
  pm_t   pm [NSTATE], pm_new [NSTATE];
  logic  en [NSTATE], val [NSTATE], flag [NSTATE];
  xin_t  dec [NSTATE];
  pm_t   thr;
  logic  thr_valid;

  bmu u_bmu (
    .clk, .rst_n, .in_valid, .r,
    .out_valid   (step),
    .bm, .bm_grp_min, .bm_even_min, .bm_odd_min
  );

  acsu u_acsu (.pm, .en, .bm, .pm_new, .dec, .val);

  tgu u_tgu (
    .clk, .rst_n, .step, .pm, .en, .bm_grp_min, .bm_even_min, .bm_odd_min,
    .t_off, .thr, .thr_valid
  );

  purge_unit u_pu (.pm_new, .val, .thr, .thr_valid, .flag, .keep_all);

  pmu u_pmu (.clk, .rst_n, .step, .pm_new, .flag_new(flag), .pm, .en);

  smu_re u_smu (
    .clk, .rst_n, .step, .dec, .flag_new(flag), .en,
    .out_valid (dec_valid),
    .out_bits  (dec_bits),
    .out_state (dec_state)
  );

  // The purge unit's fallback guarantees that some state stays enabled.
  a_some_state_live: assert property (@(posedge clk) disable iff (!rst_n) live_states != '0)
    else $error("every trellis state was purged");

  always_comb begin
    live_states = '0;
    for (int j = 0; j < NSTATE; j++) live_states += 7'(en[j]);
  end

  conv_enc34 u_enc (
    .clk, .rst_n, .in_valid(enc_valid), .x(enc_x), .z(enc_z),
    .state(enc_state)
  );
endmodule
