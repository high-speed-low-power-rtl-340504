// smu_re: register-exchange survivor-path memory with survival length 42.
//
// Each state j owns a row of SURV_LEN entries of 3 decoded bits {x3,x2,x1},
// entry 0 the newest. On a step, an enabled new state copies the row of its
// surviving predecessor pred_state(j, dec[j]), shifted by one entry, and puts
// its decision dec[j] (the input word of the surviving branch) in entry 0. Rows
// of purged states are not written, which is where their clock can be gated.
//
// A fixed output state cannot be used, since any state may be purged. The row
// to read is that of the lowest-numbered live state, found by prio_enc64 from
// the current flags. The oldest entry of that row is the decoded word.
//
// Timing: on every step the word of the step SURV_LEN steps back is registered
// into out_bits with out_valid high, once SURV_LEN steps have been taken since
// reset, so the i-th valid output word is the decoded input of the i-th step.
// Register exchange, the survival length, the held rows of purged states and the
// lowest-index output state follow the source design; the row layout and the
// output timing are this design's choices.
module smu_re
  import tcm_pkg::*;
#(
  parameter int unsigned L = SURV_LEN
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   step,
  input  xin_t   dec      [NSTATE],  // decisions of step n
  input  logic   flag_new [NSTATE],  // enable flags of step n
  input  logic   en       [NSTATE],  // enable flags of step n-1 (registered)
  output logic   out_valid,
  output xin_t   out_bits,
  output state_t out_state           // state whose row was read
);
  xin_t row [NSTATE][L];
  logic [$clog2(L+1)-1:0] fill;
  logic [63:0] en_vec;
  logic [5:0]  idx;
  logic        idx_v;

  for (genvar j = 0; j < NSTATE; j++) begin : g_row
    state_t pr;
    assign pr = pred_state(state_t'(j), dec[j]);
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        row[j] <= '{default: '0};
      end else if (step && flag_new[j]) begin
        row[j][0] <= dec[j];
        for (int i = 1; i < L; i++) row[j][i] <= row[pr][i-1];
      end
    end
  end

  always_comb
    for (int j = 0; j < NSTATE; j++) en_vec[j] = en[j];

  prio_enc64 u_pe (.flag(en_vec), .index(idx), .valid(idx_v));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill      <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_state <= '0;
    end else begin
      out_valid <= 1'b0;
      if (step) begin
        if (fill != L[$bits(fill)-1:0]) fill <= fill + 1'b1;
        out_valid <= (fill == L[$bits(fill)-1:0]) && idx_v;
        out_bits  <= row[idx][L-1];
        out_state <= idx;
      end
    end
  end
endmodule
