// prio_enc64: 64-to-6 priority encoder giving the lowest-numbered enabled state.
//
// With the T-algorithm no state is sure to be live, so the survivor memory reads
// its output from the live state with the lowest index. Three 4-to-2 encoders
// do it in levels:
//   level 1: the ORs of the four 16-flag groups (flag_g0..g3) -> index[5:4];
//   level 2: MUX1 picks the four 4-flag ORs of that group, reusing the ORs
//            built for level 1, -> index[3:2];
//   level 3: MUX2 picks the 16 flags of the group, MUX3 the four flags of the
//            nibble -> index[1:0].
// valid is low when no flag is set (index is then 0). Combinational.
module prio_enc64 (
  input  logic [63:0] flag,
  output logic [5:0]  index,
  output logic        valid
);
  logic [15:0] nib_or;          // OR of flag[4k+3:4k]
  logic [3:0]  flag_g;          // OR of each 16-flag group
  logic [3:0]  mux1;
  logic [15:0] mux2;
  logic [3:0]  mux3;
  logic [1:0]  idx_hi, idx_mid, idx_lo;

  always_comb begin
    for (int k = 0; k < 16; k++) nib_or[k] = |flag[4*k +: 4];
    for (int g = 0; g < 4; g++)  flag_g[g] = |nib_or[4*g +: 4];
  end

  pe4to2 u_level1 (.i(flag_g), .o(idx_hi));

  assign mux1 = nib_or[4*idx_hi +: 4];
  assign mux2 = flag[16*idx_hi +: 16];

  pe4to2 u_level2 (.i(mux1), .o(idx_mid));

  assign mux3 = mux2[4*idx_mid +: 4];

  pe4to2 u_level3 (.i(mux3), .o(idx_lo));

  assign index = {idx_hi, idx_mid, idx_lo};
  assign valid = |flag_g;
endmodule
