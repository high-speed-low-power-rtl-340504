// bmu: branch metric unit.
//
// Takes one received trellis step as four 7-bit soft values, one per coded bit
// z3..z0, in offset binary (0 = surest '0', 127 = surest '1'), and computes the 16
// branch metrics BM_m, m = {z3,z2,z1,z0}, as the sum of the four bit distances
// (r for a '0', 127 - r for a '1'). It also produces what the threshold generator
// needs: the minimum of each BM group (BMG0: m mod 4 = 0, BMG1: m mod 4 = 2,
// BMG2: m mod 4 = 1, BMG3: m mod 4 = 3) and the minimum of the even and of the odd
// BMs. The group definitions follow the decoder's pre-computation equations; the
// per-bit distance metric is this design's own stand-in for the TCM transition
// metric unit, whose constellation metric is not specified here.
//
// Timing: one step per cycle. Outputs are registered: a step accepted with
// in_valid at edge t appears with out_valid during the following cycle. The
// registers hold their value while in_valid is low. rst_n is synchronous, active low.
module bmu
  import tcm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  soft_t r [4],          // r[i] is the soft value of coded bit z_i
  output logic  out_valid,
  output bm_t   bm [NBM],
  output bm_t   bm_grp_min [4], // min BMG0..BMG3
  output bm_t   bm_even_min,
  output bm_t   bm_odd_min
);
  localparam bm_t SOFT_MAX = bm_t'((1 << SOFT_W) - 1);

  // Residue m mod 4 of the members of each group.
  localparam int unsigned GRP_RES [4] = '{0, 2, 1, 3};

  bm_t bm_d [NBM];
  bm_t grp_d [4];
  bm_t even_d, odd_d;

  function automatic bm_t bmin(bm_t a, bm_t b);
    return (a < b) ? a : b;
  endfunction

  always_comb begin
    for (int m = 0; m < NBM; m++) begin
      bm_d[m] = '0;
      for (int i = 0; i < 4; i++)
        bm_d[m] += m[i] ? (SOFT_MAX - bm_t'(r[i])) : bm_t'(r[i]);
    end
    for (int g = 0; g < 4; g++)
      grp_d[g] = bmin(bmin(bm_d[GRP_RES[g]],      bm_d[GRP_RES[g] + 4]),
                      bmin(bm_d[GRP_RES[g] + 8],  bm_d[GRP_RES[g] + 12]));
    // even BMs are the union of BMG0 and BMG1, odd BMs that of BMG2 and BMG3
    even_d = bmin(grp_d[0], grp_d[1]);
    odd_d  = bmin(grp_d[2], grp_d[3]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      bm          <= '{default: '0};
      bm_grp_min  <= '{default: '0};
      bm_even_min <= '0;
      bm_odd_min  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bm          <= bm_d;
        bm_grp_min  <= grp_d;
        bm_even_min <= even_d;
        bm_odd_min  <= odd_d;
      end
    end
  end
endmodule
