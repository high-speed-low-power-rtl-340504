// tcm_pkg: constants, types and trellis functions shared by the Viterbi decoder.
//
// The code is the rate-3/4, constraint-length-7 systematic feedback code of the
// 4-D 8PSK TCM system: three input bits x3 x2 x1 per trellis step, four coded bits
// z3 z2 z1 z0, 64 states. State bit 5 is the left-most delay element of the encoder
// and bit 0 the right-most one, whose output is z0; states are numbered 0..63 with
// that bit order. A branch metric is indexed by the coded word {z3,z2,z1,z0}, so
// BM m with m mod 4 selects the BM groups BMG0..BMG3 and m mod 2 the even/odd BMs.
//
// Path metrics are 12-bit and are never normalised: they wrap modulo 4096 and are
// compared by the sign of their difference (pm_lt). This is valid while every pair
// of compared metrics lies within 2047 of each other; with 9-bit branch metrics and
// a threshold offset below 1024 the metrics of live states stay well inside that
// range. The wrap-around comparison is this design's own choice.
package tcm_pkg;

  localparam int unsigned K        = 7;            // constraint length
  localparam int unsigned NU       = K - 1;        // delay elements
  localparam int unsigned NSTATE   = 1 << NU;      // 64 trellis states
  localparam int unsigned RB       = 3;            // input bits per step (rate R/(R+1), R = 3)
  localparam int unsigned NPRED    = 1 << RB;      // candidate paths per state, p = 2^R = 8
  localparam int unsigned NBM      = 16;           // coded words z3..z0
  localparam int unsigned SOFT_W   = 7;            // soft-input word length
  localparam int unsigned BM_W     = 9;            // branch metric: 4 bit distances of up to 127
  localparam int unsigned PM_W     = 12;           // path metric word length
  localparam int unsigned T_W      = 10;           // threshold offset T, in PM LSBs
  localparam int unsigned SURV_LEN = 42;           // register-exchange survival length

  typedef logic [SOFT_W-1:0] soft_t;
  typedef logic [BM_W-1:0]   bm_t;
  typedef logic [PM_W-1:0]   pm_t;
  typedef logic [NU-1:0]     state_t;
  typedef logic [RB-1:0]     xin_t;                // {x3,x2,x1}

  // Next state after input x from state s, following the encoder's delay chain.
  function automatic state_t next_state(state_t s, xin_t x);
    state_t n;
    n[5] = s[0];                       // feedback of z0 into the first delay element
    n[4] = s[5] ^ x[2];
    n[3] = s[4] ^ x[1];
    n[2] = s[3] ^ x[2];
    n[1] = s[2] ^ x[0] ^ x[1];
    n[0] = s[1] ^ x[0] ^ s[0];
    return n;
  endfunction

  // The unique predecessor of state n reached with input x (inverse of next_state).
  function automatic state_t pred_state(state_t n, xin_t x);
    state_t s;
    s[0] = n[5];
    s[5] = n[4] ^ x[2];
    s[4] = n[3] ^ x[1];
    s[3] = n[2] ^ x[2];
    s[2] = n[1] ^ x[0] ^ x[1];
    s[1] = n[0] ^ x[0] ^ s[0];
    return s;
  endfunction

  // Wrap-around comparison of two path metrics: a < b.
  function automatic logic pm_lt(pm_t a, pm_t b);
    pm_t d;
    d = a - b;
    return d[PM_W-1];
  endfunction

endpackage
