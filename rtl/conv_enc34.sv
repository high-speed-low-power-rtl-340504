// conv_enc34: rate-3/4 systematic feedback convolutional encoder of the TCM system.
//
// Six delay elements in a chain closed by feedback from the last one. Between the
// elements the inputs are added modulo 2: x3 after the 1st, x2 after the 2nd, x3
// after the 3rd, x1 and x2 after the 4th, x1 and the feedback after the 5th. The
// outputs are z3 = x3, z2 = x2, z1 = x1 and z0 = the last delay element. The tap
// positions are read from the encoder drawing of the code; the same chain is in
// tcm_pkg::next_state, which the decoder uses.
//
// Interface: when in_valid is high the coded word for x is presented combinationally
// on z (from the current state) and the state advances at the clock edge.
// rst_n (active low, synchronous) clears the state to 0.
module conv_enc34
  import tcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  xin_t       x,          // {x3,x2,x1}
  output logic [3:0] z,          // {z3,z2,z1,z0}
  output state_t     state
);
  state_t s_q;

  always_ff @(posedge clk) begin
    if (!rst_n)        s_q <= '0;
    else if (in_valid) s_q <= next_state(s_q, x);
  end

  assign z     = {x, s_q[0]};
  assign state = s_q;
endmodule
