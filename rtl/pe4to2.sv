// pe4to2: 4-to-2 priority encoder; the lowest-numbered input that is 1 wins.
//
//   I = xxx1 -> 00,  xx10 -> 01,  x100 -> 10,  1000 -> 11
//   O[0] = !I[0] & (I[1] | I[3] & !I[2])
//   O[1] = !I[0] & !I[1] & (I[2] | I[3])
//
// The output is 00 when no input is set (the caller checks for that).
// Combinational; building block of the 64-to-6 encoder.
module pe4to2 (
  input  logic [3:0] i,
  output logic [1:0] o
);
  assign o[0] = ~i[0] & (i[1] | (i[3] & ~i[2]));
  assign o[1] = ~i[0] & ~i[1] & (i[2] | i[3]);
endmodule
