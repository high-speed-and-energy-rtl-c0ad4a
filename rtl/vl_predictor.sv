// vl_predictor: long-path predictor of a variable-latency adder.
//
// Looks at a window of W operand bits (bits j+1..j+m of the adder) and
// raises err when every bit of the window propagates (a_i ^ b_i = 1): only
// then can the carry entering the window travel through it, joining the
// short paths below and above the window into one long path that needs a
// stretched clock period. When err is low, the carry leaving the window
// does not depend on the carry entering it, and the adder settles within
// one normal clock period. Computed straight from the operands, in
// parallel with the adder. Purely combinational.
module vl_predictor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         err
);
  assign err = &(a ^ b);
endmodule
