// inc_block: incrementation block of a concatenation-incrementation stage.
//
// Adds the one-bit carry of the previous stage to the M-bit intermediate
// sum s0 that the stage's zero-carry-in ripple block produced. Bit i of the
// result is s0[i] XOR t[i], where t[0] = cin and t[i] = t[i-1] AND s0[i-1]:
// a serial chain of two-input AND gates followed by one XOR per bit, so the
// longest path is (M-1) AND gates plus one XOR. The carry out of the
// increment is not needed here: the stage carry comes from the skip logic.
// The AND-chain-plus-XOR organisation follows the published structure.
// Purely combinational.
module inc_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] s0,
  input  logic         cin,
  output logic [M-1:0] sum
);
  logic [M-1:0] t;

  assign t[0] = cin;
  for (genvar i = 1; i < M; i++) begin : g_and
    assign t[i] = t[i-1] & s0[i-1];
  end

  assign sum = s0 ^ t;
endmodule
