// rca_block: M-bit ripple-carry block of a carry skip adder stage.
//
// A chain of M full adders. With HAS_CIN = 1 the chain takes the carry
// input cin (the first stage of the adder). With HAS_CIN = 0 the carry
// input is zero, as in every later stage of the concatenation-incrementation
// adder, so the least significant cell is a half adder and cin is unused;
// sum is then the stage's intermediate sum and cout its carry C0, both
// available without waiting for any lower stage.
// grp_p is the AND of the bit propagate signals P_i = a_i ^ b_i, used by
// the skip logic. The zero carry input of the later stages follows the
// published structure; the half adder in their LSB is this design's
// simplification (the same function as a full adder with carry in 0).
// Purely combinational.
module rca_block #(
  parameter int unsigned M       = 4,
  parameter bit          HAS_CIN = 1'b1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout,
  output logic         grp_p
);
  logic [M:0] c;

  if (HAS_CIN) begin : g_fa0
    assign c[0] = cin;
    full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(sum[0]), .co(c[1]));
  end else begin : g_ha0
    assign c[0] = 1'b0;
    half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(sum[0]), .co(c[1]));
  end

  for (genvar i = 1; i < M; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  assign cout  = c[M];
  assign grp_p = &(a ^ b);
endmodule
