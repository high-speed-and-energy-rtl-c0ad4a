// cska_stage: one stage j >= 2 of the concatenation-incrementation carry
// skip adder.
//
// A zero-carry-in ripple block computes the intermediate sum, its carry C0
// and the stage propagate P in parallel with every other stage. The
// incrementation block adds the previous stage's carry to the intermediate
// sum, and the skip logic forms the stage carry C0 | (P & c_prev).
// OAI selects the carry polarity: OAI = 0 takes a true carry and gives an
// inverted one (AOI gate), OAI = 1 takes an inverted carry and gives a true
// one (OAI gate). Purely combinational.
module cska_stage #(
  parameter int unsigned M   = 4,
  parameter bit          OAI = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] sum,
  output logic         co
);
  logic [M-1:0] s0;
  logic         c0, p;
  logic         ci_true;

  rca_block #(.M(M), .HAS_CIN(1'b0)) u_rca (
    .a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0), .grp_p(p)
  );

  assign ci_true = OAI ? ~ci : ci;

  inc_block #(.M(M)) u_inc (.s0(s0), .cin(ci_true), .sum(sum));

  skip_logic #(.OAI(OAI)) u_skip (.g(c0), .p(p), .ci(ci), .co(co));
endmodule
