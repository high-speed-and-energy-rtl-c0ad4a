// ci_cska: concatenation-incrementation carry skip adder (CI-CSKA).
//
// The N-bit adder is cut into Q stages whose sizes are listed in SIZES
// (least significant stage first). Stage 1 is a plain ripple-carry block
// fed by cin. Every stage j >= 2 adds its bits with a ripple block whose
// carry input is zero, so all these blocks work at the same time; its
// incrementation block then adds the carry of stage j-1 to the
// intermediate sum, and its skip logic forms the stage carry
// C0_j | (P_j & C_{j-1}) with one AOI or OAI gate. The only serial path
// across stages is the skip chain: stage 1's ripple, Q-2 skip gates and the
// last stage's incrementation block.
//
// Skip gates alternate polarity: stage 2 uses an AOI gate (true carry in,
// inverted carry out), stage 3 an OAI gate (inverted in, true out), and so
// on. cout is the carry of stage Q, re-inverted when Q is even.
//
// Defaults: N = 32 in nine stages 2,3,4,5,6,5,4,2,1. The sizes grow by
// one bit per stage up to the largest (nucleus) stage and then shrink to a
// last stage of one bit, whose ripple block is a single half adder; these
// exact sizes are this design's choice. Purely combinational.
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned Q     = CI_Q_32,
  parameter size_list_t  SIZES = CI_SIZES_32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  // carry of each stage, in the polarity the skip gate leaves it:
  // c[1] is true, c[j] for j >= 2 is inverted when j is even.
  logic [Q:1] c;

  initial begin
    assert (Q >= 2 && Q <= MAX_STAGES) else $error("ci_cska: Q out of range");
    assert (stage_total(SIZES, Q) == N) else $error("ci_cska: SIZES do not add up to N");
  end

  localparam int unsigned M1 = SIZES[0];

  rca_block #(.M(M1), .HAS_CIN(1'b1)) u_stage1 (
    .a(a[M1-1:0]), .b(b[M1-1:0]), .cin(cin),
    .sum(sum[M1-1:0]), .cout(c[1]), .grp_p()
  );

  for (genvar j = 2; j <= Q; j++) begin : g_stage
    localparam int unsigned MJ  = SIZES[j-1];
    localparam int unsigned LO  = stage_offset(SIZES, j-1);
    localparam bit          OAI = (j % 2) == 1;
    cska_stage #(.M(MJ), .OAI(OAI)) u_stage (
      .a(a[LO +: MJ]), .b(b[LO +: MJ]), .ci(c[j-1]),
      .sum(sum[LO +: MJ]), .co(c[j])
    );
  end

  assign cout = (Q % 2 == 0) ? ~c[Q] : c[Q];
endmodule
