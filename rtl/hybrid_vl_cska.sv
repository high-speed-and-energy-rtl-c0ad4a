// hybrid_vl_cska: datapath of the hybrid variable-latency carry skip adder.
//
// The adder is a CI-CSKA whose nucleus stage p (P_IDX, 1-based) is replaced
// by an Mp-bit modified parallel-prefix adder (ppa_stage). Stages 1..p-1
// and p+1..Q are the usual CI-CSKA stages: stage 1 a ripple block with the
// carry input, the others zero-carry-in ripple blocks with incrementation
// blocks and AOI/OAI skip gates.
//
// Two short paths exist: SPL1 from the first input bit of stage 1 up the
// skip chain into the nucleus, and SPL2 from the nucleus up the skip chain
// to the last sum bit of stage Q's incrementation block. They join only
// when the carry entering the nucleus propagates through all of it, which
// the predictor flags as long_path; the sequential wrapper then gives the
// adder a stretched (double) period. The fast prefix nucleus widens the
// slack that the short paths leave.
//
// Skip polarity alternates AOI/OAI from stage 2 up to stage p-1; the
// nucleus takes and gives a true carry, and the alternation restarts at
// stage p+1. Defaults: N = 32 in stages 3,4,5,8,5,4,2,1 with the 8-bit
// nucleus at stage 4. The 8-bit nucleus follows the source description;
// the other sizes are this design's choice. Purely combinational.
module hybrid_vl_cska
  import cska_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned Q     = HY_Q_32,
  parameter int unsigned P_IDX = HY_P_32,
  parameter size_list_t  SIZES = HY_SIZES_32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         long_path
);
  // c[j]: carry out of stage j in the polarity its gate leaves it.
  logic [Q:1] c;

  initial begin
    assert (Q >= 2 && Q <= MAX_STAGES) else $error("hybrid_vl_cska: Q out of range");
    assert (P_IDX >= 2 && P_IDX <= Q) else $error("hybrid_vl_cska: nucleus index out of range");
    assert (stage_total(SIZES, Q) == N) else $error("hybrid_vl_cska: SIZES do not add up to N");
  end

  // Polarity of c[j]: 1 = inverted.
  function automatic bit inv_out(int unsigned j);
    if (j == 1 || j == P_IDX) return 1'b0;
    if (j < P_IDX)            return (j % 2) == 0;
    return ((j - P_IDX) % 2) == 1;
  endfunction

  localparam int unsigned M1 = SIZES[0];
  localparam int unsigned MP = SIZES[P_IDX-1];
  localparam int unsigned LP = stage_offset(SIZES, P_IDX-1);

  rca_block #(.M(M1), .HAS_CIN(1'b1)) u_stage1 (
    .a(a[M1-1:0]), .b(b[M1-1:0]), .cin(cin),
    .sum(sum[M1-1:0]), .cout(c[1]), .grp_p()
  );

  for (genvar j = 2; j <= Q; j++) begin : g_stage
    localparam int unsigned MJ = SIZES[j-1];
    localparam int unsigned LO = stage_offset(SIZES, j-1);
    if (j == P_IDX) begin : g_nucleus
      logic ci_true;
      assign ci_true = inv_out(j-1) ? ~c[j-1] : c[j-1];
      ppa_stage #(.M(MJ)) u_ppa (
        .a(a[LO +: MJ]), .b(b[LO +: MJ]), .ci(ci_true),
        .sum(sum[LO +: MJ]), .co(c[j]), .grp_p()
      );
    end else begin : g_ci
      cska_stage #(.M(MJ), .OAI(inv_out(j-1))) u_stage (
        .a(a[LO +: MJ]), .b(b[LO +: MJ]), .ci(c[j-1]),
        .sum(sum[LO +: MJ]), .co(c[j])
      );
    end
  end

  assign cout = inv_out(Q) ? ~c[Q] : c[Q];

  vl_predictor #(.W(MP)) u_pred (
    .a(a[LP +: MP]), .b(b[LP +: MP]), .err(long_path)
  );
endmodule
