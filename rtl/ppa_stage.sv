// ppa_stage: nucleus stage of the hybrid variable-latency carry skip adder,
// an M-bit modified parallel-prefix adder with carry skip logic.
//
// Preprocessing forms the bit propagate P_i = a_i ^ b_i and generate
// G_i = a_i & b_i. A Kogge-Stone prefix tree (ceil(log2 M) levels of
// (G,P) o (G,P) cells) gives, for every bit i, the group generate and
// propagate of bits i..0 of the stage. These do not depend on the stage's
// carry input, so the tree works in parallel with the stages below.
// Postprocessing uses the incoming carry only at the end:
//   carry into bit i = G[i-1:0] | (P[i-1:0] & ci),  sum_i = P_i ^ that carry,
// and the stage carry co = G[M-1:0] | (P[M-1:0] & ci), the same function as
// the skip logic of the other stages. grp_p = P[M-1:0] feeds the predictor.
// The prefix topology (Kogge-Stone) is this design's choice. ci and co are
// true polarity. Purely combinational.
module ppa_stage #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] sum,
  output logic         co,
  output logic         grp_p
);
  localparam int unsigned LEVELS = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0] p_bit;
  logic [M-1:0] gg [LEVELS+1];
  logic [M-1:0] pp [LEVELS+1];
  logic [M:0]   carry;

  assign p_bit = a ^ b;
  assign gg[0] = a & b;
  assign pp[0] = p_bit;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < M; i++) begin : g_bit
      if (i >= D) begin : g_cell
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-D]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-D];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign carry[0] = ci;
  for (genvar i = 0; i < M; i++) begin : g_post
    assign carry[i+1] = gg[LEVELS][i] | (pp[LEVELS][i] & ci);
  end

  assign sum   = p_bit ^ carry[M-1:0];
  assign co    = carry[M];
  assign grp_p = pp[LEVELS][M-1];
endmodule
