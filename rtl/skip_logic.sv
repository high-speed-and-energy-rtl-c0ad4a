// skip_logic: carry skip logic of one stage as a single compound gate.
//
// The stage carry is co = g | (p & c_prev), where g is the carry output of
// the stage's zero-carry-in ripple block and p the AND of its propagate
// signals. Instead of a multiplexer the function is one inverting gate:
//   OAI = 0: AOI21, ci is the true previous carry, co the inverted carry
//            co = ~(g | (p & ci)).
//   OAI = 1: OAI21, ci is the inverted previous carry, co the true carry
//            co = ~(~g & (~p | ci)).
// Chained stages alternate AOI and OAI so no extra inverter sits on the
// skip path. Using AOI/OAI compound gates for the skip logic follows the
// published structure; alternating them stage by stage is this design's
// reading of it. Purely combinational.
module skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic g,
  input  logic p,
  input  logic ci,
  output logic co
);
  if (OAI) begin : g_oai
    logic g_n, p_n;
    assign g_n = ~g;
    assign p_n = ~p;
    assign co  = ~(g_n & (p_n | ci));
  end else begin : g_aoi
    assign co  = ~(g | (p & ci));
  end
endmodule
