// cska_top: the two proposed carry skip adders side by side.
//
// ci_*: the combinational concatenation-incrementation carry skip adder
// (CI-CSKA), N bits in variable-size stages.
// vl_*: the hybrid variable-latency carry skip adder, the CI-CSKA with a
// parallel-prefix nucleus stage and a long-path predictor, wrapped with
// input/output registers and adaptive clock stretching (one clock per
// addition, two when the predictor flags it; see vl_ctrl).
// Both default to 32 bits with the stage sizes of cska_pkg; the stage lists
// can be overridden together with N (they must add up to N). The two
// adders share no signals.
module cska_top
  import cska_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned CI_Q     = CI_Q_32,
  parameter size_list_t  CI_SIZES = CI_SIZES_32,
  parameter int unsigned HY_Q     = HY_Q_32,
  parameter int unsigned HY_P     = HY_P_32,
  parameter size_list_t  HY_SIZES = HY_SIZES_32
) (
  input  logic         clk,
  input  logic         rst_n,
  // CI-CSKA
  input  logic [N-1:0] ci_a,
  input  logic [N-1:0] ci_b,
  input  logic         ci_cin,
  output logic [N-1:0] ci_sum,
  output logic         ci_cout,
  // hybrid variable-latency CSKA
  input  logic         vl_in_valid,
  output logic         vl_in_ready,
  input  logic [N-1:0] vl_a,
  input  logic [N-1:0] vl_b,
  input  logic         vl_cin,
  output logic         vl_out_valid,
  output logic [N-1:0] vl_sum,
  output logic         vl_cout,
  output logic         vl_stretched
);
  ci_cska #(.N(N), .Q(CI_Q), .SIZES(CI_SIZES)) u_ci (
    .a(ci_a), .b(ci_b), .cin(ci_cin), .sum(ci_sum), .cout(ci_cout)
  );

  vl_ctrl #(.N(N), .Q(HY_Q), .P_IDX(HY_P), .SIZES(HY_SIZES)) u_vl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(vl_in_valid), .in_ready(vl_in_ready),
    .a(vl_a), .b(vl_b), .cin(vl_cin),
    .out_valid(vl_out_valid), .sum(vl_sum), .cout(vl_cout),
    .stretched(vl_stretched)
  );
endmodule
