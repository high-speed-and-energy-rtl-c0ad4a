// vl_ctrl: hybrid variable-latency carry skip adder with adaptive clock
// stretching.
//
// Operands are accepted into an input register (in_valid && in_ready). The
// hybrid adder then evaluates them from that register. The clock period is
// chosen for the short paths only, so when the predictor reports that the
// operands can excite the long path (long_path), the result register skips
// one capture edge: the evaluation is stretched to two clock periods. In
// silicon the same effect is reached by stretching the clock; here the
// clock stays periodic and the stretch is a clock-enable.
//
// Timing: operands accepted at edge k give out_valid (one-cycle pulse) with
// sum/cout at edge k+1 for a short operation, or at edge k+2 with
// stretched = 1 for a flagged one. in_ready is high whenever the input
// register is empty or is being emptied in this cycle, so short operations
// stream at one per clock; a flagged operation holds in_ready low for one
// cycle. Reset is synchronous and active low. The handshake and the reset
// are this design's choices.
module vl_ctrl
  import cska_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned Q     = HY_Q_32,
  parameter int unsigned P_IDX = HY_P_32,
  parameter size_list_t  SIZES = HY_SIZES_32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         stretched
);
  typedef struct packed {
    logic [N-1:0] a;
    logic [N-1:0] b;
    logic         cin;
  } operands_t;

  operands_t    op_q;
  logic         busy_q;     // input register holds an operation
  logic         wait_q;     // first of two stretched periods has passed
  logic [N-1:0] sum_d;
  logic         cout_d;
  logic         long_path;
  logic         capture;

  hybrid_vl_cska #(.N(N), .Q(Q), .P_IDX(P_IDX), .SIZES(SIZES)) u_add (
    .a(op_q.a), .b(op_q.b), .cin(op_q.cin),
    .sum(sum_d), .cout(cout_d), .long_path(long_path)
  );

  assign capture  = busy_q && (!long_path || wait_q);
  assign in_ready = !busy_q || capture;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_q      <= '0;
      busy_q    <= 1'b0;
      wait_q    <= 1'b0;
      out_valid <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
      stretched <= 1'b0;
    end else begin
      out_valid <= capture;
      if (capture) begin
        sum       <= sum_d;
        cout      <= cout_d;
        stretched <= wait_q;
      end
      if (in_valid && in_ready) begin
        op_q   <= '{a: a, b: b, cin: cin};
        busy_q <= 1'b1;
        wait_q <= 1'b0;
      end else if (capture) begin
        busy_q <= 1'b0;
        wait_q <= 1'b0;
      end else if (busy_q) begin
        wait_q <= 1'b1;
      end
    end
  end

  // A wait period is only ever spent on a flagged operation.
  a_wait_only_long : assert property (@(posedge clk) disable iff (!rst_n)
    wait_q |-> long_path);
  // An operation never waits longer than one extra period.
  a_max_two : assert property (@(posedge clk) disable iff (!rst_n)
    busy_q && wait_q |-> capture);
endmodule
