// tb_cska_top: end-to-end test of the top level at its default parameters
// (both adders 32 bits wide).
//
// CI-CSKA side: directed and random additions, checked against integer
// addition. For each one the test works out, from the operands and the
// stage sizes 2,3,4,5,6,5,4,2,1, which stage mechanisms were exercised:
// a carry skipped across a whole stage (every bit of the stage
// propagating, carry coming in), an incrementation block adding a carry
// of one, and a stage's own ripple block generating the carry.
// Hybrid side: a stream of additions with random gaps through the
// variable-latency wrapper; results, the stretched flag and the latency
// (one clock, or two when the 8-bit nucleus at bits 19..12 fully
// propagates) are checked, and stalls (in_ready low) are counted.
// Every mechanism must occur at least once.
module tb_cska_top;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_skip = 0, n_inc = 0, n_gen = 0;
  int n_short = 0, n_long = 0, n_stall = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ci_a, ci_b, ci_sum;  logic ci_cin, ci_cout;
  logic vl_in_valid, vl_in_ready, vl_cin, vl_out_valid, vl_cout, vl_stretched;
  logic [31:0] vl_a, vl_b, vl_sum;

  cska_top dut (
    .clk(clk), .rst_n(rst_n),
    .ci_a(ci_a), .ci_b(ci_b), .ci_cin(ci_cin), .ci_sum(ci_sum), .ci_cout(ci_cout),
    .vl_in_valid(vl_in_valid), .vl_in_ready(vl_in_ready),
    .vl_a(vl_a), .vl_b(vl_b), .vl_cin(vl_cin),
    .vl_out_valid(vl_out_valid), .vl_sum(vl_sum), .vl_cout(vl_cout),
    .vl_stretched(vl_stretched)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CI-CSKA side ----------------
  localparam int CI_SZ [9] = '{2, 3, 4, 5, 6, 5, 4, 2, 1};

  task automatic ci_add(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    int lo = 0;
    logic carry = c;
    ci_a = x; ci_b = y; ci_cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(c);
    checks++;
    if ({ci_cout, ci_sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL ci %h+%h+%b gave %h", x, y, c, {ci_cout, ci_sum});
    end
    // classify the stages (independent of the design's internals)
    for (int j = 0; j < 9; j++) begin
      int unsigned xs, ys, lim;
      lim = 1 << CI_SZ[j];
      xs = (x >> lo) & (lim - 1);
      ys = (y >> lo) & (lim - 1);
      if (j > 0) begin
        if ((xs ^ ys) == lim - 1 && carry) n_skip++;
        if (carry) n_inc++;
        if (xs + ys >= lim) n_gen++;
      end
      carry = (xs + ys + int'(carry)) >= lim;
      lo += CI_SZ[j];
    end
  endtask

  initial begin
    ci_a = '0; ci_b = '0; ci_cin = 1'b0;
    #3;
    ci_add(32'hFFFF_FFFF, 32'h0, 1'b1);
    ci_add(32'h8000_0000, 32'h8000_0000, 1'b0);
    ci_add(32'h0000_0003, 32'h0000_0001, 1'b0);
    for (int k = 0; k < 5000; k++) begin
      logic [31:0] x, y, m;
      x = $urandom; y = $urandom; m = $urandom;
      if (k % 2 == 1) y = ~x ^ (m & m << 7 & m >> 5);
      ci_add(x, y, 1'($urandom));
    end
  end

  // ---------------- hybrid variable-latency side ----------------
  typedef struct {
    logic [32:0] exp;
    bit          is_long;
    int          t_acc;
  } item_t;
  item_t sb[$];
  bit vl_done = 0;

  task automatic new_operands();
    logic [31:0] m;
    vl_a = $urandom; vl_b = $urandom; vl_cin = 1'($urandom);
    m = $urandom;
    if (m[1:0] == 0) vl_b[19:12] = ~vl_a[19:12];
  endtask

  always @(negedge clk) begin
    if (rst_n && vl_out_valid) begin
      item_t it;
      checks += 3;
      if (sb.size() == 0) begin
        failures += 3;
        $display("FAIL unexpected vl_out_valid");
      end else begin
        it = sb.pop_front();
        if ({vl_cout, vl_sum} !== it.exp) begin failures++; $display("FAIL vl sum %h expected %h", {vl_cout, vl_sum}, it.exp); end
        if (vl_stretched !== it.is_long) begin failures++; $display("FAIL vl stretched flag"); end
        if (cycle - it.t_acc - 1 != (it.is_long ? 2 : 1)) begin
          failures++;
          $display("FAIL vl latency %0d", cycle - it.t_acc - 1);
        end
        if (it.is_long) n_long++; else n_short++;
      end
    end
  end

  initial begin
    int sent = 0;
    vl_in_valid = 1'b0; vl_a = '0; vl_b = '0; vl_cin = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    new_operands();
    while (sent < 1000) begin
      @(negedge clk);
      vl_in_valid = ($urandom % 5) != 0;
      #1;
      if (vl_in_valid && !vl_in_ready) n_stall++;
      if (vl_in_valid && vl_in_ready) begin
        item_t it;
        it.exp = {1'b0, vl_a} + {1'b0, vl_b} + 33'(vl_cin);
        it.is_long = &(vl_a[19:12] ^ vl_b[19:12]);
        it.t_acc = cycle;
        sb.push_back(it);
        sent++;
        @(posedge clk);
        #1 new_operands();
      end
    end
    @(negedge clk);
    vl_in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (sb.size() != 0) begin failures++; $display("FAIL %0d results missing", sb.size()); end

    // every mechanism must have happened
    checks += 6;
    if (n_skip == 0)  begin failures++; $display("FAIL no stage skip"); end
    if (n_inc == 0)   begin failures++; $display("FAIL no incrementation by one"); end
    if (n_gen == 0)   begin failures++; $display("FAIL no stage-generated carry"); end
    if (n_short == 0) begin failures++; $display("FAIL no one-cycle addition"); end
    if (n_long == 0)  begin failures++; $display("FAIL no stretched addition"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("skip=%0d inc=%0d gen=%0d short=%0d stretched=%0d stall=%0d",
             n_skip, n_inc, n_gen, n_short, n_long, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
