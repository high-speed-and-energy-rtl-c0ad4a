// tb_vl_ctrl: self-checking test of the variable-latency adder with clock
// stretching (default 32-bit hybrid adder).
// Operands are offered with random gaps; about a third of them make every
// bit of the 8-bit nucleus (bits 19..12) propagate, which must stretch the
// evaluation. A scoreboard checks each result against integer addition,
// checks the stretched flag, and checks the latency from acceptance to
// out_valid: one clock for a short operation, two for a flagged one.
module tb_vl_ctrl;
  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_b2b = 0;
  int cycle = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, cin, out_valid, cout, stretched;
  logic [31:0] a, b, sum;

  typedef struct {
    logic [32:0] exp;
    bit          is_long;
    int          t_acc;
  } item_t;
  item_t sb[$];

  vl_ctrl dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
               .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum),
               .cout(cout), .stretched(stretched));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_operands();
    logic [31:0] m;
    a = $urandom; b = $urandom; cin = 1'($urandom);
    m = $urandom;
    if (m[1:0] == 0) b[19:12] = ~a[19:12];  // nucleus all-propagate
  endtask

  // scoreboard side, sampled between edges; cycle counts the rising edges
  // seen so far, and an item accepted at rising edge t_acc + 1 must give
  // its result at edge t_acc + 1 + latency
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      checks += 3;
      if (sb.size() == 0) begin
        failures += 3;
        $display("FAIL unexpected out_valid");
      end else begin
        it = sb.pop_front();
        if ({cout, sum} !== it.exp) begin failures++; $display("FAIL sum %h expected %h", {cout, sum}, it.exp); end
        if (stretched !== it.is_long) begin failures++; $display("FAIL stretched flag"); end
        if (cycle - it.t_acc - 1 != (it.is_long ? 2 : 1)) begin
          failures++;
          $display("FAIL latency %0d for long=%0b", cycle - it.t_acc - 1, it.is_long);
        end
        if (it.is_long) n_long++; else n_short++;
      end
    end
  end

  initial begin
    int sent = 0;
    bit last_acc = 0;
    in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    new_operands();
    while (sent < 2000) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      #1;
      if (in_valid && in_ready) begin
        item_t it;
        it.exp = {1'b0, a} + {1'b0, b} + 33'(cin);
        it.is_long = &(a[19:12] ^ b[19:12]);
        it.t_acc = cycle;
        sb.push_back(it);
        sent++;
        if (last_acc) n_b2b++;
        last_acc = 1;
        @(posedge clk);
        #1 new_operands();
      end else begin
        last_acc = 0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks += 4;
    if (sb.size() != 0) begin failures++; $display("FAIL %0d results missing", sb.size()); end
    if (n_short == 0) begin failures++; $display("FAIL no short operation"); end
    if (n_long == 0)  begin failures++; $display("FAIL no stretched operation"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back acceptance"); end
    $display("short=%0d stretched=%0d back_to_back=%0d", n_short, n_long, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
