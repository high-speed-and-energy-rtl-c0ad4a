// tb_workload_8bit: the 8-bit adders of the published area/power/delay
// comparison, run through the top level at N = 8.
// CI-CSKA in stages 2,3,2,1; hybrid adder in stages 2,4,1,1 with a 4-bit
// prefix nucleus at bits 5..2. Every operand pair and both carry inputs
// go through the CI-CSKA; every operand pair (random carry input) is
// streamed back to back through the variable-latency adder. Sums are
// checked against integer addition, the hybrid adder's latency against
// 1 clock (2 when bits 5..2 all propagate).
module tb_workload_8bit;
  import cska_pkg::*;
  int checks = 0, failures = 0, cycle = 0, n_long = 0, n_short = 0;

  localparam size_list_t CI8 = '{2, 3, 2, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam size_list_t HY8 = '{2, 4, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ci_a, ci_b, ci_sum, vl_a, vl_b, vl_sum;
  logic ci_cin, ci_cout, vl_in_valid, vl_in_ready, vl_cin, vl_out_valid, vl_cout, vl_stretched;

  cska_top #(.N(8), .CI_Q(4), .CI_SIZES(CI8), .HY_Q(4), .HY_P(2), .HY_SIZES(HY8)) dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci_a = '0; ci_b = '0; ci_cin = 1'b0;
    #2;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          ci_a = 8'(x); ci_b = 8'(y); ci_cin = c[0];
          #1;
          checks++;
          if ({ci_cout, ci_sum} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL ci %0d+%0d+%0d", x, y, c);
          end
        end
  end

  typedef struct { logic [8:0] exp; bit is_long; int t_acc; } item_t;
  item_t sb[$];

  always @(negedge clk) begin
    if (rst_n && vl_out_valid) begin
      item_t it;
      checks++;
      it = sb.pop_front();
      if ({vl_cout, vl_sum} !== it.exp || vl_stretched !== it.is_long ||
          cycle - it.t_acc - 1 != (it.is_long ? 2 : 1)) begin
        failures++;
        if (failures < 10) $display("FAIL vl result %0d expected %0d", {vl_cout, vl_sum}, it.exp);
      end
      if (it.is_long) n_long++; else n_short++;
    end
  end

  initial begin
    int k = 0;
    vl_in_valid = 1'b0; vl_a = '0; vl_b = '0; vl_cin = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    vl_a = 8'(k >> 8); vl_b = 8'(k); vl_cin = 1'($urandom);
    while (k < 65536) begin
      @(negedge clk);
      vl_in_valid = 1'b1;
      #1;
      if (vl_in_ready) begin
        item_t it;
        it.exp = 9'(vl_a) + 9'(vl_b) + 9'(vl_cin);
        it.is_long = &(vl_a[5:2] ^ vl_b[5:2]);
        it.t_acc = cycle;
        sb.push_back(it);
        @(posedge clk);
        k++;
        #1 vl_a = 8'(k >> 8); vl_b = 8'(k); vl_cin = 1'($urandom);
      end
    end
    @(negedge clk);
    vl_in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks += 3;
    if (sb.size() != 0) begin failures++; $display("FAIL results missing"); end
    if (n_long != 65536 / 16) begin failures++; $display("FAIL stretched count %0d", n_long); end
    if (n_short + n_long != 65536) begin failures++; $display("FAIL result count"); end
    $display("cycles=%0d short=%0d stretched=%0d", cycle, n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
