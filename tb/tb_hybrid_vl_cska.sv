// tb_hybrid_vl_cska: self-checking test of the hybrid CSKA datapath.
// The default 32-bit adder (stages 3,4,5,8,5,4,2,1; 8-bit prefix nucleus at
// bits 19..12) and an 8-bit instance (stages 2,4,1,1; 4-bit nucleus at
// bits 5..2) are checked against integer addition. long_path must be high
// exactly when a carry entering the nucleus would leave it at the top,
// which the test computes by adding the nucleus bits with and without an
// incoming carry.
module tb_hybrid_vl_cska;
  import cska_pkg::*;
  int checks = 0, failures = 0, longs = 0;

  logic [31:0] a, b, s;  logic ci, co, lp;
  logic [7:0]  a8, b8, s8; logic ci8, co8, lp8;

  localparam size_list_t SIZES8 = '{2, 4, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  hybrid_vl_cska dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co), .long_path(lp));
  hybrid_vl_cska #(.N(8), .Q(4), .P_IDX(2), .SIZES(SIZES8)) dut8 (
    .a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8), .long_path(lp8));

  function automatic bit through(int unsigned x, int unsigned y, int unsigned w);
    int unsigned lim = 1 << w;
    return (x + y < lim) && (x + y + 1 >= lim);
  endfunction

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    bit exp_lp;
    a = x; b = y; ci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(c);
    exp_lp = through(int'(x[19:12]), int'(y[19:12]), 8);
    longs += int'(exp_lp);
    checks += 2;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b gave %h expected %h", x, y, c, {co, s}, exp);
    end
    if (lp !== exp_lp) begin
      failures++;
      if (failures < 10) $display("FAIL long_path %h %h gave %b", x, y, lp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'h0, 32'h0, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);          // SPL1 joined to SPL2 through the nucleus
    check32(32'hFFF0_0FFF, 32'h000F_F000, 1'b1);  // nucleus propagates
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0);
    check32(32'h0000_0FFF, 32'h0000_0001, 1'b0);  // carry dies in nucleus
    check32(32'h000F_FFFF, 32'h0000_0001, 1'b0);  // carry crosses nucleus
    for (int k = 0; k < 32; k++) begin
      check32(32'hFFFF_FFFF >> k, 32'h1, 1'b0);
      check32(32'hFFFF_FFFF << k, 32'h1 << k, 1'b1);
    end
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, y, m;
      x = $urandom; y = $urandom; m = $urandom;
      if (k % 2 == 1) y = ~x ^ (m & m << 9 & m >> 6);
      check32(x, y, 1'($urandom));
    end
    checks++;
    if (longs == 0) begin failures++; $display("FAIL long path never flagged"); end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = c[0];
          #1;
          checks += 2;
          if ({co8, s8} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d gave %0d", x, y, c, {co8, s8});
          end
          if (lp8 !== through((x >> 2) & 15, (y >> 2) & 15, 4)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit long_path %0d %0d", x, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
