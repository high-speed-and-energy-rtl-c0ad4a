// tb_ci_cska: self-checking test of the CI-CSKA.
// The default 32-bit adder (stages 2,3,4,5,6,5,4,2,1) gets directed
// operands that exercise the whole skip chain (every bit propagating with
// a carry in, generate in stage 1 only, all ones) and 20000 random ones.
// A fixed-stage-size 32-bit instance (eight stages of 4 bits) gets the same
// operands. An 8-bit instance (stages 2,3,2,1) is checked exhaustively.
// Expected values come from plain integer addition.
module tb_ci_cska;
  import cska_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;  logic ci, co;
  logic [31:0] sf;       logic cof;
  logic [7:0]  a8, b8, s8; logic ci8, co8;

  localparam size_list_t SIZESF = '{4, 4, 4, 4, 4, 4, 4, 4, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam size_list_t SIZES8 = '{2, 3, 2, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  ci_cska dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  ci_cska #(.N(32), .Q(8), .SIZES(SIZESF)) dutf (.a(a), .b(b), .cin(ci), .sum(sf), .cout(cof));
  ci_cska #(.N(8), .Q(4), .SIZES(SIZES8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(c);
    checks += 2;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b gave %h expected %h", x, y, c, {co, s}, exp);
    end
    if ({cof, sf} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL fixed-size %h+%h+%b gave %h", x, y, c, {cof, sf});
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
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);          // carry skips every stage
    check32(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);  // same, mixed bits
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);  // generate in stage 1, ripple/skip to top
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);  // last stage generates
    for (int k = 0; k < 32; k++) begin           // carry entering each bit position
      check32(32'hFFFF_FFFF >> k, 32'h1, 1'b0);
      check32(32'hFFFF_FFFF << k, 32'h1 << k, 1'b1);
    end
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, y, m;
      x = $urandom; y = $urandom;
      m = $urandom;
      if (k % 2 == 1) y = ~x ^ (m & m << 7 & m >> 5);  // mostly propagating
      check32(x, y, 1'($urandom));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = c[0];
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d gave %0d", x, y, c, {co8, s8});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
