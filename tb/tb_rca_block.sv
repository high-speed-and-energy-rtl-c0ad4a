// tb_rca_block: exhaustive self-checking test of the ripple-carry block.
// Checks a 4-bit block with a carry input and a 3-bit block with a zero
// carry input (half adder in the LSB) against integer addition, and the
// group propagate against the AND of a ^ b.
module tb_rca_block;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;  logic ci4, co4, p4;
  logic [2:0] a3, b3, s3;  logic co3, p3;

  rca_block #(.M(4), .HAS_CIN(1'b1)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4), .grp_p(p4));
  rca_block #(.M(3), .HAS_CIN(1'b0)) dut3 (.a(a3), .b(b3), .cin(1'b1), .sum(s3), .cout(co3), .grp_p(p3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); ci4 = c[0];
          #1;
          check({co4, s4} == 5'(x + y + c), $sformatf("rca4 %0d+%0d+%0d", x, y, c));
          check(p4 == ((x ^ y) == 15), "rca4 grp_p");
        end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        a3 = 3'(x); b3 = 3'(y);
        #1;
        check({co3, s3} == 4'(x + y), $sformatf("rca3 zero-cin %0d+%0d", x, y));
        check(p3 == ((x ^ y) == 7), "rca3 grp_p");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
