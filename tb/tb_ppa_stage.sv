// tb_ppa_stage: exhaustive test of the 8-bit parallel-prefix nucleus stage:
// {co, sum} must equal a + b + ci, grp_p the AND of a ^ b.
module tb_ppa_stage;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum;
  logic ci, co, gp;

  ppa_stage #(.M(8)) dut (.a(a), .b(b), .ci(ci), .sum(sum), .co(co), .grp_p(gp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(x); b = 8'(y); ci = c[0];
          #1;
          checks++;
          if ({co, sum} !== 9'(x + y + c) || gp !== ((x ^ y) == 255)) begin
            failures++;
            if (failures < 10) $display("FAIL ppa %0d+%0d+%0d gave %0d/%b", x, y, c, {co, sum}, gp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
