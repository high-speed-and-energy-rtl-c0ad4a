// tb_inc_block: exhaustive self-checking test of the incrementation block:
// sum must equal (s0 + cin) modulo 2^M.
module tb_inc_block;
  localparam int M = 5;
  int checks = 0, failures = 0;
  logic [M-1:0] s0, sum;
  logic cin;

  inc_block #(.M(M)) dut (.s0(s0), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << M); x++)
      for (int c = 0; c < 2; c++) begin
        s0 = M'(x); cin = c[0];
        #1;
        checks++;
        if (sum !== M'(x + c)) begin
          failures++;
          $display("FAIL inc %0d+%0d gave %0d", x, c, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
