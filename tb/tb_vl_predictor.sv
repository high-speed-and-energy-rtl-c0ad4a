// tb_vl_predictor: exhaustive test of the 8-bit predictor window: err must
// be high exactly when a carry entering bit 0 of the window travels out of
// its top: a + b gives no carry out of the window but a + b + 1 does.
module tb_vl_predictor;
  int checks = 0, failures = 0, hits = 0;
  logic [7:0] a, b;
  logic err;

  vl_predictor #(.W(8)) dut (.a(a), .b(b), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        bit exp;
        a = 8'(x); b = 8'(y);
        #1;
        // all bits propagate  <=>  no carry out without a carry in, but one with it
        exp = ((x + y) < 256) && ((x + y + 1) >= 256);
        hits += int'(exp);
        checks++;
        if (err !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL pred %0d,%0d gave %b", x, y, err);
        end
      end
    checks++;
    if (hits != 256) begin failures++; $display("FAIL flagged count %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
