// tb_skip_logic: exhaustive test of both skip-gate polarities. The AOI form
// must give the inverted carry g | (p & c) from a true carry c; the OAI
// form the true carry from an inverted carry.
module tb_skip_logic;
  int checks = 0, failures = 0;
  logic g, p, c, co_aoi, co_oai;

  skip_logic #(.OAI(1'b0)) dut_aoi (.g(g), .p(p), .ci(c),  .co(co_aoi));
  skip_logic #(.OAI(1'b1)) dut_oai (.g(g), .p(p), .ci(~c), .co(co_oai));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, c} = 3'(v);
      #1;
      checks += 2;
      // carry = generate, or propagate with a carry coming in
      if (co_aoi !== !(g || (p && c))) begin failures++; $display("FAIL AOI g=%b p=%b c=%b", g, p, c); end
      if (co_oai !==  (g || (p && c))) begin failures++; $display("FAIL OAI g=%b p=%b c=%b", g, p, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
