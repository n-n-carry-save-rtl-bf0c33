// tb_csm_ha: exhaustive check of the half adder against a + b.
module tb_csm_ha;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  csm_ha dut (.a(a), .b(b), .s(s), .co(co));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b)) begin
        failures++;
        $display("FAIL ha %b%b -> %b%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
