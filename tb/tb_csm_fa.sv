// tb_csm_fa: exhaustive check of the full adder against a + b + ci.
module tb_csm_fa;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  csm_fa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("FAIL fa %b%b%b -> %b%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
