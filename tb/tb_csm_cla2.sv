// tb_csm_cla2: exhaustive check of the 2-bit full adder:
// 2*(alpha+beta) + gamma + delta + epsilon = 4*mu + 2*eta + xi.
module tb_csm_cla2;
  logic al, be, ga, de, ep, mu, eta, xi;
  int checks = 0, failures = 0;
  csm_cla2 dut (.alpha(al), .beta(be), .gamma(ga), .delta(de), .epsilon(ep),
                .mu(mu), .eta(eta), .xi(xi));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      int exp_v;
      {al, be, ga, de, ep} = 5'(v);
      #1;
      exp_v = 2 * (int'(al) + int'(be)) + int'(ga) + int'(de) + int'(ep);
      checks++;
      if (4 * int'(mu) + 2 * int'(eta) + int'(xi) != exp_v) begin
        failures++;
        $display("FAIL cla2 %05b -> %b%b%b", v[4:0], mu, eta, xi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
