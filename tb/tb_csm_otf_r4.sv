// tb_csm_otf_r4: the radix-4 converter at its default size (3 digits) gets
// every combination of redundant digits (8^3 = 512 cases). The output digits
// must equal sum_k (2*(c1[k]+s1[k]) + c0[k]) * 4^(ND-k), modulo 4^ND.
module tb_csm_otf_r4;
  localparam int ND = 3;
  logic [ND:1] c1, s1, c0;
  logic [ND:1][1:0] m;
  int checks = 0, failures = 0;
  csm_otf_r4 dut (.c1(c1), .s1(s1), .c0(c0), .m(m));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << (3 * ND)); v++) begin
      int sum;
      logic [2*ND-1:0] exp_m, got;
      sum = 0;
      for (int k = 1; k <= ND; k++) begin
        c1[k] = v[3*k-3];
        s1[k] = v[3*k-2];
        c0[k] = v[3*k-1];
        sum += (2 * (int'(c1[k]) + int'(s1[k])) + int'(c0[k])) << (2 * (ND - k));
      end
      #1;
      exp_m = (2*ND)'(sum);
      for (int k = 1; k <= ND; k++) got[2*(ND-k) +: 2] = m[k];
      checks++;
      if (got != exp_m) begin
        failures++;
        $display("FAIL otf_r4 v=%0d -> %b exp %b", v, got, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
