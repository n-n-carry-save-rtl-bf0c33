// tb_csm_otf_r2: the radix-2 converter at its default size (4 digits) gets
// every combination of carry-sum digits (4^4 = 256 cases, values 0..2 each
// with both encodings of 1). The output must equal the sum
// sum_k (c[k]+s[k]) * 2^(ND-k), modulo 2^ND.
module tb_csm_otf_r2;
  localparam int ND = 4;
  logic [ND:1] c, s, m;
  int checks = 0, failures = 0;
  csm_otf_r2 dut (.c(c), .s(s), .m(m));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << (2 * ND)); v++) begin
      int sum;
      logic [ND-1:0] exp_m, got;
      sum = 0;
      for (int k = 1; k <= ND; k++) begin
        c[k] = v[2*k-2];
        s[k] = v[2*k-1];
        sum += (int'(c[k]) + int'(s[k])) << (ND - k);
      end
      #1;
      exp_m = ND'(sum);
      for (int k = 1; k <= ND; k++) got[ND-k] = m[k];
      checks++;
      if (got != exp_m) begin
        failures++;
        $display("FAIL otf_r2 c=%b s=%b -> %b exp %b", c, s, got, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
