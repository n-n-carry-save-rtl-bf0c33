// tb_csm_otf_d_r4: every legal decision state against every radix-4
// redundant digit p = 2*(c1+s1)+c0: u becomes g for p <= 2, t for p >= 4 and
// stays u for p = 3; g and t never change.
module tb_csm_otf_d_r4;
  import csm_pkg::*;
  dec_t d_in, d_out, exp_d;
  logic c1, s1, c0;
  int checks = 0, failures = 0;
  csm_otf_d_r4 dut (.d_in(d_in), .c1(c1), .s1(s1), .c0(c0), .d_out(d_out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    dec_t states [3];
    states[0] = DEC_U;
    states[1] = DEC_G;
    states[2] = DEC_T;
    for (int st = 0; st < 3; st++) begin
      for (int v = 0; v < 8; v++) begin
        int p;
        d_in         = states[st];
        {c1, s1, c0} = 3'(v);
        p            = 2 * (int'(c1) + int'(s1)) + int'(c0);
        #1;
        if (st != 0)     exp_d = d_in;
        else if (p <= 2) exp_d = DEC_G;
        else if (p >= 4) exp_d = DEC_T;
        else             exp_d = DEC_U;
        checks++;
        if (d_out != exp_d) begin
          failures++;
          $display("FAIL d_r4 state %0d p=%0d -> %b", st, p, d_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
