// tb_csm_otf_d_r2: every legal decision state (u, g, t) against every
// carry-sum digit value, compared with the decision table: u stays u on a
// propagating digit (1), becomes g on 0 and t on 2; g and t never change.
module tb_csm_otf_d_r2;
  import csm_pkg::*;
  dec_t d_in, d_out, exp_d;
  logic c, s;
  int checks = 0, failures = 0;
  csm_otf_d_r2 dut (.d_in(d_in), .c(c), .s(s), .d_out(d_out));
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
      for (int v = 0; v < 4; v++) begin
        int p;
        d_in   = states[st];
        {c, s} = 2'(v);
        p      = int'(c) + int'(s);
        #1;
        if (st != 0)     exp_d = d_in;
        else if (p == 0) exp_d = DEC_G;
        else if (p == 2) exp_d = DEC_T;
        else             exp_d = DEC_U;
        checks++;
        if (d_out != exp_d) begin
          failures++;
          $display("FAIL d_r2 state %0d c=%b s=%b -> %b", st, c, s, d_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
