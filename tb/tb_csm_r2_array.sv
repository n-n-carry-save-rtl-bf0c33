// tb_csm_r2_array: exhaustive check of the radix-2 array, two's complement at
// the default n = 5 and unsigned at n = 5. The n+1 low output bits must be the
// low bits of the product, and z_lo + sum_k (c_k + s_k) * 2^(2n-k) must equal
// the full product modulo 2^(2n).
module tb_csm_r2_array;
  localparam int N = 5;
  logic [N-1:0] x, y;
  logic [N:0]   zs, zu;
  logic [N-1:1] cs, ss, cu, su;
  int checks = 0, failures = 0;

  csm_r2_array dut_s (.x(x), .y(y), .z_lo(zs), .c_msd(cs), .s_msd(ss));
  csm_r2_array #(.N(N), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .z_lo(zu), .c_msd(cu), .s_msd(su));

  function automatic logic [2*N-1:0] total(input logic [N:0] zl, input logic [N-1:1] c,
                                           input logic [N-1:1] s);
    logic [2*N-1:0] t;
    t = (2*N)'(zl);
    for (int k = 1; k < N; k++) t += (2*N)'(int'(c[k]) + int'(s[k])) << (2 * N - k);
    return t;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        logic [2*N-1:0] ps, pu;
        x = N'(a);
        y = N'(b);
        #1;
        ps = (2*N)'($signed({{N{x[N-1]}}, x}) * $signed({{N{y[N-1]}}, y}));
        pu = (2*N)'({{N{1'b0}}, x} * {{N{1'b0}}, y});
        checks += 4;
        if (zs != ps[N:0]) failures++;
        if (total(zs, cs, ss) != ps) failures++;
        if (zu != pu[N:0]) failures++;
        if (total(zu, cu, su) != pu) begin
          failures++;
          if (failures < 10) $display("FAIL r2 array unsigned %0d*%0d", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
