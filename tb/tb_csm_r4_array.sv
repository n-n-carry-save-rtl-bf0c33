// tb_csm_r4_array: exhaustive check of the radix-4 digit array at the default
// n = 8, two's complement and unsigned. The n+2 low bits must be the low bits
// of the product, every digit must lie in 0..5, and
// z_lo + sum_i (2*(c1+s1)+c0) * 4^(n-i) must equal the product modulo 2^(2n).
module tb_csm_r4_array;
  localparam int N  = 8;
  localparam int ND = N / 2 - 1;
  logic [N-1:0]  x, y;
  logic [N+1:0]  zs, zu;
  logic [ND:1]   c1s, s1s, c0s, c1u, s1u, c0u;
  int checks = 0, failures = 0;

  csm_r4_array dut_s (.x(x), .y(y), .z_lo(zs), .c1(c1s), .s1(s1s), .c0(c0s));
  csm_r4_array #(.N(N), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .z_lo(zu), .c1(c1u), .s1(s1u),
                                              .c0(c0u));

  function automatic logic [2*N-1:0] total(input logic [N+1:0] zl, input logic [ND:1] c1,
                                           input logic [ND:1] s1, input logic [ND:1] c0);
    logic [2*N-1:0] t;
    t = (2*N)'(zl);
    for (int i = 1; i <= ND; i++)
      t += (2*N)'(2 * (int'(c1[i]) + int'(s1[i])) + int'(c0[i])) << (2 * N - 2 * i);
    return t;
  endfunction

  initial begin
    #10000000;
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
        if (zs != ps[N+1:0]) failures++;
        if (total(zs, c1s, s1s, c0s) != ps) failures++;
        if (zu != pu[N+1:0]) failures++;
        if (total(zu, c1u, s1u, c0u) != pu) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
