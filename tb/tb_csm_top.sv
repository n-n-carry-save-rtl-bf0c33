// tb_csm_top: end-to-end test of both multipliers at the default size
// (n = 8, two's complement), over all 65536 operand pairs.
//
// Besides the products it counts how often each mechanism of the carry-save
// conversion occurs, reading the redundant digits the design brings out:
//  * radix-2 digits that generate (c+s = 2), propagate (1) and kill (0);
//  * radix-2 output bits the converter flipped (decision t at the end);
//  * radix-4 digits that generate (p >= 4), propagate (p = 3), kill (p <= 2);
//  * radix-4 output digits the converter incremented;
//  * products of a negative operand (Baugh-Wooley sign terms in use).
// A mechanism that never occurs counts as a failure.
module tb_csm_top;
  localparam int N   = 8;
  localparam int ND2 = N - 1;
  localparam int ND4 = N / 2 - 1;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] z_r2, z_r4;
  int checks = 0, failures = 0;
  int n_gen2 = 0, n_prop2 = 0, n_kill2 = 0, n_flip2 = 0;
  int n_gen4 = 0, n_prop4 = 0, n_kill4 = 0, n_inc4 = 0, n_neg = 0;

  logic [ND2:1] p2_c, p2_s;
  logic [ND4:1] p4_c1, p4_s1, p4_c0;

  csm_top dut (.x(x), .y(y), .z_r2(z_r2), .z_r4(z_r4), .p2_c(p2_c), .p2_s(p2_s),
               .p4_c1(p4_c1), .p4_s1(p4_s1), .p4_c0(p4_c0));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        logic [2*N-1:0] p;
        logic [ND2:1] c2, s2;
        logic [ND4:1] c1, s1, c0;
        x = N'(a);
        y = N'(b);
        #1;
        p = (2*N)'($signed({{N{x[N-1]}}, x}) * $signed({{N{y[N-1]}}, y}));
        checks += 2;
        if (z_r2 != p) begin
          failures++;
          if (failures < 10) $display("FAIL r2 %0d*%0d = %h exp %h", a, b, z_r2, p);
        end
        if (z_r4 != p) begin
          failures++;
          if (failures < 10) $display("FAIL r4 %0d*%0d = %h exp %h", a, b, z_r4, p);
        end
        if (x[N-1] || y[N-1]) n_neg++;
        c2 = p2_c;
        s2 = p2_s;
        for (int k = 1; k <= ND2; k++) begin
          case (int'(c2[k]) + int'(s2[k]))
            0: n_kill2++;
            1: n_prop2++;
            default: n_gen2++;
          endcase
          if (z_r2[2*N-k] != (c2[k] ^ s2[k])) n_flip2++;
        end
        c1 = p4_c1;
        s1 = p4_s1;
        c0 = p4_c0;
        for (int i = 1; i <= ND4; i++) begin
          int pd;
          pd = 2 * (int'(c1[i]) + int'(s1[i])) + int'(c0[i]);
          if (pd <= 2) n_kill4++;
          else if (pd == 3) n_prop4++;
          else n_gen4++;
          if (z_r4[2*N-2*i+1 -: 2] != {c1[i] ^ s1[i], c0[i]}) n_inc4++;
        end
      end
    end
    $display("radix-2 digits: generate %0d propagate %0d kill %0d; bits flipped %0d",
             n_gen2, n_prop2, n_kill2, n_flip2);
    $display("radix-4 digits: generate %0d propagate %0d kill %0d; digits incremented %0d",
             n_gen4, n_prop4, n_kill4, n_inc4);
    $display("products with a negative operand: %0d", n_neg);
    checks += 9;
    if (n_gen2 == 0) failures++;
    if (n_prop2 == 0) failures++;
    if (n_kill2 == 0) failures++;
    if (n_flip2 == 0) failures++;
    if (n_gen4 == 0) failures++;
    if (n_prop4 == 0) failures++;
    if (n_kill4 == 0) failures++;
    if (n_inc4 == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
