// csm_otf_r4: on-the-fly converter for the radix-4 carry-save multiplier.
//
// The radix-4 array delivers ND redundant radix-4 digits, most significant
// first. Digit p_k (k = 1..ND) has two bits c1[k], s1[k] of weight
// 2^(2n-2k+1) and one bit c0[k] of weight 2^(2n-2k): p_k = 2*(c1+s1) + c0.
//   block A : A_k = {c1[k] ^ s1[k], c0[k]}     (p_k mod 4)
//   block D : per output digit a chain of csm_otf_d_r4 cells, started at u
//             and updated by p_(k+1) .. p_ND; it ends in t exactly when a
//             carry enters digit k from the lower digits.
//   block G : m_k = (A_k + delta_k) mod 4, a 2-bit increment.
// m[k] = {result bit 2n-2k+1, result bit 2n-2k}. The last digit has no lower
// redundant digit, so m_ND = A_ND; a carry out of p_1 is dropped (result
// modulo 2^(2n)). Combinational; after the last digit only one D row and the
// increment remain.
module csm_otf_r4
  import csm_pkg::*;
#(
  parameter int unsigned ND = 3  // number of radix-4 digits (n/2 - 1)
) (
  input  logic [ND:1]      c1,
  input  logic [ND:1]      s1,
  input  logic [ND:1]      c0,
  output logic [ND:1][1:0] m
);
  for (genvar k = 1; k <= ND; k++) begin : g_dig
    for (genvar i = k; i <= ND; i++) begin : g_lvl
      dec_t d;
      if (i == k) begin : g_start
        assign d = DEC_U;
      end else begin : g_d
        csm_otf_d_r4 u_d (.d_in(g_dig[k].g_lvl[i-1].d), .c1(c1[i]), .s1(s1[i]), .c0(c0[i]),
                          .d_out(d));
      end
    end
    logic [1:0] a;
    assign a    = {c1[k] ^ s1[k], c0[k]};
    assign m[k] = a + {1'b0, g_dig[k].g_lvl[ND].d.delta};
  end
endmodule
