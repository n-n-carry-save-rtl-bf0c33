// csm_otf_r2: on-the-fly converter for the radix-2 carry-save multiplier.
//
// The array delivers the ND most significant result digits in carry-sum form,
// most significant first: digit p_k = c[k] + s[k] (k = 1..ND) has weight
// 2^(2n-k), and p_k arrives one full-adder delay after p_(k-1). This block
// turns them into plain bits m[k] without a carry-propagate adder:
//   block A : A_k = c[k] ^ s[k]            (p_k mod 2)
//   block D : a chain per output bit, started at u and updated by every later
//             (lower-weight) digit p_(k+1) .. p_ND with csm_otf_d_r2; it ends
//             in t exactly when a carry enters bit k from below.
//   block G : m[k] = A_k ^ delta_k         (A_k + 1 mod 2 when the chain says t)
// The last digit has no lower digit in the carry-sum part, so m[ND] = A_ND
// (the least significant bits produced by the array are already final and
// send no carry upward). A carry out of p_1 is dropped: the result is modulo
// 2^(2n). There are ND*(ND-1)/2 D cells. Since each chain step uses a digit
// as soon as it exists, only the last D row and G lie after the last digit:
// a constant two gate-level delays.
module csm_otf_r2
  import csm_pkg::*;
#(
  parameter int unsigned ND = 4  // number of carry-sum digits (n - 1)
) (
  input  logic [ND:1] c,
  input  logic [ND:1] s,
  output logic [ND:1] m
);
  // g_bit[k].g_lvl[i].d: decision for bit k after digits k+1 .. i were seen
  for (genvar k = 1; k <= ND; k++) begin : g_bit
    for (genvar i = k; i <= ND; i++) begin : g_lvl
      dec_t d;
      if (i == k) begin : g_start
        assign d = DEC_U;
      end else begin : g_d
        csm_otf_d_r2 u_d (.d_in(g_bit[k].g_lvl[i-1].d), .c(c[i]), .s(s[i]), .d_out(d));
      end
    end
    assign m[k] = (c[k] ^ s[k]) ^ g_bit[k].g_lvl[ND].d.delta;
  end
endmodule
