// csm_otf_d_r4: decision cell (block D) of the radix-4 on-the-fly converter.
//
// The redundant radix-4 digit p_i = 2*(c1 + s1) + c0 (0 .. 5) of the next
// lower position updates the decision for one output digit m_k:
//   u and p_i <= 2 -> g   (no carry can reach digit k)
//   u and p_i >= 4 -> t   (a carry reaches digit k)
//   u and p_i  = 3 -> u   (the digit propagates; still undecided)
//   g or t         -> unchanged
// p_i >= 3 is the majority of (c1, s1, c0); p_i >= 4 is c1 & s1. So
//   gamma' = ~delta & ~maj(c1, s1, c0) | gamma,
//   delta' = ~gamma & c1 & s1 | delta.
// Combinational.
module csm_otf_d_r4
  import csm_pkg::*;
(
  input  dec_t d_in,
  input  logic c1,  // carry bit of weight 2 within the digit
  input  logic s1,  // sum bit of weight 2 within the digit
  input  logic c0,  // bit of weight 1 within the digit
  output dec_t d_out
);
  logic maj;
  assign maj         = (c1 & c0) | (c1 & s1) | (s1 & c0);
  assign d_out.gamma = (~d_in.delta & ~maj) | d_in.gamma;
  assign d_out.delta = (~d_in.gamma & c1 & s1) | d_in.delta;
endmodule
