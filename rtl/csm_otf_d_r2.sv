// csm_otf_d_r2: decision cell (block D) of the radix-2 on-the-fly converter.
//
// It updates the decision for one output bit m_k with the carry-sum digit
// p_i = c + s (0, 1 or 2) of the next lower weight, which arrives one array
// stage later:
//   u and p_i = 2  -> t   (a carry reaches bit k)
//   u and p_i = 0  -> g   (no carry can reach bit k)
//   u and p_i = 1  -> u   (the digit propagates; still undecided)
//   g or t         -> unchanged
// In gamma/delta form: gamma' = ~delta & ~c & ~s | gamma,
//                      delta' = ~gamma &  c &  s | delta.
// Combinational, about one full-adder delay.
module csm_otf_d_r2
  import csm_pkg::*;
(
  input  dec_t d_in,
  input  logic c,
  input  logic s,
  output dec_t d_out
);
  assign d_out.gamma = (~d_in.delta & ~c & ~s) | d_in.gamma;
  assign d_out.delta = (~d_in.gamma &  c &  s) | d_in.delta;
endmodule
