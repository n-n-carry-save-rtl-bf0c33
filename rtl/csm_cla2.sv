// csm_cla2: 2-bit full adder (CLA_2), the cell that forms the redundant
// radix-4 digits on the diagonal of the radix-4 array.
// 2*(alpha + beta) + gamma + delta + epsilon = 4*mu + 2*eta + xi, i.e. the
// 2-bit numbers {alpha, gamma} and {beta, delta} plus a carry-in epsilon.
// The sum is at most 9 but fits 3 bits because the inputs are at most
// 2+2+1+1+1 = 7. Combinational; written as a two-level carry-lookahead.
module csm_cla2 (
  input  logic alpha,
  input  logic beta,
  input  logic gamma,
  input  logic delta,
  input  logic epsilon,
  output logic mu,
  output logic eta,
  output logic xi
);
  logic g0, p0, c1, g1, p1;
  assign p0  = gamma ^ delta;
  assign g0  = gamma & delta;
  assign xi  = p0 ^ epsilon;
  assign c1  = g0 | (p0 & epsilon);
  assign p1  = alpha ^ beta;
  assign g1  = alpha & beta;
  assign eta = p1 ^ c1;
  assign mu  = g1 | (p1 & c1);
endmodule
