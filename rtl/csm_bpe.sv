// csm_bpe: basic processing element of the radix-4 array, a (5,3) counter.
// All five inputs have the same weight: alpha and beta take two new
// elementary products, gamma, delta and epsilon the sum, middle and high
// output bits that the row above leaves at this weight. The count
// alpha+beta+gamma+delta+epsilon (0 .. 5) is given as 4*mu + 2*eta + xi.
// Its function follows the original radix-4 scheme, which takes the cell from
// earlier work; the inside (two full-adder stages) is this design's own
// choice. Purely combinational.
module csm_bpe (
  input  logic alpha,
  input  logic beta,
  input  logic gamma,
  input  logic delta,
  input  logic epsilon,
  output logic mu,   // weight 4
  output logic eta,  // weight 2
  output logic xi    // weight 1
);
  logic s1, c1, c2;
  // two full-adder stages: a 3-input sum, then the remaining two bits
  assign s1  = alpha ^ beta ^ gamma;
  assign c1  = (alpha & beta) | (alpha & gamma) | (beta & gamma);
  assign xi  = s1 ^ delta ^ epsilon;
  assign c2  = (s1 & delta) | (s1 & epsilon) | (delta & epsilon);
  assign eta = c1 ^ c2;
  assign mu  = c1 & c2;
endmodule
