// csm_top: both carry-save multipliers without final addition, side by side
// on the same operands.
//
// z_r2 comes from the radix-2 scheme (csm_mult_r2): full-adder carry-save
// array whose n-1 most significant digits leave in carry-sum form, most
// significant first, and are converted on the fly. z_r4 comes from the
// radix-4 scheme (csm_mult_r4): n/2 rows of (5,3) counters reduce the
// products, the most significant digits are formed as redundant radix-4
// digits by 2-bit full adders and converted on the fly in radix 4. Both give the full 2n-bit product; they are alternatives, shown
// together so they can be compared. N = 8 is the width of the original radix-4
// example (the radix-2 example uses n = 5; the construction is generic in n).
// The redundant most significant digits of both arrays are brought out as
// well (p2_*: radix-2 carry-sum digits, p4_*: radix-4 digits), so that the
// conversion can be observed. Purely combinational: outputs follow the inputs
// after the array delay.
module csm_top #(
  parameter int unsigned N      = 8,    // operand width (even, >= 4)
  parameter bit          SIGNED = 1'b1  // 1: two's complement, 0: unsigned
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z_r2,  // product from the radix-2 multiplier
  output logic [2*N-1:0] z_r4,  // product from the radix-4 multiplier
  output logic [N-1:1]   p2_c,  // radix-2 digit k: carry bit, weight 2^(2n-k)
  output logic [N-1:1]   p2_s,  // radix-2 digit k: sum bit
  output logic [N/2-1:1] p4_c1, // radix-4 digit i: carry bit, weight 2^(2n-2i+1)
  output logic [N/2-1:1] p4_s1, // radix-4 digit i: sum bit,   weight 2^(2n-2i+1)
  output logic [N/2-1:1] p4_c0  // radix-4 digit i: bit of weight 2^(2n-2i)
);
  csm_mult_r2 #(.N(N), .SIGNED(SIGNED)) u_mult_r2 (
    .x(x), .y(y), .z(z_r2), .msd_c(p2_c), .msd_s(p2_s));
  csm_mult_r4 #(.N(N), .SIGNED(SIGNED)) u_mult_r4 (
    .x(x), .y(y), .z(z_r4), .msd_c1(p4_c1), .msd_s1(p4_s1), .msd_c0(p4_c0));
endmodule
