// csm_mult_r4: n x n carry-save multiplier with radix-4 array and no final
// carry-propagate adder.
//
// csm_r4_array produces the n+2 least significant product bits directly and
// the n-2 most significant ones as n/2-1 redundant radix-4 digits (values
// 0 .. 5); csm_otf_r4 turns these into plain 2-bit
// digits with carry-select style decision chains instead of an adder.
// Interface: x, y (n bits, n even) in, z = x * y (2n bits, two's complement
// if SIGNED, else unsigned) out. msd_c1/msd_s1/msd_c0 bring out the redundant
// digits as they leave the array, for observation. Purely combinational.
module csm_mult_r4 #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z,
  output logic [N/2-1:1] msd_c1,  // digit i: carry bit, weight 2^(2n-2i+1)
  output logic [N/2-1:1] msd_s1,  // digit i: sum bit,   weight 2^(2n-2i+1)
  output logic [N/2-1:1] msd_c0   // digit i: bit of weight 2^(2n-2i)
);
  localparam int unsigned ND = N / 2 - 1;

  logic [N+1:0]      z_lo;
  logic [ND:1]       c1, s1, c0;
  logic [ND:1][1:0]  m;

  csm_r4_array #(.N(N), .SIGNED(SIGNED)) u_array (
    .x(x), .y(y), .z_lo(z_lo), .c1(c1), .s1(s1), .c0(c0));

  csm_otf_r4 #(.ND(ND)) u_otf (.c1(c1), .s1(s1), .c0(c0), .m(m));

  assign msd_c1 = c1;
  assign msd_s1 = s1;
  assign msd_c0 = c0;

  assign z[N+1:0] = z_lo;
  for (genvar k = 1; k <= ND; k++) begin : g_hi
    assign z[2*N-2*k+1 -: 2] = m[k];  // m_k = {z[2n-2k+1], z[2n-2k]}
  end
endmodule
