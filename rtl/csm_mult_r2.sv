// csm_mult_r2: n x n carry-save multiplier with radix-2 array and no final
// carry-propagate adder.
//
// csm_r2_array produces the n+1 least significant product bits directly and
// the n-1 most significant ones as carry-sum digits, most significant first;
// csm_otf_r2 converts those digits while the array is still working on the
// lower ones. The full 2n-bit product z = x * y (two's complement if SIGNED,
// else unsigned) is therefore ready about n+2 full-adder delays after the
// elementary products, independent of any carry chain.
// Interface: x, y (n bits) in, z (2n bits) out. msd_c/msd_s bring out the
// carry-sum digits as they leave the array (digit k has weight 2^(2n-k)), for
// observation. Purely combinational.
module csm_mult_r2 #(
  parameter int unsigned N      = 5,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z,
  output logic [N-1:1]   msd_c,  // carry bit of redundant digit p_k
  output logic [N-1:1]   msd_s   // sum bit of redundant digit p_k
);
  logic [N:0]   z_lo;
  logic [N-1:1] c_msd, s_msd, m;

  csm_r2_array #(.N(N), .SIGNED(SIGNED)) u_array (
    .x(x), .y(y), .z_lo(z_lo), .c_msd(c_msd), .s_msd(s_msd));

  csm_otf_r2 #(.ND(N-1)) u_otf (.c(c_msd), .s(s_msd), .m(m));

  assign msd_c = c_msd;
  assign msd_s = s_msd;

  assign z[N:0] = z_lo;
  for (genvar k = 1; k < N; k++) begin : g_hi
    assign z[2*N-k] = m[k];  // m_k is result bit 2n-k
  end
endmodule
