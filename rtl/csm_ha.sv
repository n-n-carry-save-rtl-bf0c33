// csm_ha: one-bit half adder. a + b = 2*co + s. In the two's complement
// radix-2 array it adds the two extra sign inputs x[n-1] and y[n-1] of the
// Baugh-Wooley scheme, off the critical path. Purely combinational.
module csm_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
