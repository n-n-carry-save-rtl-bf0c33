// csm_fa: one-bit full adder, the basic assimilating cell of the radix-2
// carry-save array and of the diagonal line that forms the most significant
// carry-sum digits. a + b + ci = 2*co + s. Purely combinational.
module csm_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
