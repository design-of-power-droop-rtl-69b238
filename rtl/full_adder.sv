// full_adder: one-bit full adder, s = a xor b xor ci, co = majority(a,b,ci).
// Combinational building block of the array multiplier.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
