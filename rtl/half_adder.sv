// half_adder: one-bit half adder, s = a xor b, c = a and b. Combinational.
// Building block of the array multiplier and of the XOR compaction.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
