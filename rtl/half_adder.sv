// half_adder: one-bit half adder, s = a xor b, c = a and b.
// Used as the least significant cell of the carry-propagate adder, where
// there is no carry-in. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
