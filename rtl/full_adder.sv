// full_adder: one-bit full adder (3:2 counter), a + b + ci = s + 2*co.
// Building cell of the 5:2 compressor, of the full-adder rows of the
// carry-save array and of the carry-propagate adder. Purely combinational.
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
