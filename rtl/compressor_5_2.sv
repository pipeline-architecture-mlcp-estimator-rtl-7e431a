// compressor_5_2: 5:2 compressor cell of the carry-save array.
//
// It adds five bits of one column and two carries from the column to its
// right:  x1+x2+x3+x4+x5+cin1+cin2 = sum + 2*(carry + cout1 + cout2).
// The two carry-outs depend only on x1..x5, never on cin1/cin2, so a row
// of these cells has no horizontal ripple: cout1/cout2 of column k feed
// cin1/cin2 of column k+1 and the row's delay is that of one cell.
//
// Inside are three full adders: FA1 adds x1..x3, FA2 adds FA1's sum with
// x4 and x5, FA3 adds FA2's sum with the two carry-ins. The paper names
// the cell and its 5-in/2-out function; this full-adder structure is this
// design's choice. Purely combinational.
module compressor_5_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s1, s2;

  full_adder u_fa1 (.a(x1), .b(x2),   .ci(x3),   .s(s1),  .co(cout1));
  full_adder u_fa2 (.a(s1), .b(x4),   .ci(x5),   .s(s2),  .co(cout2));
  full_adder u_fa3 (.a(s2), .b(cin1), .ci(cin2), .s(sum), .co(carry));
endmodule
