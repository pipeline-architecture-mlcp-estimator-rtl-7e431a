// cpa: carry-propagate adder that merges the two carry-save rows left by
// the CSA array into the fixed-width product Pq.
//
// Ripple-carry structure: a half adder in bit 0 (there is no carry-in) and
// full adders above it. The result is taken modulo 2^W: the carry out of
// the top bit is beyond the fixed-width product and is dropped. The adder
// type is this design's choice; the paper only names a CPA.
// Purely combinational; the critical path runs through all W cells.
module cpa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:1] c;  // c[k] is the carry into bit k; c[W] leaves the word

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[1]));

  for (genvar k = 1; k < W; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]));
  end
endmodule
