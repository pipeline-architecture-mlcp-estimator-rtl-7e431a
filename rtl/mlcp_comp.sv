// mlcp_comp: the compensated circuit. The fixed-width product is
//     Pq = MP + sigma * 2^L,   sigma = Round(T_mj + T_mi)
// with T_mj the major truncation columns (L-w..L-1) and T_mi everything
// below them, both in units of 2^L. T_mj is summed exactly inside the CSA
// array. This circuit supplies the rest: the MLCP estimate of T_mi and the
// half unit that turns the truncation at column L into rounding.
//
// T_mi is not built; it is replaced by its expected value given the nonzero
// codes z_j of all rows that reach it. For a nonzero digit every p_{i,j}
// and the correction bit n_j are 1 with probability 1/2, so row j adds
//     sum_{c=2j}^{L-w-1} 2^c / 2 + 2^(2j) / 2 = 2^(L-w-1)
// whatever j is: each nonzero row of the minor part is worth half a unit of
// column L-w and a zero row nothing. The estimate is therefore the count k
// of nonzero codes among the rows j with 2j <= L-w-1, placed at column
// L-w-1. This closed form is this design's own derivation; the paper
// states that the minor elements all take the same value and that the
// estimate uses every nonzero code, but does not print the formula.
//
// Output: comp, a vector over the array's column window (bit b = column
// L-w-1+b) holding k + 2^w, i.e. k at column L-w-1 plus 2^(L-1).
// Purely combinational.
module mlcp_comp
  import mlcp_pkg::*;
#(
  parameter int unsigned L      = 16,
  parameter int unsigned W_MJ   = 3,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned ROWS  = pp_rows(L, SIGNED),
  localparam int unsigned WIN   = win_width(L, W_MJ)
) (
  input  logic [ROWS-1:0] z,
  output logic [WIN-1:0]  comp
);
  // Rows whose lowest column 2j lies in the minor part.
  localparam int unsigned N_MINOR = (L - W_MJ + 1) / 2;

  logic [WIN-1:0] k;

  always_comb begin
    k = '0;
    for (int j = 0; j < int'(N_MINOR); j++) k = k + WIN'(z[j]);
    comp = k + (WIN'(1) << W_MJ);
  end
endmodule
