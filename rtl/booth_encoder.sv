// booth_encoder: radix-4 Booth recoding of Y, partial-product generation
// from X, and the cut of the partial-product matrix that makes the
// multiplier fixed-width.
//
// The full 2L-bit product is the sum of ROWS partial-product rows; row j is
// digit d_j times X, shifted by 2j columns. Row j is held as PW bits
// p_{i,j} (X or 2X, inverted when d_j is negative) plus the two's
// complement correction bit n_j = neg_j added in column 2j. The sign bit
// p_{PW-1,j} is inverted and a constant (mlcp_pkg::mp_const) takes care of
// sign extension, so no row needs extension bits.
//
// Columns L..2L-1 form the main part MP; columns below L the truncation
// part TP. Of TP only the w most significant columns (L-w..L-1, the major
// part TP_mj) are generated; the minor part below them is never built and
// is replaced by the estimate of the compensated circuit. All outputs are
// vectors over the window of columns L-w-1 .. 2L-1 (bit b = column
// L-w-1+b, WIN = L+w+1 bits); bit 0, the estimate's column, is always zero
// here.
//
// Outputs:
//   pp[0..ROWS-1]  row j, its bits in the window
//   pp[ROWS]       the correction bits n_j that fall in the window
//   pp[ROWS+1]     the sign-extension constant
//   z[j]           nonzero code of digit j
//
// SIGNED = 1 treats X and Y as two's complement, as the paper's operand
// equations do. SIGNED = 0 treats them as unsigned, which is how the
// paper's worked examples read: both operands are then zero-extended by
// two bits and one more row (digit 0 or +1, at column L) is added. That row
// lies entirely in MP and leaves the truncation part unchanged; its digit
// is never negative, so its n bit is left out.
// Purely combinational.
module booth_encoder
  import mlcp_pkg::*;
#(
  parameter int unsigned L      = 16,  // operand and product width
  parameter int unsigned W_MJ   = 3,   // major truncation columns (w)
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned ROWS  = pp_rows(L, SIGNED),
  localparam int unsigned PW    = pp_width(L, SIGNED),
  localparam int unsigned WIN   = win_width(L, W_MJ)
) (
  input  logic [L-1:0]    x,               // multiplicand
  input  logic [L-1:0]    y,               // multiplier
  output logic [WIN-1:0]  pp [ROWS+2],
  output logic [ROWS-1:0] z
);
  // Column of window bit 0.
  localparam int BASE = int'(L) - int'(W_MJ) - 1;

  // xe is X itself (signed) or X with a zero on top (unsigned); its top bit
  // is the sign used to extend X to PW bits. ye carries the implicit
  // b_{-1} = 0 in bit 0.
  logic [PW-2:0]   xe;
  logic [2*ROWS:0] ye;

  if (SIGNED) begin : g_signed
    assign xe = x;
    assign ye = {y, 1'b0};
  end else begin : g_unsigned
    assign xe = {1'b0, x};
    assign ye = {2'b00, y, 1'b0};
  end

  booth_digit_t    digit [ROWS];
  logic [PW-1:0]   row   [ROWS];   // p_{PW-1..0, j}, sign bit already inverted
  logic [ROWS-1:0] neg;

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    logic [PW-1:0] sel;

    booth_digit_enc u_enc (
      .trip  (ye[2*j+2 : 2*j]),
      .digit (digit[j]),
      .nz    (z[j])
    );

    // X or 2X, both PW bits wide and sign-extended, then inverted for a
    // negative digit.
    always_comb begin
      sel = ({PW{digit[j].one}} & {xe[PW-2], xe})
          | ({PW{digit[j].two}} & {xe, 1'b0});
      row[j] = sel ^ {PW{digit[j].neg}};
      row[j][PW-1] = ~row[j][PW-1];
    end
    assign neg[j] = digit[j].neg;
  end

  // The extra row of the unsigned configuration reads {0, 0, y[L-1]}, so
  // its digit is 0 or +1; its n bit is therefore not collected below.
  if (!SIGNED) begin : g_top_row_check
    always_comb
      assert (!neg[ROWS-1]) else $error("unsigned top Booth digit is negative");
  end

  localparam logic [31:0] CONST = mp_const(L, SIGNED);

  // Gather the matrix by columns.
  always_comb begin
    for (int j = 0; j < int'(ROWS); j++)
      for (int b = 0; b < int'(WIN); b++) begin
        // window bit b is column BASE+b, i.e. bit i = BASE+b-2j of row j
        if (BASE + b - 2*j >= 0 && BASE + b - 2*j < int'(PW) && b > 0)
          pp[j][b] = row[j][BASE + b - 2*j];
        else
          pp[j][b] = 1'b0;
      end
    // n_j sits in column 2j; each column holds at most one of them.
    pp[ROWS] = '0;
    for (int j = 0; j < int'(ROWS); j++)
      if (2*j > BASE && 2*j < int'(L)) pp[ROWS][2*j - BASE] = neg[j];
    pp[ROWS+1] = {CONST[L-1:0], (W_MJ + 1)'(0)};
  end
endmodule
