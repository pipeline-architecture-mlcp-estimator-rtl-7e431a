// mlcp_pkg: types and elaboration-time helpers shared by the fixed-width
// radix-4 Booth multiplier with MLCP (multi-level conditional probability)
// truncation-error compensation.
//
//  * booth_digit_t is the one-hot-ish code of one radix-4 Booth digit
//    (neg, one, two); the digit is zero when both one and two are low.
//  * mp_const() is the sign-extension constant of the main part. Each
//    partial-product row is written with its sign bit inverted, which adds
//    2^(sign position) per row; the sum of the negated weights, taken
//    modulo 2^(2L), corrects that. All of its set bits lie at or above
//    column L, so only the upper L bits are returned.
//  * csa_next()/csa_levels()/csa_count() give the shape of the carry-save
//    reduction tree: groups of five operands go through a row of 5:2
//    compressors, a remainder of four goes through a 5:2 row with one zero
//    operand, a remainder of three through a full-adder row, and one or two
//    left-over operands pass to the next level unchanged.
package mlcp_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_digit_t;

  // Number of partial-product rows: L/2 for two's complement operands, one
  // more for unsigned operands (they are zero-extended by two bits).
  function automatic int unsigned pp_rows(input int unsigned l, input bit signed_ops);
    return signed_ops ? l / 2 : l / 2 + 1;
  endfunction

  // Width of one partial-product row, sign bit included.
  function automatic int unsigned pp_width(input int unsigned l, input bit signed_ops);
    return signed_ops ? l + 1 : l + 2;
  endfunction

  // Width of the column window handled by the CSA array and the CPA.
  function automatic int unsigned win_width(input int unsigned l, input int unsigned w);
    return l + w + 1;
  endfunction

  // Upper L bits of (-sum_j 2^(PW-1+2j)) mod 2^(2L). Valid for L <= 32.
  function automatic logic [31:0] mp_const(input int unsigned l, input bit signed_ops);
    logic [63:0] acc;
    int unsigned rows, pw;
    rows = pp_rows(l, signed_ops);
    pw   = pp_width(l, signed_ops);
    acc  = '0;
    for (int unsigned j = 0; j < rows; j++) acc = acc - (64'd1 << (pw - 1 + 2 * j));
    return 32'(acc >> l);
  endfunction

  // Operand count after one level of the reduction tree.
  function automatic int unsigned csa_next(input int unsigned n);
    int unsigned r;
    r = n % 5;
    return 2 * (n / 5) + ((r >= 3) ? 2 : r);
  endfunction

  // Operand count at a given level (level 0 = the inputs).
  function automatic int unsigned csa_count(input int unsigned n, input int unsigned lvl);
    int unsigned m;
    m = n;
    for (int unsigned i = 0; i < lvl; i++) m = csa_next(m);
    return m;
  endfunction

  // Levels needed to bring n operands down to two.
  function automatic int unsigned csa_levels(input int unsigned n);
    int unsigned m, l;
    m = n;
    l = 0;
    while (m > 2) begin
      m = csa_next(m);
      l++;
    end
    return l;
  endfunction

endpackage
