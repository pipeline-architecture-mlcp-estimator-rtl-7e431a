// csa_array: carry-save array that reduces N operands of W bits to two
// (a sum row and a carry row) whose sum equals the sum of the operands
// modulo 2^W.
//
// The main cell is the 5:2 compressor. Each level of the tree takes the
// operands five at a time through a row of 5:2 compressors; a remainder of
// four goes through one more 5:2 row with a zero fifth operand, a remainder
// of three through a row of full adders, and one or two left-over operands
// pass straight to the next level. Within a 5:2 row, cout1/cout2 of column
// k feed cin1/cin2 of column k+1; the carries out of the top column fall
// outside the W-bit window and are dropped, as is the top carry of a
// full-adder row. The tree shape is computed at elaboration time by
// mlcp_pkg::csa_count. For the default 11 operands of the 16-bit
// multiplier (8 rows, the n bits, the sign constant, the MLCP estimate) it
// is two levels: two 5:2 rows plus one pass-through operand give 5, and one
// more 5:2 row gives 2.
//
// The paper describes a CSA array built from 5:2 compressors, full and
// half adders that brings the Booth partial products down to two rows; the
// exact grouping is this design's choice. Purely combinational.
module csa_array
  import mlcp_pkg::*;
#(
  parameter int unsigned W = 20,  // operand width (column window)
  parameter int unsigned N = 11   // number of operands, >= 1
) (
  input  logic [W-1:0] ops   [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  localparam int unsigned LEVELS = csa_levels(N);

  // Each level declares its own output array nxt; level l reads level l-1's
  // (or the inputs). Only the first csa_count(N, l+1) entries of nxt carry
  // data; the rest are tied to zero.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NI  = csa_count(N, l);
    localparam int unsigned NO  = csa_count(N, l + 1);
    localparam int unsigned G5  = NI / 5;           // full 5:2 groups
    localparam int unsigned REM = NI % 5;

    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [N];

    if (l == 0) begin : g_src_in
      assign cur = ops;
    end else begin : g_src_prev
      assign cur = g_lvl[l-1].nxt;
    end

    // full 5:2 rows, plus one padded with zero for a remainder of four
    for (genvar g = 0; g < G5 + ((REM == 4) ? 1 : 0); g++) begin : g_c52
      logic [W-1:0] x5;
      logic [W:0]   c1, c2;  // c1[k]/c2[k]: carries into column k
      logic [W-1:0] s, cy;

      if (g < G5) begin : g_x5
        assign x5 = cur[5*g+4];
      end else begin : g_x5_zero
        assign x5 = '0;
      end
      assign c1[0] = 1'b0;
      assign c2[0] = 1'b0;

      for (genvar k = 0; k < W; k++) begin : g_bit
        compressor_5_2 u_c (
          .x1(cur[5*g][k]), .x2(cur[5*g+1][k]), .x3(cur[5*g+2][k]),
          .x4(cur[5*g+3][k]), .x5(x5[k]),
          .cin1(c1[k]), .cin2(c2[k]),
          .sum(s[k]), .carry(cy[k]), .cout1(c1[k+1]), .cout2(c2[k+1])
        );
      end

      assign nxt[2*g]   = s;
      assign nxt[2*g+1] = {cy[W-2:0], 1'b0};
    end

    // full-adder row for a remainder of three
    if (REM == 3) begin : g_fa
      logic [W-1:0] s, cy;
      for (genvar k = 0; k < W; k++) begin : g_bit
        full_adder u_fa (
          .a(cur[5*G5][k]), .b(cur[5*G5+1][k]), .ci(cur[5*G5+2][k]),
          .s(s[k]), .co(cy[k])
        );
      end
      assign nxt[2*G5]   = s;
      assign nxt[2*G5+1] = {cy[W-2:0], 1'b0};
    end

    // one or two operands pass through
    if (REM == 1 || REM == 2) begin : g_pass
      for (genvar p = 0; p < REM; p++) begin : g_p
        assign nxt[2*G5+p] = cur[5*G5+p];
      end
    end

    for (genvar i = NO; i < N; i++) begin : g_zero
      assign nxt[i] = '0;
    end
  end

  if (LEVELS == 0) begin : g_out_direct
    assign sum   = ops[0];
    if (N == 1) begin : g_one
      assign carry = '0;
    end else begin : g_two
      assign carry = ops[N-1];
    end
  end else begin : g_out_tree
    assign sum   = g_lvl[LEVELS-1].nxt[0];
    assign carry = g_lvl[LEVELS-1].nxt[1];
  end
endmodule
