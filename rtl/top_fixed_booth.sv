// top_fixed_booth: pipelined L x L fixed-width radix-4 Booth multiplier with
// an MLCP (multi-level conditional probability) truncation-error estimator.
//
// A fixed-width multiplier returns only the L most significant bits of the
// 2L-bit product. Instead of building the whole partial-product matrix and
// rounding, it builds only the main part MP (columns L..2L-1) and the w
// columns just below it (the major truncation part), and replaces the rest
// (the minor part) by an estimate based on which Booth digits are nonzero.
// The result is Pq = MP + sigma*2^L, sigma = Round(T_mj + T_mi). For
// w >= 2 it differs from the exact product by less than one unit of its
// last place; a larger w adds more columns exactly and lowers the error.
//
// All arithmetic happens on a window of L+w+1 columns (L-w-1 .. 2L-1):
// the main part, the w major truncation columns, and one column below them
// for the estimate. Adding the whole window and keeping its top L bits
// gives MP + sigma*2^L: the carries out of the truncation columns are
// sigma, and a half unit added at column L-1 makes the cut a rounding.
//
// Pipeline (one new operand pair per clock, latency 3):
//   stage 1  Booth encoder: digits, partial products in the window, z
//   stage 2  compensated circuit (estimate + rounding) and CSA array of
//            5:2 compressors: rows, n bits, sign constant and estimate
//            down to two rows
//   stage 3  carry-propagate adder over the window -> Pq = top L bits
// Operands sampled with in_valid at rising edge n are on pq, with
// out_valid high, from just after edge n+2 to edge n+3: a receiver clocked
// by the same clock takes them at edge n+3. There is no stall: the pipeline
// advances every cycle. rst_n (asynchronous, active low) clears only the
// valid bits; data registers are not reset.
//
// The paper gives the blocks (Booth encoder, CSA array with 5:2
// compressors, compensated circuit, CPA) and says the design is pipelined;
// the number and placement of the pipeline registers, the valid handshake
// and the reset are this design's choices. SIGNED selects two's complement
// (default, as in the paper's operand equations) or unsigned operands
// (the reading under which the paper's worked examples come out).
module top_fixed_booth
  import mlcp_pkg::*;
#(
  parameter int unsigned L      = 16,   // operand and product width
  parameter int unsigned W_MJ   = 3,    // major truncation columns (w)
  parameter bit          SIGNED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [L-1:0] x,
  input  logic [L-1:0] y,
  output logic         out_valid,
  output logic [L-1:0] pq
);
  localparam int unsigned ROWS = pp_rows(L, SIGNED);
  localparam int unsigned WIN  = win_width(L, W_MJ);
  localparam int unsigned NOPS = ROWS + 3;  // rows, n bits, constant, estimate

  // ---------------- stage 1: Booth encoder ----------------
  logic [WIN-1:0]  pp_c [ROWS+2];
  logic [ROWS-1:0] z_c;

  booth_encoder #(.L(L), .W_MJ(W_MJ), .SIGNED(SIGNED)) u_enc (
    .x(x), .y(y), .pp(pp_c), .z(z_c)
  );

  logic [WIN-1:0]  s1_pp [ROWS+2];
  logic [ROWS-1:0] s1_z;
  logic            s1_v;

  always_ff @(posedge clk) begin
    s1_pp <= pp_c;
    s1_z  <= z_c;
  end

  // ---------------- stage 2: compensation + CSA array ----------------
  logic [WIN-1:0] comp;
  logic [WIN-1:0] ops [NOPS];
  logic [WIN-1:0] cs_sum, cs_carry;

  mlcp_comp #(.L(L), .W_MJ(W_MJ), .SIGNED(SIGNED)) u_comp (
    .z(s1_z), .comp(comp)
  );

  for (genvar i = 0; i < ROWS + 2; i++) begin : g_ops
    assign ops[i] = s1_pp[i];
  end
  assign ops[ROWS+2] = comp;

  csa_array #(.W(WIN), .N(NOPS)) u_csa (
    .ops(ops), .sum(cs_sum), .carry(cs_carry)
  );

  logic [WIN-1:0] s2_sum, s2_carry;
  logic           s2_v;

  always_ff @(posedge clk) begin
    s2_sum   <= cs_sum;
    s2_carry <= cs_carry;
  end

  // ---------------- stage 3: CPA ----------------
  // The CPA adds the whole window; the carries out of the truncation
  // columns are sigma. Pq is the window's top L bits.
  logic [WIN-1:0] win_sum;

  cpa #(.W(WIN)) u_cpa (.a(s2_sum), .b(s2_carry), .s(win_sum));

  always_ff @(posedge clk) pq <= win_sum[WIN-1 -: L];

  // ---------------- valid pipeline ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v      <= in_valid;
      s2_v      <= s1_v;
      out_valid <= s2_v;
    end
  end
endmodule
