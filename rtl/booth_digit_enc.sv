// booth_digit_enc: radix-4 (modified) Booth encoder for one digit.
//
// The overlapping multiplier bits b_{i+1}, b_i, b_{i-1} select a digit
// d = -2*b_{i+1} + b_i + b_{i-1} in {-2,-1,0,+1,+2}:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// The digit leaves as (neg, one, two); nz is the nonzero code z of the digit,
// which the MLCP compensation uses. 111 encodes zero with neg low, so a zero
// digit never produces a negative partial product. Purely combinational.
module booth_digit_enc
  import mlcp_pkg::*;
(
  input  logic [2:0]   trip,   // {b_{i+1}, b_i, b_{i-1}}
  output booth_digit_t digit,
  output logic         nz
);
  always_comb begin
    digit.one = trip[1] ^ trip[0];
    digit.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    digit.neg = trip[2] & ~(trip[1] & trip[0]);
    nz        = digit.one | digit.two;
  end
endmodule
