// tb_booth_digit_enc: all eight triplets against the radix-4 Booth table
// (digit = -2*b_{i+1} + b_i + b_{i-1}; nonzero code z; zero never negative).
module tb_booth_digit_enc;
  import mlcp_pkg::*;

  logic [2:0]   trip;
  booth_digit_t digit;
  logic         nz;
  int checks = 0, failures = 0;
  // expected digit for triplet 000..111
  int exp_digit [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_digit_enc dut (.trip(trip), .digit(digit), .nz(nz));

  initial begin
    int got;
    for (int v = 0; v < 8; v++) begin
      trip = 3'(v);
      #1;
      got = (digit.one ? 1 : 0) + (digit.two ? 2 : 0);
      if (digit.neg) got = -got;
      checks++;
      if (got != exp_digit[v] || (digit.one && digit.two) || nz != (exp_digit[v] != 0)
          || (digit.neg && exp_digit[v] == 0)) begin
        failures++;
        $display("FAIL trip=%b: neg=%b one=%b two=%b nz=%b, expected %0d",
                 trip, digit.neg, digit.one, digit.two, nz, exp_digit[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
