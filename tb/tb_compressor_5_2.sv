// tb_compressor_5_2: exhaustive test of the 5:2 compressor over all 128
// input combinations. Checks the counting identity
//   x1+..+x5+cin1+cin2 = sum + 2*(carry+cout1+cout2)
// and that cout1/cout2 do not depend on the carry-ins (no ripple in a row).
module tb_compressor_5_2;
  logic [4:0] x;
  logic       cin1, cin2, sum, carry, cout1, cout2;
  logic [1:0] couts_at_zero_cin [32];
  int checks = 0, failures = 0;

  compressor_5_2 dut (
    .x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
    .cin1(cin1), .cin2(cin2),
    .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2)
  );

  initial begin
    for (int v = 0; v < 128; v++) begin
      {cin2, cin1, x} = 7'(v);
      #1;
      checks++;
      if ($countones(x) + int'(cin1) + int'(cin2)
          != int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2))) begin
        failures++;
        $display("FAIL x=%b cin=%b%b -> s=%b c=%b co=%b%b", x, cin2, cin1, sum, carry, cout2, cout1);
      end
      if (v < 32) couts_at_zero_cin[v] = {cout2, cout1};
      else begin
        checks++;
        if (couts_at_zero_cin[v % 32] != {cout2, cout1}) begin
          failures++;
          $display("FAIL carry-outs depend on carry-ins at x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
