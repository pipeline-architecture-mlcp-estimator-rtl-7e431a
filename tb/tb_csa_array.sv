// tb_csa_array: the carry-save array must keep the sum of its operands:
// sum + carry == sum of all operands (mod 2^W). Tried for operand counts
// that exercise every tree shape (5:2 rows, a 5:2 row padded from four, a
// full-adder row, pass-through): N = 10 (the default, 16-bit signed
// multiplier), 11, 7, 6, 4, 3, with corner and random operands.
module tb_csa_array;
  int checks = 0, failures = 0;

  // One DUT per operand count, all 16 bits wide.
  logic [15:0] o10 [10], o11 [11], o7 [7], o6 [6], o4 [4], o3 [3];
  logic [15:0] s10, c10, s11, c11, s7, c7, s6, c6, s4, c4, s3, c3;

  csa_array #(.W(16), .N(10)) d10 (.ops(o10), .sum(s10), .carry(c10));
  csa_array #(.W(16), .N(11)) d11 (.ops(o11), .sum(s11), .carry(c11));
  csa_array #(.W(16), .N(7))  d7  (.ops(o7),  .sum(s7),  .carry(c7));
  csa_array #(.W(16), .N(6))  d6  (.ops(o6),  .sum(s6),  .carry(c6));
  csa_array #(.W(16), .N(4))  d4  (.ops(o4),  .sum(s4),  .carry(c4));
  csa_array #(.W(16), .N(3))  d3  (.ops(o3),  .sum(s3),  .carry(c3));

  task automatic chk(input string tag, input logic [15:0] s, input logic [15:0] c,
                     input logic [15:0] e);
    checks++;
    if (16'(s + c) !== e) begin
      failures++;
      $display("FAIL %s: %h + %h != %h", tag, s, c, e);
    end
  endtask

  task automatic fill(input int mode);
    logic [15:0] v [11];
    for (int i = 0; i < 11; i++)
      case (mode)
        0: v[i] = 16'hffff;
        1: v[i] = (i % 2 != 0) ? 16'haaaa : 16'h5555;
        default: v[i] = 16'($urandom);
      endcase
    for (int i = 0; i < 10; i++) o10[i] = v[i];
    for (int i = 0; i < 11; i++) o11[i] = v[i];
    for (int i = 0; i < 7;  i++) o7[i]  = v[i];
    for (int i = 0; i < 6;  i++) o6[i]  = v[i];
    for (int i = 0; i < 4;  i++) o4[i]  = v[i];
    for (int i = 0; i < 3;  i++) o3[i]  = v[i];
  endtask

  function automatic logic [15:0] total(input logic [15:0] v [11], input int n);
    logic [15:0] t = '0;
    for (int i = 0; i < n; i++) t += v[i];
    return t;
  endfunction

  initial begin
    logic [15:0] v [11];
    for (int it = 0; it < 3000; it++) begin
      fill(it < 2 ? it : 2);
      #1;
      for (int i = 0; i < 10; i++) v[i] = o10[i];
      v[10] = o11[10];
      chk("N=10", s10, c10, total(v, 10));
      chk("N=11", s11, c11, total(v, 11));
      chk("N=7",  s7,  c7,  total(v, 7));
      chk("N=6",  s6,  c6,  total(v, 6));
      chk("N=4",  s4,  c4,  total(v, 4));
      chk("N=3",  s3,  c3,  total(v, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
