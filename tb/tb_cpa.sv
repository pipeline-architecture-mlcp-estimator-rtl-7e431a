// tb_cpa: carry-propagate adder, corner cases and random words, against
// (a + b) mod 2^W, at the default width and at W = 8.
module tb_cpa;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  logic [7:0]   a8, b8, s8;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut   (.a(a),  .b(b),  .s(s));
  cpa #(.W(8)) dut8  (.a(a8), .b(b8), .s(s8));

  task automatic check(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W-1:0] e;
    a = va; b = vb; a8 = va[7:0]; b8 = vb[7:0];
    #1;
    e = va + vb;
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL %h + %h = %h, got %h", va, vb, e, s);
    end
    checks++;
    if (s8 !== 8'(va[7:0] + vb[7:0])) begin
      failures++;
      $display("FAIL W=8 %h + %h, got %h", va[7:0], vb[7:0], s8);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, 16'd1);
    check(16'h7fff, 16'h0001);
    check(16'h5555, 16'haaaa);
    check(16'h8000, 16'h8000);
    for (int i = 0; i < 2000; i++) check(W'($urandom), W'($urandom));
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
