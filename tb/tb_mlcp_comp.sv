// tb_mlcp_comp: the compensated circuit must put, at the bottom of the
// column window, the number of nonzero codes of the rows that reach the
// minor part (rows j with 2j <= L-w-1: rows 0..6 for L=16, rows 0..2 for
// L=8, w=3) plus 2^w, the half unit of column L. All z patterns are tried,
// for the default configuration (L=16, w=3, signed) and for L=8 unsigned.
module tb_mlcp_comp;
  int checks = 0, failures = 0;

  localparam int LA = 16, RA = 8, LB = 8, RB = 5, WM = 3;
  logic [RA-1:0]       za;
  logic [RB-1:0]       zb;
  logic [LA+WM:0]      ca;
  logic [LB+WM:0]      cb;

  mlcp_comp #(.L(LA), .W_MJ(WM), .SIGNED(1'b1)) da (.z(za), .comp(ca));
  mlcp_comp #(.L(LB), .W_MJ(WM), .SIGNED(1'b0)) db (.z(zb), .comp(cb));

  initial begin
    int ka, kb;
    for (int v = 0; v < 256; v++) begin
      za = 8'(v);
      zb = 5'(v);
      #1;
      ka = 0;
      kb = 0;
      for (int j = 0; j <= 6; j++) if (za[j]) ka++;
      for (int j = 0; j <= 2; j++) if (zb[j]) kb++;
      checks += 2;
      if (int'(ca) != ka + 8) begin
        failures++;
        $display("FAIL L=16 z=%b comp=%0d expected %0d", za, ca, ka + 8);
      end
      if (int'(cb) != kb + 8) begin
        failures++;
        $display("FAIL L=8 z=%b comp=%0d expected %0d", zb, cb, kb + 8);
      end
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
