// tb_booth_encoder: checks the partial-product window against the
// arithmetic reference (mlcp_ref_pkg): the rows, the n bits and the sign
// constant must add up to MP + T_mj, seen from column L-w-1 upwards
// (mod 2^(L+w+1)), and z must be the set of nonzero Booth digits.
// Default configuration (L=16, w=3, two's complement) and L=8 unsigned.
module tb_booth_encoder;
  import mlcp_ref_pkg::*;

  int checks = 0, failures = 0;

  localparam int LA = 16, RA = 8, LB = 8, RB = 5, WM = 3;
  localparam int WA = LA + WM + 1, WB = LB + WM + 1;
  logic [LA-1:0] xa, ya;
  logic [LB-1:0] xb, yb;
  logic [WA-1:0] ppa [RA+2];
  logic [WB-1:0] ppb [RB+2];
  logic [RA-1:0] za;
  logic [RB-1:0] zb;

  booth_encoder #(.L(LA), .W_MJ(WM), .SIGNED(1'b1)) da (.x(xa), .y(ya), .pp(ppa), .z(za));
  booth_encoder #(.L(LB), .W_MJ(WM), .SIGNED(1'b0)) db (.x(xb), .y(yb), .pp(ppb), .z(zb));

  task automatic compare(input string tag, input ref_t r, input int l, input longint sum,
                         input longint z);
    longint e, mask;
    mask = (64'sd1 <<< (l + WM + 1)) - 1;
    e = ((r.mp_hi <<< (WM + 1)) + 2 * r.s_mj) & mask;
    checks += 2;
    if ((sum & mask) != e) begin
      failures++;
      $display("FAIL %s window sum: got %h expected %h", tag, sum & mask, e);
    end
    if (z != r.z) begin
      failures++;
      $display("FAIL %s z: got %b expected %b", tag, z, r.z);
    end
  endtask

  initial begin
    longint s;
    for (int it = 0; it < 3000; it++) begin
      case (it)
        0: begin xa = 16'h8000; ya = 16'h8000; end
        1: begin xa = 16'h7fff; ya = 16'h8000; end
        2: begin xa = 16'hffff; ya = 16'haaaa; end
        default: begin xa = 16'($urandom); ya = 16'($urandom); end
      endcase
      xb = xa[7:0] ^ xa[15:8];
      yb = ya[7:0] ^ ya[15:8];
      #1;
      s = 0;
      for (int j = 0; j < RA + 2; j++) s += longint'(ppa[j]);
      compare("L=16", mlcp_ref(LA, WM, 1'b1, longint'(xa), longint'(ya)), LA, s, longint'(za));
      s = 0;
      for (int j = 0; j < RB + 2; j++) s += longint'(ppb[j]);
      compare("L=8u", mlcp_ref(LB, WM, 1'b0, longint'(xb), longint'(yb)), LB, s, longint'(zb));
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
