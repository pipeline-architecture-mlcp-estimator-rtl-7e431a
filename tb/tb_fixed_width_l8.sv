// tb_fixed_width_l8: the 8-bit configurations (L = 8, w = 3).
//
// Unsigned operands: the two worked examples
//   X = 1110_0000, Y = 1111_1011: exact 56224, Pq = 1101_1100 (56320), error 96
//   X = 1010_1010, Y = 1010_1010: exact 28900, Pq = 0111_0001 (28928), error 28
// then every one of the 65536 operand pairs against the arithmetic reference.
// Two's complement operands: every pair against the reference as well.
// For both, the largest error must stay below one unit of the last place
// (2^8), and the mean absolute error is printed in units of 2^8.
// Each pipeline is fed one pair per clock; results are checked 3 clocks on.
module tb_fixed_width_l8;
  import mlcp_ref_pkg::*;

  localparam int L = 8, W = 3, LAT = 3;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic         ov_u, ov_s;
  logic [L-1:0] x = '0, y = '0, pq_u, pq_s;
  int checks = 0, failures = 0;

  top_fixed_booth #(.L(L), .W_MJ(W), .SIGNED(1'b0)) dut_u (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(ov_u), .pq(pq_u)
  );
  top_fixed_booth #(.L(L), .W_MJ(W), .SIGNED(1'b1)) dut_s (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(ov_s), .pq(pq_s)
  );

  always #5 clk = ~clk;

  logic [L-1:0] qx [$], qy [$];
  longint       qt [$];
  real          sum_err_u = 0.0, sum_err_s = 0.0;
  longint       max_err_u = 0, max_err_s = 0, n_res = 0;

  function automatic longint absl(input longint v);
    return (v < 0) ? -v : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && ov_u) begin
      ref_t        ru, rs;
      logic [L-1:0] vx, vy;
      longint      eu, es;
      vx = qx.pop_front();
      vy = qy.pop_front();
      checks += 4;
      if (($time - qt.pop_front()) != 10 * LAT) begin
        failures++;
        $display("FAIL latency");
      end
      if (ov_s !== 1'b1) begin
        failures++;
        $display("FAIL signed pipeline out of step");
      end
      ru = mlcp_ref(L, W, 1'b0, longint'(vx), longint'(vy));
      rs = mlcp_ref(L, W, 1'b1, longint'(vx), longint'(vy));
      if (longint'(pq_u) != ru.pq) begin
        failures++;
        $display("FAIL unsigned %b x %b: pq=%b expected %b", vx, vy, pq_u, 8'(ru.pq));
      end
      if (longint'(pq_s) != rs.pq) begin
        failures++;
        $display("FAIL signed %b x %b: pq=%b expected %b", vx, vy, pq_s, 8'(rs.pq));
      end
      eu = (longint'(pq_u) <<< L) - ru.p;
      es = (longint'($signed(pq_s)) <<< L) - rs.p;
      if (vx == 8'b1110_0000 && vy == 8'b1111_1011) begin
        checks++;
        if (pq_u != 8'b1101_1100 || ru.p != 56224 || eu != 96) begin
          failures++;
          $display("FAIL worked example 1: pq=%b error=%0d", pq_u, eu);
        end else $display("example 1: %b x %b -> %b = %0d, exact %0d, error %0d",
                          vx, vy, pq_u, longint'(pq_u) <<< L, ru.p, eu);
      end
      if (vx == 8'b1010_1010 && vy == 8'b1010_1010) begin
        checks++;
        if (pq_u != 8'b0111_0001 || ru.p != 28900 || eu != 28) begin
          failures++;
          $display("FAIL worked example 2: pq=%b error=%0d", pq_u, eu);
        end else $display("example 2: %b x %b -> %b = %0d, exact %0d, error %0d",
                          vx, vy, pq_u, longint'(pq_u) <<< L, ru.p, eu);
      end
      sum_err_u += real'(absl(eu));
      sum_err_s += real'(absl(es));
      if (absl(eu) > max_err_u) max_err_u = absl(eu);
      if (absl(es) > max_err_s) max_err_s = absl(es);
      n_res++;
    end
  end

  task automatic issue(input logic [L-1:0] vx, input logic [L-1:0] vy);
    @(negedge clk);
    x = vx;
    y = vy;
    in_valid = 1'b1;
    qx.push_back(vx);
    qy.push_back(vy);
    qt.push_back(longint'($time) + 5);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    issue(8'b1110_0000, 8'b1111_1011);
    issue(8'b1010_1010, 8'b1010_1010);
    for (int i = 0; i < 65536; i++) issue(8'(i >> 8), 8'(i));
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks += 3;
    if (qx.size() != 0 || n_res != 65538) begin
      failures++;
      $display("FAIL %0d results, %0d missing", n_res, qx.size());
    end
    if (max_err_u >= (64'sd1 <<< L)) begin
      failures++;
      $display("FAIL unsigned max error %0d", max_err_u);
    end
    if (max_err_s >= (64'sd1 <<< L)) begin
      failures++;
      $display("FAIL signed max error %0d", max_err_s);
    end
    $display("unsigned: mean |error| = %f ulp, max = %0d/256", sum_err_u / real'(n_res) / 256.0, max_err_u);
    $display("signed:   mean |error| = %f ulp, max = %0d/256", sum_err_s / real'(n_res) / 256.0, max_err_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
