// tb_w_sweep: accuracy adjustment through w, the number of exactly added
// truncation columns.
//
// Seven 8-bit two's complement multipliers, w = 1..7, are fed all 65536
// operand pairs in step; a 16-bit unsigned multiplier (w = 3) runs random
// pairs alongside. Every result is compared with the arithmetic reference
// (mlcp_ref_pkg). The mean absolute error of the 8-bit units must not grow
// as w grows, and for w >= 2 the error must stay below one unit of the last
// place. The mean and largest error per w are printed.
module tb_w_sweep;
  import mlcp_ref_pkg::*;

  localparam int L = 8, LAT = 3, WMAX = 7;

  logic          clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [L-1:0]  x = '0, y = '0;
  logic [15:0]   xu = '0, yu = '0, pq_u;
  logic          ov [1:WMAX];
  logic          ov_u;
  logic [L-1:0]  pq [1:WMAX];
  int checks = 0, failures = 0;

  for (genvar w = 1; w <= WMAX; w++) begin : g_w
    top_fixed_booth #(.L(L), .W_MJ(w), .SIGNED(1'b1)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
      .out_valid(ov[w]), .pq(pq[w])
    );
  end

  top_fixed_booth #(.L(16), .W_MJ(3), .SIGNED(1'b0)) dut_u16 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xu), .y(yu),
    .out_valid(ov_u), .pq(pq_u)
  );

  always #5 clk = ~clk;

  logic [L-1:0] qx [$], qy [$];
  logic [15:0]  qxu [$], qyu [$];
  real          sum_err [1:WMAX];
  longint       max_err [1:WMAX];
  longint       n_res = 0;

  initial for (int w = 1; w <= WMAX; w++) begin
    sum_err[w] = 0.0;
    max_err[w] = 0;
  end

  always @(posedge clk) begin
    if (rst_n && ov[1]) begin
      logic [L-1:0] vx, vy;
      logic [15:0]  vxu, vyu;
      ref_t         r;
      longint       e;
      vx  = qx.pop_front();
      vy  = qy.pop_front();
      vxu = qxu.pop_front();
      vyu = qyu.pop_front();
      for (int w = 1; w <= WMAX; w++) begin
        r = mlcp_ref(L, w, 1'b1, longint'(vx), longint'(vy));
        checks++;
        if (!ov[w] || longint'(pq[w]) != r.pq) begin
          failures++;
          $display("FAIL w=%0d %h x %h: pq=%h expected %h", w, vx, vy, pq[w], 8'(r.pq));
        end
        e = (longint'($signed(pq[w])) <<< L) - r.p;
        if (e < 0) e = -e;
        sum_err[w] += real'(e);
        if (e > max_err[w]) max_err[w] = e;
      end
      r = mlcp_ref(16, 3, 1'b0, longint'(vxu), longint'(vyu));
      checks++;
      if (!ov_u || longint'(pq_u) != r.pq) begin
        failures++;
        $display("FAIL unsigned 16-bit %h x %h: pq=%h expected %h", vxu, vyu, pq_u, 16'(r.pq));
      end
      n_res++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      x = 8'(i >> 8);
      y = 8'(i);
      xu = (i < 4) ? 16'hffff : 16'($urandom);
      yu = (i < 2) ? 16'hffff : 16'($urandom);
      in_valid = 1'b1;
      qx.push_back(x);
      qy.push_back(y);
      qxu.push_back(xu);
      qyu.push_back(yu);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_res != 65536) begin
      failures++;
      $display("FAIL %0d results", n_res);
    end
    for (int w = 1; w <= WMAX; w++) begin
      $display("w=%0d: mean |error| = %f ulp, max = %0d/256", w,
               sum_err[w] / real'(n_res) / 256.0, max_err[w]);
      if (w > 1) begin
        checks++;
        if (sum_err[w] > sum_err[w-1]) begin
          failures++;
          $display("FAIL mean error grows from w=%0d to w=%0d", w - 1, w);
        end
        checks++;
        if (max_err[w] >= 256) begin
          failures++;
          $display("FAIL w=%0d error reaches one unit", w);
        end
      end
    end
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
