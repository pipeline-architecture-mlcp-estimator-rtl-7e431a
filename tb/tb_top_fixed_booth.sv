// tb_top_fixed_booth: end-to-end test of the pipelined fixed-width MLCP
// Booth multiplier at its default parameters (L = 16, w = 3, two's
// complement).
//
// A stream of operand pairs is driven, one per clock with random bubbles.
// Every output is compared with the arithmetic reference (mlcp_ref_pkg),
// with the pipeline latency (exactly 3 clocks) and with the accuracy bound
// |Pq*2^L - X*Y| < 2^L. Each mechanism of the design is counted and must
// occur at least once: back-to-back issue (one result per clock), bubbles,
// negative and zero Booth digits, compensation sigma = 0, sigma >= 1 and
// sigma >= 2, and a compensation carry that changes the main part's top
// bits (rounding up across a word boundary).
module tb_top_fixed_booth;
  import mlcp_ref_pkg::*;

  localparam int L = 16, W = 3, LAT = 3;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [L-1:0] x = '0, y = '0, pq;
  int checks = 0, failures = 0;

  top_fixed_booth dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .pq(pq)
  );

  always #5 clk = ~clk;

  // expected results in issue order, with the cycle they were issued
  ref_t   q_ref [$];
  longint q_cyc [$];  // time of the edge that samples each input
  // input sampling times
  int n_b2b = 0, n_bubble = 0, n_neg = 0, n_zero = 0, n_sig0 = 0, n_sig1 = 0,
      n_sig2 = 0, n_carry = 0, n_out = 0;
  bit last_out_valid = 0;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ref_t   r;
      longint err;
      n_out++;
      if (last_out_valid) n_b2b++;
      checks++;
      if (q_ref.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        r = q_ref.pop_front();
        checks += 3;
        if (($time - q_cyc.pop_front()) != 10 * LAT) begin
          failures++;
          $display("FAIL latency at %0t", $time);
        end
        if (longint'(pq) != r.pq) begin
          failures++;
          $display("FAIL pq=%h expected %h (p=%0d)", pq, r.pq, r.p);
        end
        err = (longint'($signed(pq)) <<< L) - r.p;
        if (err >= (64'sd1 <<< L) || err <= -(64'sd1 <<< L)) begin
          failures++;
          $display("FAIL error %0d beyond one unit", err);
        end
        if (r.nneg > 0) n_neg++;
        if (r.z != 64'hff) n_zero++;
        if (r.sigma == 0) n_sig0++;
        if (r.sigma >= 1) n_sig1++;
        if (r.sigma >= 2) n_sig2++;
        if (((r.mp_hi + r.sigma) & 64'hfff0) != (r.mp_hi & 64'hfff0)) n_carry++;
      end
    end
    last_out_valid <= rst_n && out_valid;
  end

  // Inputs change on the falling edge and are sampled on the next rising edge.
  task automatic issue(input logic [L-1:0] vx, input logic [L-1:0] vy);
    @(negedge clk);
    x = vx;
    y = vy;
    in_valid = 1'b1;
    q_ref.push_back(mlcp_ref(L, W, 1'b1, longint'(vx), longint'(vy)));
    q_cyc.push_back(longint'($time) + 5);
  endtask

  task automatic bubble();
    @(negedge clk);
    in_valid = 1'b0;
    n_bubble++;
  endtask

  task automatic count_check(input string name, input int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    issue(16'h8000, 16'h8000);
    issue(16'h7fff, 16'h7fff);
    issue(16'hffff, 16'hffff);
    issue(16'h00ff, 16'hffff);
    for (int i = 0; i < 5000; i++) begin
      if ($urandom_range(0, 3) == 0) bubble();
      issue(16'($urandom), ($urandom_range(0, 7) == 0) ? 16'h0f0f & 16'($urandom) : 16'($urandom));
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q_ref.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q_ref.size());
    end
    count_check("back_to_back", n_b2b);
    count_check("bubble", n_bubble);
    count_check("negative_digit", n_neg);
    count_check("zero_digit", n_zero);
    count_check("sigma_zero", n_sig0);
    count_check("sigma_ge_1", n_sig1);
    count_check("sigma_ge_2", n_sig2);
    count_check("comp_carry_high", n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
