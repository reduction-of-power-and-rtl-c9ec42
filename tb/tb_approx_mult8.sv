// tb_approx_mult8: end-to-end test of the 8x8 approximate multiplier over
// all 65536 operand pairs, at the module's only size.
//
// For every pair it checks the product against the table-driven reference
// model, and checks the model itself against the identity
// product = alpha*beta + (sum of the error contributions of all cells).
// Products with a zero or power-of-two operand must be exact. Each error
// mechanism of the design must occur at least once: an approximate half
// adder, full adder or 4-2 compressor on one of its wrong input patterns, and
// an OR gate seeing two or more generate ones. The run prints how often each
// occurred and the resulting error metrics (mean relative error distance,
// normalized error distance, largest error distance).
// Watchdog: 200000 cycles.
module tb_approx_mult8;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0]  alpha, beta;
  logic [15:0] product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  approx_mult8 dut (.alpha(alpha), .beta(beta), .product(product));

  initial begin
    ev_acc_t tot;
    real red_sum, ed_sum, mred, ned;
    int max_ed, n_exact, n_over, n_under;
    red_sum = 0.0; ed_sum = 0.0; max_ed = 0; n_exact = 0; n_over = 0; n_under = 0;
    tot = '{ev_count: '{0, 0, 0, 0}, err: 0};
    for (int v = 0; v < 65536; v++) begin
      ev_acc_t acc;
      int exact, ed;
      logic [15:0] expect_v;
      acc = '{ev_count: '{0, 0, 0, 0}, err: 0};
      {alpha, beta} = 16'(v);
      @(posedge clk);
      expect_v = ref_mult(alpha, beta, acc);
      exact = int'(alpha) * int'(beta);
      checks++;
      if (product != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d (exact %0d)", alpha, beta, product, expect_v, exact);
      end
      checks++;
      if (longint'(expect_v) != longint'(exact) + acc.err) begin
        failures++;
        if (failures < 10) $display("FAIL model identity %0d * %0d", alpha, beta);
      end
      if ($countones(alpha) <= 1 || $countones(beta) <= 1) begin
        checks++;
        if (int'(product) != exact) begin
          failures++;
          $display("FAIL %0d * %0d = %0d should be exact", alpha, beta, product);
        end
      end
      ed = (int'(product) > exact) ? int'(product) - exact : exact - int'(product);
      if (ed > max_ed) max_ed = ed;
      ed_sum += real'(ed);
      if (exact != 0) red_sum += real'(ed) / real'(exact);
      if (ed == 0) n_exact++; else if (int'(product) > exact) n_over++; else n_under++;
      for (int k = 0; k < 4; k++) tot.ev_count[k] += acc.ev_count[k];
    end
    mred = red_sum / 65535.0;
    ned  = ed_sum / 65536.0 / real'(255 * 255);
    $display("error events: approx HA %0d, approx FA %0d, approx 4-2 %0d, OR of generates %0d",
             tot.ev_count[EV_HA], tot.ev_count[EV_FA], tot.ev_count[EV_C42], tot.ev_count[EV_OR]);
    $display("products: %0d exact, %0d high, %0d low; MRED %e NED %e max ED %0d",
             n_exact, n_over, n_under, mred, ned, max_ed);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (tot.ev_count[k] == 0) begin failures++; $display("FAIL: error mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
