// tb_altered_pp_gen: runs all 65536 operand pairs through the partial-product
// stage. Per pair it checks every a(m,n) against the operand bits, that in
// the altered columns 3..11 each pair obeys p + g = a(m,n) + a(n,m) with
// p >= g, and that every other p and g position is 0. Over the whole input
// space it checks the probabilities the design is built on: a is 1 in 1/4 of
// the cases, p in 7/16 and g in 1/16. Watchdog: 200000 cycles.
module tb_altered_pp_gen;
  import approx_mult_pkg::*;
  logic clk = 1'b0;
  logic [N-1:0] alpha, beta;
  pp_mat_t a, p, g;
  int checks = 0, failures = 0;
  int cnt_a [N][N];
  int cnt_p [N][N];
  int cnt_g [N][N];

  always #5 clk = ~clk;

  altered_pp_gen dut (.alpha(alpha), .beta(beta), .a(a), .p(p), .g(g));

  initial begin
    int bad;
    foreach (cnt_a[m, n]) begin cnt_a[m][n] = 0; cnt_p[m][n] = 0; cnt_g[m][n] = 0; end
    for (int v = 0; v < 65536; v++) begin
      {alpha, beta} = 16'(v);
      @(posedge clk);
      bad = 0;
      for (int m = 0; m < N; m++) begin
        for (int n = 0; n < N; n++) begin
          int am, an;
          am = (int'(alpha) >> m) % 2 * ((int'(beta) >> n) % 2);
          an = (int'(alpha) >> n) % 2 * ((int'(beta) >> m) % 2);
          if (int'(a[m][n]) != am) bad++;
          cnt_a[m][n] += int'(a[m][n]);
          cnt_p[m][n] += int'(p[m][n]);
          cnt_g[m][n] += int'(g[m][n]);
          if (m > n && m + n >= 3 && m + n <= 11) begin
            if (int'(p[m][n]) + int'(g[m][n]) != am + an) bad++;
            if (g[m][n] && !p[m][n]) bad++;
          end else if (p[m][n] || g[m][n]) bad++;
        end
      end
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("FAIL alpha=%0d beta=%0d: %0d wrong terms", alpha, beta, bad);
      end
    end
    for (int m = 0; m < N; m++) begin
      for (int n = 0; n < N; n++) begin
        checks++;
        if (cnt_a[m][n] != 65536 / 4) failures++;
        if (m > n && m + n >= 3 && m + n <= 11) begin
          checks += 2;
          if (cnt_p[m][n] != 65536 * 7 / 16) begin failures++; $display("FAIL p(%0d,%0d) ones=%0d", m, n, cnt_p[m][n]); end
          if (cnt_g[m][n] != 65536 / 16)     begin failures++; $display("FAIL g(%0d,%0d) ones=%0d", m, n, cnt_g[m][n]); end
        end
      end
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
