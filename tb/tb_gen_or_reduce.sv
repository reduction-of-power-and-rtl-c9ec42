// tb_gen_or_reduce: drives the generate matrix of all 65536 operand pairs
// (formed here from the operand bits) into the OR reduction. Per pair it
// checks that G_c is 1 exactly when column c holds at least one generate 1.
// Over the input space it measures, per column, how often the OR differs from
// the true count (two or more ones) and compares it with the error
// probabilities 0.00390, 0.01124 and 0.02153 expected for columns of 2, 3
// and 4 generate terms. Watchdog: 200000 cycles.
module tb_gen_or_reduce;
  import approx_mult_pkg::*;
  logic clk = 1'b0;
  pp_mat_t g;
  gcol_t   gcol;
  int checks = 0, failures = 0;
  int miss [ALT_LO:ALT_HI];
  int nterm [ALT_LO:ALT_HI];

  always #5 clk = ~clk;

  gen_or_reduce dut (.g(g), .gcol(gcol));

  initial begin
    real perr_tab [2:4];
    perr_tab[2] = 0.00390; perr_tab[3] = 0.01124; perr_tab[4] = 0.02153;
    for (int c = ALT_LO; c <= ALT_HI; c++) begin
      miss[c] = 0;
      nterm[c] = 0;
      for (int m = 0; m < N; m++) if (c - m >= 0 && c - m < m) nterm[c]++;
    end
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] al, be;
      int bad;
      {al, be} = 16'(v);
      g = '0;
      for (int m = 0; m < N; m++)
        for (int n = 0; n < m; n++)
          if (m + n >= ALT_LO && m + n <= ALT_HI) g[m][n] = al[m] & be[n] & al[n] & be[m];
      @(posedge clk);
      bad = 0;
      for (int c = ALT_LO; c <= ALT_HI; c++) begin
        int cnt;
        cnt = 0;
        for (int m = 0; m < N; m++) if (c - m >= 0 && c - m < m) cnt += int'(g[m][c-m]);
        if (gcol[c] != (cnt > 0)) bad++;
        if (int'(gcol[c]) != cnt) miss[c]++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("FAIL alpha=%0d beta=%0d gcol=%b", al, be, gcol);
      end
    end
    for (int c = ALT_LO; c <= ALT_HI; c++) begin
      real perr;
      perr = real'(miss[c]) / 65536.0;
      $display("column %0d: %0d generate terms, OR error probability %f", c, nterm[c], perr);
      checks++;
      if (nterm[c] < 2 || nterm[c] > 4 || perr - perr_tab[nterm[c]] > 0.0001 || perr_tab[nterm[c]] - perr > 0.0001) begin
        failures++;
        $display("FAIL column %0d error probability %f", c, perr);
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
