// tb_approx_reduce_tree: feeds the reduction tree the altered partial
// products of all 65536 operand pairs (formed here from the operand bits) and
// checks that the two output rows add up to the product of the table-driven
// reference model, that y[0] is 0 and that x[14] carries a(7,7) straight
// through. Watchdog: 200000 cycles.
module tb_approx_reduce_tree;
  import approx_mult_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  pp_mat_t a, p;
  gcol_t   gcol;
  row_t    x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  approx_reduce_tree dut (.a(a), .p(p), .gcol(gcol), .x(x), .y(y));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] al, be;
      logic [15:0] expect_v, got;
      ev_acc_t acc;
      acc = '{ev_count: '{0, 0, 0, 0}, err: 0};
      {al, be} = 16'(v);
      p = '0;
      gcol = '0;
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++) begin
          a[m][n] = al[m] & be[n];
          if (n < m && m + n >= ALT_LO && m + n <= ALT_HI) begin
            p[m][n] = (al[m] & be[n]) | (al[n] & be[m]);
            gcol[m+n] = gcol[m+n] | (al[m] & be[n] & al[n] & be[m]);
          end
        end
      @(posedge clk);
      expect_v = ref_mult(al, be, acc);
      got = 16'(x) + 16'(y);
      checks++;
      if (got != expect_v || y[0] != 1'b0 || x[14] != a[7][7]) begin
        failures++;
        if (failures < 10) $display("FAIL alpha=%0d beta=%0d x+y=%0d expected %0d", al, be, got, expect_v);
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
