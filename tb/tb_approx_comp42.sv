// tb_approx_comp42: exhaustive check of the approximate 4-2 compressor
// against its published truth table (inputs x1..x4 = 0000..1111), that it
// gives 0 for all-zero inputs, that exactly five rows are wrong and each by
// one, and that all-ones gives 3. Watchdog: 1000 cycles.
module tb_approx_comp42;
  logic clk = 1'b0;
  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  localparam logic [15:0] T_SUM = 16'b1110_1111_1111_0110;
  localparam logic [15:0] T_CAR = 16'b1111_1000_1000_1000;

  always #5 clk = ~clk;

  approx_comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exact, approx;
      {x1, x2, x3, x4} = 4'(i);
      @(posedge clk);
      checks++;
      if (sum !== T_SUM[i] || carry !== T_CAR[i]) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b", 4'(i), sum, carry);
      end
      exact  = int'(x1) + int'(x2) + int'(x3) + int'(x4);
      approx = int'(sum) + 2*int'(carry);
      checks++;
      if (approx - exact > 1 || exact - approx > 1) failures++;
      if (approx != exact) wrong++;
      if (i == 15) begin checks++; if (approx != 3) failures++; end
      if (i == 0)  begin checks++; if (approx != 0) failures++; end
    end
    checks++;
    if (wrong != 5) begin failures++; $display("FAIL: %0d wrong rows, expected 5", wrong); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
