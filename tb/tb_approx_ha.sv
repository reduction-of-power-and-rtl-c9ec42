// tb_approx_ha: exhaustive check of the approximate half adder against its
// published truth table (Sum = 0,1,1,1 and Carry = 0,0,0,1 for inputs
// 00..11), and of the rule that its value never differs from the exact sum
// by more than one. A watchdog ends the run after 1000 clock cycles.
module tb_approx_ha;
  logic clk = 1'b0;
  logic x1, x2, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  localparam logic [3:0] T_SUM = 4'b1110;
  localparam logic [3:0] T_CAR = 4'b1000;

  always #5 clk = ~clk;

  approx_ha dut (.x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x1, x2} = 2'(i);
      @(posedge clk);
      checks++;
      if (sum !== T_SUM[i] || carry !== T_CAR[i]) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b", 2'(i), sum, carry);
      end
      checks++;
      if (int'(sum) + 2*int'(carry) - (int'(x1) + int'(x2)) > 1) failures++;
      if (int'(sum) + 2*int'(carry) != int'(x1) + int'(x2)) wrong++;
    end
    checks++;
    if (wrong != 1) begin failures++; $display("FAIL: %0d wrong rows, expected 1", wrong); end
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
