// tb_approx_fa: exhaustive check of the approximate full adder against its
// published truth table (inputs x1 x2 x3 = 000..111), that exactly the two
// rows 110 and 111 are wrong, and each by one. Watchdog: 1000 cycles.
module tb_approx_fa;
  logic clk = 1'b0;
  logic x1, x2, x3, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  localparam logic [7:0] T_SUM = 8'b0101_0110;
  localparam logic [7:0] T_CAR = 8'b1010_1000;

  always #5 clk = ~clk;

  approx_fa dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 8; i++) begin
      int exact, approx;
      {x1, x2, x3} = 3'(i);
      @(posedge clk);
      checks++;
      if (sum !== T_SUM[i] || carry !== T_CAR[i]) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b", 3'(i), sum, carry);
      end
      exact  = int'(x1) + int'(x2) + int'(x3);
      approx = int'(sum) + 2*int'(carry);
      checks++;
      if (approx - exact > 1 || exact - approx > 1) failures++;
      if (approx != exact) begin
        wrong++;
        checks++;
        if (!(x1 && x2)) begin failures++; $display("FAIL: unexpected error row %b", 3'(i)); end
      end
    end
    checks++;
    if (wrong != 2) begin failures++; $display("FAIL: %0d wrong rows, expected 2", wrong); end
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
