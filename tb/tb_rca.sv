// tb_rca: checks the 15-bit ripple-carry adder against integer addition on
// corner cases (all ones plus one, carry through every bit) and 20000 random
// operand pairs, including the carry out. Watchdog: 100000 cycles.
module tb_rca;
  localparam int W = 15;   // the adder's default width
  logic clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic cout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rca dut (.a(a), .b(b), .sum(sum), .cout(cout));

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    int expect_v;
    a = ta; b = tb_;
    @(posedge clk);
    expect_v = int'(ta) + int'(tb_);
    checks++;
    if ({cout, sum} != (W+1)'(expect_v)) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", ta, tb_, {cout, sum}, expect_v);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, 1);
    check_one('1, '1);
    check_one(15'h5555, 15'h2AAB);
    for (int i = 0; i < 20000; i++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
