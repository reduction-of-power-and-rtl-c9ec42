// approx_fa: approximate full adder.
//
// One of the two XORs of the sum is replaced by an OR: W = x1 | x2,
// Sum = W ^ x3, Carry = W & x3. The inputs are not interchangeable: x1 and x2
// are merged by the OR, x3 is the third input. The result is wrong only for
// x1 = x2 = 1: input 110 gives value 1 instead of 2, input 111 gives 2
// instead of 3, so the error is never more than one. Combinational.
module approx_fa (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  logic w;
  assign w     = x1 | x2;
  assign sum   = w ^ x3;
  assign carry = w & x3;
endmodule
