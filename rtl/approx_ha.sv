// approx_ha: approximate half adder.
//
// The XOR of an exact half adder is replaced by an OR, so Sum = x1 | x2 while
// Carry = x1 & x2 stays exact. Only the input 11 is wrong: it gives Carry=1,
// Sum=1 (value 3) instead of 2, an error of one unit of the column weight.
// Both equations are the design's; the cell is purely combinational.
module approx_ha (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 | x2;
  assign carry = x1 & x2;
endmodule
