// approx_comp42: approximate 4-2 compressor.
//
// Four bits of one column are reduced to a Sum bit (same weight) and a Carry
// bit (double weight), with no carry-in or carry-out chain. The exact count
// needs three output bits only when all four inputs are 1; that case is
// mapped to 11 (value 3), so two output bits suffice:
//   W1 = x1 & x2,  W2 = x3 & x4
//   Sum   = (x1 ^ x2) | (x3 ^ x4) | (W1 & W2)
//   Carry = W1 | W2
// Five of the sixteen input patterns (0101, 0110, 1001, 1010, 1111) come out
// one low; no pattern is off by more than one. Inputs pair as (x1,x2) and
// (x3,x4). Combinational.
module approx_comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic w1, w2;
  assign w1    = x1 & x2;
  assign w2    = x3 & x4;
  assign sum   = (x1 ^ x2) | (x3 ^ x4) | (w1 & w2);
  assign carry = w1 | w2;
endmodule
