// rca: ripple-carry adder for the vector-merge step of the multiplier.
//
// Adds the two rows left by the reduction tree. Each bit is an exact full
// adder and the carry ripples from bit 0 upward, so the delay grows linearly
// with W. The carry out of the top bit is the extra product bit.
// The design names a ripple-carry adder for this step; the bit-level form is
// the textbook one. Combinational.
module rca #(
  parameter int W = 15
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
