// approx_mult8: 8x8 unsigned approximate multiplier (all columns approximated).
//
// The multiplier trades a small, bounded error for a much smaller partial-
// product reduction tree. It works in four steps:
//   1. altered_pp_gen forms the 64 partial products a(m,n) = alpha[m]&beta[n]
//      and, in columns 3..11, replaces each pair a(m,n), a(n,m) by a
//      propagate term p = OR and a generate term g = AND of the pair.
//   2. gen_or_reduce ORs the generate terms of each column into one bit G_c;
//      since a generate term is 1 only one time in 16, the OR is nearly
//      always equal to the column's count of ones.
//   3. approx_reduce_tree reduces the propagate terms, the remaining partial
//      products and the G bits in two stages of approximate half adders,
//      full adders and 4-2 compressors, each wrong by at most one unit on a
//      few input patterns, down to two rows x and y.
//   4. rca adds x and y exactly; its carry out is product bit 15.
// Multiplying by zero or by a power of two is always exact, as no cell then
// sees more than one 1.
//
// Interface: alpha, beta (unsigned, 8 bits) in, product (16 bits) out.
// Timing: purely combinational, no clock and no registers; the structure and
// the cells follow the design, the absence of pipeline registers is this
// implementation's choice as none are described.
module approx_mult8
  import approx_mult_pkg::*;
(
  input  logic [N-1:0]  alpha,
  input  logic [N-1:0]  beta,
  output logic [PW-1:0] product
);
  pp_mat_t a, p, g;
  gcol_t   gcol;
  row_t    x, y;

  altered_pp_gen     u_pp   (.alpha(alpha), .beta(beta), .a(a), .p(p), .g(g));
  gen_or_reduce      u_gor  (.g(g), .gcol(gcol));
  approx_reduce_tree u_tree (.a(a), .p(p), .gcol(gcol), .x(x), .y(y));
  rca #(.W(COLS))    u_rca  (.a(x), .b(y), .sum(product[COLS-1:0]), .cout(product[PW-1]));
endmodule
