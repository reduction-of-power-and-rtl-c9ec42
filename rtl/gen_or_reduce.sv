// gen_or_reduce: OR-reduction of the generate terms, one column at a time.
//
// A generate term g(m,n) is 1 with probability 1/16, so two of them in one
// column are rarely 1 together, and an OR of the column is almost always
// equal to their sum. The OR is wrong (one low, or more) only when two or
// more are 1; for 2, 3 and 4 terms that happens with probability about
// 0.0039, 0.0112 and 0.0215. To keep that error bounded an OR gate takes at
// most four terms; at N = 8 no column holds more than four, so each altered
// column needs one gate: 2-input in columns 3, 4, 10, 11, 3-input in
// columns 5, 6, 8, 9 and 4-input in column 7.
//
// Input: the generate matrix from altered_pp_gen (zero outside m > n and the
// altered columns; only the m > n positions are read, so lint reports the
// rest of the matrix as unused). Output: G[c], the OR of the generate terms
// of column c. The gate sizes and the four-input limit are the design's; the
// generic column loop is this implementation's way of writing them.
// Combinational.
module gen_or_reduce
  import approx_mult_pkg::*;
(
  input  pp_mat_t g,
  output gcol_t   gcol
);
  for (genvar c = ALT_LO; c <= ALT_HI; c++) begin : g_col
    logic [N-1:0] terms;   // terms[m] = g(m, c-m) when that is a generate term
    for (genvar m = 0; m < N; m++) begin : g_term
      if (c - m >= 0 && c - m < N && m > c - m) begin : g_on
        assign terms[m] = g[m][c-m];
      end else begin : g_off
        assign terms[m] = 1'b0;
      end
    end
    assign gcol[c] = |terms;
  end
endmodule
