// altered_pp_gen: partial products and their propagate/generate alteration.
//
// Every partial product is a(m,n) = alpha[m] & beta[n]; with random inputs it
// is 1 with probability 1/4. In the columns that hold more than three partial
// products (ALT_LO..ALT_HI) each symmetric pair a(m,n), a(n,m) with m > n is
// replaced by
//   p(m,n) = a(m,n) | a(n,m)   (1 with probability 7/16)
//   g(m,n) = a(m,n) & a(n,m)   (1 with probability 1/16)
// and p + g = a(m,n) + a(n,m), so the alteration alone loses nothing. The
// later stages treat the rare g terms with cheap OR gates and the rest with
// approximate adders.
//
// Outputs: the full matrix a, and p and g at [m][n] for m > n and m+n in
// ALT_LO..ALT_HI; every other p and g position is 0 (a choice of this
// implementation: those positions are never read). Diagonal terms a(m,m)
// and the pairs outside the altered columns are taken from a. The equations
// and the range of altered columns are the design's. Combinational.
module altered_pp_gen
  import approx_mult_pkg::*;
(
  input  logic [N-1:0] alpha,
  input  logic [N-1:0] beta,
  output pp_mat_t      a,
  output pp_mat_t      p,
  output pp_mat_t      g
);
  for (genvar m = 0; m < N; m++) begin : g_m
    for (genvar n = 0; n < N; n++) begin : g_n
      assign a[m][n] = alpha[m] & beta[n];
      if (m > n && m + n >= ALT_LO && m + n <= ALT_HI) begin : g_alt
        assign p[m][n] = a[m][n] | a[n][m];
        assign g[m][n] = a[m][n] & a[n][m];
      end else begin : g_none
        assign p[m][n] = 1'b0;
        assign g[m][n] = 1'b0;
      end
    end
  end
endmodule
