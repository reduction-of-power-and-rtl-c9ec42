// approx_mult_pkg: sizes and types shared by the 8x8 approximate multiplier.
//
// N is the operand width. The reduction tree in approx_reduce_tree is a fixed
// wiring for N = 8, the size the design is laid out for; the other modules
// are written for any N but are only used at 8.
//
// Partial products are held in an N x N matrix indexed [m][n], where element
// [m][n] belongs to multiplicand bit m and multiplier bit n and has weight
// 2^(m+n). Columns ALT_LO..ALT_HI are the columns that hold more than three
// partial products; only there are pairs a(m,n), a(n,m) replaced by
// propagate/generate terms.
package approx_mult_pkg;

  localparam int N      = 8;            // operand width
  localparam int PW     = 2 * N;        // product width
  localparam int COLS   = 2 * N - 1;    // columns of the partial-product matrix
  localparam int ALT_LO = 3;            // first column with more than 3 terms
  localparam int ALT_HI = 2 * N - 5;    // last column with more than 3 terms

  typedef logic [N-1:0][N-1:0] pp_mat_t;   // [m][n], weight 2^(m+n)
  typedef logic [COLS-1:0]     row_t;      // one bit per column
  typedef logic [ALT_HI:ALT_LO] gcol_t;    // one OR-ed generate bit per altered column

endpackage
