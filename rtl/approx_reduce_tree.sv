// approx_reduce_tree: two-stage approximate reduction of the altered
// partial-product matrix of the 8x8 multiplier.
//
// Stage 1 reduces the propagate terms and the remaining plain partial
// products (the OR-ed generate bits G3..G11 wait for stage 2):
//   col 12  approx HA  (a7,5  a5,7)            -> S12 C12   a6,6 passes
//   col 11  approx HA  (p7,4  p6,5)            -> S11 C11
//   col 10  approx FA  (p7,3  p6,4  a5,5)      -> S10 C10
//   col  9  approx FA  (p7,2  p6,3  p5,4)      -> S9  C9
//   col  8  approx 4-2 (p7,1  p6,2  p5,3 a4,4) -> S8  C8
//   col  7  approx 4-2 (p7,0  p6,1  p5,2 p4,3) -> S7  C7
//   col  6  approx 4-2 (p6,0  p5,1  p4,2 a3,3) -> S6  C6
//   col  5  approx FA  (p5,0  p4,1  p3,2)      -> S5  C5
//   col  4  approx HA  (p4,0  p3,1)            -> S4  C4    a2,2 passes
// C_i is the carry made in column i; it has the weight of column i+1.
// Stage 2 leaves at most two bits per column, using one approximate HA and
// eleven approximate FAs (inputs in x1, x2, x3 order):
//   col 13  FA (a7,6 a6,7 C12)   col 12  FA (S12 C11 a6,6)
//   col 11..5  FA (S_c G_c C_c-1)
//   col  4  FA (S4 a2,2 G4)      col  3  FA (p3,0 p2,1 G3)
//   col  2  HA (a2,0 a0,2)       a1,1 passes
// Outputs x and y are the two rows for the final adder: in column c, x holds
// the stage-2 sum (or the lone bit) and y the stage-2 carry from column c-1
// (or the second bit). y[0] is always 0.
//
// The cell kinds, their counts and which terms share a cell follow the
// reduction map of the design; the order of the inputs inside a cell (which
// matters for the FA, whose third input is not OR-ed) is read top to bottom
// from that map, and the choice of a2,0/a0,2 for the column-2 half adder is
// this implementation's. Of the p input only the altered pairs are read, so
// lint reports the rest as unused. Combinational; fixed to N = 8.
module approx_reduce_tree
  import approx_mult_pkg::*;
(
  input  pp_mat_t a,      // plain partial products [m][n]
  input  pp_mat_t p,      // propagate terms [m][n], m > n
  input  gcol_t   gcol,   // OR-ed generate bit per altered column
  output row_t    x,
  output row_t    y
);
  if (N != 8) begin : g_size_check
    $error("approx_reduce_tree is wired for N = 8");
  end

  // stage-1 sums and carries, indexed by the column of the cell
  logic [12:4] s1, c1;
  // stage-2 sums and carries, indexed by the column of the cell
  logic [13:2] s2, c2;

  // ---------------- stage 1 ----------------
  approx_ha     u_s1_c12 (.x1(a[7][5]), .x2(a[5][7]),                         .sum(s1[12]), .carry(c1[12]));
  approx_ha     u_s1_c11 (.x1(p[7][4]), .x2(p[6][5]),                         .sum(s1[11]), .carry(c1[11]));
  approx_fa     u_s1_c10 (.x1(p[7][3]), .x2(p[6][4]), .x3(a[5][5]),           .sum(s1[10]), .carry(c1[10]));
  approx_fa     u_s1_c9  (.x1(p[7][2]), .x2(p[6][3]), .x3(p[5][4]),           .sum(s1[9]),  .carry(c1[9]));
  approx_comp42 u_s1_c8  (.x1(p[7][1]), .x2(p[6][2]), .x3(p[5][3]), .x4(a[4][4]), .sum(s1[8]), .carry(c1[8]));
  approx_comp42 u_s1_c7  (.x1(p[7][0]), .x2(p[6][1]), .x3(p[5][2]), .x4(p[4][3]), .sum(s1[7]), .carry(c1[7]));
  approx_comp42 u_s1_c6  (.x1(p[6][0]), .x2(p[5][1]), .x3(p[4][2]), .x4(a[3][3]), .sum(s1[6]), .carry(c1[6]));
  approx_fa     u_s1_c5  (.x1(p[5][0]), .x2(p[4][1]), .x3(p[3][2]),           .sum(s1[5]),  .carry(c1[5]));
  approx_ha     u_s1_c4  (.x1(p[4][0]), .x2(p[3][1]),                         .sum(s1[4]),  .carry(c1[4]));

  // ---------------- stage 2 ----------------
  approx_fa u_s2_c13 (.x1(a[7][6]), .x2(a[6][7]),  .x3(c1[12]),  .sum(s2[13]), .carry(c2[13]));
  approx_fa u_s2_c12 (.x1(s1[12]),  .x2(c1[11]),   .x3(a[6][6]), .sum(s2[12]), .carry(c2[12]));
  for (genvar c = 5; c <= 11; c++) begin : g_s2_mid
    approx_fa u_fa (.x1(s1[c]), .x2(gcol[c]), .x3(c1[c-1]), .sum(s2[c]), .carry(c2[c]));
  end
  approx_fa u_s2_c4  (.x1(s1[4]),   .x2(a[2][2]),  .x3(gcol[4]), .sum(s2[4]),  .carry(c2[4]));
  approx_fa u_s2_c3  (.x1(p[3][0]), .x2(p[2][1]),  .x3(gcol[3]), .sum(s2[3]),  .carry(c2[3]));
  approx_ha u_s2_c2  (.x1(a[2][0]), .x2(a[0][2]),                .sum(s2[2]),  .carry(c2[2]));

  // ---------------- rows for the final adder ----------------
  always_comb begin
    x = '0;
    y = '0;
    x[0] = a[0][0];
    x[1] = a[1][0];
    y[1] = a[0][1];
    x[2] = s2[2];
    y[2] = a[1][1];
    for (int c = 3; c <= 13; c++) begin
      x[c] = s2[c];
      y[c] = c2[c-1];
    end
    x[14] = a[7][7];
    y[14] = c2[13];
  end
endmodule
