// tb_ref_pkg: reference model of the 8x8 approximate multiplier, for the
// testbenches only.
//
// The model is written independently of the RTL: the approximate cells are
// evaluated by looking up their published truth tables (not their logic
// equations), the generate columns by counting ones, and the reduction map is
// held as a list of cells over a flat array of numbered signals. Alongside
// the product it counts how often each kind of cell hit one of its error
// patterns, and the signed error each contributed, so that a testbench can
// check the identity  product = alpha*beta + sum(errors)  as well.
package tb_ref_pkg;

  // ---- truth tables, indexed by the inputs read as a binary number {x1,x2,..}
  localparam logic [3:0]  HA_SUM  = 4'b1110;
  localparam logic [3:0]  HA_CAR  = 4'b1000;
  localparam logic [7:0]  FA_SUM  = 8'b0101_0110;
  localparam logic [7:0]  FA_CAR  = 8'b1010_1000;
  localparam logic [15:0] C42_SUM = 16'b1110_1111_1111_0110;
  localparam logic [15:0] C42_CAR = 16'b1111_1000_1000_1000;

  // ---- signal numbering of the flat signal array
  localparam int SA  = 0;     // a(m,n)  at SA + 8m + n
  localparam int SP  = 64;    // p(m,n)  at SP + 8m + n
  localparam int SG  = 128;   // G_c     at SG + c
  localparam int SS1 = 144;   // stage-1 sum of column c
  localparam int SC1 = 160;   // stage-1 carry of column c
  localparam int SS2 = 176;   // stage-2 sum of column c
  localparam int SC2 = 192;   // stage-2 carry of column c
  localparam int NSIG = 208;

  function automatic int A(int m, int n); return SA + 8*m + n; endfunction
  function automatic int P(int m, int n); return SP + 8*m + n; endfunction

  typedef enum int {EV_HA = 0, EV_FA = 1, EV_C42 = 2, EV_OR = 3} ev_t;

  typedef struct {
    longint ev_count[4];   // cell evaluations that hit an error pattern
    longint err;           // signed sum of all error contributions
  } ev_acc_t;

  // One cell evaluation; writes its sum/carry into the signal array.
  function automatic void eval_cell(ref bit sig[NSIG], ref ev_acc_t acc,
                               input int kind, input int col, input int stage,
                               input int i1, input int i2, input int i3 = -1,
                               input int i4 = -1);
    int idx, ones;
    bit s, c;
    ones = sig[i1] + sig[i2] + ((i3 >= 0) ? sig[i3] : 0) + ((i4 >= 0) ? sig[i4] : 0);
    case (kind)
      0: begin idx = {sig[i1], sig[i2]};                   s = HA_SUM[idx];  c = HA_CAR[idx];  end
      1: begin idx = {sig[i1], sig[i2], sig[i3]};          s = FA_SUM[idx];  c = FA_CAR[idx];  end
      default: begin idx = {sig[i1], sig[i2], sig[i3], sig[i4]}; s = C42_SUM[idx]; c = C42_CAR[idx]; end
    endcase
    if (s + 2*c != ones) begin
      acc.ev_count[kind]++;
      acc.err += (longint'(s + 2*c) - ones) <<< col;
    end
    if (stage == 1) begin sig[SS1+col] = s; sig[SC1+col] = c; end
    else            begin sig[SS2+col] = s; sig[SC2+col] = c; end
  endfunction

  // Approximate product of alpha and beta.
  function automatic logic [15:0] ref_mult(input logic [7:0] al, input logic [7:0] be,
                                           ref ev_acc_t acc);
    bit sig[NSIG];
    int x[15], y[15];
    int sum;
    foreach (sig[i]) sig[i] = 0;
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++)
        sig[A(m,n)] = al[m] & be[n];
    // propagate terms and generate columns 3..11
    for (int c = 3; c <= 11; c++) begin
      int cnt = 0;
      for (int m = 0; m < 8; m++) begin
        int n = c - m;
        if (n >= 0 && n < m) begin
          sig[P(m,n)] = sig[A(m,n)] | sig[A(n,m)];
          cnt += sig[A(m,n)] & sig[A(n,m)];
        end
      end
      sig[SG+c] = (cnt != 0);
      if (cnt > 1) begin
        acc.ev_count[EV_OR]++;
        acc.err -= longint'(cnt - 1) <<< c;
      end
    end
    // stage 1: kind 0 = HA, 1 = FA, 2 = 4-2 compressor
    eval_cell(sig, acc, 0, 12, 1, A(7,5), A(5,7));
    eval_cell(sig, acc, 0, 11, 1, P(7,4), P(6,5));
    eval_cell(sig, acc, 1, 10, 1, P(7,3), P(6,4), A(5,5));
    eval_cell(sig, acc, 1,  9, 1, P(7,2), P(6,3), P(5,4));
    eval_cell(sig, acc, 2,  8, 1, P(7,1), P(6,2), P(5,3), A(4,4));
    eval_cell(sig, acc, 2,  7, 1, P(7,0), P(6,1), P(5,2), P(4,3));
    eval_cell(sig, acc, 2,  6, 1, P(6,0), P(5,1), P(4,2), A(3,3));
    eval_cell(sig, acc, 1,  5, 1, P(5,0), P(4,1), P(3,2));
    eval_cell(sig, acc, 0,  4, 1, P(4,0), P(3,1));
    // stage 2
    eval_cell(sig, acc, 1, 13, 2, A(7,6), A(6,7), SC1+12);
    eval_cell(sig, acc, 1, 12, 2, SS1+12, SC1+11, A(6,6));
    for (int c = 11; c >= 5; c--)
      eval_cell(sig, acc, 1, c, 2, SS1+c, SG+c, SC1+c-1);
    eval_cell(sig, acc, 1,  4, 2, SS1+4, A(2,2), SG+4);
    eval_cell(sig, acc, 1,  3, 2, P(3,0), P(2,1), SG+3);
    eval_cell(sig, acc, 0,  2, 2, A(2,0), A(0,2));
    // rows for the final adder
    foreach (x[i]) begin x[i] = 0; y[i] = 0; end
    x[0] = sig[A(0,0)];
    x[1] = sig[A(1,0)];  y[1] = sig[A(0,1)];
    x[2] = sig[SS2+2];   y[2] = sig[A(1,1)];
    for (int c = 3; c <= 13; c++) begin x[c] = sig[SS2+c]; y[c] = sig[SC2+c-1]; end
    x[14] = sig[A(7,7)]; y[14] = sig[SC2+13];
    sum = 0;
    for (int c = 0; c < 15; c++) sum += (x[c] + y[c]) << c;
    return 16'(sum);
  endfunction

endpackage
