// 8x8 unsigned approximate Dadda multiplier.
//
// How it works
//   1. pp_gen forms the 64 partial products a[i][j] = B[i] & A[j] (weight 2^(i+j)).
//   2. Altered partial products: each pair a[i][j], a[j][i] (i > j) of one column is
//      replaced by p[i][j] = a[i][j] | a[j][i] and g[i][j] = a[i][j] & a[j][i].
//      This is exact (a + b = (a | b) + (a & b)); the g terms are rarely one.
//   3. Stage 1 reduces the p terms with approximate half adders (columns 4, 11, 12),
//      approximate full adders (columns 5, 9, 10) and approximate 4-2 compressors
//      (columns 6, 7, 8), producing S[k] in column k and C[k] into column k+1.
//      The g terms of each column 3..11 are merged by one OR gate into G[k].
//   4. Stage 2 reduces every column to two rows x, y with approximate full adders
//      (columns 3..13) and an approximate half adder in column 2.
//   5. A 16-bit carry-lookahead adder adds x and y.
// The cell-to-column assignment of steps 3 and 4 is the published reduction diagram,
// cell for cell. Reading p/g as OR/AND of the mirrored pair, reading the column-2
// cell as a half adder on a[2][0], a[0][2] with a[1][1] passed on, and using a CLA
// for the last step are interpretations made by this implementation.
//
// Interface and timing: purely combinational, product valid after the adder delay.
// The result is approximate: about 18% of all 65536 operand pairs are exact, e.g.
// 10 * {1,2,3,8} are exact while 21 * 85 gives 1389 (exact 1785).
module approx_dadda_mult
  import fir_pkg::*;
(
  input  sample_t  a,
  input  sample_t  b,
  output product_t product
);
  logic [7:0] pp [8];          // pp[i][j] = b[i] & a[j]
  logic [7:0] p  [8];          // p[i][j], i > j
  logic [7:0] g  [8];          // g[i][j], i > j
  logic [12:4] S, C;           // stage-1 sums and carries, indexed by column
  logic [11:3] G;              // OR-ed generate terms, indexed by column
  logic [15:0] x, y;           // the two rows left after stage 2

  pp_gen #(.N(8)) u_pp (.a(a), .b(b), .pp(pp));

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        if (i > j) begin
          p[i][j] = pp[i][j] | pp[j][i];
          g[i][j] = pp[i][j] & pp[j][i];
        end else begin
          p[i][j] = 1'b0;
          g[i][j] = 1'b0;
        end
      end
    end
  end

  // ---------------- Stage 1 ----------------
  approx_half_adder     u_s1_c12 (.x1(pp[7][5]), .x2(pp[5][7]), .sum(S[12]), .carry(C[12]));
  approx_half_adder     u_s1_c11 (.x1(p[7][4]),  .x2(p[6][5]),  .sum(S[11]), .carry(C[11]));
  approx_full_adder     u_s1_c10 (.x1(p[7][3]),  .x2(p[6][4]),  .x3(pp[5][5]),
                                  .sum(S[10]), .carry(C[10]));
  approx_full_adder     u_s1_c9  (.x1(p[7][2]),  .x2(p[6][3]),  .x3(p[5][4]),
                                  .sum(S[9]),  .carry(C[9]));
  approx_compressor_4_2 u_s1_c8  (.x1(p[7][1]),  .x2(p[6][2]),  .x3(p[5][3]), .x4(pp[4][4]),
                                  .sum(S[8]),  .carry(C[8]));
  approx_compressor_4_2 u_s1_c7  (.x1(p[7][0]),  .x2(p[6][1]),  .x3(p[5][2]), .x4(p[4][3]),
                                  .sum(S[7]),  .carry(C[7]));
  approx_compressor_4_2 u_s1_c6  (.x1(p[6][0]),  .x2(p[5][1]),  .x3(p[4][2]), .x4(pp[3][3]),
                                  .sum(S[6]),  .carry(C[6]));
  approx_full_adder     u_s1_c5  (.x1(p[5][0]),  .x2(p[4][1]),  .x3(p[3][2]),
                                  .sum(S[5]),  .carry(C[5]));
  approx_half_adder     u_s1_c4  (.x1(p[4][0]),  .x2(p[3][1]),  .sum(S[4]),  .carry(C[4]));

  // OR gates over the generate terms of each column
  always_comb begin
    G[11]    = g[7][4] | g[6][5];
    G[10]    = g[7][3] | g[6][4];
    G[9]     = g[7][2] | g[6][3] | g[5][4];
    G[8]     = g[7][1] | g[6][2] | g[5][3];
    G[7]     = g[7][0] | g[6][1] | g[5][2] | g[4][3];
    G[6]     = g[6][0] | g[5][1] | g[4][2];
    G[5]     = g[5][0] | g[4][1] | g[3][2];
    G[4]     = g[4][0] | g[3][1];
    G[3]     = g[3][0] | g[2][1];
  end

  // ---------------- Stage 2 ----------------
  assign x[0] = pp[0][0];
  assign y[0] = 1'b0;
  assign x[1] = pp[1][0];
  assign y[1] = pp[0][1];
  assign y[2] = pp[1][1];
  approx_half_adder u_s2_c2  (.x1(pp[2][0]), .x2(pp[0][2]), .sum(x[2]), .carry(y[3]));
  approx_full_adder u_s2_c3  (.x1(p[3][0]), .x2(p[2][1]), .x3(G[3]),     .sum(x[3]), .carry(y[4]));
  approx_full_adder u_s2_c4  (.x1(S[4]),    .x2(pp[2][2]), .x3(G[4]),    .sum(x[4]), .carry(y[5]));
  for (genvar k = 5; k <= 11; k++) begin : g_s2
    approx_full_adder u_fa (.x1(S[k]), .x2(G[k]), .x3(C[k-1]), .sum(x[k]), .carry(y[k+1]));
  end
  approx_full_adder u_s2_c12 (.x1(S[12]),    .x2(C[11]),    .x3(pp[6][6]), .sum(x[12]), .carry(y[13]));
  approx_full_adder u_s2_c13 (.x1(pp[7][6]), .x2(pp[6][7]), .x3(C[12]),    .sum(x[13]), .carry(y[14]));
  assign x[14] = pp[7][7];
  assign x[15] = 1'b0;
  assign y[15] = 1'b0;

  // ---------------- Final addition ----------------
  logic cout_unused;
  cla_adder #(.W(16)) u_cla (.a(x), .b(y), .cin(1'b0), .sum(product), .cout(cout_unused));
endmodule
