// Reference model of the approximate 8x8 multiplier for the testbenches.
// It evaluates the same reduction as the RTL, written independently as a bit-level
// function: altered partial products, stage-1 cells, OR-ed generates, stage-2 cells
// and an ordinary '+' for the final addition.
package tb_ref_pkg;
  function automatic void rha(input bit x1, x2, output bit s, c);
    s = x1 | x2; c = x1 & x2;
  endfunction
  function automatic void rfa(input bit x1, x2, x3, output bit s, c);
    bit w; w = x1 | x2; s = w ^ x3; c = w & x3;
  endfunction
  function automatic void rc42(input bit x1, x2, x3, x4, output bit s, c);
    s = (x1 ^ x2) | (x3 ^ x4) | (x1 & x2 & x3 & x4);
    c = (x1 & x2) | (x3 & x4);
  endfunction

  function automatic int unsigned approx_mul_ref(input int unsigned av, input int unsigned bv);
    bit aa [8][8];
    bit s [16];
    bit c [16];
    bit gg [16];
    bit x [16];
    bit y [16];
    int unsigned xs, ys;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        aa[i][j] = bit'((bv >> i) & 1) & bit'((av >> j) & 1);
    for (int k = 0; k < 16; k++) begin
      s[k] = 0; c[k] = 0; gg[k] = 0; x[k] = 0; y[k] = 0;
    end
    // generate terms: OR over pairs (i > j) with i + j == k, columns 3..11
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < i; j++)
        if (i + j >= 3 && i + j <= 11) gg[i+j] = gg[i+j] | (aa[i][j] & aa[j][i]);
    rha(aa[7][5], aa[5][7], s[12], c[12]);
    rha(aa[7][4] | aa[4][7], aa[6][5] | aa[5][6], s[11], c[11]);
    rfa(aa[7][3] | aa[3][7], aa[6][4] | aa[4][6], aa[5][5], s[10], c[10]);
    rfa(aa[7][2] | aa[2][7], aa[6][3] | aa[3][6], aa[5][4] | aa[4][5], s[9], c[9]);
    rc42(aa[7][1] | aa[1][7], aa[6][2] | aa[2][6], aa[5][3] | aa[3][5], aa[4][4], s[8], c[8]);
    rc42(aa[7][0] | aa[0][7], aa[6][1] | aa[1][6], aa[5][2] | aa[2][5], aa[4][3] | aa[3][4], s[7], c[7]);
    rc42(aa[6][0] | aa[0][6], aa[5][1] | aa[1][5], aa[4][2] | aa[2][4], aa[3][3], s[6], c[6]);
    rfa(aa[5][0] | aa[0][5], aa[4][1] | aa[1][4], aa[3][2] | aa[2][3], s[5], c[5]);
    rha(aa[4][0] | aa[0][4], aa[3][1] | aa[1][3], s[4], c[4]);
    x[0] = aa[0][0];
    x[1] = aa[1][0]; y[1] = aa[0][1];
    rha(aa[2][0], aa[0][2], x[2], y[3]); y[2] = aa[1][1];
    rfa(aa[3][0] | aa[0][3], aa[2][1] | aa[1][2], gg[3], x[3], y[4]);
    rfa(s[4], aa[2][2], gg[4], x[4], y[5]);
    for (int k = 5; k <= 11; k++) rfa(s[k], gg[k], c[k-1], x[k], y[k+1]);
    rfa(s[12], c[11], aa[6][6], x[12], y[13]);
    rfa(aa[7][6], aa[6][7], c[12], x[13], y[14]);
    x[14] = aa[7][7];
    xs = 0; ys = 0;
    for (int k = 0; k < 16; k++) begin
      xs |= int'(x[k]) << k;
      ys |= int'(y[k]) << k;
    end
    return (xs + ys) & 32'hFFFF;
  endfunction
endpackage
