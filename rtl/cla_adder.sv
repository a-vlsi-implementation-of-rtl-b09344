// Exact W-bit carry-lookahead adder: sum = a + b + cin (mod 2^W), cout = carry out.
// Bits are grouped in fours. Inside a group each carry is formed directly from the
// bit generate/propagate terms and the group carry-in; each group also forms a group
// generate/propagate pair, and the carry into every group is looked ahead from those
// pairs. W need not be a multiple of four (the last group is short).
// Combinational. The design calls for a carry-lookahead adder but does not give its
// structure; the 4-bit grouping is this implementation's choice.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;   // number of 4-bit groups

  logic [W-1:0]  g, p;      // bit generate / propagate
  logic [W:0]    c;         // carry into each bit
  logic [NG-1:0] gg, gp;    // group generate / propagate
  logic [NG:0]   gc;        // carry into each group

  assign g = a & b;
  assign p = a ^ b;

  // Group generate/propagate
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int i = 4 * k; i < 4 * k + 4 && i < W; i++) begin
        gg[k] = g[i] | (p[i] & gg[k]);
        gp[k] = gp[k] & p[i];
      end
    end
  end

  // Lookahead carries into the groups: gc[k+1] expanded as a sum of products
  always_comb begin
    gc[0] = cin;
    for (int k = 0; k < NG; k++) begin
      logic term;
      gc[k+1] = gg[k];
      for (int j = 0; j < k; j++) begin
        term = gg[j];
        for (int m = j + 1; m <= k; m++) term = term & gp[m];
        gc[k+1] = gc[k+1] | term;
      end
      term = cin;
      for (int m = 0; m <= k; m++) term = term & gp[m];
      gc[k+1] = gc[k+1] | term;
    end
  end

  // Carries inside each group, looked ahead from the group carry-in
  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic t;
      int   base;
      base = (i / 4) * 4;
      c[i+1] = g[i];
      for (int j = base; j < i; j++) begin
        t = g[j];
        for (int m = j + 1; m <= i; m++) t = t & p[m];
        c[i+1] = c[i+1] | t;
      end
      t = gc[i/4];
      for (int m = base; m <= i; m++) t = t & p[m];
      c[i+1] = c[i+1] | t;
    end
    c[0] = cin;
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = gc[NG];
endmodule
