// Partial-product generator of the N x N multiplier: N instances of pp_row, row i
// being a & {N{b[i]}}, so bit j of row i carries the weight 2^(i+j).
// Combinational. The split into one generator with N row instances follows the
// published design; the row function itself is the plain AND array.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    pp_row #(.N(N)) u_row (.a(a), .b(b[i]), .pp(pp[i]));
  end
endmodule
