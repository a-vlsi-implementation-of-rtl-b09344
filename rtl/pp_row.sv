// One partial-product row of the array multiplier: the multiplicand gated by a
// single multiplier bit, pp = a & {N{b}}. Combinational. Row i of the 8x8 multiplier
// is pp_row with b = B[i]; the row/column naming follows the published design.
module pp_row #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic         b,
  output logic [N-1:0] pp
);
  assign pp = a & {N{b}};
endmodule
