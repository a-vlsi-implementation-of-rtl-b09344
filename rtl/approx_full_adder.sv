// Approximate full adder.
// One of the two XORs of the sum is replaced by an OR, and the carry reuses it:
//   w = x1 | x2;  sum = w ^ x3;  carry = w & x3.
// Two of eight input cases are wrong (110 gives 1 instead of 2, 111 gives 2 instead
// of 3); the error is never more than one. Purely combinational; the equations are
// those of the published design.
module approx_full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  logic w;
  assign w     = x1 | x2;
  assign sum   = w ^ x3;
  assign carry = w & x3;
endmodule
