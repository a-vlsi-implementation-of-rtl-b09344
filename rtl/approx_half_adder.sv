// Approximate half adder.
// The XOR of an exact half adder is replaced by an OR: sum = x1 | x2, carry = x1 & x2.
// The only wrong case is 1+1, which yields carry=1, sum=1 (3 instead of 2).
// Purely combinational. The equations are those of the published design.
module approx_half_adder (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 | x2;
  assign carry = x1 & x2;
endmodule
