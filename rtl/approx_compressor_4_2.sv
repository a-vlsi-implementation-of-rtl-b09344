// Approximate 4-2 compressor.
// Reduces four bits of one column to a sum bit (same weight) and a carry bit (next
// weight), with no carry-in or carry-out, as the published design defines it:
//   w1 = x1 & x2;  w2 = x3 & x4;
//   sum   = (x1 ^ x2) | (x3 ^ x4) | (w1 & w2);
//   carry = w1 | w2.
// Five of the sixteen input cases are off by one (for example 0101 gives 1 instead
// of 2, and 1111 gives 3 instead of 4). Purely combinational.
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic w1, w2;
  assign w1    = x1 & x2;
  assign w2    = x3 & x4;
  assign sum   = (x1 ^ x2) | (x3 ^ x4) | (w1 & w2);
  assign carry = w1 | w2;
endmodule
