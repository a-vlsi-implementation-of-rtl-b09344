// Shared sizes of the 4-tap FIR filter built on the approximate Dadda multiplier.
// Sample and coefficient width, number of taps and the width of products and sums.
// All four numbers are the ones the design is published with: 8-bit unsigned operands,
// 16-bit products, four taps and a 16-bit output sum.
package fir_pkg;
  localparam int unsigned DATA_W = 8;           // sample and coefficient width
  localparam int unsigned PROD_W = 2 * DATA_W;  // multiplier product width
  localparam int unsigned TAPS   = 4;           // filter length
  localparam int unsigned OUT_W  = 16;          // output sum width (wraps modulo 2^OUT_W)

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [PROD_W-1:0] product_t;
endpackage
