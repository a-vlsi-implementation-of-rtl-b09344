// 4-tap direct-form FIR filter built from approximate Dadda multipliers.
//
//   y(n) = b0*x(n) + b1*x(n-1) + b2*x(n-2) + b3*x(n-3)
//
// x(n) enters a delay line of three D registers (MS0..MS2) giving X1..X3. Each tap
// sample is multiplied by its coefficient in an 8x8 approximate Dadda multiplier
// (A0..A3), and the products are summed by a chain of three carry-lookahead adders:
// Add0 = A0 + A1, Add1 = Add0 + A2, y(n) = Add1 + A3. Samples and coefficients are
// unsigned 8-bit; products and sums are 16-bit and the output wraps modulo 2^16.
//
// Timing: the delay line shifts on each rising clk edge; rst (active high,
// synchronous) clears it. y(n) is combinational from xn and the delay line, so it
// shows the current sample's output in the same cycle, with no output register.
// The structure, widths and signal names follow the published filter; the reset
// style, the missing output register and the 16-bit wrap-around are this design's
// reading of its simulation. The coefficient ports may change at any time.
// Sizes come from fir_pkg (DATA_W = 8, TAPS = 4, OUT_W = 16). They are not module
// parameters because the multiplier's reduction tree is drawn for 8x8 operands only
// and the coefficient ports b0..b3 fix the tap count.
module fir_filter_4tap
  import fir_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  sample_t          xn,
  input  sample_t          b0,
  input  sample_t          b1,
  input  sample_t          b2,
  input  sample_t          b3,
  output logic [OUT_W-1:0] yn
);

  sample_t  x [TAPS];     // x[0] = x(n), x[k] = x(n-k)
  sample_t  coef [TAPS];
  product_t prod [TAPS];  // A0..A3
  logic [OUT_W-1:0] acc [TAPS];  // acc[k] = sum of prod[0..k]; acc[1] = Add0, acc[2] = Add1

  assign x[0]    = xn;
  assign coef[0] = b0;
  assign coef[1] = b1;
  assign coef[2] = b2;
  assign coef[3] = b3;

  // Delay line
  for (genvar k = 1; k < TAPS; k++) begin : g_ms
    delay_reg #(.W(DATA_W)) u_ms (.clk(clk), .rst(rst), .d(x[k-1]), .q(x[k]));
  end

  // Multipliers
  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    approx_dadda_mult u_mul (.a(x[k]), .b(coef[k]), .product(prod[k]));
  end

  // Adder chain
  assign acc[0] = OUT_W'(prod[0]);
  for (genvar k = 1; k < TAPS; k++) begin : g_add
    logic cout_unused;
    cla_adder #(.W(OUT_W)) u_add (
      .a(acc[k-1]), .b(OUT_W'(prod[k])), .cin(1'b0), .sum(acc[k]), .cout(cout_unused));
  end

  assign yn = acc[TAPS-1];
endmodule
