// Delay element of the FIR filter: a W-bit D register, q follows d one clock later.
// Rising-edge clocked, with an active-high synchronous reset that clears q to zero.
// The D-flip-flop delay element is the published design's; the reset polarity follows
// its simulation, while synchronous reset and the clock edge are this design's choice.
module delay_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
