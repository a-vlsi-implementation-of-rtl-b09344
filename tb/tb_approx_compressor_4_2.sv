// Exhaustive test of the approximate 4-2 compressor against its sixteen-row truth
// table, and of the number of inexact cases (five).
module tb_approx_compressor_4_2;
  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} for inputs x1x2x3x4 = 0000 .. 1111
  localparam logic [1:0] EXP [16] = '{
    2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b01, 2'b01, 2'b11,
    2'b01, 2'b01, 2'b01, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11};

  approx_compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs = 0;
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b got c=%b s=%b exp %b", 4'(v), carry, sum, EXP[v]);
      end
      if (2 * int'(carry) + int'(sum) != int'(x1) + int'(x2) + int'(x3) + int'(x4)) errs++;
    end
    checks++;
    if (errs != 5) begin
      failures++;
      $display("FAIL inexact cases %0d, expected 5", errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
