// Exhaustive test of the approximate full adder against its eight-row truth table.
module tb_approx_full_adder;
  logic x1, x2, x3, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} for inputs x1x2x3 = 000 .. 111
  localparam logic [1:0] EXP [8] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b01, 2'b10};

  approx_full_adder dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs = 0;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b got c=%b s=%b exp %b", 3'(v), carry, sum, EXP[v]);
      end
      if (2 * int'(carry) + int'(sum) != int'(x1) + int'(x2) + int'(x3)) errs++;
    end
    // two of the eight cases are approximate
    checks++;
    if (errs != 2) begin
      failures++;
      $display("FAIL wrong cases %0d, expected 2", errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
