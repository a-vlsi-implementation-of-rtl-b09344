// Exhaustive test of the approximate half adder against its truth table
// (sum = OR, carry = AND; only 1+1 is wrong, giving 3).
module tb_approx_half_adder;
  logic x1, x2, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} for inputs 00, 01, 10, 11
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  approx_half_adder dut (.x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b got c=%b s=%b exp %b", 2'(v), carry, sum, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
