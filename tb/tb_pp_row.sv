// Exhaustive test of one partial-product row: pp must equal a when b = 1, else 0.
module tb_pp_row;
  logic [7:0] a, pp;
  logic       b;
  int checks = 0, failures = 0;

  pp_row #(.N(8)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      a = v[7:0];
      b = v[8];
      #1;
      checks++;
      if (pp !== (b ? a : 8'h00)) begin
        failures++;
        $display("FAIL a=%h b=%b pp=%h", a, b, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
