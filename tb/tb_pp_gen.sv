// Test of the partial-product generator: all 64 bits checked bit by bit for random
// and directed operands, including A=21, B=85 whose rows are PP0=PP2=PP4=PP6=00010101
// and PP1=PP3=PP5=PP7=0.
module tb_pp_gen;
  logic [7:0] a, b;
  logic [7:0] pp [8];
  int checks = 0, failures = 0;

  pp_gen #(.N(8)) dut (.a(a), .b(b), .pp(pp));

  task automatic check_all();
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (pp[i][j] !== (a[j] & b[i])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
        end
      end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd21; b = 8'd85; #1;
    check_all();
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (pp[i] !== ((i % 2 == 0) ? 8'b00010101 : 8'b0)) begin
        failures++;
        $display("FAIL PP%0d=%b", i, pp[i]);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a = 8'($urandom); b = 8'($urandom); #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
