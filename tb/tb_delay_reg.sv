// Test of the delay register: synchronous reset clears q, q follows d one rising
// edge later, and reset wins over new data.
module tb_delay_reg;
  logic       clk = 0, rst;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;

  delay_reg #(.W(8)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 8'hA5;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    prev = d;
    for (int n = 0; n < 200; n++) begin
      d = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL q=%h exp %h", q, d); end
      // q holds between edges
      d = ~d; #2;
      checks++;
      if (q !== ~d) begin failures++; $display("FAIL q changed between edges"); end
    end
    rst = 1; d = 8'h3C;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset priority q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
