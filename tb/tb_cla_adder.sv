// Test of the carry-lookahead adder against '+': a 16-bit instance (random operands
// and carry chains that ripple across every group) and a 7-bit instance, whose last
// group is short, tested exhaustively.
module tb_cla_adder;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [6:0]  a7, b7, s7;
  logic        ci7, co7;
  int checks = 0, failures = 0;

  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cla_adder #(.W(7))  dut7  (.a(a7),  .b(b7),  .cin(ci7),  .sum(s7),  .cout(co7));

  task automatic chk16();
    logic [16:0] e;
    #1;
    e = {1'b0, a16} + {1'b0, b16} + 17'(ci16);
    checks++;
    if ({co16, s16} !== e) begin
      failures++;
      $display("FAIL16 %h+%h+%b = %h, exp %h", a16, b16, ci16, {co16, s16}, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; chk16();
    a16 = 16'h7FFF; b16 = 16'h0001; ci16 = 1'b0; chk16();
    a16 = 16'hFFFF; b16 = 16'hFFFF; ci16 = 1'b1; chk16();
    a16 = 16'h00F0; b16 = 16'h0F10; ci16 = 1'b0; chk16();
    for (int n = 0; n < 50000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom); chk16();
    end
    for (int v = 0; v < (1 << 15); v++) begin
      logic [7:0] e;
      {ci7, a7, b7} = 15'(v);
      #1;
      e = {1'b0, a7} + {1'b0, b7} + 8'(ci7);
      checks++;
      if ({co7, s7} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL7 %h+%h+%b = %h, exp %h", a7, b7, ci7, {co7, s7}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
