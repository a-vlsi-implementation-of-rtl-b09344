// Exhaustive test of the approximate 8x8 Dadda multiplier.
// Every one of the 65536 operand pairs is compared with the bit-level reference model
// in tb_ref_pkg. Independently of that model, the test also checks figures of the
// whole product table that were worked out separately: the sum of all 65536 products
// (972052864), the number of exact products (11937), and a few single products.
module tb_approx_dadda_mult;
  import tb_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] product;
  int checks = 0, failures = 0;

  approx_dadda_mult dut (.a(a), .b(b), .product(product));

  task automatic expect_product(input int unsigned av, bv, pv);
    a = 8'(av); b = 8'(bv); #1;
    checks++;
    if (product !== 16'(pv)) begin
      failures++;
      $display("FAIL %0d*%0d = %0d, expected %0d", av, bv, product, pv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned total = 0;
    int exact = 0;
    for (int v = 0; v < 65536; v++) begin
      int unsigned r;
      a = v[7:0]; b = v[15:8]; #1;
      r = approx_mul_ref(a, b);
      checks++;
      if (product !== 16'(r)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d, ref %0d", a, b, product, r);
      end
      total += product;
      if (int'(product) == int'(a) * int'(b)) exact++;
    end
    checks++;
    if (total != 64'd972052864) begin
      failures++; $display("FAIL product sum %0d", total);
    end
    checks++;
    if (exact != 11937) begin
      failures++; $display("FAIL exact count %0d", exact);
    end
    expect_product(21, 85, 1389);
    expect_product(26, 84, 2056);
    expect_product(255, 255, 49157);
    expect_product(200, 100, 19232);
    expect_product(7, 9, 63);
    expect_product(10, 1, 10);
    expect_product(10, 2, 20);
    expect_product(10, 3, 30);
    expect_product(10, 8, 80);
    $display("exact products: %0d of 65536", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
