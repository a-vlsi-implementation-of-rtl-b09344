// End-to-end test of the 4-tap FIR filter at its default sizes.
//
// Phase 1 repeats the published simulation: with reset released, x(n) = 10 held and
// coefficients 1, 2, 3, 8, the output must step through 10, 30, 60, 140 on
// consecutive cycles as the delay line fills, and the internal partial sums must be
// 30 and 60 once the delay line is full.
// Phase 2 drives random samples and coefficients (with a stretch of large values) and
// compares y(n) every cycle with a model that keeps its own sample history and uses
// the reference multiplier. A mid-run reset checks that the delay line clears.
// Counted mechanisms, each of which must occur: reset clearing the delay line, a
// sample reaching the last tap, an approximate product (differs from the exact one),
// and the 16-bit output wrapping around.
module tb_fir_filter_4tap;
  import tb_ref_pkg::*;
  logic        clk = 0, rst;
  logic [7:0]  xn, b0, b1, b2, b3;
  logic [15:0] yn;
  int checks = 0, failures = 0;
  int n_reset = 0, n_last_tap = 0, n_approx = 0, n_wrap = 0;
  int unsigned hist [4];      // model delay line: hist[k] = x(n-k)

  fir_filter_4tap dut (.clk(clk), .rst(rst), .xn(xn), .b0(b0), .b1(b1), .b2(b2), .b3(b3), .yn(yn));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare yn with the model just before a rising edge, then advance the model.
  task automatic step(input int expected = -1);
    int unsigned co [4];
    int unsigned y_ref = 0, y_exact = 0;
    co = '{b0, b1, b2, b3};
    hist[0] = xn;
    #4;  // let the combinational path settle (edges are at multiples of 10)
    for (int k = 0; k < 4; k++) begin
      int unsigned pr;
      pr = approx_mul_ref(hist[k], co[k]);
      if (pr != hist[k] * co[k]) n_approx++;
      y_ref += pr;
      y_exact += hist[k] * co[k];
    end
    if (y_ref > 16'hFFFF) n_wrap++;
    if (hist[3] != 0) n_last_tap++;
    if (expected >= 0) begin
      checks++;
      if (yn !== 16'(expected)) begin
        failures++;
        $display("FAIL published example: yn=%0d expected %0d", yn, expected);
      end
    end
    checks++;
    if (yn !== 16'(y_ref)) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t yn=%0d ref=%0d (exact %0d)", $time, yn, 16'(y_ref), y_exact);
    end
    @(posedge clk);
    if (rst) begin
      hist = '{0, 0, 0, 0};
    end else begin
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
    end
    #1;
  endtask

  initial begin
    int unsigned fig [4] = '{10, 30, 60, 140};
    hist = '{0, 0, 0, 0};
    rst = 1; xn = 8'd10; b0 = 8'd1; b1 = 8'd2; b2 = 8'd3; b3 = 8'd8;
    @(posedge clk); #1;
    @(posedge clk); #1;
    rst = 0;
    // Phase 1: published example
    for (int n = 0; n < 4; n++) step(int'(fig[n]));
    #4;
    checks++;
    if (dut.acc[1] !== 16'd30 || dut.acc[2] !== 16'd60) begin
      failures++;
      $display("FAIL partial sums Add0=%0d Add1=%0d", dut.acc[1], dut.acc[2]);
    end
    // Phase 2: random traffic
    for (int n = 0; n < 1500; n++) begin
      if (n % 16 == 0) begin
        b0 = 8'($urandom); b1 = 8'($urandom); b2 = 8'($urandom); b3 = 8'($urandom);
      end
      if (n >= 600 && n < 700) begin
        xn = 8'(200 + $urandom_range(0, 55));
        b0 = 8'(200 + $urandom_range(0, 55)); b1 = 8'(200 + $urandom_range(0, 55));
        b2 = 8'(200 + $urandom_range(0, 55)); b3 = 8'(200 + $urandom_range(0, 55));
      end else begin
        xn = 8'($urandom);
      end
      rst = (n == 1000);
      if (rst) n_reset++;
      step();
      if (n == 1000) begin
        checks++;
        if (dut.x[1] !== 8'd0 || dut.x[2] !== 8'd0 || dut.x[3] !== 8'd0) begin
          failures++;
          $display("FAIL delay line not cleared by reset");
        end
      end
    end
    rst = 0;
    $display("mechanisms: reset=%0d last_tap=%0d approx_products=%0d wraps=%0d",
             n_reset, n_last_tap, n_approx, n_wrap);
    checks += 4;
    if (n_reset == 0)    begin failures++; $display("FAIL reset never exercised"); end
    if (n_last_tap == 0) begin failures++; $display("FAIL last tap never reached"); end
    if (n_approx == 0)   begin failures++; $display("FAIL no approximate product seen"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL output never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
