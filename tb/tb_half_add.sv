// Self-checking testbench of half_add: directed cases (exact sums, cancellation
// to +0, -0 + -0, rounding ties, subnormals, overflow, inf and NaN) and 20000
// random operand pairs compared bit for bit with the real-valued reference,
// half of them with close exponents so that cancellation is exercised.
module tb_half_add;
  import mpwn_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  half_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [15:0] ta, logic [15:0] tb_, logic [15:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (!h_same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL half_add %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00, 16'h4000);   // 1 + 1 = 2
    check(16'h3C00, 16'hBC00, 16'h0000);   // 1 - 1 = +0
    check(16'h8000, 16'h8000, 16'h8000);   // -0 + -0 = -0
    check(16'h8000, 16'h0000, 16'h0000);   // -0 + +0 = +0
    check(16'h3C00, 16'h1000, 16'h3C00);   // 1 + 2^-11 -> tie, stays even
    check(16'h3C01, 16'h1000, 16'h3C02);   // odd + half ulp -> rounds up
    check(16'h0001, 16'h0001, 16'h0002);   // subnormal sum
    check(16'h03FF, 16'h0001, 16'h0400);   // subnormal to normal
    check(16'h7BFF, 16'h7BFF, 16'h7C00);   // overflow
    check(16'h7C00, 16'hFC00, 16'h7E00);   // inf - inf
    check(16'h7C00, 16'h3C00, 16'h7C00);
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom);
      rb = 16'($urandom);
      if (ra[14:10] == 5'h1F) ra[14] = 1'b0;
      if (rb[14:10] == 5'h1F) rb[14] = 1'b0;
      if (i % 2 == 0) rb[14:10] = ra[14:10] ^ 5'(($urandom % 2));
      check(ra, rb, ref_add(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
