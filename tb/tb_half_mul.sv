// Self-checking testbench of half_mul: directed special cases (exact products,
// signed zeros, subnormal results, overflow, inf and NaN) and 20000 random
// operand pairs, compared bit for bit with the real-valued reference.
module tb_half_mul;
  import mpwn_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  half_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [15:0] ta, logic [15:0] tb_, logic [15:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (!h_same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL half_mul %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00, 16'h3C00);   // 1 * 1
    check(16'hD7B0, 16'hBC00, 16'h57B0);   // -123 * -1 = 123
    check(16'h4000, 16'h4200, 16'h4600);   // 2 * 3 = 6
    check(16'h0001, 16'h3800, 16'h0000);   // tiny * 0.5, tie to even -> 0
    check(16'h0003, 16'h3800, 16'h0002);   // 3*2^-24 * 0.5 -> tie to even 2
    check(16'h0400, 16'h3800, 16'h0200);   // min normal / 2 -> subnormal
    check(16'h7BFF, 16'h4000, 16'h7C00);   // overflow -> inf
    check(16'h7C00, 16'h0000, 16'h7E00);   // inf * 0 -> NaN
    check(16'hFC00, 16'h3C00, 16'hFC00);   // -inf * 1
    check(16'h8000, 16'h3C00, 16'h8000);   // -0 * 1 = -0
    check(16'h3555, 16'h3555, ref_mul(16'h3555, 16'h3555));
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom);
      rb = 16'($urandom);
      if (i % 2 == 0) begin               // keep half of the pairs in range
        ra[14] = 1'b0;
        rb[14] = 1'b0;
      end
      check(ra, rb, ref_mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
