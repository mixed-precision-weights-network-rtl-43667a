// Self-checking testbench of xsb: for every finite half activation and both
// binary weights, the result must equal the arithmetic product x * (+1 or -1).
module tb_xsb;
  import mpwn_ref_pkg::*;

  logic        w;
  logic [15:0] x, y, e;
  int checks = 0, failures = 0;

  xsb dut (.w(w), .x(x), .y(y));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int s = 0; s < 2; s++) begin
        x = 16'(v);
        w = 1'(s);
        #1;
        if (x[14:10] == 5'h1F) continue;
        // weight bit 1 is -1, weight bit 0 stands for +1
        e = (s == 1) ? r2h(-h2r(x)) : x;
        if (x[14:0] == 0) e = {x[15] ^ w, 15'd0};
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL xsb w=%0d x=%h y=%h exp=%h", s, x, y, e);
        end
      end
    end
    // the example of the design description: -123 times -1 is 123
    x = 16'hD7B0; w = 1'b1; #1;
    checks++;
    if (h2r(y) != 123.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
