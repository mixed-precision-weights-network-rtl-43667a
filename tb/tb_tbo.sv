// Self-checking testbench of tbo: for every finite half activation and the
// weights -1, 0 and +1 the result must equal x * w in value; for w = 0 the
// result is a zero carrying the activation's sign (-123 * 0 gives -0).
module tb_tbo;
  import mpwn_ref_pkg::*;

  logic [1:0]  w;
  logic [15:0] x, y, e;
  int checks = 0, failures = 0;

  tbo dut (.w(w), .x(x), .y(y));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] wv [3] = '{2'b11, 2'b00, 2'b01};
    for (int v = 0; v < 65536; v++) begin
      for (int s = 0; s < 3; s++) begin
        x = 16'(v);
        w = wv[s];
        #1;
        if (x[14:10] == 5'h1F) continue;
        case (s)
          0: e = (x[14:0] == 0) ? {~x[15], 15'd0} : r2h(-h2r(x));
          1: e = {x[15], 15'd0};
          default: e = x;
        endcase
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL tbo w=%b x=%h y=%h exp=%h", w, x, y, e);
        end
      end
    end
    x = 16'hD7B0; w = 2'b00; #1;           // -123 * 0 = -0
    checks++;
    if (y !== 16'h8000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
