// Self-checking testbench of batchnorm_relu in its two configurations: scale,
// shift and ReLU (batch-norm layers) and shift only (bias of the last layer).
// 3000 random inputs each, results compared bit for bit one cycle later; the
// number of inputs clamped by ReLU is counted and must not be zero.
module tb_batchnorm_relu;
  import mpwn_pkg::*;
  import mpwn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid;
  half_t x, scale, shift;
  logic  ov_a, ov_b;
  half_t y_a, y_b;

  batchnorm_relu #(.USE_SCALE(1'b1), .USE_RELU(1'b1)) u_a (.clk, .rst_n, .in_valid, .x, .scale, .shift,
    .out_valid(ov_a), .y(y_a));
  batchnorm_relu #(.USE_SCALE(1'b0), .USE_RELU(1'b0)) u_b (.clk, .rst_n, .in_valid, .x, .scale, .shift,
    .out_valid(ov_b), .y(y_b));

  int checks = 0, failures = 0, clamped = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h16_t ea, eb;
    in_valid = 0; x = 0; scale = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = 1;
      x     = rand_half(-8.0, 8.0);
      scale = rand_half(-2.0, 2.0);
      shift = rand_half(-1.0, 1.0);
      ea = ref_bn(x, scale, shift, 1'b1, 1'b1);
      eb = ref_bn(x, scale, shift, 1'b0, 1'b0);
      if (ref_add(ref_mul(x, scale), shift) != ea) clamped++;
      @(posedge clk);
      #1;
      checks += 2;
      if (!ov_a || y_a !== ea) begin
        failures++;
        if (failures < 10) $display("FAIL bn x=%h s=%h b=%h y=%h exp=%h", x, scale, shift, y_a, ea);
      end
      if (!ov_b || y_b !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL bias x=%h b=%h y=%h exp=%h", x, shift, y_b, eb);
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk);
    #1;
    checks++;
    if (ov_a || ov_b) failures++;
    checks++;
    if (clamped == 0) failures++;
    $display("ReLU clamped %0d of 3000", clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
