// End-to-end testbench of mpwn_lenet5_top at its default (FTTTF, full LeNet-5)
// size.  It builds a random 28x28 image with pixel values k/255, random weights
// of each layer's weight space and random batch-norm parameters, loads all of
// them through the load port, runs one inference and compares
//   - the flattened 256-vector, the FC#3 and FC#4 outputs and the 10 logits,
//     bit for bit, with a reference network evaluated in the same order;
//   - the cycle count of every stage with the engines' schedule;
// and it counts that each mechanism of the design happened: every stage ran,
// ReLU clamped values, ternary zero weights were skipped by TBO, lanes were
// masked, pooling picked a non-first window element.
// A second inference with a new image checks that the accelerator restarts.
module tb_mpwn_lenet5_top;
  import mpwn_pkg::*;
  import mpwn_ref_pkg::*;

  // Must match the top's defaults.
  localparam int WS [5] = '{0, 2, 2, 2, 0};   // F T T T F
  localparam int LC = 8, LF = 16;
  localparam int IMG = 28, K = 5, C1 = 6, C2 = 16, F3 = 120, F4 = 84, NC = 10;
  localparam int H1 = IMG - K + 1, P1 = H1 / 2, H2 = P1 - K + 1, P2 = H2 / 2, NFL = C2 * P2 * P2;
  localparam int NT1 = K * K, NT2 = C1 * K * K;
  localparam int WD1 = (NT1 + LC - 1) / LC, WD2 = (NT2 + LC - 1) / LC;
  localparam int WD3 = (NFL + LF - 1) / LF, WD4 = (F3 + LF - 1) / LF, WD5 = (F4 + LF - 1) / LF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  load_req_t ld;
  logic      start, busy, done;
  stage_e    stage;
  half_t     logits [NC];

  mpwn_lenet5_top dut (.clk, .rst_n, .ld, .start, .busy, .done, .stage, .logits);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // cycles spent in each stage
  int stage_cycles [8];
  always @(posedge clk) if (rst_n) stage_cycles[stage] <= stage_cycles[stage] + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(ld_target_e tg, ld_kind_e k, int addr, logic [255:0] data);
    @(negedge clk);
    ld.valid = 1; ld.target = tg; ld.kind = k; ld.addr = 16'(addr); ld.data = data;
    @(negedge clk);
    ld.valid = 0;
  endtask

  task automatic expect_h(string what, int i, h16_t got, h16_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 12) $display("FAIL %s[%0d] = %h, expected %h", what, i, got, exp_v);
    end
  endtask

  task automatic expect_i(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, exp_v);
    end
  endtask

  // mechanism counters
  int n_relu_clamp = 0, n_tbo_zero = 0, n_masked = 0, n_pool_nonfirst = 0;

  function automatic int count_zero(h16_t v[]);
    int c = 0;
    foreach (v[i]) if (v[i] == 16'h0000) c++;
    return c;
  endfunction

  function automatic int count_nonfirst(int c, int ih, int iw, h16_t x[], h16_t y[]);
    int n = 0;
    for (int ch = 0; ch < c; ch++)
      for (int m = 0; m < ih / 2; m++)
        for (int l = 0; l < iw / 2; l++)
          if (y[ch*(ih/2)*(iw/2) + m*(iw/2) + l] !== x[ch*ih*iw + 2*m*iw + 2*l]) n++;
    return n;
  endfunction

  initial begin
    h16_t img[], w1[], w2[], w3[], w4[], w5[];
    h16_t s1[], b1[], s2[], b2[], s3[], b3[], s4[], b4[], bias5[], ones[];
    h16_t y1[], q1[], y2[], q2[], y3[], y4[], y5[];
    int   t0;

    ld = '0; start = 0;
    foreach (stage_cycles[i]) stage_cycles[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- parameters ----
    w1 = new[C1*NT1];  foreach (w1[i]) w1[i] = rand_weight(WS[0], 0.3);
    w2 = new[C2*NT2];  foreach (w2[i]) w2[i] = rand_weight(WS[1], 0.3);
    w3 = new[F3*NFL];  foreach (w3[i]) w3[i] = rand_weight(WS[2], 0.3);
    w4 = new[F4*F3];   foreach (w4[i]) w4[i] = rand_weight(WS[3], 0.3);
    w5 = new[NC*F4];   foreach (w5[i]) w5[i] = rand_weight(WS[4], 0.3);
    s1 = new[C1]; b1 = new[C1]; s2 = new[C2]; b2 = new[C2];
    s3 = new[F3]; b3 = new[F3]; s4 = new[F4]; b4 = new[F4]; bias5 = new[NC]; ones = new[NC];
    foreach (s1[i]) begin s1[i] = rand_half(0.5, 1.5);  b1[i] = rand_half(-0.3, 0.3); end
    foreach (s2[i]) begin s2[i] = rand_half(0.1, 0.4);  b2[i] = rand_half(-0.3, 0.3); end
    foreach (s3[i]) begin s3[i] = rand_half(0.05, 0.2); b3[i] = rand_half(-0.3, 0.3); end
    foreach (s4[i]) begin s4[i] = rand_half(0.05, 0.3); b4[i] = rand_half(-0.3, 0.3); end
    foreach (bias5[i]) begin bias5[i] = rand_half(-0.5, 0.5); ones[i] = 16'h3C00; end
    for (int i = 0; i < 5; i++) if (WS[i] == 2) begin
      case (i)
        1: foreach (w2[j]) if (w2[j] == 0) n_tbo_zero++;
        2: foreach (w3[j]) if (w3[j] == 0) n_tbo_zero++;
        3: foreach (w4[j]) if (w4[j] == 0) n_tbo_zero++;
        default: ;
      endcase
    end

    for (int n = 0; n < C1; n++) begin
      for (int t = 0; t < WD1; t++) load(LT_CONV1, LD_WGT, n*WD1 + t, pack_word(WS[0], LC, w1, NT1, n, t));
      load(LT_CONV1, LD_SCALE, n, 256'(s1[n]));
      load(LT_CONV1, LD_SHIFT, n, 256'(b1[n]));
    end
    for (int n = 0; n < C2; n++) begin
      for (int t = 0; t < WD2; t++) load(LT_CONV2, LD_WGT, n*WD2 + t, pack_word(WS[1], LC, w2, NT2, n, t));
      load(LT_CONV2, LD_SCALE, n, 256'(s2[n]));
      load(LT_CONV2, LD_SHIFT, n, 256'(b2[n]));
    end
    for (int n = 0; n < F3; n++) begin
      for (int t = 0; t < WD3; t++) load(LT_FC3, LD_WGT, n*WD3 + t, pack_word(WS[2], LF, w3, NFL, n, t));
      load(LT_FC3, LD_SCALE, n, 256'(s3[n]));
      load(LT_FC3, LD_SHIFT, n, 256'(b3[n]));
    end
    for (int n = 0; n < F4; n++) begin
      for (int t = 0; t < WD4; t++) load(LT_FC4, LD_WGT, n*WD4 + t, pack_word(WS[3], LF, w4, F3, n, t));
      load(LT_FC4, LD_SCALE, n, 256'(s4[n]));
      load(LT_FC4, LD_SHIFT, n, 256'(b4[n]));
    end
    for (int n = 0; n < NC; n++) begin
      for (int t = 0; t < WD5; t++) load(LT_FC5, LD_WGT, n*WD5 + t, pack_word(WS[4], LF, w5, F4, n, t));
      load(LT_FC5, LD_SHIFT, n, 256'(bias5[n]));
    end

    for (int run = 0; run < 2; run++) begin
      img = new[IMG*IMG];
      foreach (img[i]) begin
        img[i] = r2h(real'($urandom % 256) / 255.0);
        load(LT_IMAGE, LD_WGT, i, 256'(img[i]));
      end

      // ---- reference network ----
      ref_conv(WS[0], LC, 1, C1, K, IMG, IMG, img, w1, s1, b1, y1);
      ref_pool(C1, H1, H1, y1, q1);
      ref_conv(WS[1], LC, C1, C2, K, P1, P1, q1, w2, s2, b2, y2);
      ref_pool(C2, H2, H2, y2, q2);
      ref_fc(WS[2], LF, NFL, F3, q2, w3, s3, b3, 1'b1, 1'b1, y3);
      ref_fc(WS[3], LF, F3, F4, y3, w4, s4, b4, 1'b1, 1'b1, y4);
      ref_fc(WS[4], LF, F4, NC, y4, w5, ones, bias5, 1'b0, 1'b0, y5);
      n_relu_clamp += count_zero(y1) + count_zero(y2) + count_zero(y3) + count_zero(y4);
      n_pool_nonfirst += count_nonfirst(C1, H1, H1, y1, q1) + count_nonfirst(C2, H2, H2, y2, q2);
      n_masked += C1*H1*H1*(WD1*LC - NT1) + C2*H2*H2*(WD2*LC - NT2)
                + F3*(WD3*LF - NFL) + F4*(WD4*LF - F3) + NC*(WD5*LF - F4);

      // ---- run ----
      foreach (stage_cycles[i]) stage_cycles[i] = 0;
      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      $display("inference %0d: %0d cycles from start to done", run, cycle - t0);
      @(negedge clk);
      expect_i("busy after done", int'(busy), 0);

      // stage lengths: engine schedule plus the cycle of the hand-over
      expect_i("Conv#1 cycles", stage_cycles[ST_CONV1], C1*H1*H1*WD1 + 5 + 1);
      expect_i("Pool#1 cycles", stage_cycles[ST_POOL1], C1*P1*P1 + 1 + 1);
      expect_i("Conv#2 cycles", stage_cycles[ST_CONV2], C2*H2*H2*WD2 + 5 + 1);
      expect_i("Pool#2 cycles", stage_cycles[ST_POOL2], NFL + 1 + 1);
      expect_i("FC#3 cycles",   stage_cycles[ST_FC3],   F3*WD3 + 5 + 1);
      expect_i("FC#4 cycles",   stage_cycles[ST_FC4],   F4*WD4 + 5 + 1);
      expect_i("FC#5 cycles",   stage_cycles[ST_FC5],   NC*WD5 + 5 + 1);

      for (int i = 0; i < NFL; i++) expect_h("flatten", i, dut.u_buf_fl.mem[i], q2[i]);
      for (int i = 0; i < F3; i++)  expect_h("fc3", i, dut.u_buf_f3.mem[i], y3[i]);
      for (int i = 0; i < F4; i++)  expect_h("fc4", i, dut.u_buf_f4.mem[i], y4[i]);
      for (int i = 0; i < NC; i++)  expect_h("logit", i, logits[i], y5[i]);
    end

    // ---- every mechanism must have happened ----
    $display("ReLU clamps %0d, TBO zero weights %0d, masked lane-beats %0d, pool non-first picks %0d",
             n_relu_clamp, n_tbo_zero, n_masked, n_pool_nonfirst);
    for (int s = 1; s < 8; s++) begin
      checks++;
      if (stage_cycles[s] == 0) begin failures++; $display("FAIL stage %0d never ran", s); end
    end
    checks++; if (n_relu_clamp == 0)    begin failures++; $display("FAIL no ReLU clamp"); end
    checks++; if (n_tbo_zero == 0)      begin failures++; $display("FAIL no ternary zero weight"); end
    checks++; if (n_masked == 0)        begin failures++; $display("FAIL no masked lane"); end
    checks++; if (n_pool_nonfirst == 0) begin failures++; $display("FAIL pooling never picked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
