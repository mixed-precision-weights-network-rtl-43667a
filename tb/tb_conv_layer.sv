// Self-checking testbench of conv_layer with ternary weights: 3 input channels
// of 7 x 6, 4 kernels of 3 x 3 (27 taps, so the last of 4 beats is partly
// masked), batch normalization with random scale and shift, ReLU.  The testbench
// loads weights and batch-norm parameters through the load port, plays the input
// buffer (8 read ports, one cycle of latency), runs the layer twice and compares
// every output bit for bit with the reference.  The pass must take
// COUT*OH*OW*WORDS + 5 cycles from start to done.
module tb_conv_layer;
  import mpwn_pkg::*;
  import mpwn_ref_pkg::*;

  localparam int CIN = 3, COUT = 4, K = 3, IH = 7, IW = 6, L = 8;
  localparam int OH = IH - K + 1, OW = IW - K + 1, NTAP = CIN*K*K, WORDS = (NTAP + L - 1) / L;
  localparam int IAW = $clog2(CIN*IH*IW), OAW = $clog2(COUT*OH*OW);
  localparam wspace_e WS = WS_T;
  localparam int WB = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            ld_we, start, busy, done, out_we;
  ld_kind_e        ld_kind;
  logic [15:0]     ld_addr;
  logic [15:0]     ld_data;   // LANES*WB = 16 here
  logic [IAW-1:0]  act_raddr [L];
  half_t           act_rdata [L];
  logic [OAW-1:0]  out_waddr;
  half_t           out_wdata;
  h16_t            inmap [CIN*IH*IW];
  h16_t            outmap [COUT*OH*OW];

  conv_layer #(.CIN(CIN), .COUT(COUT), .K(K), .IH(IH), .IW(IW), .LANES(L), .WSPACE(WS)) dut (
    .clk, .rst_n, .ld_we, .ld_kind, .ld_addr, .ld_data, .start, .busy, .done,
    .act_raddr, .act_rdata, .out_we, .out_waddr, .out_wdata);

  always_ff @(posedge clk) begin
    for (int p = 0; p < L; p++) act_rdata[p] <= inmap[act_raddr[p]];
    if (out_we) outmap[out_waddr] <= out_wdata;
  end

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(ld_kind_e k, int addr, logic [255:0] data);
    @(negedge clk);
    ld_we = 1; ld_kind = k; ld_addr = 16'(addr); ld_data = data[15:0];
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin
    h16_t x[], w[], sc[], sh[], yref[];
    int t0;
    ld_we = 0; ld_kind = LD_WGT; ld_addr = 0; ld_data = 0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      x = new[CIN*IH*IW]; w = new[COUT*NTAP]; sc = new[COUT]; sh = new[COUT];
      foreach (x[i])  begin x[i] = rand_half(-2.0, 2.0); inmap[i] = x[i]; end
      foreach (w[i])  w[i]  = rand_weight(2, 1.0);
      foreach (sc[i]) sc[i] = rand_half(0.25, 1.0);
      foreach (sh[i]) sh[i] = rand_half(-0.5, 0.5);
      for (int n = 0; n < COUT; n++) begin
        for (int t = 0; t < WORDS; t++) load(LD_WGT, n*WORDS + t, pack_word(2, L, w, NTAP, n, t));
        load(LD_SCALE, n, 256'(sc[n]));
        load(LD_SHIFT, n, 256'(sh[n]));
      end
      ref_conv(2, L, CIN, COUT, K, IH, IW, x, w, sc, sh, yref);
      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cycle - t0 != COUT*OH*OW*WORDS + 5) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cycle - t0, COUT*OH*OW*WORDS + 5);
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
      for (int i = 0; i < COUT*OH*OW; i++) begin
        checks++;
        if (outmap[i] !== yref[i]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d = %h, expected %h", i, outmap[i], yref[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
