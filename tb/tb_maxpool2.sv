// Self-checking testbench of maxpool2 on a 3 x 6 x 8 map of random signed
// halves.  The testbench plays the input buffer (one cycle of read latency) and
// collects the writes; every output must equal the largest of its 2x2 window,
// land at its channel-major address, and done must come C*OH*OW+1 cycles after
// start.  The unit is then run a second time to check it restarts.
module tb_maxpool2;
  import mpwn_pkg::*;
  import mpwn_ref_pkg::*;

  localparam int C = 3, IH = 6, IW = 8, OH = IH / 2, OW = IW / 2;
  localparam int IAW = $clog2(C*IH*IW), OAW = $clog2(C*OH*OW);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           start, busy, done, out_we;
  logic [IAW-1:0] in_raddr [4];
  half_t          in_rdata [4];
  logic [OAW-1:0] out_waddr;
  half_t          out_wdata;
  h16_t           inmap [C*IH*IW];
  h16_t           outmap [C*OH*OW];
  int             writes;

  maxpool2 #(.C(C), .IH(IH), .IW(IW)) dut (.clk, .rst_n, .start, .busy, .done,
    .in_raddr, .in_rdata, .out_we, .out_waddr, .out_wdata);

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) in_rdata[p] <= inmap[in_raddr[p]];
    if (out_we) begin
      outmap[out_waddr] <= out_wdata;
      writes <= writes + 1;
    end
  end

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h16_t xin[], yref[];
    int t0;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      xin = new[C*IH*IW];
      foreach (xin[i]) begin
        xin[i] = rand_half(-10.0, 10.0);
        inmap[i] = xin[i];
      end
      ref_pool(C, IH, IW, xin, yref);
      writes = 0;
      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cycle - t0 != C*OH*OW + 1) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cycle - t0, C*OH*OW + 1);
      end
      @(negedge clk);
      checks++;
      if (writes != C*OH*OW || busy) failures++;
      for (int i = 0; i < C*OH*OW; i++) begin
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
