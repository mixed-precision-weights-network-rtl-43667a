// Self-checking testbench of fmap_buffer (100 words, 4 read ports): random
// writes mirrored in a model array, random reads on all ports at once, data
// checked one cycle after the address; out-of-range addresses must read +0.
module tb_fmap_buffer;
  import mpwn_pkg::*;

  localparam int D = 100, P = 4;
  localparam int AW = $clog2(D);
  logic clk = 0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr;
  half_t         wdata;
  logic [AW-1:0] raddr [P];
  half_t         rdata [P];
  half_t         model [D];
  logic [AW-1:0] last_addr [P];

  fmap_buffer #(.DEPTH(D), .RPORTS(P)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    foreach (raddr[p]) raddr[p] = 0;
    // fill every word first
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      we = ($urandom % 2 == 0);
      waddr = AW'($urandom % D);
      wdata = 16'($urandom);
      for (int p = 0; p < P; p++) begin
        raddr[p] = AW'($urandom % 128);     // some beyond DEPTH
        last_addr[p] = raddr[p];
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < P; p++) begin
        half_t e;
        // a read in the cycle of a write to the same word returns the old word
        e = (32'(last_addr[p]) < D) ? model[last_addr[p]] : 16'h0000;
        checks++;
        if (rdata[p] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d: %h exp %h", p, last_addr[p], rdata[p], e);
        end
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
