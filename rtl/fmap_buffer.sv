// Feature-map buffer between two layers: one write port and RPORTS independent
// read ports with one cycle of read latency.
//
// The layer engines read LANES activations per cycle.  The design description
// gets this by partitioning its activation arrays; here the buffer simply offers
// RPORTS read ports on one array (an FPGA tool maps it to replicated LUT RAM or
// registers).  Reads are synchronous: raddr[p] in cycle t gives rdata[p] in t+1.
// A read of an address beyond DEPTH returns +0.  The array is not reset: every
// word is written by the producing layer before the consuming layer reads it.
module fmap_buffer
  import mpwn_pkg::*;
#(
  parameter int unsigned DEPTH  = 784,
  parameter int unsigned RPORTS = 8,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  half_t         wdata,
  input  logic [AW-1:0] raddr [RPORTS],
  output half_t         rdata [RPORTS]
);

  half_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < RPORTS; p++) begin : g_rd
    always_ff @(posedge clk) begin
      rdata[p] <= (32'(raddr[p]) < DEPTH) ? mem[raddr[p]] : HALF_ZERO;
    end
  end

endmodule
