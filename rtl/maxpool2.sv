// 2x2 max pooling with stride 2 over a C x IH x IW feature map.
//
// After start, the unit walks the output map in channel, row, column order.  In
// each cycle it sends the four addresses of one 2x2 window to the input buffer
// (four read ports, one cycle of latency), and in the next cycle it writes the
// largest of the four half values to the output buffer at c*OH*OW + y*OW + x.
// This channel-major output order is also the order of the flatten step that
// feeds the first fully-connected layer, so flattening costs no logic.  Values
// are compared through mpwn_pkg::half_key(), which orders halves as numbers.
// One output per cycle; done pulses with the last write, C*OH*OW+1 cycles after
// start.  The network uses 2x2 max pooling after each convolution; the unit's
// organisation is this design's.
module maxpool2
  import mpwn_pkg::*;
#(
  parameter int unsigned C   = 6,
  parameter int unsigned IH  = 24,
  parameter int unsigned IW  = 24,
  parameter int unsigned OH  = IH / 2,
  parameter int unsigned OW  = IW / 2,
  parameter int unsigned IAW = $clog2(C*IH*IW),
  parameter int unsigned OAW = $clog2(C*OH*OW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [IAW-1:0] in_raddr [4],
  input  half_t          in_rdata [4],
  output logic           out_we,
  output logic [OAW-1:0] out_waddr,
  output half_t          out_wdata
);

  localparam int unsigned NOUT = C * OH * OW;

  logic           issuing;
  logic [OAW-1:0] oidx;                 // output index being issued
  int unsigned    ch, oy, ox;
  logic           rd_valid;
  logic [OAW-1:0] rd_oidx;

  always_comb begin
    ch = 32'(oidx) / (OH * OW);
    oy = (32'(oidx) % (OH * OW)) / OW;
    ox = 32'(oidx) % OW;
    for (int p = 0; p < 4; p++)
      in_raddr[p] = IAW'(ch * IH * IW + (2 * oy + p / 2) * IW + 2 * ox + p % 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      oidx     <= '0;
      rd_valid <= 1'b0;
      rd_oidx  <= '0;
    end else begin
      rd_valid <= issuing;
      rd_oidx  <= oidx;
      if (start && !issuing) begin
        issuing <= 1'b1;
        oidx    <= '0;
      end else if (issuing) begin
        if (32'(oidx) == NOUT - 1) issuing <= 1'b0;
        else                      oidx    <= oidx + 1'b1;
      end
    end
  end

  half_t m01, m23;
  always_comb begin
    m01       = (half_key(in_rdata[1]) > half_key(in_rdata[0])) ? in_rdata[1] : in_rdata[0];
    m23       = (half_key(in_rdata[3]) > half_key(in_rdata[2])) ? in_rdata[3] : in_rdata[2];
    out_wdata = (half_key(m23) > half_key(m01)) ? m23 : m01;
    out_we    = rd_valid;
    out_waddr = rd_oidx;
  end

  assign busy = issuing || rd_valid;
  assign done = rd_valid && (32'(rd_oidx) == NOUT - 1);

endmodule
