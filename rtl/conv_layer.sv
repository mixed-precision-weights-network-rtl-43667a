// Convolutional layer engine: valid (no padding, stride 1) convolution of a
// CIN x IH x IW half feature map with COUT kernels of CIN x K x K weights,
// followed by batch normalization and ReLU (Eq. 13 of the network definition;
// no bias, since batch normalization supplies it).
//
// How it works.  One output pixel is a dot product of NTAP = CIN*K*K terms.  The
// engine cuts it into WORDS = ceil(NTAP/LANES) beats of LANES terms: per beat it
// reads one weight word (LANES packed weights of the layer's weight space) from
// its weight memory and LANES activations from the input buffer through LANES
// read ports, and feeds them to dot_engine.  Tap q of a pixel (m, l) is input
// element k*IH*IW + (m+j)*IW + (l+i) with k = q/(K*K), j = (q%(K*K))/K,
// i = q%K; taps past NTAP are masked.  Pixels run in channel, row, column order,
// one beat per cycle with no bubbles, so one layer takes COUT*OH*OW*WORDS cycles
// plus a pipeline tail of 5 cycles.  The LANES-wide parallel window follows the
// design description (inner loops unrolled, partition factor 8); the beat
// schedule and the memory layout are this design's.
//
// Weight word n*WORDS + t holds taps t*LANES .. t*LANES+LANES-1 of kernel n, tap
// i of the word in bits [i*WB +: WB].  Batch-norm scale and shift are stored
// per output channel.  All three memories are written through the load port
// (ld_kind selects which) while the engine is idle; ld_data is LANES*WB bits
// wide, or 16 if that is less, since scale and shift are half values.
//
// Timing: start (one cycle) begins a pass; the result of output o is written to
// the output buffer at address o; done pulses with the last write.
module conv_layer
  import mpwn_pkg::*;
#(
  parameter int unsigned CIN    = 1,
  parameter int unsigned COUT   = 6,
  parameter int unsigned K      = 5,
  parameter int unsigned IH     = 28,
  parameter int unsigned IW     = 28,
  parameter int unsigned LANES  = 8,
  parameter wspace_e     WSPACE = WS_F,
  parameter int unsigned WB     = wbits(WSPACE),
  parameter int unsigned LDW       = (LANES*WB > 16) ? LANES*WB : 16,
  parameter int unsigned OH     = IH - K + 1,
  parameter int unsigned OW     = IW - K + 1,
  parameter int unsigned NTAP   = CIN * K * K,
  parameter int unsigned WORDS  = (NTAP + LANES - 1) / LANES,
  parameter int unsigned IAW    = $clog2(CIN*IH*IW),
  parameter int unsigned OAW    = $clog2(COUT*OH*OW)
) (
  input  logic                clk,
  input  logic                rst_n,
  // parameter load
  input  logic                ld_we,
  input  ld_kind_e            ld_kind,
  input  logic [15:0]         ld_addr,
  input  logic [LDW-1:0]      ld_data,
  // control
  input  logic                start,
  output logic                busy,
  output logic                done,
  // input feature map (LANES read ports, one cycle of latency)
  output logic [IAW-1:0]      act_raddr [LANES],
  input  half_t               act_rdata [LANES],
  // output feature map
  output logic                out_we,
  output logic [OAW-1:0]      out_waddr,
  output half_t               out_wdata
);

  localparam int unsigned NPIX = OH * OW;
  localparam int unsigned NOUT = COUT * NPIX;

  // ---------------- parameter memories ----------------
  logic [LANES*WB-1:0] wmem [COUT*WORDS];
  half_t               scale_mem [COUT];
  half_t               shift_mem [COUT];
  logic [LANES*WB-1:0] wq;

  // index widths of the parameter memories (load addresses are range-checked)
  localparam int unsigned WMA = (COUT*WORDS > 1) ? $clog2(COUT*WORDS) : 1;
  localparam int unsigned CHA = (COUT > 1) ? $clog2(COUT) : 1;

  always_ff @(posedge clk) begin
    if (ld_we && ld_kind == LD_WGT && 32'(ld_addr) < COUT * WORDS)
      wmem[WMA'(ld_addr)] <= ld_data[LANES*WB-1:0];
    if (ld_we && ld_kind == LD_SCALE && 32'(ld_addr) < COUT)
      scale_mem[CHA'(ld_addr)] <= ld_data[15:0];
    if (ld_we && ld_kind == LD_SHIFT && 32'(ld_addr) < COUT)
      shift_mem[CHA'(ld_addr)] <= ld_data[15:0];
  end

  // ---------------- beat issue ----------------
  logic        issuing;
  int unsigned n_q, m_q, l_q, t_q;
  logic [LANES-1:0] mask_c;

  always_comb begin
    int unsigned q, k, r;
    for (int p = 0; p < LANES; p++) begin
      q = t_q * LANES + p;
      k = q / (K * K);
      r = q % (K * K);
      mask_c[p]    = (q < NTAP);
      act_raddr[p] = mask_c[p]
                   ? IAW'(k * IH * IW + (m_q + r / K) * IW + l_q + r % K)
                   : '0;
    end
  end

  always_ff @(posedge clk) begin
    wq <= wmem[n_q * WORDS + t_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      n_q <= 0; m_q <= 0; l_q <= 0; t_q <= 0;
    end else if (start && !issuing) begin
      issuing <= 1'b1;
      n_q <= 0; m_q <= 0; l_q <= 0; t_q <= 0;
    end else if (issuing) begin
      if (t_q != WORDS - 1) begin
        t_q <= t_q + 1;
      end else begin
        t_q <= 0;
        if (l_q != OW - 1) begin
          l_q <= l_q + 1;
        end else begin
          l_q <= 0;
          if (m_q != OH - 1) begin
            m_q <= m_q + 1;
          end else begin
            m_q <= 0;
            if (n_q != COUT - 1) n_q <= n_q + 1;
            else                 issuing <= 1'b0;
          end
        end
      end
    end
  end

  // Control delayed by the one-cycle read latency of the memories.
  logic             d_valid, d_first, d_last;
  logic [LANES-1:0] d_mask;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_mask  <= '0;
    end else begin
      d_valid <= issuing;
      d_first <= issuing && (t_q == 0);
      d_last  <= issuing && (t_q == WORDS - 1);
      d_mask  <= mask_c;
    end
  end

  // ---------------- arithmetic ----------------
  logic  dot_valid;
  half_t dot_sum;
  dot_engine #(.LANES(LANES), .WSPACE(WSPACE), .WB(WB)) u_dot (
    .clk, .rst_n,
    .in_valid(d_valid), .in_first(d_first), .in_last(d_last), .in_mask(d_mask),
    .in_act(act_rdata), .in_wgt(wq),
    .out_valid(dot_valid), .out_sum(dot_sum)
  );

  // Results arrive in output order; count them to know the channel.
  int unsigned res_ch, res_pix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_ch  <= 0;
      res_pix <= 0;
    end else if (start && !issuing) begin
      res_ch  <= 0;
      res_pix <= 0;
    end else if (dot_valid) begin
      if (res_pix == NPIX - 1) begin
        res_pix <= 0;
        res_ch  <= res_ch + 1;
      end else begin
        res_pix <= res_pix + 1;
      end
    end
  end

  logic bn_valid;
  batchnorm_relu #(.USE_SCALE(1'b1), .USE_RELU(1'b1)) u_bn (
    .clk, .rst_n,
    .in_valid(dot_valid), .x(dot_sum),
    .scale(scale_mem[res_ch]), .shift(shift_mem[res_ch]),
    .out_valid(bn_valid), .y(out_wdata)
  );

  logic [OAW-1:0] wr_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   wr_cnt <= '0;
    else if (start && !issuing)   wr_cnt <= '0;
    else if (bn_valid)            wr_cnt <= wr_cnt + 1'b1;
  end

  assign out_we    = bn_valid;
  assign out_waddr = wr_cnt;
  assign done      = bn_valid && (32'(wr_cnt) == NOUT - 1);

  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 busy_q <= 1'b0;
    else if (start && !issuing) busy_q <= 1'b1;
    else if (done)              busy_q <= 1'b0;
  end
  assign busy = busy_q;

endmodule
