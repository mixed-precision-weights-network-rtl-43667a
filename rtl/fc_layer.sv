// Fully-connected layer engine: F = W X (+ b) for a CIN-element half input
// vector and COUT outputs (Eq. 14), followed by batch normalization and ReLU, or
// for the last layer by the bias only.
//
// How it works.  Output n is a dot product over CIN inputs, cut into
// WORDS = ceil(CIN/LANES) beats.  Beat t reads weight word n*WORDS + t (LANES
// packed weights) and inputs t*LANES .. t*LANES+LANES-1 from the input buffer
// (LANES read ports); inputs past CIN are masked.  One beat per cycle, outputs
// in order, so a layer takes COUT*WORDS cycles plus a pipeline tail of 5 cycles.
// The 16-wide beat follows the design description (input loop pipelined, W and X
// partitioned by 16); the schedule and memory layout are this design's.
//
// USE_SCALE = 1, USE_RELU = 1: y = relu(x*scale[n] + shift[n])  (FC#3, FC#4;
// these layers have no bias, batch normalization supplies it).
// USE_SCALE = 0, USE_RELU = 0: y = x + shift[n], shift holding the bias (FC#5).
//
// Timing: start (one cycle) begins a pass; output n is written at address n;
// done pulses with the last write.  Memories are loaded through the load port;
// ld_data is LANES*WB bits wide, or 16 if that is less (scale and shift).
module fc_layer
  import mpwn_pkg::*;
#(
  parameter int unsigned CIN       = 256,
  parameter int unsigned COUT      = 120,
  parameter int unsigned LANES     = 16,
  parameter wspace_e     WSPACE    = WS_T,
  parameter bit          USE_SCALE = 1'b1,
  parameter bit          USE_RELU  = 1'b1,
  parameter int unsigned WB        = wbits(WSPACE),
  parameter int unsigned LDW       = (LANES*WB > 16) ? LANES*WB : 16,
  parameter int unsigned WORDS     = (CIN + LANES - 1) / LANES,
  parameter int unsigned IAW       = $clog2(CIN),
  parameter int unsigned OAW       = $clog2(COUT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_we,
  input  ld_kind_e            ld_kind,
  input  logic [15:0]         ld_addr,
  input  logic [LDW-1:0]      ld_data,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [IAW-1:0]      act_raddr [LANES],
  input  half_t               act_rdata [LANES],
  output logic                out_we,
  output logic [OAW-1:0]      out_waddr,
  output half_t               out_wdata
);

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
  logic             issuing;
  int unsigned      n_q, t_q;
  logic [LANES-1:0] mask_c;

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      mask_c[p]    = (t_q * LANES + p < CIN);
      act_raddr[p] = mask_c[p] ? IAW'(t_q * LANES + p) : '0;
    end
  end

  always_ff @(posedge clk) begin
    wq <= wmem[n_q * WORDS + t_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      n_q <= 0; t_q <= 0;
    end else if (start && !issuing) begin
      issuing <= 1'b1;
      n_q <= 0; t_q <= 0;
    end else if (issuing) begin
      if (t_q != WORDS - 1) begin
        t_q <= t_q + 1;
      end else begin
        t_q <= 0;
        if (n_q != COUT - 1) n_q <= n_q + 1;
        else                 issuing <= 1'b0;
      end
    end
  end

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

  int unsigned res_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 res_n <= 0;
    else if (start && !issuing) res_n <= 0;
    else if (dot_valid)         res_n <= res_n + 1;
  end

  logic bn_valid;
  batchnorm_relu #(.USE_SCALE(USE_SCALE), .USE_RELU(USE_RELU)) u_bn (
    .clk, .rst_n,
    .in_valid(dot_valid), .x(dot_sum),
    .scale(scale_mem[res_n]), .shift(shift_mem[res_n]),
    .out_valid(bn_valid), .y(out_wdata)
  );

  logic [OAW-1:0] wr_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 wr_cnt <= '0;
    else if (start && !issuing) wr_cnt <= '0;
    else if (bn_valid)          wr_cnt <= wr_cnt + 1'b1;
  end

  assign out_we    = bn_valid;
  assign out_waddr = wr_cnt;
  assign done      = bn_valid && (32'(wr_cnt) == COUT - 1);

  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 busy_q <= 1'b0;
    else if (start && !issuing) busy_q <= 1'b1;
    else if (done)              busy_q <= 1'b0;
  end
  assign busy = busy_q;

endmodule
