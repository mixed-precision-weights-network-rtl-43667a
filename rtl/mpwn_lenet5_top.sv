// Mixed-precision weights network (MPWN) accelerator for a LeNet-5 classifier
// of 28x28 grayscale images (Fashion-MNIST), in the FTTTF configuration: the first
// and last weight layers keep half-precision (F) weights, the three middle ones
// use ternary (T) weights whose products are formed by the ternary bitwise
// operation instead of a multiplier.
//
// Network (activations are binary16 throughout):
//   image 1x28x28
//   Conv#1 6C5  (W1) -> BN#1 -> ReLU -> 2x2 max-pool   6x12x12
//   Conv#2 16C5 (W2) -> BN#2 -> ReLU -> 2x2 max-pool  16x4x4 = 256 (flatten)
//   FC#3 256->120 (W3) -> BN#3 -> ReLU
//   FC#4 120->84  (W4) -> BN#4 -> ReLU
//   FC#5 84->10   (W5) + bias  -> 10 logits (class scores)
// The weight space of each layer is a parameter (W1..W5, default F,T,T,T,F), so
// the same RTL builds any other combination, for example FBTBF, where B layers
// use XOR signed-bits.
//
// The layers run one after another, each between two feature-map buffers: a
// sequencer starts each engine when the previous one reports done.  The
// convolution engines process LANES_CONV (8) taps per cycle, the fully-connected
// engines LANES_FC (16) inputs per cycle.  Softmax is not computed: the logits
// rank the classes in the same order.
//
// Interface
//   ld      load beat (valid, target, kind, addr, data): writes a pixel of the
//           image, or a weight word / batch-norm scale / shift (bias for FC#5)
//           of one layer.  Load only while busy is low.
//   start   one-cycle pulse; busy stays high until done pulses with the last
//           logit written.  logits[] then hold the 10 class scores.
//   stage   the layer currently running.
// Cycles of one inference, at the defaults:
//   Conv#1 6*576*4 + Pool 864 + Conv#2 16*64*19 + Pool 256 + FC#3 120*16
//   + FC#4 84*8 + FC#5 10*6, plus a few cycles of pipeline tail per layer.
module mpwn_lenet5_top
  import mpwn_pkg::*;
#(
  parameter wspace_e     W1         = WS_F,
  parameter wspace_e     W2         = WS_T,
  parameter wspace_e     W3         = WS_T,
  parameter wspace_e     W4         = WS_T,
  parameter wspace_e     W5         = WS_F,
  parameter int unsigned LANES_CONV = 8,
  parameter int unsigned LANES_FC   = 16,
  parameter int unsigned IMG        = 28,
  parameter int unsigned KS         = 5,
  parameter int unsigned C1         = 6,
  parameter int unsigned C2         = 16,
  parameter int unsigned F3         = 120,
  parameter int unsigned F4         = 84,
  parameter int unsigned NCLASS     = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  load_req_t ld,
  input  logic      start,
  output logic      busy,
  output logic      done,
  output stage_e    stage,
  output half_t     logits [NCLASS]
);

  // Feature-map sizes.
  localparam int unsigned H1  = IMG - KS + 1;     // 24
  localparam int unsigned P1  = H1 / 2;           // 12
  localparam int unsigned H2  = P1 - KS + 1;      // 8
  localparam int unsigned P2  = H2 / 2;           // 4
  localparam int unsigned NFL = C2 * P2 * P2;     // 256

  localparam int unsigned D_IMG = IMG * IMG;
  localparam int unsigned D_C1  = C1 * H1 * H1;
  localparam int unsigned D_P1  = C1 * P1 * P1;
  localparam int unsigned D_C2  = C2 * H2 * H2;
  localparam int unsigned A_IMG = $clog2(D_IMG);
  localparam int unsigned A_C1  = $clog2(D_C1);
  localparam int unsigned A_P1  = $clog2(D_P1);
  localparam int unsigned A_C2  = $clog2(D_C2);
  localparam int unsigned A_FL  = $clog2(NFL);
  localparam int unsigned A_F3  = $clog2(F3);
  localparam int unsigned A_F4  = $clog2(F4);
  localparam int unsigned A_F5  = $clog2(NCLASS);

  localparam int unsigned WB1 = wbits(W1);
  localparam int unsigned WB2 = wbits(W2);
  localparam int unsigned WB3 = wbits(W3);
  localparam int unsigned WB4 = wbits(W4);
  localparam int unsigned WB5 = wbits(W5);
  localparam int unsigned LDW1 = (LANES_CONV*WB1 > 16) ? LANES_CONV*WB1 : 16;
  localparam int unsigned LDW2 = (LANES_CONV*WB2 > 16) ? LANES_CONV*WB2 : 16;
  localparam int unsigned LDW3 = (LANES_FC*WB3 > 16) ? LANES_FC*WB3 : 16;
  localparam int unsigned LDW4 = (LANES_FC*WB4 > 16) ? LANES_FC*WB4 : 16;
  localparam int unsigned LDW5 = (LANES_FC*WB5 > 16) ? LANES_FC*WB5 : 16;

  // ---------------- sequencer ----------------
  stage_e st_q;
  logic   launch_q;                       // first cycle of a stage
  logic   c1_done, p1_done, c2_done, p2_done, f3_done, f4_done, f5_done;
  logic   c1_busy, p1_busy, c2_busy, p2_busy, f3_busy, f4_busy, f5_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= ST_IDLE;
      launch_q <= 1'b0;
    end else begin
      launch_q <= 1'b0;
      case (st_q)
        ST_IDLE:  if (start)   begin st_q <= ST_CONV1; launch_q <= 1'b1; end
        ST_CONV1: if (c1_done) begin st_q <= ST_POOL1; launch_q <= 1'b1; end
        ST_POOL1: if (p1_done) begin st_q <= ST_CONV2; launch_q <= 1'b1; end
        ST_CONV2: if (c2_done) begin st_q <= ST_POOL2; launch_q <= 1'b1; end
        ST_POOL2: if (p2_done) begin st_q <= ST_FC3;   launch_q <= 1'b1; end
        ST_FC3:   if (f3_done) begin st_q <= ST_FC4;   launch_q <= 1'b1; end
        ST_FC4:   if (f4_done) begin st_q <= ST_FC5;   launch_q <= 1'b1; end
        ST_FC5:   if (f5_done)       st_q <= ST_IDLE;
        default:                     st_q <= ST_IDLE;
      endcase
    end
  end

  assign stage = st_q;
  assign busy  = (st_q != ST_IDLE);
  assign done  = f5_done;

  // Load strobes.
  logic ld_img, ld_c1, ld_c2, ld_f3, ld_f4, ld_f5;
  always_comb begin
    ld_img = ld.valid && (ld.target == LT_IMAGE);
    ld_c1  = ld.valid && (ld.target == LT_CONV1);
    ld_c2  = ld.valid && (ld.target == LT_CONV2);
    ld_f3  = ld.valid && (ld.target == LT_FC3);
    ld_f4  = ld.valid && (ld.target == LT_FC4);
    ld_f5  = ld.valid && (ld.target == LT_FC5);
  end

  // ---------------- image buffer -> Conv#1 ----------------
  logic [A_IMG-1:0] img_raddr [LANES_CONV];
  half_t            img_rdata [LANES_CONV];
  fmap_buffer #(.DEPTH(D_IMG), .RPORTS(LANES_CONV)) u_buf_img (
    .clk, .we(ld_img), .waddr(ld.addr[A_IMG-1:0]), .wdata(ld.data[15:0]),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  logic            c1_we;
  logic [A_C1-1:0] c1_waddr;
  half_t           c1_wdata;
  conv_layer #(.CIN(1), .COUT(C1), .K(KS), .IH(IMG), .IW(IMG),
               .LANES(LANES_CONV), .WSPACE(W1)) u_conv1 (
    .clk, .rst_n,
    .ld_we(ld_c1), .ld_kind(ld.kind), .ld_addr(ld.addr),
    .ld_data(ld.data[LDW1-1:0]),
    .start(launch_q && st_q == ST_CONV1), .busy(c1_busy), .done(c1_done),
    .act_raddr(img_raddr), .act_rdata(img_rdata),
    .out_we(c1_we), .out_waddr(c1_waddr), .out_wdata(c1_wdata)
  );

  // ---------------- Conv#1 buffer -> Pool#1 ----------------
  logic [A_C1-1:0] c1_raddr [4];
  half_t           c1_rdata [4];
  fmap_buffer #(.DEPTH(D_C1), .RPORTS(4)) u_buf_c1 (
    .clk, .we(c1_we), .waddr(c1_waddr), .wdata(c1_wdata),
    .raddr(c1_raddr), .rdata(c1_rdata)
  );

  logic            p1_we;
  logic [A_P1-1:0] p1_waddr;
  half_t           p1_wdata;
  maxpool2 #(.C(C1), .IH(H1), .IW(H1)) u_pool1 (
    .clk, .rst_n, .start(launch_q && st_q == ST_POOL1), .busy(p1_busy), .done(p1_done),
    .in_raddr(c1_raddr), .in_rdata(c1_rdata),
    .out_we(p1_we), .out_waddr(p1_waddr), .out_wdata(p1_wdata)
  );

  // ---------------- Pool#1 buffer -> Conv#2 ----------------
  logic [A_P1-1:0] p1_raddr [LANES_CONV];
  half_t           p1_rdata [LANES_CONV];
  fmap_buffer #(.DEPTH(D_P1), .RPORTS(LANES_CONV)) u_buf_p1 (
    .clk, .we(p1_we), .waddr(p1_waddr), .wdata(p1_wdata),
    .raddr(p1_raddr), .rdata(p1_rdata)
  );

  logic            c2_we;
  logic [A_C2-1:0] c2_waddr;
  half_t           c2_wdata;
  conv_layer #(.CIN(C1), .COUT(C2), .K(KS), .IH(P1), .IW(P1),
               .LANES(LANES_CONV), .WSPACE(W2)) u_conv2 (
    .clk, .rst_n,
    .ld_we(ld_c2), .ld_kind(ld.kind), .ld_addr(ld.addr),
    .ld_data(ld.data[LDW2-1:0]),
    .start(launch_q && st_q == ST_CONV2), .busy(c2_busy), .done(c2_done),
    .act_raddr(p1_raddr), .act_rdata(p1_rdata),
    .out_we(c2_we), .out_waddr(c2_waddr), .out_wdata(c2_wdata)
  );

  // ---------------- Conv#2 buffer -> Pool#2 (+ flatten) ----------------
  logic [A_C2-1:0] c2_raddr [4];
  half_t           c2_rdata [4];
  fmap_buffer #(.DEPTH(D_C2), .RPORTS(4)) u_buf_c2 (
    .clk, .we(c2_we), .waddr(c2_waddr), .wdata(c2_wdata),
    .raddr(c2_raddr), .rdata(c2_rdata)
  );

  logic            p2_we;
  logic [A_FL-1:0] p2_waddr;
  half_t           p2_wdata;
  maxpool2 #(.C(C2), .IH(H2), .IW(H2)) u_pool2 (
    .clk, .rst_n, .start(launch_q && st_q == ST_POOL2), .busy(p2_busy), .done(p2_done),
    .in_raddr(c2_raddr), .in_rdata(c2_rdata),
    .out_we(p2_we), .out_waddr(p2_waddr), .out_wdata(p2_wdata)
  );

  // ---------------- flattened vector -> FC#3 ----------------
  logic [A_FL-1:0] fl_raddr [LANES_FC];
  half_t           fl_rdata [LANES_FC];
  fmap_buffer #(.DEPTH(NFL), .RPORTS(LANES_FC)) u_buf_fl (
    .clk, .we(p2_we), .waddr(p2_waddr), .wdata(p2_wdata),
    .raddr(fl_raddr), .rdata(fl_rdata)
  );

  logic            f3_we;
  logic [A_F3-1:0] f3_waddr;
  half_t           f3_wdata;
  fc_layer #(.CIN(NFL), .COUT(F3), .LANES(LANES_FC), .WSPACE(W3),
             .USE_SCALE(1'b1), .USE_RELU(1'b1)) u_fc3 (
    .clk, .rst_n,
    .ld_we(ld_f3), .ld_kind(ld.kind), .ld_addr(ld.addr),
    .ld_data(ld.data[LDW3-1:0]),
    .start(launch_q && st_q == ST_FC3), .busy(f3_busy), .done(f3_done),
    .act_raddr(fl_raddr), .act_rdata(fl_rdata),
    .out_we(f3_we), .out_waddr(f3_waddr), .out_wdata(f3_wdata)
  );

  // ---------------- FC#3 buffer -> FC#4 ----------------
  logic [A_F3-1:0] f3_raddr [LANES_FC];
  half_t           f3_rdata [LANES_FC];
  fmap_buffer #(.DEPTH(F3), .RPORTS(LANES_FC)) u_buf_f3 (
    .clk, .we(f3_we), .waddr(f3_waddr), .wdata(f3_wdata),
    .raddr(f3_raddr), .rdata(f3_rdata)
  );

  logic            f4_we;
  logic [A_F4-1:0] f4_waddr;
  half_t           f4_wdata;
  fc_layer #(.CIN(F3), .COUT(F4), .LANES(LANES_FC), .WSPACE(W4),
             .USE_SCALE(1'b1), .USE_RELU(1'b1)) u_fc4 (
    .clk, .rst_n,
    .ld_we(ld_f4), .ld_kind(ld.kind), .ld_addr(ld.addr),
    .ld_data(ld.data[LDW4-1:0]),
    .start(launch_q && st_q == ST_FC4), .busy(f4_busy), .done(f4_done),
    .act_raddr(f3_raddr), .act_rdata(f3_rdata),
    .out_we(f4_we), .out_waddr(f4_waddr), .out_wdata(f4_wdata)
  );

  // ---------------- FC#4 buffer -> FC#5 -> logits ----------------
  logic [A_F4-1:0] f4_raddr [LANES_FC];
  half_t           f4_rdata [LANES_FC];
  fmap_buffer #(.DEPTH(F4), .RPORTS(LANES_FC)) u_buf_f4 (
    .clk, .we(f4_we), .waddr(f4_waddr), .wdata(f4_wdata),
    .raddr(f4_raddr), .rdata(f4_rdata)
  );

  logic            f5_we;
  logic [A_F5-1:0] f5_waddr;
  half_t           f5_wdata;
  fc_layer #(.CIN(F4), .COUT(NCLASS), .LANES(LANES_FC), .WSPACE(W5),
             .USE_SCALE(1'b0), .USE_RELU(1'b0)) u_fc5 (
    .clk, .rst_n,
    .ld_we(ld_f5), .ld_kind(ld.kind), .ld_addr(ld.addr),
    .ld_data(ld.data[LDW5-1:0]),
    .start(launch_q && st_q == ST_FC5), .busy(f5_busy), .done(f5_done),
    .act_raddr(f4_raddr), .act_rdata(f4_rdata),
    .out_we(f5_we), .out_waddr(f5_waddr), .out_wdata(f5_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCLASS; i++) logits[i] <= HALF_ZERO;
    end else if (f5_we && 32'(f5_waddr) < NCLASS) begin
      logits[f5_waddr] <= f5_wdata;
    end
  end

  // A stage must finish before the next is launched.  (The assertion samples
  // rst_n on the clock for its disable condition while the registers use it as
  // an asynchronous reset; lint tools report that double use, which is intended.)
  a_one_stage_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    launch_q |-> !(c1_busy || p1_busy || c2_busy || p2_busy || f3_busy || f4_busy || f5_busy))
    else $error("mpwn_lenet5_top: stage launched while another is busy");

endmodule
