// Parallel dot-product engine: LANES weight-space multipliers, a pairwise adder
// tree and a running accumulator, all in binary16.
//
// It computes the inner sums of the convolution (Eq. 13) and of the matrix
// product (Eq. 14).  Each beat presents LANES (activation, weight) pairs, which
// is what the partitioning of W and X into LANES banks makes possible in the
// layer engines.  Lanes whose mask bit is 0 contribute +0, so a dot product whose
// length is not a multiple of LANES is padded without touching the result.
//
// Pipeline (three register stages, one beat per cycle, no stalls):
//   stage 1  products p[i] = w[i] * x[i]  (half_mul, xsb or tbo per WSPACE)
//   stage 2  adder tree: ((p0+p1)+(p2+p3))+... pairwise, in lane order
//   stage 3  acc = first ? tree : acc + tree;  result on the beat marked last
// out_valid pulses three cycles after the last beat of a dot product.  Each
// addition rounds to half, so the summation order above is part of the result.
// The lane count follows the design description's partition factors (8 for the
// convolutions, 16 for the fully-connected layers); the pipeline is this design's.
module dot_engine
  import mpwn_pkg::*;
#(
  parameter int unsigned LANES  = 16,
  parameter wspace_e     WSPACE = WS_T,
  parameter int unsigned WB     = wbits(WSPACE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,   // first beat of a dot product
  input  logic                in_last,    // last beat of a dot product
  input  logic [LANES-1:0]    in_mask,    // 1 = lane carries a real term
  input  half_t               in_act [LANES],
  input  logic [LANES*WB-1:0] in_wgt,     // lane i in bits [i*WB +: WB]
  output logic                out_valid,
  output half_t               out_sum
);

  initial assert ((LANES & (LANES - 1)) == 0 && LANES >= 2)
    else $error("dot_engine: LANES must be a power of two");

  // ---- stage 1: products ----
  half_t prod_c [LANES];
  half_t prod_q [LANES];
  logic  s1_valid, s1_first, s1_last;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    weight_mul #(.WSPACE(WSPACE), .WB(WB)) u_wmul (
      .w(in_wgt[i*WB +: WB]), .x(in_act[i]), .y(prod_c[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      for (int i = 0; i < LANES; i++) prod_q[i] <= HALF_ZERO;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      for (int i = 0; i < LANES; i++)
        prod_q[i] <= (in_valid && in_mask[i]) ? prod_c[i] : HALF_ZERO;
    end
  end

  // ---- stage 2: adder tree, heap order: node n = node 2n+1 + node 2n+2 ----
  half_t node [2*LANES-1];
  for (genvar i = 0; i < LANES; i++) begin : g_leaf
    assign node[LANES-1+i] = prod_q[i];
  end
  for (genvar n = 0; n < LANES - 1; n++) begin : g_tree
    half_add u_add (.a(node[2*n+1]), .b(node[2*n+2]), .y(node[n]));
  end

  half_t tree_q;
  logic  s2_valid, s2_first, s2_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      tree_q   <= HALF_ZERO;
    end else begin
      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      tree_q   <= node[0];
    end
  end

  // ---- stage 3: accumulator ----
  half_t acc_q, acc_sum;
  half_add u_acc (.a(acc_q), .b(tree_q), .y(acc_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= HALF_ZERO;
      out_valid <= 1'b0;
      out_sum   <= HALF_ZERO;
    end else begin
      out_valid <= s2_valid && s2_last;
      if (s2_valid) begin
        acc_q <= s2_first ? tree_q : acc_sum;
        if (s2_last) out_sum <= s2_first ? tree_q : acc_sum;
      end
    end
  end

endmodule
