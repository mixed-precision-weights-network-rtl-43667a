// Inference batch normalization followed by ReLU, on one half value per cycle.
//
// In inference, batch normalization of channel c is an affine map
//   y = x * scale[c] + shift[c],
// with scale = gamma / sqrt(var + eps) and shift = beta - mean * scale folded
// when the network is exported.  The layer engine supplies scale and shift of
// the current channel.  USE_SCALE = 0 leaves out the multiplier (y = x + shift),
// which is how the bias of the last fully-connected layer is added; the scale
// input is then unused.
// USE_RELU = 1 then clamps negative results, -0 included, to +0.
// The network places a batch normalization after every convolutional and the
// first two fully-connected layers, and ReLU as the activation; the folding and
// the two rounding steps (after the product and after the sum) are this design's.
//
// Interface: in_valid/x/scale/shift in; out_valid/y one cycle later.
module batchnorm_relu
  import mpwn_pkg::*;
#(
  parameter bit USE_SCALE = 1'b1,
  parameter bit USE_RELU  = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  half_t x,
  input  half_t scale,
  input  half_t shift,
  output logic  out_valid,
  output half_t y
);

  half_t scaled, shifted, act;

  generate
    if (USE_SCALE) begin : g_scale
      half_mul u_mul (.a(x), .b(scale), .y(scaled));
    end else begin : g_noscale
      assign scaled = x;
    end
  endgenerate

  half_add u_add (.a(scaled), .b(shift), .y(shifted));

  always_comb begin
    if (USE_RELU && shifted[15]) act = HALF_ZERO;
    else                         act = shifted;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= HALF_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= act;
    end
  end

endmodule
