// Binary16 (IEEE 754 half-precision) multiplier, combinational.
//
// Multiplies two half values, as the F layers of the network and the scale step
// of batch normalization need.  Both operands are unpacked to an 11-bit
// significand (hidden bit included, subnormals kept), the 22-bit integer product
// is exact, and mpwn_pkg::round_pack() rounds it once to the nearest half, ties
// to even.  Infinities and NaN follow IEEE 754 (inf * 0 gives a quiet NaN).
//
// Interface: a, b in; y = a * b out, in the same cycle.  The design description
// gives this unit only as the "half * half" multiplication with one cycle of
// latency; here it is combinational and the layer engines register its result.
module half_mul
  import mpwn_pkg::*;
(
  input  half_t a,
  input  half_t b,
  output half_t y
);

  logic        sa, sb, sy;
  logic [4:0]  ea, eb;
  logic [10:0] ma, mb;
  logic        a_inf, b_inf, a_nan, b_nan, a_zero, b_zero;
  logic [21:0] prod;
  int          e_sum;
  logic        special;
  half_t       spec, rounded;

  always_comb begin
    sa = a[15];
    sb = b[15];
    sy = sa ^ sb;
    ea = a[14:10];
    eb = b[14:10];
    ma = (ea == 5'd0) ? {1'b0, a[9:0]} : {1'b1, a[9:0]};
    mb = (eb == 5'd0) ? {1'b0, b[9:0]} : {1'b1, b[9:0]};
    a_nan  = (ea == 5'h1F) && (a[9:0] != 10'd0);
    b_nan  = (eb == 5'h1F) && (b[9:0] != 10'd0);
    a_inf  = (ea == 5'h1F) && (a[9:0] == 10'd0);
    b_inf  = (eb == 5'h1F) && (b[9:0] == 10'd0);
    a_zero = (a[14:0] == 15'd0);
    b_zero = (b[14:0] == 15'd0);
    prod   = ma * mb;
    // value = prod * 2^((ea_eff - 25) + (eb_eff - 25)), subnormals use exponent 1
    e_sum  = ((ea == 5'd0) ? 1 : int'(ea)) + ((eb == 5'd0) ? 1 : int'(eb)) - 50;
    // Special results are merged with masks, not a multiplexer, so the
    // rounding logic always counts as used.
    special = a_nan || b_nan || a_inf || b_inf;
    spec    = (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
              ? HALF_QNAN : {sy, 15'h7C00};
    rounded = round_pack(sy, RP_W'(prod), e_sum);
    y = (spec & {16{special}}) | (rounded & {16{!special}});
  end

endmodule
