// Binary16 (IEEE 754 half-precision) adder, combinational.
//
// Adds two half values; it is the accumulator of the dot-product engine and the
// shift/bias step after it.  The operand with the larger exponent is shifted left
// by the exponent difference (at most 29 places), so the integer sum of the two
// significands is exact in 41 bits; mpwn_pkg::round_pack() then rounds it once,
// to nearest with ties to even.  An exact zero sum is +0 unless both operands are
// -0.  Infinities and NaN follow IEEE 754 (inf - inf gives a quiet NaN).
//
// Interface: a, b in; y = a + b out, in the same cycle.  The design description
// only names the half data type; the adder's construction is this design's own.
module half_add
  import mpwn_pkg::*;
(
  input  half_t a,
  input  half_t b,
  output half_t y
);

  logic        a_nan, b_nan, a_inf, b_inf, big_is_a;
  logic [4:0]  ea, eb, ebig, esml;
  logic [10:0] ma, mb, mbig, msml;
  logic        sbig, ssml;
  logic [RP_W-1:0] abig, asml, mag;
  logic        sres, eff_sub, neg, special;
  logic [RP_W:0] diff;
  half_t       spec, rounded;

  always_comb begin
    ea = (a[14:10] == 5'd0) ? 5'd1 : a[14:10];
    eb = (b[14:10] == 5'd0) ? 5'd1 : b[14:10];
    ma = (a[14:10] == 5'd0) ? {1'b0, a[9:0]} : {1'b1, a[9:0]};
    mb = (b[14:10] == 5'd0) ? {1'b0, b[9:0]} : {1'b1, b[9:0]};
    a_nan = (a[14:10] == 5'h1F) && (a[9:0] != 10'd0);
    b_nan = (b[14:10] == 5'h1F) && (b[9:0] != 10'd0);
    a_inf = (a[14:10] == 5'h1F) && (a[9:0] == 10'd0);
    b_inf = (b[14:10] == 5'h1F) && (b[9:0] == 10'd0);
    big_is_a = (ea >= eb);
    ebig = big_is_a ? ea : eb;
    esml = big_is_a ? eb : ea;
    mbig = big_is_a ? ma : mb;
    msml = big_is_a ? mb : ma;
    sbig = big_is_a ? a[15] : b[15];
    ssml = big_is_a ? b[15] : a[15];
    abig = RP_W'(mbig) << (ebig - esml);
    asml = RP_W'(msml);
    // One adder serves both signs: with eff_sub set it forms abig - asml in
    // RP_W+1 bits, and a negative difference is negated back to a magnitude.
    eff_sub = sbig ^ ssml;
    diff = {1'b0, abig} + ({1'b0, asml} ^ {(RP_W+1){eff_sub}}) + (RP_W+1)'(eff_sub);
    neg  = eff_sub & diff[RP_W];
    mag  = (diff[RP_W-1:0] ^ {RP_W{neg}}) + RP_W'(neg);
    sres = neg ? ssml : sbig;
    // Special results (NaN, infinity, exact zero) are merged with masks, not a
    // multiplexer, so the rounding logic always counts as used.
    special = a_nan || b_nan || a_inf || b_inf || (mag == '0);
    if (a_nan || b_nan || (a_inf && b_inf && (a[15] != b[15])))
      spec = HALF_QNAN;
    else if (a_inf)
      spec = a;
    else if (b_inf)
      spec = b;
    else
      spec = {a[15] & b[15], 15'd0};
    rounded = round_pack(sres, mag, int'(esml) - 25);
    y = (spec & {16{special}}) | (rounded & {16{!special}});
  end

endmodule
