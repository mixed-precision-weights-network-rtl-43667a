// Ternary bitwise operation (TBO): product of a half activation and a ternary
// weight in {-1, 0, +1}.
//
// The weight is a two-bit two's-complement integer (2'b11 = -1, 2'b00 = 0,
// 2'b01 = +1).  As in XOR signed-bits, the result's sign bit is the XOR of the
// activation's sign bit and the weight's sign bit w[1].  Bit w[0] is 1 for a
// weight of +-1 and 0 for a zero weight; the 15 exponent and mantissa bits of the
// activation are ANDed with it, so a zero weight clears them.  A zero weight thus
// gives a signed zero (-0 for a negative activation), exactly as the gate-level
// description (one XOR and 15 AND gates) does.  No latency.
//
// Interface: w (two-bit weight), x (half activation) in; y = w * x out.
module tbo
  import mpwn_pkg::*;
(
  input  logic [1:0] w,
  input  half_t      x,
  output half_t      y
);

  always_comb y = {x[15] ^ w[1], x[14:0] & {15{w[0]}}};

endmodule
