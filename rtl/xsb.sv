// XOR signed-bits (XSB): product of a half activation and a binary weight.
//
// A binary weight is +1 or -1, so the product only changes the sign of the
// activation: the result's sign bit is the XOR of the activation's sign bit and
// the weight's sign bit, and the 15 exponent and mantissa bits pass unchanged.
// The weight is the one-bit signed integer of the design description, where
// 1'b1 means -1 and 1'b0 stands for +1.  One XOR gate, no latency.
//
// Interface: w (weight sign bit), x (half activation) in; y = w * x out.
module xsb
  import mpwn_pkg::*;
(
  input  logic  w,
  input  half_t x,
  output half_t y
);

  always_comb y = {x[15] ^ w, x[14:0]};

endmodule
