// One lane's multiplier, chosen by the layer's weight space.
//
// The weight space of a layer is fixed when the network is built, so the choice
// is made at elaboration: an F layer gets a full binary16 multiplier (half_mul),
// a B layer the XOR signed-bits unit (xsb) and a T layer the ternary bitwise
// operation (tbo).  This replacement of the multiplier by bit operations in the
// B and T layers is the central hardware idea of the design.
//
// Interface: w (WB bits: 16, 1 or 2 for F, B, T), x (half activation) in;
// y = w * x out, combinational.
module weight_mul
  import mpwn_pkg::*;
#(
  parameter wspace_e     WSPACE = WS_T,
  parameter int unsigned WB     = wbits(WSPACE)
) (
  input  logic [WB-1:0] w,
  input  half_t         x,
  output half_t         y
);

  generate
    if (WSPACE == WS_F) begin : g_f
      half_mul u_mul (.a(x), .b(half_t'(w)), .y(y));
    end else if (WSPACE == WS_B) begin : g_b
      xsb u_xsb (.w(w[0]), .x(x), .y(y));
    end else begin : g_t
      tbo u_tbo (.w(w[1:0]), .x(x), .y(y));
    end
  endgenerate

endmodule
