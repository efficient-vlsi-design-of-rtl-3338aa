// coef_sign_conv: sign conversion of the coefficient.
//
// A 1's complementer inverts the 16 bits below the sign and a 2:1 multiplexer,
// selected by the sign bit H[16], passes either H[15:0] (H >= 0) or ~H[15:0]
// (H < 0) on as Hm[15:0]. For a negative two's-complement H this gives
// Hm = |H| - 1; the missing 1 is accounted for by the result sign conversion,
// which applies a 1's complement to the product. Small negative coefficients
// therefore map to small Hm with few nonzero 2-bit groups.
//
// Interface: h (17 bits) in; hm (16 bits) and h_sign out. Combinational.
// Structure follows the published design; the output of the sign bit as its own port is
// this design's choice.
module coef_sign_conv
  import vh_pkg::*;
(
  input  coef_t h,
  output hmag_t hm,
  output logic  h_sign
);

  hmag_t h_inv;

  assign h_sign = h[HW-1];
  assign h_inv  = ~h[MW-1:0];                   // 1's complementer
  assign hm     = h_sign ? h_inv : h[MW-1:0];   // 2:1 mux

endmodule
