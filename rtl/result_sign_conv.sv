// result_sign_conv: sign conversion of the final result.
//
// The magnitude path multiplied by Hm, which for a negative coefficient is
// ~H[15:0] = |H| - 1. Inverting the product (1's complement, -p - 1) restores
// the sign without an adder; the error this leaves, Xin/2^16 - 1 in units of
// the last place, stays within the truncation error of the multiplier.
//
// Interface: p and h_sign in; y out. Combinational.
// The published design names this block and drives it by the coefficient's MSB; the
// 1's complement form is this design's choice, mirroring the coefficient's
// sign conversion.
module result_sign_conv
  import vh_pkg::*;
(
  input  prod_t p,
  input  logic  h_sign,
  output prod_t y
);

  assign y = h_sign ? ~p : p;

endmodule
