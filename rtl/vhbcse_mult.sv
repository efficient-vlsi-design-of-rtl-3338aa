// vhbcse_mult: reconfigurable constant multiplier using vertical-horizontal
// binary common sub-expression elimination (VHBCSE), for a single coefficient.
//
// y ~= xin * h / 2^16, with xin a 16-bit signed sample, h a 17-bit signed
// coefficient (fraction in [-1, 1)) and y a 16-bit signed product. The
// coefficient may change every cycle.
//
// It is the partial product generator (ppg: A0 = Xin + Xin/2 and the
// right-shifted copies of Xin, Xin/2, A0) followed by one coefficient path
// (vhbcse_coef_path: sign conversion, layer-1 muxes, control logic, controlled
// additions of layers 2 to 4, result sign conversion). Each partial product is
// truncated to its own width, so y differs from the exact xin*h/2^16 by a few
// units in the last place (below 5).
//
// Interface: xin, h in; y out. Purely combinational.
// The layer structure follows the published design; number scaling, truncation
// and the form of the final sign conversion are this design's choices.
module vhbcse_mult
  import vh_pkg::*;
(
  input  sample_t xin,
  input  coef_t   h,
  output prod_t   y
);

  pp_t x_full [NPP];
  pp_t x_half [NPP];
  pp_t a0     [NPP];

  ppg u_ppg (.xin(xin), .x_full(x_full), .x_half(x_half), .a0(a0));

  vhbcse_coef_path u_path (.x_full(x_full), .x_half(x_half), .a0(a0), .h(h), .y(y));

endmodule
