// vhbcse_mcm: multiple constant multiplication of one sample by N coefficients.
//
// One partial product generator (ppg) forms A0 = Xin + Xin/2 and the shifted
// copies of Xin, Xin/2 and A0 once; N coefficient paths (vhbcse_coef_path)
// share them and each selects, adds and sign-corrects its own product. This is
// the vertical 2-bit BCSE: the sub-expressions of the 2-bit groups are common
// to all coefficients, so the N multipliers need a single extra adder for
// pattern '11' between them. Coefficients may change every cycle.
//
// Interface: xin, coef[0..N-1] in; prod[k] ~= xin*coef[k]/2^16 out.
// Purely combinational. Sharing the generator across the coefficients follows
// the published design; N defaults to its 8-tap filter.
module vhbcse_mcm
  import vh_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sample_t xin,
  input  coef_t   coef [N],
  output prod_t   prod [N]
);

  pp_t x_full [NPP];
  pp_t x_half [NPP];
  pp_t a0     [NPP];

  ppg u_ppg (.xin(xin), .x_full(x_full), .x_half(x_half), .a0(a0));

  for (genvar k = 0; k < N; k++) begin : g_path
    vhbcse_coef_path u_path (
      .x_full(x_full), .x_half(x_half), .a0(a0), .h(coef[k]), .y(prod[k])
    );
  end

endmodule
