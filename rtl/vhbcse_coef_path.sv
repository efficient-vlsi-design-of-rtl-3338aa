// vhbcse_coef_path: the per-coefficient part of the VHBCSE multiplier.
//
// Everything that depends on the coefficient: sign conversion, the layer-1
// multiplexers, the control logic generator, the controlled additions of
// layers 2 and 3, the layer-4 addition and the sign conversion of the result.
// It takes the shifted input candidates (Xin, Xin/2, A0 = Xin + Xin/2 at every
// group shift) from a partial product generator that can be shared by every
// coefficient multiplying the same sample; this sharing is the vertical 2-bit
// BCSE across coefficients.
//
//   coef_sign_conv   Hm = H[16] ? ~H[15:0] : H[15:0]
//   pp_mux_unit      layer 1: eight 4:1 muxes pick one partial product per 2-bit group
//   cl_gen           C1..C7: equal nibbles / bytes of Hm
//   add_layer2       layer 2: pairs of partial products added, equal nibbles reuse sums
//   add_layer3       layer 3: nibble sums added, equal bytes reuse the high-byte sum
//   final_add        layer 4: (AS5 + AS6) >>> 1, kept as 16 bits
//   result_sign_conv y = H[16] ? ~p : p
//
// Interface: the three candidate arrays and h in; y ~= xin*h/2^16 out.
// Combinational. The layer structure follows the published design; the number
// scaling, truncation and the form of the final sign conversion are this
// design's choices.
module vhbcse_coef_path
  import vh_pkg::*;
(
  input  pp_t   x_full [NPP],
  input  pp_t   x_half [NPP],
  input  pp_t   a0     [NPP],
  input  coef_t h,
  output prod_t y
);

  hmag_t hm;
  logic  h_sign;
  pp_t   pp     [NPP];
  ctrl_t ctrl;

  logic signed [AS1W-1:0] as1;
  logic signed [AS2W-1:0] as2;
  logic signed [AS3W-1:0] as3;
  logic signed [AS4W-1:0] as4;
  logic signed [T1W-1:0]  as5;
  logic signed [T2W-1:0]  as6;
  prod_t                  p;

  coef_sign_conv u_sign (.h(h), .hm(hm), .h_sign(h_sign));

  pp_mux_unit u_mux (.hm(hm), .x_full(x_full), .x_half(x_half), .a0(a0), .pp(pp));

  cl_gen u_cl (.hm(hm), .ctrl(ctrl));

  add_layer2 u_l2 (.pp(pp), .ctrl(ctrl), .as1(as1), .as2(as2), .as3(as3), .as4(as4));

  add_layer3 u_l3 (.as1(as1), .as2(as2), .as3(as3), .as4(as4), .c7(ctrl.c7),
                   .as5(as5), .as6(as6));

  final_add u_l4 (.as5(as5), .as6(as6), .p(p));

  result_sign_conv u_res (.p(p), .h_sign(h_sign), .y(y));

endmodule
