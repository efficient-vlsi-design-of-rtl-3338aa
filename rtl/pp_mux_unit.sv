// pp_mux_unit: layer-1 multiplexer unit.
//
// Eight 4:1 multiplexers, one per 2-bit group of the sign-converted coefficient.
// Multiplexer k is steered by Hm[15-2k:14-2k] and picks 0, Xin/2, Xin or A0
// (each already shifted by 2k in the partial product generator) as the partial
// product pp[k]. This is the vertical 2-bit BCSE: the four candidates are shared
// by every coefficient that multiplies the same sample, only the selection
// depends on the coefficient.
//
// Interface: hm and the three candidate arrays in (only the low 17-2k bits of
// entry k are used); pp[0..7] (17-bit,
// sign-extended, significant width 17-2k) out. Combinational.
// Structure follows the published design.
module pp_mux_unit
  import vh_pkg::*;
(
  input  hmag_t hm,
  input  pp_t   x_full [NPP],
  input  pp_t   x_half [NPP],
  input  pp_t   a0     [NPP],
  output pp_t   pp     [NPP]
);

  // Each mux is only as wide as its partial product (17-2k bits); the result is
  // sign-extended to the common 17-bit type afterwards.
  for (genvar k = 0; k < NPP; k++) begin : g_mux
    localparam int unsigned W = pp_width(k);
    logic [W-1:0] sel_w;
    always_comb begin
      unique case (bcs_t'(hm[MW-1-2*k -: 2]))
        BCS_00:  sel_w = '0;
        BCS_01:  sel_w = x_half[k][W-1:0];
        BCS_10:  sel_w = x_full[k][W-1:0];
        BCS_11:  sel_w = a0[k][W-1:0];
        default: sel_w = '0;
      endcase
    end
    assign pp[k] = PPW'(signed'(sel_w));
  end

endmodule
