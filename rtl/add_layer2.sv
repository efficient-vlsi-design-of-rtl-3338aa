// add_layer2: controlled addition at layer 2 (first horizontal BCSE step).
//
// Four adders sum the partial products in pairs, one pair per nibble of Hm:
//   S1 = pp0+pp1 (17 bit)  S2 = pp2+pp3 (13 bit)  S3 = pp4+pp5 (9 bit)  S4 = pp6+pp7 (5 bit)
// When two nibbles of the coefficient are equal, the sum of the lower nibble is
// the sum of the higher one shifted right by 4 bits per nibble of distance, so
// it is taken from the higher adder instead:
//   AS1 = S1
//   AS2 = C1 ? S1>>>4 : S2                          (mux M1)
//   AS3 = C2 ? S1>>>8 : (C3 ? S2>>>4 : S3)          (M3 after M2)
//   AS4 = C4 ? S1>>>12 : (C5 ? S2>>>8 : (C6 ? S3>>>4 : S4))   (M6, M5, M4)
// Because the partial products are truncated, a reused sum can differ from the
// adder's own result by a few units in its last place; the multiplier accepts
// that as part of its truncation error.
//
// An adder whose sum reaches no output for the current flags has its operands
// forced to zero (operand isolation), so it does not toggle while the
// coefficient stays the same; this is where the horizontal BCSE saves power:
//   S2 is needed if !C1, or C3 & !C2, or C5 & !C4
//   S3 is needed if !C2 & !C3, or C6 & !C4 & !C5
//   S4 is needed if !C4 & !C5 & !C6
//
// Interface: pp[0..7] and ctrl in; as1..as4 (signed, 17/13/9/5 bits) out.
// Combinational. Adders, muxes, shift amounts and control pairing follow the
// published design, as does the aim of keeping unused adders from switching;
// the isolation gates and the widths (one more sign bit than the 16/12/8/4 bits
// given there) are this design's choices.
module add_layer2
  import vh_pkg::*;
(
  input  pp_t   pp [NPP],
  input  ctrl_t ctrl,
  output logic signed [AS1W-1:0] as1,
  output logic signed [AS2W-1:0] as2,
  output logic signed [AS3W-1:0] as3,
  output logic signed [AS4W-1:0] as4
);

  pp_t s [NNIB];            // group sums A1..A4, sign-extended to 17 bits
  logic [NNIB-1:0] need;    // adder j's sum reaches an output

  always_comb begin
    need[0] = 1'b1;
    need[1] = !ctrl.c1 || (ctrl.c3 && !ctrl.c2) || (ctrl.c5 && !ctrl.c4);
    need[2] = (!ctrl.c2 && !ctrl.c3) || (ctrl.c6 && !ctrl.c4 && !ctrl.c5);
    need[3] = !ctrl.c4 && !ctrl.c5 && !ctrl.c6;
  end

  for (genvar j = 0; j < NNIB; j++) begin : g_add
    localparam int unsigned W = PPW - 4 * j;
    logic [W-1:0] sum_w;
    logic         cout_unused;
    csk_adder #(.WIDTH(W)) u_add (
      .a   (pp[2*j][W-1:0]   & {W{need[j]}}),
      .b   (pp[2*j+1][W-1:0] & {W{need[j]}}),
      .cin (1'b0),
      .sum (sum_w),
      .cout(cout_unused)
    );
    assign s[j] = PPW'(signed'(sum_w));
  end

  pp_t m1, m2, m3, m4, m5, m6;

  always_comb begin
    m1 = ctrl.c1 ? (s[0] >>> 4)  : s[1];
    m2 = ctrl.c3 ? (s[1] >>> 4)  : s[2];
    m3 = ctrl.c2 ? (s[0] >>> 8)  : m2;
    m4 = ctrl.c6 ? (s[2] >>> 4)  : s[3];
    m5 = ctrl.c5 ? (s[1] >>> 8)  : m4;
    m6 = ctrl.c4 ? (s[0] >>> 12) : m5;
  end

  assign as1 = s[0][AS1W-1:0];
  assign as2 = m1[AS2W-1:0];
  assign as3 = m3[AS3W-1:0];
  assign as4 = m6[AS4W-1:0];

endmodule
