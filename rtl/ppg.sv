// ppg: partial product generator for the eight 2-bit groups of the coefficient.
//
// The only adder of layer 1 forms A0 = Xin + Xin/2, the partial product of the
// pattern '11'. Every other candidate is a hard-wired arithmetic right shift:
// for group k (k = 0 takes Hm[15:14]) the candidates are
//   x_full[k] = Xin      >>> 2k    (pattern '10')
//   x_half[k] = Xin      >>> 2k+1  (pattern '01')
//   a0[k]     = A0       >>> 2k    (pattern '11')
// so group k's candidates are the group-0 candidates shifted right by 2k, and
// group k needs only 17-2k significant bits (17, 15, ..., 3). All outputs are
// sign-extended to 17 bits; the bits that are dropped by the shifts are
// truncated (rounded toward minus infinity).
//
// Interface: xin (16-bit signed) in; three arrays of eight 17-bit candidates out.
// Combinational. The shift/scale values (Xin/2 ... Xin/32768) and widths follow
// the published design; dropping the shifted-out bits is this design's reading.
module ppg
  import vh_pkg::*;
(
  input  sample_t xin,
  output pp_t     x_full [NPP],
  output pp_t     x_half [NPP],
  output pp_t     a0     [NPP]
);

  pp_t x_ext, x_half_ext, a0_0;
  logic a0_cout;

  assign x_ext      = PPW'(xin);          // sign extension to 17 bits
  assign x_half_ext = x_ext >>> 1;

  csk_adder #(.WIDTH(PPW)) u_a0 (
    .a   (x_ext),
    .b   (x_half_ext),
    .cin (1'b0),
    .sum (a0_0),
    .cout(a0_cout)
  );

  for (genvar k = 0; k < NPP; k++) begin : g_shift
    assign x_full[k] = x_ext >>> (2 * k);
    assign x_half[k] = x_ext >>> (2 * k + 1);
    assign a0[k]     = a0_0  >>> (2 * k);
  end

endmodule
