// cl_gen: control logic generator of the horizontal BCSE.
//
// Splits the sign-converted coefficient Hm into the nibbles Hm[15:12],
// Hm[11:8], Hm[7:4], Hm[3:0] and compares them pairwise with six 4-bit
// equality comparators (an XNOR per bit, all four combined), giving C1..C6.
// The 8-bit check C7 (Hm[15:8] == Hm[7:0]) is not a seventh comparator: it is
// derived from the 4-bit results, C7 = C2 & C5.
//   C1: [15:12]==[11:8]  C2: [15:12]==[7:4]  C3: [11:8]==[7:4]
//   C4: [15:12]==[3:0]   C5: [11:8]==[3:0]   C6: [7:4]==[3:0]
//
// Interface: hm in; ctrl (struct of c1..c7) out. Combinational.
// The comparator pairs, the XNOR structure and the derivation of C7 from C2 and
// C5 follow the published design.
module cl_gen
  import vh_pkg::*;
(
  input  hmag_t hm,
  output ctrl_t ctrl
);

  logic [3:0] nib [NNIB];

  for (genvar j = 0; j < NNIB; j++) begin : g_nib
    assign nib[j] = hm[MW-1-4*j -: 4];
  end

  // 4-bit comparator: XNOR each bit pair, then combine.
  function automatic logic comp4(logic [3:0] p, logic [3:0] q);
    return &(p ~^ q);
  endfunction

  always_comb begin
    ctrl.c1 = comp4(nib[0], nib[1]);
    ctrl.c2 = comp4(nib[0], nib[2]);
    ctrl.c3 = comp4(nib[1], nib[2]);
    ctrl.c4 = comp4(nib[0], nib[3]);
    ctrl.c5 = comp4(nib[1], nib[3]);
    ctrl.c6 = comp4(nib[2], nib[3]);
    ctrl.c7 = ctrl.c2 & ctrl.c5;
  end

endmodule
