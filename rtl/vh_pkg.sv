// vh_pkg: widths, types and constants shared by the VHBCSE constant multiplier
// and the 8-tap FIR filter built from it.
//
// Number format. The input sample Xin is a 16-bit two's-complement integer. The
// coefficient H is a 17-bit two's-complement fraction: H[16] is the sign, and the
// magnitude path works on the 16-bit word Hm whose bit 15 weighs 1/2 and bit 0
// weighs 1/65536. The product keeps the upper 16 bits, i.e. y ~= Xin * H / 2^16.
// The 16/17/16-bit sizes follow the published design; the fractional scaling is this
// design's reading of the widths printed in its architecture figure.
//
// The magnitude coefficient is cut into eight 2-bit groups (binary common
// sub-expressions, BCS), four 4-bit nibbles and two bytes. Group k (k = 0 is the
// most significant, Hm[15:14]) yields a partial product that is 17-2k bits wide.
package vh_pkg;

  localparam int unsigned XW   = 16;  // input sample width
  localparam int unsigned HW   = 17;  // coefficient width, sign included
  localparam int unsigned MW   = 16;  // width of the sign-converted coefficient Hm
  localparam int unsigned YW   = 16;  // product width
  localparam int unsigned NPP  = 8;   // 2-bit groups = partial products
  localparam int unsigned PPW  = 17;  // widest partial product (group 0)
  localparam int unsigned NNIB = 4;   // 4-bit nibbles of Hm

  // Layer-2 sum widths AS1..AS4 (17-4j bits) and layer-3/4 internal widths.
  localparam int unsigned AS1W = 17;
  localparam int unsigned AS2W = 13;
  localparam int unsigned AS3W = 9;
  localparam int unsigned AS4W = 5;
  localparam int unsigned T1W  = 18;  // AS1 + AS2, also AS5
  localparam int unsigned T2W  = 10;  // AS3 + AS4, also AS6
  localparam int unsigned FW   = 19;  // AS5 + AS6 before the final shift

  typedef logic signed [XW-1:0]  sample_t;
  typedef logic signed [HW-1:0]  coef_t;
  typedef logic        [MW-1:0]  hmag_t;
  typedef logic signed [PPW-1:0] pp_t;     // partial product, sign-extended to 17 bits
  typedef logic signed [YW-1:0]  prod_t;

  // Value of one 2-bit binary common sub-expression and the partial product it selects.
  typedef enum logic [1:0] {
    BCS_00 = 2'b00,  // 0
    BCS_01 = 2'b01,  // Xin/2 (scaled by the group position)
    BCS_10 = 2'b10,  // Xin
    BCS_11 = 2'b11   // A0 = Xin + Xin/2, the one pattern that costs an adder
  } bcs_t;

  // Equality flags of the control logic generator.
  typedef struct packed {
    logic c1;  // Hm[15:12] == Hm[11:8]
    logic c2;  // Hm[15:12] == Hm[7:4]
    logic c3;  // Hm[11:8]  == Hm[7:4]
    logic c4;  // Hm[15:12] == Hm[3:0]
    logic c5;  // Hm[11:8]  == Hm[3:0]
    logic c6;  // Hm[7:4]   == Hm[3:0]
    logic c7;  // Hm[15:8]  == Hm[7:0]
  } ctrl_t;

  // Significant width of partial product k.
  function automatic int unsigned pp_width(int unsigned k);
    return PPW - 2 * k;
  endfunction

endpackage
