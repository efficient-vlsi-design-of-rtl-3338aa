// add_layer3: controlled addition at layer 3 (second horizontal BCSE step).
//
// Two adders combine the layer-2 sums into the weight of the two coefficient
// bytes: T1 = AS1 + AS2 (high byte Hm[15:8]) and T2 = AS3 + AS4 (low byte
// Hm[7:0]). When the bytes are equal (C7) the low-byte sum is the high-byte sum
// shifted right by 8, and mux M1 takes that instead of T2:
//   AS5 = T1        AS6 = C7 ? T1>>>8 : T2
// While C7 is set the operands of the T2 adder are forced to zero (operand
// isolation), so the unused adder does not toggle.
//
// Interface: as1..as4 and c7 in; as5 (18 bit) and as6 (10 bit) signed out.
// Combinational. Structure follows the published design; the widths (one sign bit and
// one carry bit above the 16/8 given there) and the isolation gates are this
// design's choices.
module add_layer3
  import vh_pkg::*;
(
  input  logic signed [AS1W-1:0] as1,
  input  logic signed [AS2W-1:0] as2,
  input  logic signed [AS3W-1:0] as3,
  input  logic signed [AS4W-1:0] as4,
  input  logic                   c7,
  output logic signed [T1W-1:0]  as5,
  output logic signed [T2W-1:0]  as6
);

  logic [T1W-1:0] t1;
  logic [T2W-1:0] t2;
  logic           t1_cout, t2_cout;

  csk_adder #(.WIDTH(T1W)) u_a1 (
    .a(T1W'(as1)), .b(T1W'(as2)), .cin(1'b0), .sum(t1), .cout(t1_cout)
  );
  csk_adder #(.WIDTH(T2W)) u_a2 (
    .a(T2W'(as3) & {T2W{!c7}}), .b(T2W'(as4) & {T2W{!c7}}), .cin(1'b0), .sum(t2), .cout(t2_cout)
  );

  logic signed [T1W-1:0] t1_shift;
  assign t1_shift = signed'(t1) >>> 8;

  assign as5 = signed'(t1);
  assign as6 = c7 ? t1_shift[T2W-1:0] : signed'(t2);

endmodule
