// final_add: layer-4 addition.
//
// Adds the high-byte sum AS5 and the low-byte sum AS6 and shifts the result
// right by one, which turns the layer sums (scaled by 2^-15) into the product
// Xin * Hm / 2^16, kept as 16 bits. Every partial product is truncated toward
// minus infinity, so the sum can only fall below the exact value; for the
// largest magnitudes (Xin = -32768, Hm = 0xFFFF) it reaches exactly -32768,
// and the positive side stays below 32767. The narrowing to 16 bits therefore
// never wraps for the values the multiplier feeds in; a deferred assertion
// guards that.
//
// Interface: as5 (18 bit), as6 (10 bit) in; p (16-bit signed) out. Combinational.
// The addition and the final shift by one follow the published design.
module final_add
  import vh_pkg::*;
(
  input  logic signed [T1W-1:0] as5,
  input  logic signed [T2W-1:0] as6,
  output prod_t                 p
);

  logic [FW-1:0]         f;
  logic                  f_cout;
  logic signed [FW-2:0]  half;

  csk_adder #(.WIDTH(FW)) u_a (
    .a(FW'(as5)), .b(FW'(as6)), .cin(1'b0), .sum(f), .cout(f_cout)
  );

  assign half = f[FW-1:1];  // >>> 1 of the signed sum
  assign p    = half[YW-1:0];

  always_comb begin
    a_range: assert final (half >= -(FW-1)'(32768) && half <= (FW-1)'(32767))
      else $error("final_add: product %0d outside 16 bits", half);
  end

endmodule
