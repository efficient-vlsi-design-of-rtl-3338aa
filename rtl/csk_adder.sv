// csk_adder: WIDTH-bit carry-skip adder, used for every addition of the multiplier.
//
// The operands are cut into blocks of BLOCK bits. Inside a block the carry
// ripples; when every bit of a block propagates (a ^ b all ones) the block's
// carry-out is taken straight from its carry-in, so a carry crosses a fully
// propagating block in one step instead of BLOCK steps. The sum is the plain
// two's-complement / unsigned sum: signed callers sign-extend the operands to
// WIDTH bits and read sum as signed.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The published design recommends a carry-skip adder over a ripple-carry adder; the block
// size of 4 is this design's choice.
module csk_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  always_comb begin
    logic c;         // running carry
    logic blk_cin;   // carry into the current block
    logic blk_prop;  // every bit of the block propagates
    c   = cin;
    sum = '0;
    for (int unsigned blk = 0; blk < NBLK; blk++) begin
      blk_cin  = c;
      blk_prop = 1'b1;
      for (int unsigned j = 0; j < BLOCK; j++) begin
        if (blk * BLOCK + j < WIDTH) begin
          sum[blk*BLOCK+j] = a[blk*BLOCK+j] ^ b[blk*BLOCK+j] ^ c;
          c        = (a[blk*BLOCK+j] & b[blk*BLOCK+j]) | (c & (a[blk*BLOCK+j] ^ b[blk*BLOCK+j]));
          blk_prop = blk_prop & (a[blk*BLOCK+j] ^ b[blk*BLOCK+j]);
        end
      end
      if (blk_prop) c = blk_cin;  // skip path
    end
    cout = c;
  end

endmodule
