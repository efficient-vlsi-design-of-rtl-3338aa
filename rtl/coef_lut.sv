// coef_lut: coefficient look-up table of the reconfigurable FIR filter.
//
// TAPS registers of one 17-bit coefficient each, all read in parallel (every
// tap's multiplier sees its own coefficient every cycle). One write port lets a
// host load a new coefficient set while the filter runs: a write at a clock
// edge takes effect for the multipliers right after that edge. A synchronous,
// active-high reset clears all coefficients to zero.
//
// Interface: clk, rst, we, waddr, wdata in; coef[0..TAPS-1] out.
// The published design only says the coefficients are kept in a LUT and change at run
// time; the write port, reset and parallel read are this design's choices.
module coef_lut
  import vh_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      we,
  input  logic [$clog2(TAPS)-1:0]   waddr,
  input  coef_t                     wdata,
  output coef_t                     coef [TAPS]
);

  coef_t mem [TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < TAPS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign coef = mem;

endmodule
