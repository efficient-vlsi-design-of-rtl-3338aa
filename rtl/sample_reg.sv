// sample_reg: input sample register of the FIR filter.
//
// Captures xin on a clock edge with en high and holds it, together with a
// valid flag, until the next enabled edge. In the transposed-form filter this
// one register feeds every multiplier, so all coefficients multiply the same
// stored sample. A synchronous, active-high reset clears sample and flag.
//
// Interface: clk, rst, en, xin in; x_q (held sample), x_q_valid (x_q was loaded
// at the last edge) out. One cycle from xin to x_q.
// The published design only says the sampled inputs are kept in a register; the
// enable, valid flag and reset are this design's choices.
module sample_reg
  import vh_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t xin,
  output sample_t x_q,
  output logic    x_q_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q       <= '0;
      x_q_valid <= 1'b0;
    end else begin
      x_q_valid <= en;
      if (en) x_q <= xin;
    end
  end

endmodule
