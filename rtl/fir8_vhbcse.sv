// fir8_vhbcse: reconfigurable 8-tap FIR filter built from VHBCSE constant
// multipliers, in transposed form.
//
//   y[n] = sum_{k=0}^{TAPS-1} mult(h[k], x[n-k])
// where mult is the 16 x 17-bit VHBCSE multiplication (product ~ x*h/2^16,
// 16 bit); eight 16-bit products fit the 19-bit output.
//
// Structure: sample_reg holds the current sample x[n]. vhbcse_mcm multiplies it
// by all coefficients at once: one partial product generator shared by eight
// coefficient paths. coef_lut holds h[0]..h[7] and can be rewritten at any time
// through its write port (reconfiguration). psum_chain adds each product into
// the partial-sum chain and registers the output.
//
// Timing: a sample presented with x_valid at clock edge n enters the sample
// register at that edge; y[n] is registered at edge n+1 with y_valid high for
// one cycle. A coefficient written at edge m applies to samples processed after
// m; partial sums already in the chain keep the products of the old
// coefficients, as in any transposed-form filter. Edges without a sample leave
// the chain untouched. Reset (rst, synchronous, active high) clears samples,
// coefficients, partial sums and output.
//
// The tap count, the 16-bit input, the 17-bit coefficients, the 19-bit output
// and the sharing of one partial product generator by all coefficients follow
// the published design; the transposed form, the write port and the valid
// handshake are this design's choices.
module fir8_vhbcse
  import vh_pkg::*;
#(
  parameter int unsigned TAPS = 8,
  localparam int unsigned OW  = YW + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    x_valid,
  input  sample_t                 xin,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  coef_t                   coef_wdata,
  output logic                    y_valid,
  output logic signed [OW-1:0]    yn
);

  sample_t x_q;
  logic    x_q_valid;
  coef_t   coef [TAPS];
  prod_t   prod [TAPS];

  sample_reg u_sample (
    .clk(clk), .rst(rst), .en(x_valid), .xin(xin), .x_q(x_q), .x_q_valid(x_q_valid)
  );

  coef_lut #(.TAPS(TAPS)) u_coefs (
    .clk(clk), .rst(rst), .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef(coef)
  );

  vhbcse_mcm #(.N(TAPS)) u_mcm (.xin(x_q), .coef(coef), .prod(prod));

  psum_chain #(.TAPS(TAPS), .PW(YW), .OW(OW)) u_chain (
    .clk(clk), .rst(rst), .en(x_q_valid), .prod(prod), .y(yn)
  );

  always_ff @(posedge clk) begin
    if (rst) y_valid <= 1'b0;
    else     y_valid <= x_q_valid;
  end

endmodule
