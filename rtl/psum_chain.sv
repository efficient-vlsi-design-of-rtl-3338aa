// psum_chain: partial-sum delay chain of a transposed-form FIR filter.
//
// Holds TAPS-1 partial sums z[1..TAPS-1]. On an enabled clock edge, with
// prod[k] = h[k] * x[n]:
//   y    <= prod[0] + z[1]
//   z[k] <= prod[k] + z[k+1]      (z[TAPS] = 0)
// so y = sum_k h[k] * x[n-k], each product taken with the coefficient in force
// when its sample was processed. Sums are OW bits wide, enough for TAPS
// products of PW bits without overflow. Disabled edges hold everything. A
// synchronous, active-high reset clears the chain and the output.
//
// Interface: clk, rst, en, prod[0..TAPS-1] in; y out (registered).
// The published design gives the filter only as an 8-tap FIR; the transposed
// form is this design's choice, made so that one input sample meets all
// coefficients at once and the partial product generator can be shared.
module psum_chain #(
  parameter int unsigned TAPS = 8,
  parameter int unsigned PW   = 16,
  parameter int unsigned OW   = PW + $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [PW-1:0] prod [TAPS],
  output logic signed [OW-1:0] y
);

  logic signed [OW-1:0] z [1:TAPS];  // z[TAPS] is the constant 0
  logic signed [OW-1:0] z_next [TAPS];

  assign z[TAPS] = '0;

  always_comb begin
    for (int unsigned k = 0; k < TAPS; k++) z_next[k] = OW'(prod[k]) + z[k+1];
  end

  for (genvar k = 1; k < TAPS; k++) begin : g_z
    always_ff @(posedge clk) begin
      if (rst)     z[k] <= '0;
      else if (en) z[k] <= z_next[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= z_next[0];
  end

endmodule
