// thermal_integrator - one discrete first-order thermal stage.
//
// Implements H(z) = A z^-1 / (1 - B z^-1), the forward-Euler form of
// R/(1 + s*tau), with A = h*R/tau and B = 1 - h/tau as in the paper:
//     y[n] = B * y[n-1] + A * x[n-1]
// The state y and the coefficients A and B are Q0.WI (default 24, the paper's
// integrator width); the Q0.W input is widened to Q0.WI. Both products are
// kept to 2*WI bits, added, and truncated back to WI bits; the state saturates
// just below 1 pu. Truncation, saturation and reset to zero are this design's
// choices.
//
// Timing: on each clock with `en` high the state takes its next value; y is
// the state register, so it reflects inputs up to the previous update.
module thermal_integrator
  import thermal_pkg::*;
#(
  parameter int          W  = PU_W,
  parameter int          WI = INT_W,
  parameter int unsigned A  = 33554,     // 0.002 in Q0.24
  parameter int unsigned B  = 16609444   // 0.99  in Q0.24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  x,
  output logic [WI-1:0] y
);
  logic [2*WI-1:0] prod_b, prod_a;
  logic [2*WI:0]   sum;
  logic [WI-1:0]   xw, nxt;

  always_comb begin
    xw     = (WI >= W) ? WI'({x, {WI{1'b0}}} >> W) : WI'(x >> (W - WI));
    prod_b = y * WI'(B);
    prod_a = xw * WI'(A);
    sum    = {1'b0, prod_b} + {1'b0, prod_a};
    nxt    = sum[2*WI] ? '1 : sum[2*WI-1:WI];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= nxt;
  end

  initial assert (longint'(A) < (64'd1 << WI) && longint'(B) < (64'd1 << WI) && WI <= 31)
    else $error("thermal_integrator: coefficients must be below 1");
endmodule
