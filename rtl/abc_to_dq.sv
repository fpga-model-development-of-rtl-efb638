// abc_to_dq: three-phase to rotating d/q frame.
//
// Stage 1 forms the stationary alpha/beta components of a star-connected,
// balanced three-phase quantity (xa + xb + xc = 0, so xc is not needed):
//     x_alpha = 3/2*K * xa
//     x_beta  = K * (sqrt(3)/2 * xa + sqrt(3) * xb)
// Stage 2 rotates them into the rotor frame with the rotor electrical angle:
//     xd =  cos(theta)*x_alpha + sin(theta)*x_beta
//     xq = -sin(theta)*x_alpha + cos(theta)*x_beta
// These are the document's Clarke and Park equations. K is the transformation
// constant (2/3 gives amplitude-invariant d/q values); kt = 3/2*K is supplied
// precomputed by the processor.
//
// Interface: xa, xb Q15.16; k, kt, sin_t, cos_t Q1.30; xd, xq Q15.16.
// Timing: both stages are registered every clock, latency 2 clocks.
module abc_to_dq
  import pmsm_pkg::*;
(
  input  logic clk,
  input  q16_t xa,
  input  q16_t xb,
  input  q30_t k,
  input  q30_t kt,
  input  q30_t sin_t,
  input  q30_t cos_t,
  output q16_t xd,
  output q16_t xq
);

  q16_t x_al, x_be;
  q16_t beta_sum;

  assign beta_sum = fmul(xa, Q30_SQRT3_2, Q30) + fmul(xb, Q30_SQRT3, Q30);

  always_ff @(posedge clk) begin
    x_al <= fmul(xa, kt, Q30);
    x_be <= fmul(beta_sum, k, Q30);
    xd   <= fmul(x_al, cos_t, Q30) + fmul(x_be, sin_t, Q30);
    xq   <= fmul(x_be, cos_t, Q30) - fmul(x_al, sin_t, Q30);
  end

endmodule
