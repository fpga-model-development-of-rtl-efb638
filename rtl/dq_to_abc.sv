// dq_to_abc: rotating d/q frame back to three phase quantities.
//
// Inverse of abc_to_dq. Stage 1 rotates back to the stationary frame:
//     x_alpha = cos(theta)*xd - sin(theta)*xq
//     x_beta  = sin(theta)*xd + cos(theta)*xq
// Stage 2 inverts the alpha/beta transformation with kinv = 2/(3K):
//     xa = kinv * x_alpha
//     xb = kinv * (-x_alpha/2 + sqrt(3)/2 * x_beta)
//     xc = -xa - xb
// The document prints only the forward transformation; this inverse is its
// matrix inverse for a balanced star-connected system. It gives the phase
// currents of the machine model and the phase back-EMFs for the inverter.
//
// Interface: xd, xq Q15.16; kinv, sin_t, cos_t Q1.30; xa, xb, xc Q15.16.
// Timing: two registered stages, latency 2 clocks.
module dq_to_abc
  import pmsm_pkg::*;
(
  input  logic clk,
  input  q16_t xd,
  input  q16_t xq,
  input  q30_t kinv,
  input  q30_t sin_t,
  input  q30_t cos_t,
  output q16_t xa,
  output q16_t xb,
  output q16_t xc
);

  q16_t x_al, x_be;
  q16_t b_pre, a_out, b_out;

  assign a_out = fmul(x_al, kinv, Q30);
  assign b_pre = fmul(x_be, Q30_SQRT3_2, Q30) - (x_al >>> 1);
  assign b_out = fmul(b_pre, kinv, Q30);

  always_ff @(posedge clk) begin
    x_al <= fmul(xd, cos_t, Q30) - fmul(xq, sin_t, Q30);
    x_be <= fmul(xd, sin_t, Q30) + fmul(xq, cos_t, Q30);
    xa   <= a_out;
    xb   <= b_out;
    xc   <= -a_out - b_out;
  end

endmodule
