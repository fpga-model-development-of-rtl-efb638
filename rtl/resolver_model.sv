// resolver_model: SIN and COS winding voltages of the rotor-position resolver.
//
// A resolver is a rotating transformer: the ECU excites one winding with a
// high-frequency carrier and the two stator windings, 90 degrees apart, return
// the carrier modulated by the sine and cosine of the rotor angle:
//     u_sin = k*u0sin * carrier * sin(theta),  u_cos = k*u0cos * carrier * cos(theta)
// Here the excitation reaches the FPGA as one digital input, so the carrier is
// taken as +1 while exc is high and -1 while it is low; the ECU recovers the
// angle from the envelope as with a sine carrier. The envelope equations are
// the document's; the square carrier follows from the single digital
// excitation input and is this design's reading.
//
// Interface: exc (synchronised excitation bit); sin_r/cos_r Q1.30, the sine
// and cosine of the resolver angle; amp_s = k*u0sin and amp_c = k*u0cos, the
// two winding amplitudes, in Q15.16 volts; u_sin/u_cos Q15.16 volts. Timing: outputs registered, latency 1 clock.
module resolver_model
  import pmsm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic exc,
  input  q30_t sin_r,
  input  q30_t cos_r,
  input  q16_t amp_s,
  input  q16_t amp_c,
  output q16_t u_sin,
  output q16_t u_cos
);

  q16_t env_s, env_c;

  assign env_s = fmul(amp_s, sin_r, Q30);
  assign env_c = fmul(amp_c, cos_r, Q30);

  always_ff @(posedge clk) begin
    if (rst) begin
      u_sin <= '0;
      u_cos <= '0;
    end else begin
      u_sin <= exc ? env_s : -env_s;
      u_cos <= exc ? env_c : -env_c;
    end
  end

endmodule
