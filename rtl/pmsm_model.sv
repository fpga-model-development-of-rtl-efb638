// pmsm_model: electrical part of the permanent-magnet synchronous machine in
// the rotor (d/q) frame.
//
// Once per model step the d/q stator currents are advanced by a forward-Euler
// step of the machine equations
//     Ld did/dt = ud - Rs*id + w*Lq*iq
//     Lq diq/dt = uq - Rs*iq - w*Ld*id - w*Psi_p
// as  i <= i + (Ts/L) * (right-hand side), where Ts/Ld and Ts/Lq arrive
// precomputed, like the integrator structure the document shows (voltage
// minus Rs*i, times Ts/L, into a resettable integrator with the current fed
// back). Every clock the outputs derived from the state are refreshed:
//     torque = 3/2*K * (Psi_p + (Ld - Lq)*id) * iq
//     uemf   = w * Psi_p
// Ld/Lq may change every step (3D tables); they enter the equations as
// printed in the document, without a dL/dt term.
// The integrators keep 16 fraction bits below the Q15.16 output, so small
// increments are not lost.
//
// Interface: ud, uq, we (electrical speed) Q15.16; ld, lq, gd (=Ts/Ld),
// gq (=Ts/Lq), rs, psi, kt (=3/2*K) Q1.30. Outputs id, iq, torque, uemf Q15.16.
// Timing: id/iq change on the clock after step; torque/uemf one clock later.
// model_rst (or rst) clears the currents.
module pmsm_model
  import pmsm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic model_rst,
  input  logic step,
  input  q16_t ud,
  input  q16_t uq,
  input  q16_t we,
  input  q30_t ld,
  input  q30_t lq,
  input  q30_t gd,
  input  q30_t gq,
  input  q30_t rs,
  input  q30_t psi,
  input  q30_t kt,
  output q16_t id,
  output q16_t iq,
  output q16_t torque,
  output q16_t uemf
);

  logic signed [63:0] id_acc, iq_acc;   // Q31.32
  q16_t rhs_d, rhs_q;
  q16_t w_lq, w_ld, emf;
  q30_t flux;
  q16_t m_raw;
  logic signed [63:0] inc_d, inc_q;

  assign id = 32'(id_acc >>> 16);
  assign iq = 32'(iq_acc >>> 16);

  assign w_lq  = fmul(we, lq, Q30);                 // ohms
  assign w_ld  = fmul(we, ld, Q30);
  assign emf   = fmul(we, psi, Q30);
  assign rhs_d = ud - fmul(id, rs, Q30) + fmul(w_lq, iq, Q16);
  assign rhs_q = uq - fmul(iq, rs, Q30) - fmul(w_ld, id, Q16) - emf;
  assign inc_d = (64'(rhs_d) * 64'(gd)) >>> 14;     // Q46 -> Q32
  assign inc_q = (64'(rhs_q) * 64'(gq)) >>> 14;

  assign flux  = psi + fmul(ld - lq, id, Q16);      // Wb, Q1.30
  assign m_raw = fmul(flux, iq, Q30);

  always_ff @(posedge clk) begin
    if (rst || model_rst) begin
      id_acc <= '0;
      iq_acc <= '0;
    end else if (step) begin
      id_acc <= id_acc + inc_d;
      iq_acc <= iq_acc + inc_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      torque <= '0;
      uemf   <= '0;
    end else begin
      torque <= fmul(m_raw, kt, Q30);
      uemf   <= emf;
    end
  end

endmodule
