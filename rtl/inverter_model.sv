// inverter_model: three-phase two-level power inverter seen from the motor.
//
// Each leg has a high-side and a low-side switch driven by the ECU gate
// signals. From the two gates and the sign of the phase current the leg is in
// one of six states, and its pole voltage (against the DC-link midpoint) is
//     HSD (high side on)            +Udc/2
//     LSD (low side on)             -Udc/2
//     shorted (both on)             0, and short_o is raised
//     open, current >  Imin         -Udc/2 - Uf  (low-side diode conducts)
//     open, current < -Imin         +Udc/2 + Uf  (high-side diode conducts)
//     open, |current| <= Imin       the phase back-EMF (no current flows)
// The phase voltages applied to the star-connected machine are the pole
// voltages minus their mean. The six states and the inputs used (gate signals,
// battery voltage, minimal switching current, diode forward voltage, back-EMF)
// follow the document; the voltage assigned to each state, the shorted-leg
// handling and the star-point referencing are this design's choices.
//
// Interface: gate[2k] = high side and gate[2k+1] = low side of phase k
// (a, b, c); udc, uf, imin, i*, e* Q15.16; u* Q15.16; state per phase.
// Positive current flows from the inverter into the machine.
// Timing: outputs registered every clock, latency 1 clock.
module inverter_model
  import pmsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] gate,
  input  q16_t       udc,
  input  q16_t       uf,
  input  q16_t       imin,
  input  q16_t       i_ph [3],
  input  q16_t       e_ph [3],
  output q16_t       u_ph [3],
  output sw_state_e  state [3],
  output logic       short_o
);

  q16_t      v_pole [3];
  sw_state_e st     [3];
  q16_t      v_mean;
  q16_t      half;

  assign half = udc >>> 1;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      unique case ({gate[2*k+1], gate[2*k]})
        2'b01:   st[k] = SW_HSD;
        2'b10:   st[k] = SW_LSD;
        2'b11:   st[k] = SW_SHORT;
        default: begin
          if (i_ph[k] > imin)        st[k] = SW_OPEN_POS;
          else if (i_ph[k] < -imin)  st[k] = SW_OPEN_NEG;
          else                       st[k] = SW_OPEN_NOCUR;
        end
      endcase
      unique case (st[k])
        SW_HSD:      v_pole[k] = half;
        SW_LSD:      v_pole[k] = -half;
        SW_SHORT:    v_pole[k] = '0;
        SW_OPEN_POS: v_pole[k] = -half - uf;
        SW_OPEN_NEG: v_pole[k] = half + uf;
        default:     v_pole[k] = e_ph[k];
      endcase
    end
  end

  assign v_mean = fmul(v_pole[0] + v_pole[1] + v_pole[2], Q30_THIRD, Q30);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) begin
        u_ph[k]  <= '0;
        state[k] <= SW_OPEN_NOCUR;
      end
      short_o <= 1'b0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        u_ph[k]  <= v_pole[k] - v_mean;
        state[k] <= st[k];
      end
      short_o <= (st[0] == SW_SHORT) || (st[1] == SW_SHORT) || (st[2] == SW_SHORT);
    end
  end

endmodule
