// io_model: the FPGA's electrical interface to the ECU.
//
// Seven digital inputs arrive from the ECU: six IGBT gate signals and the
// resolver excitation. Their voltage threshold is set on the I/O board; here
// each bit passes a two-flop synchroniser into the model clock domain.
// Five analogue outputs go back to the ECU: three simulated phase-current
// sensors and the resolver SIN and COS windings. A current sensor is linear,
//     u_x = k * i_x + q,  limited to [u_min, u_max]
// (defaults k = 0.003 V/A, q = 2.5 V, u_min = 0.5 V, u_max = 4.5 V). The
// resolver voltages pass through unchanged. Channel counts, the sensor
// equation and its values follow the document; the synchroniser and the
// output format (Q15.16 volts for the DAC stage) are this design's choices.
//
// Interface: di[5:0] gates, di[6] excitation; i_ph Q15.16 A; k_sens Q1.30;
// q_sens, u_min, u_max, u_sin, u_cos Q15.16 V; ao[0..2] current sensors
// a, b, c, ao[3] resolver SIN, ao[4] resolver COS.
// Timing: digital inputs 2 clocks, analogue outputs 1 clock.
module io_model
  import pmsm_pkg::*;
#(
  parameter int N_DI = 7,
  parameter int N_AO = 5
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_DI-1:0] di,
  output logic [5:0]      gate,
  output logic            exc,
  input  q16_t            i_ph [3],
  input  q30_t            k_sens,
  input  q16_t            q_sens,
  input  q16_t            u_min,
  input  q16_t            u_max,
  input  q16_t            u_sin,
  input  q16_t            u_cos,
  output q16_t            ao [N_AO]
);

  logic [N_DI-1:0] sync1, sync2;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= di;
      sync2 <= sync1;
    end
  end

  assign gate = sync2[5:0];
  assign exc  = sync2[6];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < N_AO; n++) ao[n] <= '0;
    end else begin
      for (int k = 0; k < 3; k++)
        ao[k] <= clamp(fmul(i_ph[k], k_sens, Q30) + q_sens, u_min, u_max);
      ao[3] <= u_sin;
      ao[4] <= u_cos;
    end
  end

endmodule
