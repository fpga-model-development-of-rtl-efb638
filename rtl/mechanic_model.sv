// mechanic_model: rotor speed and angle from the torque balance.
//
// Once per model step the equation of motion  J dOmega/dt = M - M_load  is
// advanced by a forward-Euler step, Omega <= Omega + Ts/J * (M - M_load), and
// the mechanical angle by theta <= theta + Ts/(2*pi) * Omega (in turns). The
// electrical speed and angle follow with the pole-pair count, the angle plus
// an offset register (the resolver offset); the speed is also given in rpm.
// The torque balance is the document's; the step, number formats and angle
// offset are this design's choices.
//
// Number formats: torque, mload, wm, we, rpm Q15.16; tsj = Ts/J in Q23.40;
// kth = Ts/(2*pi) * 2^48 (so Omega[Q16]*kth is the angle step in 2^-64
// turn); theta_m, theta_e unsigned 32-bit, 2^32 = one turn.
// The speed accumulator is Q23.40 and the angle accumulator 64 bits wide,
// so neither loses small increments; the angle wraps naturally each turn.
// Timing: wm/theta_m change on the clock after step; we/theta_e/rpm one
// clock later. model_rst (or rst) clears speed and angle.
module mechanic_model
  import pmsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        model_rst,
  input  logic        step,
  input  q16_t        torque,
  input  q16_t        mload,
  input  logic [31:0] tsj,
  input  logic [31:0] kth,
  input  logic [7:0]  pp,
  input  ang_t        th_ofs,
  output q16_t        wm,
  output q16_t        we,
  output q16_t        rpm,
  output ang_t        theta_m,
  output ang_t        theta_e
);

  logic signed [63:0] w_acc;    // Q23.40 rad/s
  logic        [63:0] th_acc;   // turns * 2^64
  logic signed [63:0] dw;
  logic signed [63:0] dth;

  assign wm      = 32'(w_acc >>> 24);
  assign theta_m = th_acc[63:32];
  assign dw      = (64'(torque - mload) * $signed({1'b0, tsj})) >>> Q16;
  assign dth     = 64'(wm) * $signed({1'b0, kth});

  always_ff @(posedge clk) begin
    if (rst || model_rst) begin
      w_acc  <= '0;
      th_acc <= '0;
    end else if (step) begin
      w_acc  <= w_acc + dw;
      th_acc <= th_acc + 64'(dth);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we      <= '0;
      rpm     <= '0;
      theta_e <= '0;
    end else begin
      we      <= 32'(64'(wm) * $signed({1'b0, 24'd0, pp}));
      rpm     <= fmul(wm, Q16_RPM_PER_RAD, Q16);
      theta_e <= 32'(theta_m * {24'd0, pp}) + th_ofs;
    end
  end

endmodule
