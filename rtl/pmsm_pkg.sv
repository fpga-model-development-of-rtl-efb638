// pmsm_pkg: number formats, parameter record and register map shared by the
// FPGA PMSM hardware-in-the-loop model.
//
// Number formats (a design choice; the model only needs fixed point of
// sufficient range):
//   q16_t  signed Q15.16  voltages [V], currents [A], torque [Nm], speed [rad/s]
//   q30_t  signed Q1.30   coefficients: inductance [H], flux [Wb], resistance
//                         [Ohm], Ts/L [1/H*s], sin/cos, transformation constants
//   ang_t  unsigned 32-bit angle, 2^32 is one full turn (wraps naturally)
// Ts/J of the mechanic is Q23.40 and the angle increment Ts/(2*pi) is scaled
// by 2^48 (see mechanic_model).
//
// Every model parameter is one 32-bit register written by the real-time
// processor; the address map is this design's own.
package pmsm_pkg;

  typedef logic signed [31:0] q16_t;
  typedef logic signed [31:0] q30_t;
  typedef logic        [31:0] ang_t;

  localparam int Q16 = 16;
  localparam int Q30 = 30;

  // Fixed-point constants
  localparam q30_t Q30_SQRT3_2   = 32'sd929887697;   // sqrt(3)/2
  localparam q30_t Q30_SQRT3     = 32'sd1859775393;  // sqrt(3)
  localparam q16_t Q16_RPM_PER_RAD = 32'sd625823;    // 60/(2*pi) = 9.5493

  // Switch state of one inverter leg
  typedef enum logic [2:0] {
    SW_OPEN_NOCUR = 3'd0,  // both switches off, |i| below the minimal current
    SW_HSD        = 3'd1,  // high-side switch on
    SW_LSD        = 3'd2,  // low-side switch on
    SW_SHORT      = 3'd3,  // both switches on (shoot-through)
    SW_OPEN_POS   = 3'd4,  // both off, positive current through low-side diode
    SW_OPEN_NEG   = 3'd5   // both off, negative current through high-side diode
  } sw_state_e;

  localparam q30_t Q30_THIRD = 32'sd357913941;  // 1/3

  // Current sensor defaults (common sensor equation values)
  localparam q30_t K_SENS_DEF = 32'sd3221225; // 0.003 V/A in Q1.30
  localparam q16_t Q_SENS_DEF = 32'sd163840;  // 2.5 V
  localparam q16_t U_MIN_DEF  = 32'sd32768;   // 0.5 V
  localparam q16_t U_MAX_DEF  = 32'sd294912;  // 4.5 V

  // Register map (word addresses)
  typedef enum logic [7:0] {
    R_CTRL     = 8'h00,  // [0] model reset, [1] 3D-table mode
    R_RS       = 8'h01,  // stator resistance, q30
    R_LD       = 8'h02,  // Ld constant, q30
    R_LQ       = 8'h03,  // Lq constant, q30
    R_GD       = 8'h04,  // Ts/Ld constant, q30
    R_GQ       = 8'h05,  // Ts/Lq constant, q30
    R_PSI      = 8'h06,  // permanent-magnet flux, q30
    R_K        = 8'h07,  // transformation constant K, q30
    R_KT       = 8'h08,  // 3/2*K, q30
    R_KINV     = 8'h09,  // 2/(3K), q30
    R_PP       = 8'h0A,  // pole pairs (machine topology)
    R_TSJ      = 8'h0B,  // Ts/J, Q23.40
    R_KTH      = 8'h0C,  // Ts/(2*pi) * 2^48
    R_MLOAD    = 8'h0D,  // load torque, q16
    R_UDC      = 8'h0E,  // battery voltage, q16
    R_UF       = 8'h0F,  // diode forward voltage, q16
    R_IMIN     = 8'h10,  // minimal switching current, q16
    R_KSENS    = 8'h11,  // current sensor slope k [V/A], q30
    R_QSENS    = 8'h12,  // current sensor offset q [V], q16
    R_UMIN     = 8'h13,  // sensor minimum voltage, q16
    R_UMAX     = 8'h14,  // sensor maximum voltage, q16
    R_RES_AMP  = 8'h15,  // resolver k*u0sin, SIN winding amplitude, q16
    R_RES_PP   = 8'h16,  // resolver pole pairs
    R_RES_OFS  = 8'h17,  // resolver angle offset, ang_t
    R_TH_OFS   = 8'h18,  // electrical angle offset, ang_t
    R_TBL_L    = 8'h19,  // table staging: L, q30
    R_TBL_G    = 8'h1A,  // table staging: Ts/L, q30
    R_TBL_CMT  = 8'h1B,  // table commit: [31] axis q, [15:0] entry address
    R_RES_AMPC = 8'h1C,  // resolver k*u0cos, COS winding amplitude, q16
    // read-back
    R_IA       = 8'h20,
    R_IB       = 8'h21,
    R_IC       = 8'h22,
    R_ID       = 8'h23,
    R_IQ       = 8'h24,
    R_M        = 8'h25,
    R_UD       = 8'h26,
    R_UQ       = 8'h27,
    R_UEMF     = 8'h28,
    R_WM       = 8'h29,
    R_RPM      = 8'h2A,
    R_THM      = 8'h2B,
    R_STATUS   = 8'h2C   // [0] shoot-through seen, [12:4] switch states c,b,a
  } reg_addr_e;

  typedef struct packed {
    logic       model_rst;
    logic       mode_3d;
    q30_t       rs, ld, lq, gd, gq, psi, k, kt, kinv;
    logic [7:0] pp;
    logic [31:0] tsj, kth;
    q16_t       mload, udc, uf, imin;
    q30_t       k_sens;
    q16_t       q_sens, u_min, u_max;
    q16_t       res_amp, res_amp_c;
    logic [7:0] res_pp;
    ang_t       res_ofs, th_ofs;
  } pmsm_params_t;

  typedef struct packed {
    q16_t ia, ib, ic, id, iq, m, ud, uq, uemf, wm, rpm;
    ang_t thm;
    logic [8:0] sw;    // switch state of phases c, b, a
    logic shoot;
  } monitor_t;

  // Fixed-point product a*b >>> sh, with a 64-bit intermediate.
  function automatic logic signed [31:0] fmul(input logic signed [31:0] a,
                                              input logic signed [31:0] b,
                                              input int sh);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return 32'(p >>> sh);
  endfunction

  // Clamp a value into [lo, hi].
  function automatic logic signed [31:0] clamp(input logic signed [31:0] x,
                                               input logic signed [31:0] lo,
                                               input logic signed [31:0] hi);
    if (x < lo) return lo;
    if (x > hi) return hi;
    return x;
  endfunction

endpackage
