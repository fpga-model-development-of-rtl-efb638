// hil_fpga_top: FPGA model of a PMSM drive for hardware-in-the-loop testing
// of an inverter ECU whose power stage has been removed.
//
// The ECU drives six gate signals and a resolver excitation into the FPGA and
// reads back three phase-current sensor voltages and the resolver SIN/COS
// windings, exactly as it would from the real power stage and motor. Inside,
// the model closes the loop every model step:
//   gates --> inverter_model --(ua,ub,uc)--> abc_to_dq --(ud,uq)--> pmsm_model
//   pmsm_model --(torque)--> mechanic_model --(speed, angle)--> pmsm_model,
//             resolver_model, ldlq_tables, transformations
//   pmsm_model --(id,iq)--> dq_to_abc --(ia,ib,ic)--> io_model current sensors
//   pmsm_model --(uemf)--> dq_to_abc --(ea,eb,ec)--> inverter_model
//   ldlq_tables --(Ld,Lq,Ts/Ld,Ts/Lq)--> pmsm_model
// Two CORDIC units give sin/cos of the electrical angle (transformations) and
// of the resolver angle. The real-time processor sets every parameter, the
// load torque and the battery voltage through a 32-bit register bus, loads
// the inductance tables, and reads the model's signals back.
// The block structure and connections follow the document; the step length,
// number formats, register map and lookup rule are this design's choices.
//
// Interface: clk; rst synchronous, active high; reg_* register bus
// (see pmsm_pkg::reg_addr_e); gate_in[2k]/gate_in[2k+1] high/low side gate of
// phase k; exc_in resolver excitation; ao[0..2] current-sensor voltages,
// ao[3..4] resolver SIN/COS, all Q15.16 volts; step_o model-step strobe.
// Timing: one model step every STEP_CLKS clocks (1 us at 100 MHz by default).
// The model starts held in reset (R_CTRL bit 0); clear it after writing the
// parameters.
module hil_fpga_top
  import pmsm_pkg::*;
#(
  parameter int STEP_CLKS = 100,
  parameter int ID_BITS   = 4,
  parameter int IQ_BITS   = 4,
  parameter int TH_BITS   = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_we,
  input  logic [7:0]  reg_waddr,
  input  logic [31:0] reg_wdata,
  input  logic [7:0]  reg_raddr,
  output logic [31:0] reg_rdata,
  input  logic [5:0]  gate_in,
  input  logic        exc_in,
  output q16_t        ao [5],
  output logic        step_o
);

  pmsm_params_t prm;
  monitor_t     mon;
  logic         step;
  logic         tbl_we_d, tbl_we_q;
  logic [15:0]  tbl_addr;
  q30_t         tbl_l, tbl_g;

  logic [5:0]   gate;
  logic         exc;
  q16_t         wm, we, rpm;
  ang_t         theta_m, theta_e, theta_r;
  q30_t         sin_e, cos_e, sin_r, cos_r;
  q16_t         id, iq, torque, uemf;
  q16_t         i_ph [3];
  q16_t         e_ph [3];
  q16_t         u_ph [3];
  sw_state_e    sw_state [3];
  logic         short_now, short_seen;
  q16_t         ud, uq;
  q30_t         ld, lq, gd, gq;
  q16_t         u_sin, u_cos;

  assign step_o = step;

  step_timer #(.STEP_CLKS(STEP_CLKS)) u_step (
    .clk, .rst, .step
  );

  param_regs u_regs (
    .clk, .rst,
    .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr(reg_raddr), .rdata(reg_rdata),
    .prm, .tbl_we_d, .tbl_we_q, .tbl_addr, .tbl_l, .tbl_g, .mon
  );

  io_model u_io (
    .clk, .rst,
    .di({exc_in, gate_in}), .gate, .exc,
    .i_ph, .k_sens(prm.k_sens), .q_sens(prm.q_sens),
    .u_min(prm.u_min), .u_max(prm.u_max),
    .u_sin, .u_cos, .ao
  );

  mechanic_model u_mech (
    .clk, .rst, .model_rst(prm.model_rst), .step,
    .torque, .mload(prm.mload), .tsj(prm.tsj), .kth(prm.kth),
    .pp(prm.pp), .th_ofs(prm.th_ofs),
    .wm, .we, .rpm, .theta_m, .theta_e
  );

  always_ff @(posedge clk)
    theta_r <= 32'(theta_m * {24'd0, prm.res_pp}) + prm.res_ofs;

  cordic_sincos u_cordic_e (.clk, .theta(theta_e), .sin_o(sin_e), .cos_o(cos_e));
  cordic_sincos u_cordic_r (.clk, .theta(theta_r), .sin_o(sin_r), .cos_o(cos_r));

  ldlq_tables #(.ID_BITS(ID_BITS), .IQ_BITS(IQ_BITS), .TH_BITS(TH_BITS)) u_tables (
    .clk, .rst, .id, .iq, .theta(theta_e), .mode_3d(prm.mode_3d),
    .ld_c(prm.ld), .lq_c(prm.lq), .gd_c(prm.gd), .gq_c(prm.gq),
    .tbl_we_d, .tbl_we_q, .tbl_addr, .tbl_l, .tbl_g,
    .ld, .lq, .gd, .gq
  );

  pmsm_model u_pmsm (
    .clk, .rst, .model_rst(prm.model_rst), .step,
    .ud, .uq, .we, .ld, .lq, .gd, .gq,
    .rs(prm.rs), .psi(prm.psi), .kt(prm.kt),
    .id, .iq, .torque, .uemf
  );

  dq_to_abc u_cur_abc (
    .clk, .xd(id), .xq(iq), .kinv(prm.kinv), .sin_t(sin_e), .cos_t(cos_e),
    .xa(i_ph[0]), .xb(i_ph[1]), .xc(i_ph[2])
  );

  dq_to_abc u_emf_abc (
    .clk, .xd('0), .xq(uemf), .kinv(prm.kinv), .sin_t(sin_e), .cos_t(cos_e),
    .xa(e_ph[0]), .xb(e_ph[1]), .xc(e_ph[2])
  );

  inverter_model u_inv (
    .clk, .rst, .gate, .udc(prm.udc), .uf(prm.uf), .imin(prm.imin),
    .i_ph, .e_ph, .u_ph, .state(sw_state), .short_o(short_now)
  );

  abc_to_dq u_u_dq (
    .clk, .xa(u_ph[0]), .xb(u_ph[1]), .k(prm.k), .kt(prm.kt),
    .sin_t(sin_e), .cos_t(cos_e), .xd(ud), .xq(uq)
  );

  resolver_model u_res (
    .clk, .rst, .exc, .sin_r, .cos_r, .amp_s(prm.res_amp), .amp_c(prm.res_amp_c), .u_sin, .u_cos
  );

  // Sticky shoot-through flag for the processor
  always_ff @(posedge clk) begin
    if (rst || prm.model_rst) short_seen <= 1'b0;
    else if (short_now)       short_seen <= 1'b1;
  end

  assign mon = '{ia: i_ph[0], ib: i_ph[1], ic: i_ph[2], id: id, iq: iq,
                 m: torque, ud: ud, uq: uq, uemf: uemf, wm: wm, rpm: rpm,
                 thm: theta_m,
                 sw: {sw_state[2], sw_state[1], sw_state[0]}, shoot: short_seen};

endmodule
