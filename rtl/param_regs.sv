// param_regs: register bank between the real-time processor and the FPGA
// model.
//
// The processor side of the simulator runs slower models (load torque,
// battery, saturation maps) every millisecond and exchanges 32-bit words with
// the FPGA model. Each model parameter (stator resistance, Ld, Lq, magnet
// flux, transformation constants, pole pairs, load torque, battery voltage,
// sensor scaling, ...) is one 32-bit register that can be changed online.
// Quantities the processor can pre-evaluate (Ts/L, Ts/J, 3/2*K, 2/(3K)) are
// written already computed. The 3D inductance tables are loaded by writing
// the staging registers R_TBL_L and R_TBL_G and then R_TBL_CMT with the axis
// in bit 31 (0 = d, 1 = q) and the entry address in bits 15:0; the commit
// produces a one-clock write strobe. The model's signals (phase and d/q
// currents, torque, d/q voltages, back-EMF, speed, rpm, angle, status) are
// read back through raddr/rdata.
// One register per 32-bit word follows the document's register blocks; the
// address map (pmsm_pkg::reg_addr_e) and the table-load sequence are this
// design's own. The current-sensor registers reset to the document's sensor
// values; the other parameters reset to zero and must be written before the
// model is released from its reset (R_CTRL bit 0, set at reset).
//
// Timing: a write takes effect on the next clock; rdata is registered (one
// clock after raddr).
module param_regs
  import pmsm_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [7:0]   waddr,
  input  logic [31:0]  wdata,
  input  logic [7:0]   raddr,
  output logic [31:0]  rdata,
  output pmsm_params_t prm,
  output logic         tbl_we_d,
  output logic         tbl_we_q,
  output logic [15:0]  tbl_addr,
  output q30_t         tbl_l,
  output q30_t         tbl_g,
  input  monitor_t     mon
);

  always_ff @(posedge clk) begin
    if (rst) begin
      prm           <= '0;
      prm.model_rst <= 1'b1;
      prm.k_sens    <= K_SENS_DEF;
      prm.q_sens    <= Q_SENS_DEF;
      prm.u_min     <= U_MIN_DEF;
      prm.u_max     <= U_MAX_DEF;
      tbl_l         <= '0;
      tbl_g         <= '0;
      tbl_addr      <= '0;
      tbl_we_d      <= 1'b0;
      tbl_we_q      <= 1'b0;
    end else begin
      tbl_we_d <= 1'b0;
      tbl_we_q <= 1'b0;
      if (we) begin
        case (reg_addr_e'(waddr))
          R_CTRL:    begin prm.model_rst <= wdata[0]; prm.mode_3d <= wdata[1]; end
          R_RS:      prm.rs      <= wdata;
          R_LD:      prm.ld      <= wdata;
          R_LQ:      prm.lq      <= wdata;
          R_GD:      prm.gd      <= wdata;
          R_GQ:      prm.gq      <= wdata;
          R_PSI:     prm.psi     <= wdata;
          R_K:       prm.k       <= wdata;
          R_KT:      prm.kt      <= wdata;
          R_KINV:    prm.kinv    <= wdata;
          R_PP:      prm.pp      <= wdata[7:0];
          R_TSJ:     prm.tsj     <= wdata;
          R_KTH:     prm.kth     <= wdata;
          R_MLOAD:   prm.mload   <= wdata;
          R_UDC:     prm.udc     <= wdata;
          R_UF:      prm.uf      <= wdata;
          R_IMIN:    prm.imin    <= wdata;
          R_KSENS:   prm.k_sens  <= wdata;
          R_QSENS:   prm.q_sens  <= wdata;
          R_UMIN:    prm.u_min   <= wdata;
          R_UMAX:    prm.u_max   <= wdata;
          R_RES_AMP: prm.res_amp <= wdata;
          R_RES_AMPC: prm.res_amp_c <= wdata;
          R_RES_PP:  prm.res_pp  <= wdata[7:0];
          R_RES_OFS: prm.res_ofs <= wdata;
          R_TH_OFS:  prm.th_ofs  <= wdata;
          R_TBL_L:   tbl_l       <= wdata;
          R_TBL_G:   tbl_g       <= wdata;
          R_TBL_CMT: begin
            tbl_addr <= wdata[15:0];
            tbl_we_d <= ~wdata[31];
            tbl_we_q <= wdata[31];
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata <= '0;
    end else begin
      case (reg_addr_e'(raddr))
        R_CTRL:   rdata <= {30'd0, prm.mode_3d, prm.model_rst};
        R_RS:     rdata <= prm.rs;
        R_LD:     rdata <= prm.ld;
        R_LQ:     rdata <= prm.lq;
        R_PSI:    rdata <= prm.psi;
        R_PP:     rdata <= {24'd0, prm.pp};
        R_MLOAD:  rdata <= prm.mload;
        R_UDC:    rdata <= prm.udc;
        R_KSENS:  rdata <= prm.k_sens;
        R_QSENS:  rdata <= prm.q_sens;
        R_UMIN:   rdata <= prm.u_min;
        R_UMAX:   rdata <= prm.u_max;
        R_IA:     rdata <= mon.ia;
        R_IB:     rdata <= mon.ib;
        R_IC:     rdata <= mon.ic;
        R_ID:     rdata <= mon.id;
        R_IQ:     rdata <= mon.iq;
        R_M:      rdata <= mon.m;
        R_UD:     rdata <= mon.ud;
        R_UQ:     rdata <= mon.uq;
        R_UEMF:   rdata <= mon.uemf;
        R_WM:     rdata <= mon.wm;
        R_RPM:    rdata <= mon.rpm;
        R_THM:    rdata <= mon.thm;
        R_STATUS: rdata <= {19'd0, mon.sw, 3'd0, mon.shoot};
        default:  rdata <= '0;
      endcase
    end
  end

endmodule
