// tb_param_regs: reset values (model held in reset, sensor defaults), a write
// and read-back of parameter registers, the parameter record outputs, the
// one-clock table write strobe for each axis, and the read-back of monitored
// model signals.
module tb_param_regs;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [7:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  pmsm_params_t prm;
  logic tbl_we_d, tbl_we_q;
  logic [15:0] tbl_addr;
  q30_t tbl_l, tbl_g;
  monitor_t mon;
  int checks = 0, failures = 0;

  param_regs dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata, .prm,
                  .tbl_we_d, .tbl_we_q, .tbl_addr, .tbl_l, .tbl_g, .mon);
  always #5 clk = ~clk;

  task automatic wr(reg_addr_e a, logic [31:0] d);
    we <= 1; waddr <= a; wdata <= d; @(posedge clk); we <= 0;
  endtask
  task automatic rd_check(reg_addr_e a, logic [31:0] exp);
    raddr <= a; @(posedge clk); @(posedge clk); #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("read %s: %h expected %h", a.name(), rdata, exp);
    end
  endtask
  task automatic ck(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("fail: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_we;
    mon = '{ia: 1, ib: 2, ic: 3, id: 4, iq: 5, m: 6, ud: 7, uq: 8, uemf: 9, wm: 10,
            rpm: 11, thm: 12, sw: 9'b001_010_100, shoot: 1'b1};
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    ck(prm.model_rst == 1'b1, "model held in reset");
    ck(prm.k_sens == K_SENS_DEF && prm.q_sens == Q_SENS_DEF && prm.u_min == U_MIN_DEF && prm.u_max == U_MAX_DEF, "sensor defaults");
    rd_check(R_QSENS, 32'd163840);
    wr(R_RS, 32'h0051_EB85);
    wr(R_LD, 32'h0003_4000);
    wr(R_LQ, 32'h0006_8000);
    wr(R_PP, 32'd4);
    wr(R_MLOAD, 32'hFFF0_0000);
    wr(R_RES_AMP, 32'h0003_0000);
    wr(R_RES_AMPC, 32'h0002_8000);
    wr(R_CTRL, 32'd2);
    @(posedge clk); #1;
    ck(prm.rs == 32'h0051_EB85 && prm.ld == 32'h0003_4000 && prm.lq == 32'h0006_8000, "record rs/ld/lq");
    ck(prm.pp == 8'd4 && prm.mload == 32'hFFF0_0000, "record pp/mload");
    ck(prm.res_amp == 32'h0003_0000 && prm.res_amp_c == 32'h0002_8000, "resolver SIN/COS amplitudes");
    ck(prm.model_rst == 1'b0 && prm.mode_3d == 1'b1, "control bits");
    rd_check(R_RS, 32'h0051_EB85);
    rd_check(R_LQ, 32'h0006_8000);
    rd_check(R_CTRL, 32'd2);
    rd_check(R_IA, 32'd1);
    rd_check(R_UEMF, 32'd9);
    rd_check(R_THM, 32'd12);
    rd_check(R_STATUS, {19'd0, 9'b001_010_100, 3'd0, 1'b1});
    // table load: stage, commit d, commit q
    wr(R_TBL_L, 32'd777);
    wr(R_TBL_G, 32'd888);
    n_we = 0;
    fork
      begin
        wr(R_TBL_CMT, 32'h0000_0123);
        wr(R_TBL_CMT, 32'h8000_0456);
        repeat (3) @(posedge clk);
      end
      begin
        repeat (6) begin
          @(posedge clk); #1;
          if (tbl_we_d) begin n_we++; ck(tbl_addr == 16'h0123 && tbl_l == 777 && tbl_g == 888, "d commit"); end
          if (tbl_we_q) begin n_we++; ck(tbl_addr == 16'h0456, "q commit"); end
        end
      end
    join
    ck(n_we == 2, "two one-clock table strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
