// tb_workload_500rpm: the drive at 500 rpm with a 280 Nm torque request,
// the operating point at which the machine model is compared with a real
// test bench. The whole model runs at its default size.
//
// The testbench plays the processor and the ECU. As the processor it writes
// the parameters of an interior-magnet machine of this bench's own choosing
// (Rs = 20 mOhm, Ld = 0.2 mH, Lq = 0.4 mH, Psi = 0.15 Wb, 4 pole pairs,
// J = 0.08 kg m^2, 800 V battery, K = 2/3). The model's torque equation has no
// pole-pair factor, so the factor moves into the mechanics: R_TSJ holds
// p*Ts/J, R_MLOAD the load divided by p, and the shaft torque is p times the
// read-back torque. The load model runs every 500 steps (0.5 ms): zero load
// while the machine accelerates, then the measured torque plus a
// proportional speed correction, which holds the speed at 500 rpm.
// As the ECU it decodes the electrical angle from the resolver windings and
// the phase currents from the sensor voltages, and drives each leg by
// hysteresis current control (+-4 A) around the sinusoidal references of
// id = 0, iq = 466.7 A (280 Nm shaft torque).
//
// Checks, during 12000 steps at speed: every phase current follows its
// reference within 12 A; the three sensor currents sum to zero; the decoded
// resolver angle matches the read-back rotor angle; and, averaged over the
// window, iq, id, the shaft torque and the rpm read-back are at the requested
// operating point.
// Then, as in the comparison of the constant-inductance model with the model
// using angle-dependent tables, id is set to -100 A and the 6th electrical
// harmonic of the torque is measured by a Fourier sum over a third of an
// electrical turn: first with constant Ld/Lq, where it must be near zero,
// then with 3D tables loaded with L0 * (1 + 0.1*cos(6*theta)), where it must
// match p * 0.1 * |Ld - Lq| * |id * iq| (times 0.943 for the 32 angle steps).
// Counted mechanisms: hysteresis switchings, load-model updates, reaching the
// speed, the switch to table mode.
module tb_workload_500rpm;
  import pmsm_pkg::*;

  localparam real TS = 1e-6, RS = 0.02, LD = 2e-4, LQ = 4e-4, PSI = 0.15, J = 0.08;
  localparam real UDC = 800.0, PI = 3.14159265358979;
  localparam int  PP = 4;
  localparam real RPM_REF = 500.0, M_REF = 280.0;
  localparam real W_REF = RPM_REF * 2.0 * PI / 60.0;          // mechanical rad/s
  localparam real IQ_REF = M_REF / (real'(PP) * PSI);         // kt = 3/2*K = 1
  localparam real HYST = 4.0;

  logic        clk = 0, rst = 1;
  logic        reg_we = 0;
  logic [7:0]  reg_waddr = 0, reg_raddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [5:0]  gate_in = 0;
  logic        exc_in = 0;
  q16_t        ao [5];
  logic        step_o;

  int checks = 0, failures = 0;
  int n_switch = 0, n_load = 0, n_speed = 0, n_mode = 0;

  hil_fpga_top dut (.clk, .rst, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
                    .gate_in, .exc_in, .ao, .step_o);

  always #5 clk = ~clk;
  // Resolver excitation: 20 kHz square wave
  initial forever begin
    repeat (2500) @(posedge clk);
    exc_in <= ~exc_in;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] q30(real v); return 32'($rtoi(v * 1073741824.0)); endfunction
  function automatic logic [31:0] q16(real v); return 32'($rtoi(v * 65536.0)); endfunction
  function automatic real fr16(logic [31:0] v); return real'($signed(v)) / 65536.0; endfunction

  task automatic wr(reg_addr_e a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1; reg_waddr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd(reg_addr_e a, output logic [31:0] d);
    @(negedge clk);
    reg_raddr = a;
    @(negedge clk);
    d = reg_rdata;
  endtask

  task automatic ck(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      if (failures < 30) $display("%0t %s: got %f expected %f", $time, what, got, exp);
    end
  endtask

  task automatic wait_step();
    @(posedge clk iff step_o);
    repeat (40) @(posedge clk);
  endtask

  // Table inductance as loaded: L0 * L_norm(theta) at the centre of each of
  // the 32 angle sectors, L_norm = 1 + 0.1*cos(6*theta)
  function automatic real ltab(real l0, int sector);
    return l0 * (1.0 + 0.1 * $cos(6.0 * 2.0 * PI * (real'(sector) + 0.5) / 32.0));
  endfunction

  // ECU and processor state
  real id_ref = 0.0, iq_ref = IQ_REF;
  real th_dec, m_sum = 0.0, wm;
  real i_dec [3], i_ref [3];
  int  leg [3] = '{-1, -1, -1};
  int  n_avg = 0;
  logic at_speed = 0;

  // One model step as seen from outside: the ECU samples the resolver and the
  // sensors and sets the gates; the processor reads the torque and, every
  // 500 steps, updates the load torque.
  task automatic do_step();
    logic [31:0] v;
    real s_env, c_env;
    wait_step();
    s_env = fr16(ao[3]) * (exc_in ? 1.0 : -1.0);
    c_env = fr16(ao[4]) * (exc_in ? 1.0 : -1.0);
    th_dec = $atan2(s_env, c_env);
    for (int k = 0; k < 3; k++) begin
      i_dec[k] = (fr16(ao[k]) - 2.5) / 0.003;
      i_ref[k] = id_ref * $cos(th_dec - 2.0 * PI * real'(k) / 3.0)
               - iq_ref * $sin(th_dec - 2.0 * PI * real'(k) / 3.0);
    end
    for (int k = 0; k < 3; k++) begin
      if (i_dec[k] < i_ref[k] - HYST && leg[k] < 0) begin leg[k] = 1;  n_switch++; end
      if (i_dec[k] > i_ref[k] + HYST && leg[k] > 0) begin leg[k] = -1; n_switch++; end
    end
    gate_in <= {leg[2] < 0, leg[2] > 0, leg[1] < 0, leg[1] > 0, leg[0] < 0, leg[0] > 0};
    rd(R_M, v);
    m_sum += fr16(v);
    n_avg++;
    if (n_avg == 500) begin
      rd(R_WM, v);
      wm = fr16(v);
      if (!at_speed && wm >= W_REF) begin
        at_speed = 1;
        n_speed++;
      end
      wr(R_MLOAD, q16(at_speed ? m_sum / 500.0 + 20.0 * (wm - W_REF) : 0.0));
      n_load++;
      m_sum = 0.0; n_avg = 0;
    end
  endtask

  // Rotor electrical angle from the read-back mechanical angle
  task automatic rd_theta_e(output real th);
    logic [31:0] v;
    rd(R_THM, v);
    th = real'(v) / 4294967296.0 * 2.0 * PI * real'(PP);
  endtask

  // Amplitude of the 6th electrical harmonic of the shaft torque, over two
  // periods of that harmonic (a third of an electrical revolution)
  task automatic torque_h6(output real amp, output real mean);
    logic [31:0] v;
    real th, th0, prev, acc, a6, b6, m, sm;
    int  n;
    rd_theta_e(th0);
    prev = th0; acc = 0.0; a6 = 0.0; b6 = 0.0; sm = 0.0; n = 0;
    while (acc < 2.0 * PI / 3.0) begin
      do_step();
      rd_theta_e(th);
      acc += th - prev - 2.0 * PI * $floor((th - prev) / (2.0 * PI) + 0.5);
      prev = th;
      rd(R_M, v);
      m = real'(PP) * fr16(v);
      a6 += m * $cos(6.0 * th);
      b6 += m * $sin(6.0 * th);
      sm += m;
      n++;
    end
    amp = 2.0 / real'(n) * $sqrt(a6 * a6 + b6 * b6);
    mean = sm / real'(n);
  endtask

  initial begin
    logic [31:0] v;
    real th_rd, err, h6_const, h6_3d, m_const, m_3d, h6_exp;
    real sum_id, sum_iq, sum_m, sum_rpm;
    int  n_win, step_n;

    repeat (5) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    wr(R_RS,   q30(RS));
    wr(R_LD,   q30(LD));
    wr(R_LQ,   q30(LQ));
    wr(R_GD,   q30(TS / LD));
    wr(R_GQ,   q30(TS / LQ));
    wr(R_PSI,  q30(PSI));
    wr(R_K,    q30(2.0 / 3.0));
    wr(R_KT,   q30(1.0));
    wr(R_KINV, q30(1.0));
    wr(R_PP,   PP);
    wr(R_TSJ,  32'($rtoi(real'(PP) * TS / J * 1099511627776.0)));
    wr(R_KTH,  32'($rtoi(TS / (2.0 * PI) * 281474976710656.0)));
    wr(R_MLOAD, 0);
    wr(R_UDC,  q16(UDC));
    wr(R_UF,   q16(1.5));
    wr(R_IMIN, q16(0.5));
    wr(R_RES_AMP, q16(3.0));
    wr(R_RES_AMPC, q16(3.0));
    wr(R_RES_PP, PP);
    // 3D tables, loaded while the model is held in reset
    for (int a = 0; a < 8192; a++) begin
      wr(R_TBL_L, q30(ltab(LD, a % 32)));
      wr(R_TBL_G, q30(TS / ltab(LD, a % 32)));
      wr(R_TBL_CMT, 32'(a));
      wr(R_TBL_L, q30(ltab(LQ, a % 32)));
      wr(R_TBL_G, q30(TS / ltab(LQ, a % 32)));
      wr(R_TBL_CMT, 32'h8000_0000 | 32'(a));
    end
    wr(R_CTRL, 32'd0);
    gate_in <= 6'b101010;

    // 1. accelerate, then hold 500 rpm at 280 Nm (constant inductances, id = 0)
    n_win = 0; step_n = 0;
    sum_id = 0.0; sum_iq = 0.0; sum_m = 0.0; sum_rpm = 0.0;
    while (n_win < 12000 && step_n < 60000) begin
      do_step();
      step_n++;
      if (at_speed) begin
        n_win++;
        if (n_win > 3000) begin
          for (int k = 0; k < 3; k++) ck("phase current vs reference", i_dec[k], i_ref[k], 12.0);
          ck("sensor currents sum", i_dec[0] + i_dec[1] + i_dec[2], 0.0, 1.0);
          rd_theta_e(th_rd);
          err = th_dec - th_rd;
          err = err - 2.0 * PI * $floor(err / (2.0 * PI) + 0.5);
          ck("resolver angle", err, 0.0, 0.01);
          rd(R_ID, v);  sum_id += fr16(v);
          rd(R_IQ, v);  sum_iq += fr16(v);
          rd(R_M, v);   sum_m  += real'(PP) * fr16(v);
          rd(R_RPM, v); sum_rpm += fr16(v);
        end
      end
    end
    ck("mean iq", sum_iq / 9000.0, IQ_REF, 0.02 * IQ_REF);
    ck("mean id", sum_id / 9000.0, 0.0, 10.0);
    ck("mean shaft torque", sum_m / 9000.0, M_REF, 0.03 * M_REF);
    ck("mean rpm", sum_rpm / 9000.0, RPM_REF, 0.01 * RPM_REF);
    $display("steps %0d: iq %f id %f torque %f Nm rpm %f", step_n, sum_iq / 9000.0,
             sum_id / 9000.0, sum_m / 9000.0, sum_rpm / 9000.0);

    // 2. torque harmonics with id = -100 A: constant inductances, then the
    //    3D tables. Only the tables' angle profile produces a 6th harmonic:
    //    p * 0.1 * |Ld - Lq| * |id * iq|, times 0.943 for the 32-sector steps.
    id_ref = -100.0;
    repeat (2000) do_step();
    torque_h6(h6_const, m_const);
    wr(R_CTRL, 32'd2);
    n_mode++;
    repeat (2000) do_step();
    torque_h6(h6_3d, m_3d);
    h6_exp = real'(PP) * 0.1 * (LQ - LD) * 100.0 * IQ_REF * 0.943;
    $display("6th torque harmonic: constant L %f Nm, 3D tables %f Nm (expected %f); mean %f / %f Nm",
             h6_const, h6_3d, h6_exp, m_const, m_3d);
    ck("6th harmonic, constant L", h6_const, 0.0, 0.2 * h6_exp);
    ck("6th harmonic, 3D tables", h6_3d, h6_exp, 0.25 * h6_exp);
    ck("mean torque, 3D tables", m_3d, M_REF + real'(PP) * (LQ - LD) * 100.0 * IQ_REF, 0.03 * M_REF);
    ck("speed held", fr16(q16(wm)), W_REF, 0.01 * W_REF);

    $display("mechanisms: switchings %0d load updates %0d at speed %0d mode switch %0d",
             n_switch, n_load, n_speed, n_mode);
    checks += 4;
    if (n_switch == 0) failures++;
    if (n_load == 0) failures++;
    if (n_speed == 0) failures++;
    if (n_mode == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
