// tb_hil_fpga_top: end-to-end test of the PMSM hardware-in-the-loop model at
// its default size (1 us model step, 16 x 16 x 32 inductance tables).
//
// The testbench plays both outside parties. As the real-time processor it
// writes all parameters over the register bus (an interior-magnet machine:
// Rs = 20 mOhm, Ld = 0.2 mH, Lq = 0.4 mH, Psi = 80 mWb, 4 pole pairs,
// J = 1e-3 kg m^2, 800 V battery, K = 2/3), loads the 3D inductance tables
// with L_2D * (1 + 0.1*cos(6*theta)) and reads the model's signals back.
// As the ECU it drives the six gate signals and the resolver excitation, and
// reads the five analogue outputs.
//
// Phases:
//  1. Standstill current rise in constant-inductance mode: one voltage
//     vector for 40 steps; id is compared with a floating-point Euler
//     solution. Then all gates open: the phase currents commutate into the
//     diodes and die out (open-with-current and open-without-current states).
//  2. The same rise in 3D-table mode must follow the table inductance.
//  3. Closed loop: the ECU decodes the rotor angle from the resolver windings,
//     picks the six-step voltage vector 90 degrees ahead, limits the current
//     by hysteresis on the decoded current-sensor voltages, and inserts one
//     step of dead time at every vector change. Every step it checks
//     ia+ib+ic = 0, the sensor equation against the read-back current, the
//     torque equation against read-back id/iq and table inductances, the
//     speed against its own integration of the read-back torque, and the
//     decoded resolver angle against the read-back rotor angle.
//  4. A larger sensor slope drives the current-sensor outputs into their
//     limits; a deliberate shoot-through must set the status flag; the model
//     reset must clear currents and speed.
// Every mechanism is counted and one that never happened is a failure.
module tb_hil_fpga_top;
  import pmsm_pkg::*;

  localparam real TS = 1e-6, RS = 0.02, LD = 2e-4, LQ = 4e-4, PSI = 0.08, J = 1e-3;
  localparam real UDC = 800.0, UF = 1.5, IMIN = 0.5, PI = 3.14159265358979;
  localparam int  PP = 4;

  logic        clk = 0, rst = 1;
  logic        reg_we = 0;
  logic [7:0]  reg_waddr = 0, reg_raddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [5:0]  gate_in = 0;
  logic        exc_in = 0;
  q16_t        ao [5];
  logic        step_o;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_state [6];
  int n_vcheck = 0, n_short = 0, n_reset = 0, n_mode = 0, n_clip = 0, n_commut = 0, n_deadtime = 0, n_limit = 0;

  hil_fpga_top dut (.clk, .rst, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
                    .gate_in, .exc_in, .ao, .step_o);

  always #5 clk = ~clk;
  // Resolver excitation: 20 kHz square wave
  initial forever begin
    repeat (2500) @(posedge clk);
    exc_in <= ~exc_in;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] q30(real v); return 32'($rtoi(v * 1073741824.0)); endfunction
  function automatic logic [31:0] q16(real v); return 32'($rtoi(v * 65536.0)); endfunction
  function automatic real fr16(logic [31:0] v); return real'($signed(v)) / 65536.0; endfunction
  function automatic real fr30(logic [31:0] v); return real'($signed(v)) / 1073741824.0; endfunction

  // Table inductance as loaded (depends on the angle sector only)
  function automatic real ltab(real l0, int sector);
    return l0 * (1.0 + 0.1 * $cos(6.0 * 2.0 * PI * (real'(sector) + 0.5) / 32.0));
  endfunction

  // Register bus: driven on the falling edge, sampled by the model on the rising edge
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
    repeat (40) @(posedge clk);   // let the pipelines settle
  endtask

  task automatic count_states();
    logic [31:0] st;
    rd(R_STATUS, st);
    for (int k = 0; k < 3; k++) n_state[st[4 + 3*k +: 3]]++;
  endtask

  // gate word from leg levels: +1 high side, -1 low side, 0 both off
  function automatic logic [5:0] legs(int a, int b, int c);
    logic [5:0] g;
    int l [3];
    l[0] = a; l[1] = b; l[2] = c;
    g = '0;
    for (int k = 0; k < 3; k++) begin
      if (l[k] > 0) g[2*k] = 1'b1;
      if (l[k] < 0) g[2*k+1] = 1'b1;
    end
    return g;
  endfunction

  // voltage vectors 0..5 at k*60 degrees
  function automatic logic [5:0] vec(int k);
    case (k)
      0: return legs( 1, -1, -1);
      1: return legs( 1,  1, -1);
      2: return legs(-1,  1, -1);
      3: return legs(-1,  1,  1);
      4: return legs(-1, -1,  1);
      default: return legs( 1, -1,  1);
    endcase
  endfunction

  // Standstill rise: one vector for n steps, compare id with Euler solution
  task automatic rise_test(real l_d, string what);
    logic [31:0] v;
    real e_id, ud;
    ud = 2.0 / 3.0 * UDC;        // vector 0 at theta = 0, K = 2/3
    e_id = 0.0;
    wait_step();
    gate_in <= vec(0);
    for (int n = 0; n < 40; n++) begin
      wait_step();
      count_states();
      e_id = e_id + TS / l_d * (ud - RS * e_id);
    end
    rd(R_ID, v);
    ck(what, fr16(v), e_id, 0.01 * e_id + 0.5);
    rd(R_IQ, v);
    ck({what, " iq"}, fr16(v), 0.0, 0.5);
  endtask

  initial begin
    logic [31:0] v, v2, v3;
    real w_est, m_prev, th_e, s_env, c_env, th_dec, err, ia, ib, ic, id, iq, m, l_d, l_q;
    real i_dec [3];
    real imax;
    int sec, sector, prev_vec, cur_vec, dead;
    logic active, gate_dead;
    logic [5:0] gate_now;

    repeat (5) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // ---- processor: parameters ----
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
    wr(R_TSJ,  32'($rtoi(TS / J * 1099511627776.0)));
    wr(R_KTH,  32'($rtoi(TS / (2.0 * PI) * 281474976710656.0)));
    wr(R_MLOAD, q16(5.0));
    wr(R_UDC,  q16(UDC));
    wr(R_UF,   q16(UF));
    wr(R_IMIN, q16(IMIN));
    wr(R_RES_AMP, q16(3.0));
    wr(R_RES_AMPC, q16(3.0));
    wr(R_RES_PP, PP);
    wr(R_RES_OFS, 0);
    wr(R_TH_OFS, 0);
    rd(R_PSI, v);
    checks++;
    if (v != q30(PSI)) failures++;

    // 3D tables: L_2D * L_norm(theta), constant over the current grid
    for (int a = 0; a < 8192; a++) begin
      sec = a % 32;
      wr(R_TBL_L, q30(ltab(LD, sec)));
      wr(R_TBL_G, q30(TS / ltab(LD, sec)));
      wr(R_TBL_CMT, 32'(a));
      wr(R_TBL_L, q30(ltab(LQ, sec)));
      wr(R_TBL_G, q30(TS / ltab(LQ, sec)));
      wr(R_TBL_CMT, 32'h8000_0000 | 32'(a));
    end

    // ---- phase 1: constant mode ----
    wr(R_CTRL, 32'd0);
    gate_in <= '0;
    rise_test(LD, "const-mode id");
    gate_in <= '0;
    for (int n = 0; n < 60; n++) begin
      wait_step();
      count_states();
    end
    rd(R_IA, v);
    ck("currents die out after opening", fr16(v), 0.0, 3.0);  // within one step's increment
    // reset between tests
    wr(R_CTRL, 32'd1); wr(R_CTRL, 32'd0);

    // ---- phase 2: 3D-table mode ----
    wr(R_CTRL, 32'd2);
    n_mode++;
    rise_test(ltab(LD, 0), "3D-mode id");
    gate_in <= '0;
    repeat (60) wait_step();
    wr(R_CTRL, 32'd3); wr(R_CTRL, 32'd2);
    n_reset++;
    rd(R_ID, v);
    ck("model reset clears id", fr16(v), 0.0, 1e-3);

    // ---- phase 3: closed loop ----
    w_est = 0.0;
    prev_vec = -1; cur_vec = 0; dead = 0; active = 1;
    for (int n = 0; n < 20000; n++) begin
      wait_step();
      // ECU: resolver angle from the winding envelopes
      s_env = fr16(ao[3]) * (exc_in ? 1.0 : -1.0);
      c_env = fr16(ao[4]) * (exc_in ? 1.0 : -1.0);
      th_dec = $atan2(s_env, c_env);
      // ECU: currents from the sensor voltages
      imax = 0.0;
      for (int k = 0; k < 3; k++) begin
        i_dec[k] = (fr16(ao[k]) - 2.5) / 0.003;
        if (i_dec[k] > imax) imax = i_dec[k];
        if (-i_dec[k] > imax) imax = -i_dec[k];
      end
      if (imax > 300.0) begin active = 0; n_limit++; end
      else if (imax < 250.0) active = 1;
      sector = int'($floor((th_dec + PI / 2.0) / (PI / 3.0) + 0.5));
      sector = ((sector % 6) + 6) % 6;
      if (sector != cur_vec) begin
        cur_vec = sector; dead = 1; n_commut++;
      end
      gate_dead = (dead > 0);
      if (dead > 0) begin
        gate_now = '0; dead--; n_deadtime++;
      end else if (active) gate_now = vec(cur_vec);
      else gate_now = legs(-1, -1, -1);
      gate_in <= gate_now;

      // processor read-back (state is stable until the next step)
      rd(R_IA, v); ia = fr16(v);
      rd(R_IB, v); ib = fr16(v);
      rd(R_IC, v); ic = fr16(v);
      ck("ia+ib+ic", ia + ib + ic, 0.0, 0.01);
      ck("sensor a", i_dec[0], ia, 2.0);
      rd(R_ID, v); id = fr16(v);
      rd(R_IQ, v); iq = fr16(v);
      rd(R_M, v);  m = fr16(v);
      rd(R_THM, v3);
      th_e = real'(v3) / 4294967296.0 * 2.0 * PI * PP;
      sector = int'((32'(v3 * PP)) >> 27);
      l_d = ltab(LD, sector); l_q = ltab(LQ, sector);
      ck("torque", m, 1.0 * (PSI + (l_d - l_q) * id) * iq, 0.05 + 0.003 * (m < 0 ? -m : m));
      rd(R_WM, v2);
      if (n > 0) w_est += (m_prev - 5.0) * TS / J;
      m_prev = m;
      ck("speed", fr16(v2), w_est, 0.02 + 0.01 * (w_est < 0 ? -w_est : w_est));
      // d/q voltages of the vector applied this step (two-level legs, K = 2/3)
      if (!gate_dead) begin
        real va, vb, vc, mn, al, be;
        rd(R_UD, v); rd(R_UQ, v2);
        va = gate_now[0] ? UDC / 2 : -UDC / 2;
        vb = gate_now[2] ? UDC / 2 : -UDC / 2;
        vc = gate_now[4] ? UDC / 2 : -UDC / 2;
        mn = (va + vb + vc) / 3.0;
        al = va - mn;
        be = ((vb - mn) - (vc - mn)) / $sqrt(3.0);
        ck("ud", fr16(v), $cos(th_e) * al + $sin(th_e) * be, 0.5);
        ck("uq", fr16(v2), -$sin(th_e) * al + $cos(th_e) * be, 0.5);
        n_vcheck++;
      end
      err = th_dec - th_e;
      while (err > PI) err -= 2.0 * PI;
      while (err < -PI) err += 2.0 * PI;
      ck("resolver angle", err, 0.0, 0.01);
      if (n % 10 == 0) count_states();
    end
    rd(R_WM, v);
    checks++;
    if (fr16(v) < 20.0) begin failures++; $display("machine did not accelerate: %f rad/s", fr16(v)); end
    $display("closed loop: speed %f rad/s, %0d commutations", fr16(v), n_commut);

    // ---- phase 4: sensor limits, shoot-through, reset ----
    gate_in <= vec(0);
    wr(R_KSENS, q30(0.05));
    repeat (5) wait_step();
    rd(R_IA, v);
    for (int k = 0; k < 3; k++) begin
      if (ao[k] == q16(4.5) || ao[k] == q16(0.5)) n_clip++;
    end
    wr(R_KSENS, K_SENS_DEF);
    gate_in <= legs(1, -1, -1) | 6'b000010;     // phase a: both switches on
    wait_step();
    rd(R_STATUS, v);
    checks++;
    if (v[0] !== 1'b1) failures++; else n_short++;
    gate_in <= '0;
    wr(R_CTRL, 32'd3);
    n_reset++;
    wait_step();
    rd(R_WM, v);
    ck("reset clears speed", fr16(v), 0.0, 1e-6);
    rd(R_STATUS, v);
    checks++;
    if (v[0] !== 1'b0) failures++;
    wr(R_CTRL, 32'd2);

    // ---- every mechanism happened ----
    $display("states: open-nocur %0d HSD %0d LSD %0d short %0d open-pos %0d open-neg %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5]);
    $display("shoot-through %0d, resets %0d, mode switches %0d, sensor clips %0d, commutations %0d, dead times %0d, current limits %0d",
             n_short, n_reset, n_mode, n_clip, n_commut, n_deadtime, n_limit);
    for (int s = 0; s < 6; s++) begin
      if (s == 3) continue;     // the shorted state is counted by n_short
      checks++;
      if (n_state[s] == 0) begin failures++; $display("state %0d never seen", s); end
    end
    checks++; if (n_short == 0) failures++;
    checks++; if (n_reset == 0) failures++;
    checks++; if (n_mode == 0) failures++;
    checks++; if (n_clip == 0) failures++;
    checks++; if (n_commut == 0) failures++;
    checks++; if (n_deadtime == 0) failures++;
    checks++; if (n_limit == 0) failures++;
    checks++; if (n_vcheck == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
