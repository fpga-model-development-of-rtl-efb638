// tb_pmsm_model: drives the machine model with fixed d/q voltages and speed
// for several hundred steps and compares currents, torque and back-EMF with a
// floating-point forward-Euler solution of the same machine equations.
// Half-way the inductances change (as with the 3D tables). Then the model
// reset is checked to clear the currents, and a stretch without step strobes
// is checked to hold them.
module tb_pmsm_model;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1, model_rst = 0, step = 0;
  q16_t ud, uq, we, id, iq, torque, uemf;
  q30_t ld, lq, gd, gq, rs, psi, kt;
  int checks = 0, failures = 0;

  real Ts = 1e-6;
  real r_ld, r_lq, r_rs, r_psi, r_kt, r_ud, r_uq, r_we, r_gd, r_gq;
  real e_id, e_iq, n_id, n_iq, e_m, e_emf;

  pmsm_model dut (.clk, .rst, .model_rst, .step, .ud, .uq, .we, .ld, .lq, .gd, .gq,
                  .rs, .psi, .kt, .id, .iq, .torque, .uemf);
  always #5 clk = ~clk;

  function automatic q30_t to30(real v); return q30_t'($rtoi(v * 1073741824.0)); endfunction
  function automatic q16_t to16(real v); return q16_t'($rtoi(v * 65536.0)); endfunction
  function automatic real fr30(q30_t v); return real'(v) / 1073741824.0; endfunction
  function automatic real fr16(q16_t v); return real'(v) / 65536.0; endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      if (failures < 20) $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic set_l(real l_d, real l_q);
    ld <= to30(l_d); lq <= to30(l_q); gd <= to30(Ts / l_d); gq <= to30(Ts / l_q);
    r_ld = fr30(to30(l_d)); r_lq = fr30(to30(l_q));
    r_gd = fr30(to30(Ts / l_d)); r_gq = fr30(to30(Ts / l_q));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rs <= to30(0.02); psi <= to30(0.08); kt <= to30(1.0);
    ud <= to16(10.0); uq <= to16(60.0); we <= to16(500.0);
    set_l(2e-4, 4e-4);
    r_rs = fr30(to30(0.02)); r_psi = fr30(to30(0.08)); r_kt = 1.0;
    r_ud = 10.0; r_uq = 60.0; r_we = 500.0;
    e_id = 0; e_iq = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 1; n <= 600; n++) begin
      if (n == 300) begin
        set_l(1.5e-4, 3.0e-4);
        @(posedge clk);
      end
      step <= 1; @(posedge clk); step <= 0;
      n_id = e_id + r_gd * (r_ud - r_rs * e_id + r_we * r_lq * e_iq);
      n_iq = e_iq + r_gq * (r_uq - r_rs * e_iq - r_we * r_ld * e_id - r_we * r_psi);
      e_id = n_id; e_iq = n_iq;
      repeat (2) @(posedge clk);
      #1;
      if (n % 25 == 0) begin
        e_m   = r_kt * (r_psi + (r_ld - r_lq) * e_id) * e_iq;
        e_emf = r_we * r_psi;
        check("id", fr16(id), e_id, 0.02 + 0.002 * (e_id < 0 ? -e_id : e_id));
        check("iq", fr16(iq), e_iq, 0.02 + 0.002 * (e_iq < 0 ? -e_iq : e_iq));
        check("torque", fr16(torque), e_m, 0.01 + 0.003 * (e_m < 0 ? -e_m : e_m));
        check("uemf", fr16(uemf), e_emf, 1e-3);
      end
    end
    // no step: state holds
    repeat (20) @(posedge clk);
    #1;
    check("hold id", fr16(id), e_id, 0.02 + 0.002 * (e_id < 0 ? -e_id : e_id));
    // currents were driven well away from zero
    checks++;
    if (fr16(id) < 1.0 && fr16(id) > -1.0) failures++;
    // model reset clears the integrators
    model_rst <= 1; @(posedge clk); model_rst <= 0; @(posedge clk); #1;
    check("reset id", fr16(id), 0.0, 1e-6);
    check("reset iq", fr16(iq), 0.0, 1e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
