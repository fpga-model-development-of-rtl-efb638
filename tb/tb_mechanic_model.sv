// tb_mechanic_model: applies driving and load torque for a number of steps
// and compares speed, rpm and mechanical/electrical angle with a
// floating-point integration of J dOmega/dt = M - M_load. Also checks the
// angle offset, deceleration with load above torque, and the model reset.
module tb_mechanic_model;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1, model_rst = 0, step = 0;
  q16_t torque, mload, wm, we, rpm;
  logic [31:0] tsj, kth;
  logic [7:0] pp;
  ang_t th_ofs, theta_m, theta_e;
  int checks = 0, failures = 0;

  real Ts = 1e-6, J = 0.05;
  real r_tsj, r_kth, w, th, ew, eth;

  mechanic_model dut (.clk, .rst, .model_rst, .step, .torque, .mload, .tsj, .kth, .pp,
                      .th_ofs, .wm, .we, .rpm, .theta_m, .theta_e);
  always #5 clk = ~clk;

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      if (failures < 20) $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  function automatic real angdiff(ang_t a, real turns);
    real f;
    f = real'(a) / 4294967296.0 - (turns - $floor(turns));
    if (f > 0.5) f -= 1.0;
    if (f < -0.5) f += 1.0;
    return f;
  endfunction

  task automatic run(int n, real m, real ml);
    torque <= q16_t'($rtoi(m * 65536.0));
    mload  <= q16_t'($rtoi(ml * 65536.0));
    @(posedge clk);
    for (int i = 0; i < n; i++) begin
      step <= 1; @(posedge clk); step <= 0; @(posedge clk);
      // same order as the hardware: angle uses the speed before the update
      th += w * Ts / 6.283185307179586;
      w  += (m - ml) * r_tsj;
    end
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tsj <= 32'($rtoi(Ts / J * 1099511627776.0));
    kth <= 32'($rtoi(Ts / 6.283185307179586 * 281474976710656.0));
    r_tsj = real'(32'($rtoi(Ts / J * 1099511627776.0))) / 1099511627776.0;
    pp <= 8'd4; th_ofs <= 32'h1000_0000;
    torque <= '0; mload <= '0;
    w = 0; th = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int seg = 0; seg < 8; seg++) begin
      run(2000, seg < 5 ? 300.0 : 0.0, seg < 5 ? 20.0 : 400.0);
      check("wm", real'(wm) / 65536.0, w, 1e-3 + 1e-4 * (w < 0 ? -w : w));
      check("rpm", real'(rpm) / 65536.0, w * 60.0 / 6.283185307179586, 0.02 + 1e-4 * (w < 0 ? -w : w) * 10);
      check("we", real'(we) / 65536.0, 4.0 * real'(wm) / 65536.0, 1e-6);
      check("theta_m", angdiff(theta_m, th), 0.0, 2e-5);
      check("theta_e", angdiff(theta_e, 4.0 * th + 0.0625), 0.0, 1e-4);
    end
    checks++;
    if (w < 5.0) failures++;    // the rotor really turned
    model_rst <= 1; @(posedge clk); model_rst <= 0; @(posedge clk); #1;
    check("reset wm", real'(wm) / 65536.0, 0.0, 1e-9);
    check("reset th", real'(theta_m), 0.0, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
