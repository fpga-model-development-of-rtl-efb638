// tb_inverter_model: every gate combination of the three legs with phase
// currents above, below and inside the minimal switching current; the phase
// voltages one clock later are compared with pole voltages worked out per
// switch state and referred to the star point. Checks the shorted-leg flag
// and counts every switch state seen.
module tb_inverter_model;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] gate;
  q16_t udc, uf, imin;
  q16_t i_ph [3], e_ph [3], u_ph [3];
  sw_state_e state [3];
  logic short_o;
  int checks = 0, failures = 0;
  int seen [6];

  inverter_model dut (.clk, .rst, .gate, .udc, .uf, .imin, .i_ph, .e_ph, .u_ph, .state, .short_o);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real Udc = 800.0, Uf = 1.5, Imin = 0.5;
    real cur [3], emf [3], v [3], mean, got;
    int   exp_st [3];
    logic exp_short;
    udc  <= q16_t'($rtoi(Udc * 65536.0));
    uf   <= q16_t'($rtoi(Uf * 65536.0));
    imin <= q16_t'($rtoi(Imin * 65536.0));
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int g = 0; g < 64; g++) begin
      for (int ci = 0; ci < 27; ci++) begin
        automatic int cc = ci;
        for (int k = 0; k < 3; k++) begin
          case (cc % 3)
            0: cur[k] = 12.25;
            1: cur[k] = -7.5;
            default: cur[k] = 0.25;
          endcase
          cc /= 3;
          emf[k] = 100.0 * (k - 1) + 3.0;
          i_ph[k] <= q16_t'($rtoi(cur[k] * 65536.0));
          e_ph[k] <= q16_t'($rtoi(emf[k] * 65536.0));
        end
        gate <= 6'(g);
        exp_short = 0;
        for (int k = 0; k < 3; k++) begin
          automatic logic hs = g[2*k], ls = g[2*k+1];
          if (hs && ls)      begin v[k] = 0.0;           exp_st[k] = 3; exp_short = 1; end
          else if (hs)       begin v[k] = Udc / 2;       exp_st[k] = 1; end
          else if (ls)       begin v[k] = -Udc / 2;      exp_st[k] = 2; end
          else if (cur[k] > Imin)  begin v[k] = -Udc / 2 - Uf; exp_st[k] = 4; end
          else if (cur[k] < -Imin) begin v[k] = Udc / 2 + Uf;  exp_st[k] = 5; end
          else               begin v[k] = emf[k];        exp_st[k] = 0; end
        end
        mean = (v[0] + v[1] + v[2]) / 3.0;
        @(posedge clk); #1;
        for (int k = 0; k < 3; k++) begin
          got = real'(u_ph[k]) / 65536.0;
          checks++;
          if ((got - (v[k] - mean)) > 1e-3 || ((v[k] - mean) - got) > 1e-3 || int'(state[k]) != exp_st[k]) begin
            failures++;
            if (failures < 10) $display("g=%b k=%0d u %f exp %f state %0d exp %0d", g, k, got, v[k] - mean, state[k], exp_st[k]);
          end
          seen[exp_st[k]]++;
        end
        checks++;
        if (short_o != exp_short) failures++;
      end
    end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (seen[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
