// tb_io_model: digital inputs must appear after two clocks on gate/exc;
// current-sensor outputs must follow u = k*i + q limited to [u_min, u_max]
// (0.003 V/A, 2.5 V, 0.5 V, 4.5 V), including currents that saturate both
// ends; resolver voltages pass to outputs 3 and 4.
module tb_io_model;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1;
  logic [6:0] di;
  logic [5:0] gate;
  logic exc;
  q16_t i_ph [3], ao [5];
  q16_t u_sin, u_cos;
  int checks = 0, failures = 0, n_clip_hi = 0, n_clip_lo = 0;

  io_model dut (.clk, .rst, .di, .gate, .exc, .i_ph, .k_sens(K_SENS_DEF), .q_sens(Q_SENS_DEF),
                .u_min(U_MIN_DEF), .u_max(U_MAX_DEF), .u_sin, .u_cos, .ao);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] hist [3];
    di <= '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      automatic logic [6:0] d = 7'($urandom);
      real cur [3], e, g;
      di <= d;
      for (int k = 0; k < 3; k++) begin
        cur[k] = (real'($urandom % 200000) - 100000.0) / 60.0;   // about +-1667 A
        i_ph[k] <= q16_t'($rtoi(cur[k] * 65536.0));
      end
      u_sin <= q16_t'($urandom); u_cos <= q16_t'($urandom);
      @(posedge clk); #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      for (int k = 0; k < 3; k++) begin
        e = 0.003 * cur[k] + 2.5;
        if (e > 4.5) begin e = 4.5; n_clip_hi++; end
        if (e < 0.5) begin e = 0.5; n_clip_lo++; end
        g = real'(ao[k]) / 65536.0;
        checks++;
        if ((g - e) > 1e-3 || (e - g) > 1e-3) begin
          failures++;
          if (failures < 10) $display("ao%0d %f exp %f", k, g, e);
        end
      end
      checks++;
      if (ao[3] != u_sin || ao[4] != u_cos) failures++;
      if (n >= 2) begin
        checks++;
        if ({exc, gate} != hist[1]) failures++;
      end
    end
    checks++;
    if (n_clip_hi == 0 || n_clip_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
