// tb_resolver_model: random angles and both excitation levels; the SIN and
// COS winding voltages one clock later must equal +-k*u0sin*sin(theta) and
// +-k*u0cos*cos(theta), with different amplitudes for the two windings.
module tb_resolver_model;
  import pmsm_pkg::*;
  logic clk = 0, rst = 1, exc;
  q30_t sin_r, cos_r;
  q16_t amp_s, amp_c, u_sin, u_cos;
  int checks = 0, failures = 0;

  resolver_model dut (.clk, .rst, .exc, .sin_r, .cos_r, .amp_s, .amp_c, .u_sin, .u_cos);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      automatic real a = ($urandom % 100000) / 100000.0 * 6.283185307;
      automatic real A = 2.0 + ($urandom % 1000) / 250.0;
      automatic real C = 2.0 + ($urandom % 1000) / 250.0;
      automatic real sg = (n % 2) ? 1.0 : -1.0;
      automatic real es = sg * A * $sin(a), ec = sg * C * $cos(a);
      automatic real gs, gc;
      exc   <= n[0];
      amp_s <= q16_t'($rtoi(A * 65536.0));
      amp_c <= q16_t'($rtoi(C * 65536.0));
      sin_r <= q30_t'($rtoi($sin(a) * 1073741824.0));
      cos_r <= q30_t'($rtoi($cos(a) * 1073741824.0));
      @(posedge clk); #1;
      gs = real'(u_sin) / 65536.0; gc = real'(u_cos) / 65536.0;
      checks++;
      if ((gs - es) > 1e-4 || (es - gs) > 1e-4 || (gc - ec) > 1e-4 || (ec - gc) > 1e-4) begin
        failures++;
        if (failures < 10) $display("sin %f/%f cos %f/%f", gs, es, gc, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
