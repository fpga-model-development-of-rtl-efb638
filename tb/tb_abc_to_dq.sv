// tb_abc_to_dq: random balanced three-phase values and angles; the d/q
// result two clocks later is compared with the Clarke/Park equations
// evaluated in floating point. K = 2/3 and K = sqrt(2/3) are both used.
module tb_abc_to_dq;
  import pmsm_pkg::*;
  logic clk = 0;
  q16_t xa, xb, xd, xq;
  q30_t k, kt, sn, cs;
  int checks = 0, failures = 0;

  abc_to_dq dut (.clk, .xa, .xb, .k, .kt, .sin_t(sn), .cos_t(cs), .xd, .xq);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic real kr  = (n % 2) ? 0.816496580927726 : 2.0 / 3.0;
      automatic real a   = ($urandom % 100000) / 100000.0 * 6.283185307;
      automatic real ra  = (real'($urandom % 200000) - 100000.0) / 100.0;  // +-1000
      automatic real rb  = (real'($urandom % 200000) - 100000.0) / 100.0;
      automatic real al, be, ed, eq, gd, gq;
      xa <= q16_t'($rtoi(ra * 65536.0));
      xb <= q16_t'($rtoi(rb * 65536.0));
      k  <= q30_t'($rtoi(kr * 1073741824.0));
      kt <= q30_t'($rtoi(1.5 * kr * 1073741824.0));
      sn <= q30_t'($rtoi($sin(a) * 1073741824.0));
      cs <= q30_t'($rtoi($cos(a) * 1073741824.0));
      repeat (2) @(posedge clk);
      #1;
      al = 1.5 * kr * ra;
      be = kr * ($sqrt(3.0) / 2.0 * ra + $sqrt(3.0) * rb);
      ed = $cos(a) * al + $sin(a) * be;
      eq = -$sin(a) * al + $cos(a) * be;
      gd = real'(xd) / 65536.0;
      gq = real'(xq) / 65536.0;
      checks++;
      if ((gd - ed) > 1e-3 || (ed - gd) > 1e-3 || (gq - eq) > 1e-3 || (eq - gq) > 1e-3) begin
        failures++;
        if (failures < 10) $display("d %f/%f q %f/%f", gd, ed, gq, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
