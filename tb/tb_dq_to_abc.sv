// tb_dq_to_abc: random d/q values and angles; the phase values two clocks
// later are compared with the inverse Park/Clarke transformation evaluated in
// floating point, for K = 2/3 (kinv = 1) and K = sqrt(2/3).
module tb_dq_to_abc;
  import pmsm_pkg::*;
  logic clk = 0;
  q16_t xd, xq, xa, xb, xc;
  q30_t kinv, sn, cs;
  int checks = 0, failures = 0;

  dq_to_abc dut (.clk, .xd, .xq, .kinv, .sin_t(sn), .cos_t(cs), .xa, .xb, .xc);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic real kr = (n % 2) ? 0.816496580927726 : 2.0 / 3.0;
      automatic real ki = 2.0 / (3.0 * kr);
      automatic real a  = ($urandom % 100000) / 100000.0 * 6.283185307;
      automatic real rd = (real'($urandom % 200000) - 100000.0) / 100.0;
      automatic real rq = (real'($urandom % 200000) - 100000.0) / 100.0;
      automatic real al, be, ea, eb, ec, ga, gb, gc;
      xd   <= q16_t'($rtoi(rd * 65536.0));
      xq   <= q16_t'($rtoi(rq * 65536.0));
      kinv <= q30_t'($rtoi(ki * 1073741824.0));
      sn   <= q30_t'($rtoi($sin(a) * 1073741824.0));
      cs   <= q30_t'($rtoi($cos(a) * 1073741824.0));
      repeat (2) @(posedge clk);
      #1;
      al = $cos(a) * rd - $sin(a) * rq;
      be = $sin(a) * rd + $cos(a) * rq;
      // solve x_alpha = 3/2 K xa, x_beta = K (sqrt3/2 xa + sqrt3 xb), xa+xb+xc = 0
      ea = al / (1.5 * kr);
      eb = (be / kr - $sqrt(3.0) / 2.0 * ea) / $sqrt(3.0);
      ec = -ea - eb;
      ga = real'(xa) / 65536.0; gb = real'(xb) / 65536.0; gc = real'(xc) / 65536.0;
      checks++;
      if ((ga - ea) > 1e-3 || (ea - ga) > 1e-3 || (gb - eb) > 1e-3 || (eb - gb) > 1e-3 ||
          (gc - ec) > 1e-3 || (ec - gc) > 1e-3) begin
        failures++;
        if (failures < 10) $display("a %f/%f b %f/%f c %f/%f", ga, ea, gb, eb, gc, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
