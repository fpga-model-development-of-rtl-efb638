// tb_cordic_sincos: feeds a new angle every clock (fixed corner angles, then
// random ones) and compares each result, STAGES+2 clocks later, with $sin and
// $cos. Tolerance 2e-6.
module tb_cordic_sincos;
  localparam int STAGES = 24;
  localparam int LAT = STAGES + 2;
  localparam int N = 400;
  logic clk = 0;
  logic [31:0] theta;
  logic signed [31:0] s, c;
  logic [31:0] ang [N];
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  cordic_sincos #(.STAGES(STAGES)) dut (.clk, .theta, .sin_o(s), .cos_o(c));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      if (i < 16) ang[i] = 32'(i) * 32'h1000_0000;       // multiples of 22.5 deg
      else        ang[i] = $urandom;
    end
    for (int t = 0; t < N + LAT; t++) begin
      theta <= (t < N) ? ang[t] : 32'd0;
      @(posedge clk); #1;
      if (t >= LAT - 1 && t - (LAT - 1) < N) begin
        automatic int k = t - (LAT - 1);
        automatic real a = real'(ang[k]) / 4294967296.0 * 2.0 * pi;
        automatic real es = $sin(a), ec = $cos(a);
        automatic real gs = real'(s) / 1073741824.0, gc = real'(c) / 1073741824.0;
        checks++;
        if ((gs - es) > 2e-6 || (es - gs) > 2e-6 || (gc - ec) > 2e-6 || (ec - gc) > 2e-6) begin
          failures++;
          if (failures < 10) $display("angle %h: sin %f/%f cos %f/%f", ang[k], gs, es, gc, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
