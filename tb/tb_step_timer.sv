// tb_step_timer: checks that the model-step strobe is one clock wide, comes
// every STEP_CLKS clocks and first appears STEP_CLKS clocks after reset.
module tb_step_timer;
  localparam int STEP = 7;
  logic clk = 0, rst = 1, step;
  int checks = 0, failures = 0;
  int last, cyc, n;

  step_timer #(.STEP_CLKS(STEP)) dut (.clk, .rst, .step);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; last = 0; n = 0;
    while (n < 20) begin
      @(posedge clk); #1;
      cyc++;
      if (step) begin
        checks++;
        if (cyc - last != STEP) begin
          failures++;
          $display("interval %0d expected %0d", cyc - last, STEP);
        end
        last = cyc;
        n++;
      end
    end
    // strobe width: the clock after a strobe has none
    @(posedge clk); #1;
    checks++;
    if (step) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
