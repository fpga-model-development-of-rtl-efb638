// step_timer: model-step strobe for the FPGA PMSM model.
//
// All submodels advance their state once per model step. This counter issues
// a one-clock strobe every STEP_CLKS clocks (default 100 clocks, i.e. 1 us at
// a 100 MHz clock). Between strobes the combinational and pipelined parts of
// the model (transformations, CORDIC, table read) settle, so STEP_CLKS must
// exceed their total latency (about 35 clocks). The step length is this
// design's choice; the document gives none for its model.
//
// Interface: clk, synchronous active-high rst, step out. The first strobe comes
// STEP_CLKS clocks after reset is released.
module step_timer #(
  parameter int unsigned STEP_CLKS = 100
) (
  input  logic clk,
  input  logic rst,
  output logic step
);

  logic [$clog2(STEP_CLKS+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      step <= 1'b0;
    end else if (cnt == $bits(cnt)'(STEP_CLKS - 1)) begin
      cnt  <= '0;
      step <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      step <= 1'b0;
    end
  end

endmodule
