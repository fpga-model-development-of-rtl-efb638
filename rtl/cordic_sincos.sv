// cordic_sincos: sine and cosine of a rotor angle, for the DQ transformation
// and the resolver.
//
// The angle is an unsigned 32-bit fraction of a turn (2^32 = 2*pi). It is
// first reduced to the nearest quadrant, leaving a residual in [-45, +45)
// degrees; a rotation-mode CORDIC with STAGES micro-rotations then turns the
// vector (1/K_cordic, 0) by the residual, and the quadrant is restored by
// swapping and negating the result. The micro-rotation angles are
// atan(2^-i) / (2*pi) * 2^32, i = 0..23; the start value 652032874 is
// 2^30 / prod_i sqrt(1 + 2^-2i), which cancels the CORDIC gain.
//
// Interface: theta in, sin_o/cos_o out in Q1.30. Fully pipelined: a new angle
// may enter every clock and its result appears STAGES+2 clocks later.
// The document uses sin/cos of the rotor angle without saying how they are
// formed; the CORDIC is this design's choice.
// Only the top two bits of the shifted angle th_shift (the quadrant) are read;
// the residual is taken from theta itself, so a lint tool reports the other
// 30 bits of th_shift as unused.
module cordic_sincos #(
  parameter int STAGES = 24
) (
  input  logic                clk,
  input  logic         [31:0] theta,
  output logic signed  [31:0] sin_o,
  output logic signed  [31:0] cos_o
);

  localparam logic signed [33:0] X_START = 34'sd652032874;

  function automatic logic signed [33:0] atan_tab(input int i);
    case (i)
      0: return 34'sd536870912;   1: return 34'sd316933406;
      2: return 34'sd167458907;   3: return 34'sd85004756;
      4: return 34'sd42667331;    5: return 34'sd21354465;
      6: return 34'sd10679838;    7: return 34'sd5340245;
      8: return 34'sd2670163;     9: return 34'sd1335087;
      10: return 34'sd667544;     11: return 34'sd333772;
      12: return 34'sd166886;     13: return 34'sd83443;
      14: return 34'sd41722;      15: return 34'sd20861;
      16: return 34'sd10430;      17: return 34'sd5215;
      18: return 34'sd2608;       19: return 34'sd1304;
      20: return 34'sd652;        21: return 34'sd326;
      22: return 34'sd163;        23: return 34'sd81;
      default: return 34'sd0;
    endcase
  endfunction

  logic signed [33:0] x [0:STAGES];
  logic signed [33:0] y [0:STAGES];
  logic signed [33:0] z [0:STAGES];
  logic        [1:0]  q [0:STAGES];

  // Quadrant reduction
  logic [31:0] th_shift;
  logic [1:0]  quad;
  assign th_shift = theta + 32'h2000_0000;
  assign quad     = th_shift[31:30];

  always_ff @(posedge clk) begin
    x[0] <= X_START;
    y[0] <= '0;
    z[0] <= 34'(signed'(theta - {quad, 30'b0}));
    q[0] <= quad;
  end

  // Micro-rotations
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (z[i] >= 0) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - atan_tab(i);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + atan_tab(i);
      end
      q[i+1] <= q[i];
    end
  end

  // Quadrant restore
  always_ff @(posedge clk) begin
    unique case (q[STAGES])
      2'd0: begin cos_o <= 32'(x[STAGES]);  sin_o <= 32'(y[STAGES]);  end
      2'd1: begin cos_o <= 32'(-y[STAGES]); sin_o <= 32'(x[STAGES]);  end
      2'd2: begin cos_o <= 32'(-x[STAGES]); sin_o <= 32'(-y[STAGES]); end
      default: begin cos_o <= 32'(y[STAGES]); sin_o <= 32'(-x[STAGES]); end
    endcase
  end

endmodule
