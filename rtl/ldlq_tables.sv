// ldlq_tables: saturation- and angle-dependent inductances Ld(id,iq,theta)
// and Lq(id,iq,theta).
//
// The machine model's inductances vary with the d/q currents (magnetic
// saturation) and with the rotor angle (slotting and winding distribution).
// Because the angle changes every model step, the lookup lives on the FPGA.
// Each axis has one 3D table of 2^(ID_BITS+IQ_BITS+TH_BITS) entries; an entry
// holds the inductance L and the matching integration gain Ts/L, both Q1.30,
// so the machine model needs no divider. The processor fills the tables
// (typically with L_2D(id,iq) * L_norm(theta), the 2D saturation map scaled by
// a normalised angle profile) through the write port.
//
// Addressing: the current indices are (i >>> I_SHIFT) + 2^(BITS-1), saturated
// to the table (I_SHIFT = 22 gives a 64 A grid; 16 points span -512..+448 A);
// the angle index is the top TH_BITS bits of the electrical angle. The entry
// at the grid point at or below the operating point is used (no interpolation).
// Address = {id index, iq index, theta index}.
// With mode_3d low the constant Ld, Lq, Ts/Ld, Ts/Lq registers are passed
// instead (the model without angle-dependent tables).
// The table contents, grid and lookup rule are this design's choices; the
// document gives the functions L = f(id, iq, theta) and the product form.
//
// Timing: address registered, memory read registered, output registered:
// outputs follow id/iq/theta after 3 clocks.
// Only the top TH_BITS bits of theta and the low ID_BITS+IQ_BITS+TH_BITS bits
// of the 16-bit tbl_addr port are used; at the default sizes a lint tool
// reports the rest as unused. The port is 16 bits wide so that larger tables
// fit the same register.
module ldlq_tables
  import pmsm_pkg::*;
#(
  parameter int ID_BITS = 4,
  parameter int IQ_BITS = 4,
  parameter int TH_BITS = 5,
  parameter int I_SHIFT = 22
) (
  input  logic        clk,
  input  logic        rst,
  input  q16_t        id,
  input  q16_t        iq,
  input  ang_t        theta,
  input  logic        mode_3d,
  input  q30_t        ld_c,
  input  q30_t        lq_c,
  input  q30_t        gd_c,
  input  q30_t        gq_c,
  input  logic        tbl_we_d,
  input  logic        tbl_we_q,
  input  logic [15:0] tbl_addr,
  input  q30_t        tbl_l,
  input  q30_t        tbl_g,
  output q30_t        ld,
  output q30_t        lq,
  output q30_t        gd,
  output q30_t        gq
);

  localparam int AW    = ID_BITS + IQ_BITS + TH_BITS;
  localparam int DEPTH = 1 << AW;

  logic [63:0] mem_d [DEPTH];
  logic [63:0] mem_q [DEPTH];

  function automatic logic [15:0] cur_index(input q16_t i, input int bits);
    logic signed [31:0] s;
    logic signed [31:0] hi;
    s  = (i >>> I_SHIFT) + (32'sd1 <<< (bits - 1));
    hi = (32'sd1 <<< bits) - 32'sd1;
    if (s < 0) s = 0;
    else if (s > hi) s = hi;
    return 16'(s);
  endfunction

  logic [AW-1:0] raddr;
  logic [63:0]   rd_d, rd_q;
  logic [ID_BITS-1:0] ix_d;
  logic [IQ_BITS-1:0] ix_q;

  assign ix_d = ID_BITS'(cur_index(id, ID_BITS));
  assign ix_q = IQ_BITS'(cur_index(iq, IQ_BITS));

  // Table write port
  always_ff @(posedge clk) begin
    if (tbl_we_d) mem_d[tbl_addr[AW-1:0]] <= {tbl_l, tbl_g};
    if (tbl_we_q) mem_q[tbl_addr[AW-1:0]] <= {tbl_l, tbl_g};
  end

  // Lookup
  always_ff @(posedge clk) begin
    raddr <= {ix_d, ix_q, theta[31 -: TH_BITS]};
    rd_d  <= mem_d[raddr];
    rd_q  <= mem_q[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ld <= '0; lq <= '0; gd <= '0; gq <= '0;
    end else if (mode_3d) begin
      ld <= rd_d[63:32]; gd <= rd_d[31:0];
      lq <= rd_q[63:32]; gq <= rd_q[31:0];
    end else begin
      ld <= ld_c; gd <= gd_c;
      lq <= lq_c; gq <= gq_c;
    end
  end

endmodule
