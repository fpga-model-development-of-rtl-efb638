// tb_ldlq_tables: fills both 3D tables with entries that encode their own
// address, then looks up random currents (including ones beyond the table,
// which must saturate to the edge) and angles. The entry expected at each
// operating point is computed from the grid (64 A steps from -512 A, 32
// angle sectors) and compared three clocks later. Also checks that the
// constant mode passes the constant registers, and the switch between modes.
module tb_ldlq_tables;
  import pmsm_pkg::*;
  localparam int IDB = 4, IQB = 4, THB = 5;
  logic clk = 0, rst = 1, mode_3d = 0;
  q16_t id, iq;
  ang_t theta;
  logic tbl_we_d = 0, tbl_we_q = 0;
  logic [15:0] tbl_addr;
  q30_t tbl_l, tbl_g, ld, lq, gd, gq;
  int checks = 0, failures = 0, n_sat = 0;

  ldlq_tables #(.ID_BITS(IDB), .IQ_BITS(IQB), .TH_BITS(THB)) dut (
    .clk, .rst, .id, .iq, .theta, .mode_3d,
    .ld_c(32'sd111), .lq_c(32'sd222), .gd_c(32'sd333), .gq_c(32'sd444),
    .tbl_we_d, .tbl_we_q, .tbl_addr, .tbl_l, .tbl_g, .ld, .lq, .gd, .gq);
  always #5 clk = ~clk;

  function automatic int idx(real i, int bits);
    int r;
    r = $rtoi($floor(i / 64.0)) + (1 << (bits - 1));
    if (r < 0) r = 0;
    if (r > (1 << bits) - 1) r = (1 << bits) - 1;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id <= '0; iq <= '0; theta <= '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int a = 0; a < (1 << (IDB + IQB + THB)); a++) begin
      tbl_addr <= 16'(a);
      tbl_l <= 32'sd100000 + a;  tbl_g <= 32'sd500000 + a;  tbl_we_d <= 1; tbl_we_q <= 0;
      @(posedge clk);
      tbl_l <= 32'sd200000 + a;  tbl_g <= 32'sd600000 + a;  tbl_we_d <= 0; tbl_we_q <= 1;
      @(posedge clk);
    end
    tbl_we_q <= 0;
    // constant mode
    repeat (4) @(posedge clk); #1;
    checks++;
    if (ld != 111 || lq != 222 || gd != 333 || gq != 444) failures++;
    mode_3d <= 1;
    for (int n = 0; n < 400; n++) begin
      automatic real ri = (real'($urandom % 160000) - 80000.0) / 100.0;  // +-800 A
      automatic real rq = (real'($urandom % 160000) - 80000.0) / 100.0;
      automatic logic [31:0] th = $urandom;
      automatic int a;
      id <= q16_t'($rtoi(ri * 65536.0));
      iq <= q16_t'($rtoi(rq * 65536.0));
      theta <= th;
      repeat (3) @(posedge clk); #1;
      a = (idx(ri, IDB) << (IQB + THB)) | (idx(rq, IQB) << THB) | int'(th >> (32 - THB));
      if (ri < -512.0 || ri >= 512.0 || rq < -512.0 || rq >= 512.0) n_sat++;
      checks++;
      if (ld != 100000 + a || gd != 500000 + a || lq != 200000 + a || gq != 600000 + a) begin
        failures++;
        if (failures < 10) $display("id %f iq %f th %h: ld %0d exp %0d", ri, rq, th, ld, 100000 + a);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    mode_3d <= 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (ld != 111 || gq != 444) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
