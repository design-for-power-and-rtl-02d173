// tb_tdm_tree: checks the carry-save tree with its default shape (the column heights
// of an 8 x 8 partial-product matrix) and with a 12-column matrix of height 10 in
// every column. Random bit matrices are applied; row0 + row1 must equal the weighted
// sum of all used input bits modulo 2**W. Bits above a column's height are set at
// random too and must not matter. Watchdog: 1 ms of simulated time.
module tb_tdm_tree;
  timeunit 1ns; timeprecision 1ps;
  import mult_pkg::*;

  localparam hvec_t HA = ppm_heights(8);
  localparam int    WA = 16;
  localparam int    RA = tree_rows(HA, WA);

  function automatic hvec_t flat(int w, int h);
    hvec_t v = '0;
    for (int c = 0; c < w; c++) v[c] = 8'(h);
    return v;
  endfunction
  localparam hvec_t HB = flat(12, 10);
  localparam int    WB = 12;
  localparam int    RB = tree_rows(HB, WB);

  logic [WA-1:0][RA-1:0] col_a;
  logic [WA-1:0]         a0, a1;
  logic [WB-1:0][RB-1:0] col_b;
  logic [WB-1:0]         b0, b1;

  tdm_tree dut_a (.col(col_a), .row0(a0), .row1(a1));
  tdm_tree #(.W(WB), .HEIGHT(HB)) dut_b (.col(col_b), .row0(b0), .row1(b1));

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint sa, sb;
      sa = 0;
      sb = 0;
      for (int c = 0; c < WA; c++)
        for (int r = 0; r < RA; r++) begin
          col_a[c][r] = ($urandom % 4 == 0);
          if (r < int'(HA[c])) sa += longint'(col_a[c][r]) << c;
        end
      for (int c = 0; c < WB; c++)
        for (int r = 0; r < RB; r++) begin
          col_b[c][r] = $urandom % 2;
          if (r < int'(HB[c])) sb += longint'(col_b[c][r]) << c;
        end
      #1;
      checks++;
      if (WA'(a0 + a1) != WA'(sa)) begin
        failures++;
        if (failures < 10) $display("FAIL tree A: %0d + %0d != %0d", a0, a1, WA'(sa));
      end
      checks++;
      if (WB'(b0 + b1) != WB'(sb)) begin
        failures++;
        if (failures < 10) $display("FAIL tree B: %0d + %0d != %0d", b0, b1, WB'(sb));
      end
    end
    // all used bits high in the 8 x 8 shape: sum is 255 * 255
    for (int c = 0; c < WA; c++) col_a[c] = '1;
    #1;
    checks++;
    if (WA'(a0 + a1) != 16'd65025) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
