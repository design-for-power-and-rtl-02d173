// tb_spec_adder: checks the speculative adder (W = 16, window K = 8) and a small one
// (W = 8, K = 3, every operand pair). The sum must equal a + b whenever err is low,
// and err must be high exactly when the sum is wrong. Random operands plus long
// carry chains are applied; both outcomes must occur. Watchdog: 1 ms.
module tb_spec_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a, b, s;
  logic        e;
  logic [7:0]  a8, b8, s8;
  logic        e8;

  spec_adder dut (.a(a), .b(b), .sum(s), .err(e));
  spec_adder #(.W(8), .K(3)) dut8 (.a(a8), .b(b8), .sum(s8), .err(e8));

  int checks = 0, failures = 0;
  int n_miss = 0, n_ok = 0;

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] want;
    a = x; b = y;
    #1;
    want = x + y;
    checks++;
    if (e != (s != want)) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h: sum %h want %h err %b", x, y, s, want, e);
    end
    if (e) n_miss++; else n_ok++;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    check16(16'h00FF, 16'h0001);   // carry through 8 bits into bit 8: window sees it
    check16(16'h01FF, 16'h0001);   // 8 propagate bits above a generate: missed
    check16(16'h7FFF, 16'h0001);
    check16(16'hFFFF, 16'h0001);   // carry only leaves the word
    for (int t = 0; t < 100000; t++) check16(16'($urandom), 16'($urandom));
    for (int t = 0; t < 20000; t++) begin
      logic [15:0] x;
      x = 16'($urandom);
      check16(x, ~x ^ 16'(1 << ($urandom % 16)));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        logic [7:0] want;
        a8 = x[7:0]; b8 = y[7:0];
        #1;
        want = a8 + b8;
        checks++;
        if (e8 != (s8 != want)) begin
          failures++;
          if (failures < 10) $display("FAIL W8 %0d+%0d: sum %0d err %b", x, y, s8, e8);
        end
      end
    $display("missed %0d, correct %0d", n_miss, n_ok);
    checks++; if (n_miss == 0) failures++;
    checks++; if (n_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
