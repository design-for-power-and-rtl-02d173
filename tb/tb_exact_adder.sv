// tb_exact_adder: checks the exact adder (W = 16) with random and corner operands
// against a + b modulo 2**16. Watchdog: 1 ms of simulated time.
module tb_exact_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a, b, s;

  exact_adder dut (.a(a), .b(b), .sum(s));

  int checks = 0, failures = 0;

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] full;
    a = x; b = y;
    #1;
    full = 17'(x) + 17'(y);
    checks++;
    if (s != full[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h: %h", x, y, s);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h0001);
    check(16'h0000, 16'h0000);
    for (int t = 0; t < 100000; t++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
