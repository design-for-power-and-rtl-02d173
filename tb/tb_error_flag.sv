// tb_error_flag: checks the error-flag OR for 17 inputs (the 8 x 8 multiplier's
// size): all-zero, each single input, and random patterns. Watchdog: 1 ms.
module tb_error_flag;
  timeunit 1ns; timeprecision 1ps;

  logic [16:0] e;
  logic        flag;

  error_flag #(.NE(17)) dut (.e(e), .flag(flag));

  int checks = 0, failures = 0;

  task automatic check(input logic [16:0] v);
    e = v;
    #1;
    checks++;
    if (flag != (v != '0)) begin
      failures++;
      $display("FAIL e=%h flag=%b", v, flag);
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
    check('0);
    for (int i = 0; i < 17; i++) check(17'(1) << i);
    for (int t = 0; t < 1000; t++) check(17'($urandom) & 17'($urandom) & 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
