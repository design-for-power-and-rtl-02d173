// tb_correction_block: checks the correction block for M = 5 and M = 8 over all
// input patterns. With n high inputs, a speculative counter gives 2*(n>=2) + n%2;
// the block must raise e exactly when n > 3 and give ew with
// 2*(n>=2) + n%2 + 2*ew == n. Watchdog: 1 ms of simulated time.
module tb_correction_block;
  timeunit 1ns; timeprecision 1ps;

  logic [4:0] x5;
  logic [7:0] x8;
  logic e5, e8;
  logic [0:0] ew5;
  logic [1:0] ew8;

  correction_block #(.M(5)) dut5 (.x(x5), .e(e5), .ew(ew5));
  correction_block #(.M(8)) dut8 (.x(x8), .e(e8), .ew(ew8));

  int checks = 0, failures = 0;
  int n_err = 0;

  task automatic check(input int n, input logic e, input int ew, input int v);
    int spec = 2 * int'(n >= 2) + n % 2;
    checks++;
    if (e != (n > 3)) begin
      failures++;
      $display("FAIL x=%0h: e=%0b count=%0d", v, e, n);
    end
    checks++;
    if (spec + 2 * ew != n) begin
      failures++;
      $display("FAIL x=%0h: ew=%0d count=%0d", v, ew, n);
    end
    if (e) n_err++;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = '0;
    for (int v = 0; v < 32; v++) begin
      x5 = v[4:0];
      #1;
      check($countones(x5), e5, int'(ew5), v);
    end
    for (int v = 0; v < 256; v++) begin
      x8 = v[7:0];
      #1;
      check($countones(x8), e8, int'(ew8), v);
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
