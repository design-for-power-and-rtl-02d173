// tb_spec_counter: checks the speculative (m:2) counter for M = 5 (the drawn case)
// and M = 8 over all input patterns. Whenever at most three inputs are high,
// 2C + S must equal their number; S must always be the parity and C must always be
// "two or more high". Watchdog: 1 ms of simulated time.
module tb_spec_counter;
  timeunit 1ns; timeprecision 1ps;

  logic [4:0] x5;
  logic [7:0] x8;
  logic s5, c5, s8, c8;

  spec_counter #(.M(5)) dut5 (.x(x5), .s(s5), .c(c5));
  spec_counter #(.M(8)) dut8 (.x(x8), .s(s8), .c(c8));

  int checks = 0, failures = 0;
  int n_over = 0;

  task automatic check(input int n, input logic s, input logic c, input int v);
    checks++;
    if (n <= 3 && (2 * int'(c) + int'(s)) != n) begin
      failures++;
      $display("FAIL x=%0h: 2C+S=%0d count=%0d", v, 2 * int'(c) + int'(s), n);
    end
    checks++;
    if (s != logic'(n % 2) || c != (n >= 2)) begin
      failures++;
      $display("FAIL x=%0h: s=%0b c=%0b count=%0d", v, s, c, n);
    end
    if (n > 3) n_over++;
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
      check($countones(x5), s5, c5, v);
    end
    for (int v = 0; v < 256; v++) begin
      x8 = v[7:0];
      #1;
      check($countones(x8), s8, c8, v);
    end
    checks++;
    if (n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
