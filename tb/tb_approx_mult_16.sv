// tb_approx_mult_16: the multiplier in its 16 x 16 arrangement, recoded columns
// 11..22 (eight A terms in the middle column, so counters of up to eight inputs and
// correction words of two bits), adder window 8.
//
// Applies 200000 random operand pairs, half of them with bits high three times out
// of four so that counter mispredictions become frequent, plus all-ones operands.
// Checks exact_p == a * b always, spec_p == a * b whenever err is low, and err high
// whenever some recoded column has four or more high A terms (worked out here). It
// counts counter mispredictions, adder misses and clean results and fails if one
// never occurred. Watchdog: 1 ms of simulated time.
module tb_approx_mult_16;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] spec_p, exact_p;
  logic           err;

  approx_mult #(.N(N), .RLO(11), .RHI(22), .K(8)) dut (
    .a(a), .b(b), .spec_p(spec_p), .exact_p(exact_p), .err(err)
  );

  int checks = 0, failures = 0;
  int n_cnt_miss = 0, n_add_miss = 0, n_clean = 0;

  function automatic bit ref_counter_miss(logic [N-1:0] x, logic [N-1:0] y);
    for (int c = 11; c <= 22; c++) begin
      int ones = 0;
      for (int i = 0; i < N; i++) begin
        int j = c - i;
        if (j > i && j < N && x[i] && y[j] && x[j] && y[i]) ones++;
      end
      if (ones >= 4) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] prod;
    bit cm;
    a = x; b = y;
    #1;
    prod = (2*N)'(x) * (2*N)'(y);
    cm = ref_counter_miss(x, y);
    checks++;
    if (exact_p !== prod) begin
      failures++;
      if (failures < 10) $display("FAIL exact %0d*%0d: got %0d want %0d", x, y, exact_p, prod);
    end
    checks++;
    if (!err && spec_p !== prod) begin
      failures++;
      if (failures < 10) $display("FAIL spec %0d*%0d: got %0d, err low", x, y, spec_p);
    end
    checks++;
    if (cm && !err) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d: counter miss without err", x, y);
    end
    if (cm) n_cnt_miss++;
    else if (err) n_add_miss++;
    else n_clean++;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '1);
    check(16'd250, 16'd56);
    for (int t = 0; t < 100000; t++) check(N'($urandom), N'($urandom));
    for (int t = 0; t < 100000; t++)
      check(N'($urandom) | N'($urandom), N'($urandom) | N'($urandom));
    $display("counter mispredictions %0d, adder misses %0d, clean %0d",
             n_cnt_miss, n_add_miss, n_clean);
    checks++; if (n_cnt_miss == 0) failures++;
    checks++; if (n_add_miss == 0) failures++;
    checks++; if (n_clean == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
