// tb_approx_mult: end-to-end test of the speculative multiplier at its default size
// (8 x 8, recoded columns 5..9, adder window 8).
//
// Applies the three operand pairs of the reference waveform (25 x 36 = 900,
// 45 x 69 = 3105, 250 x 56 = 14000), then every one of the 65536 operand pairs.
// For each it checks, against a * b computed here:
//   - exact_p is always the product;
//   - when err is low, spec_p is the product;
//   - err is high exactly when a counter saw four or more high A terms (worked out
//     here from the operands) or when spec_p is wrong.
// It counts how often each mechanism occurred (counter misprediction, adder miss,
// clean speculative result) and fails if one never did. One operand pair is
// applied per nanosecond; a watchdog ends the run after 1 ms of simulated time.

module tb_approx_mult;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] spec_p, exact_p;
  logic           err;

  approx_mult dut (.a(a), .b(b), .spec_p(spec_p), .exact_p(exact_p), .err(err));

  int checks = 0, failures = 0;
  int n_cnt_miss = 0, n_add_miss = 0, n_clean = 0;

  // Reference: does column 7 (the only one with four A terms) hold four high ones?
  function automatic bit ref_counter_miss(logic [N-1:0] x, logic [N-1:0] y);
    int ones = 0;
    for (int i = 0; i < 4; i++)
      if (x[i] && y[7-i] && x[7-i] && y[i]) ones++;
    return ones >= 4;
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
      if (failures < 10) $display("FAIL spec %0d*%0d: got %0d want %0d, err low", x, y, spec_p, prod);
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
    // reference waveform values: all three must come out exact and unflagged
    check(8'd25, 8'd36);
    checks++; if (spec_p !== 16'd900 || err) failures++;
    check(8'd45, 8'd69);
    checks++; if (spec_p !== 16'd3105 || err) failures++;
    check(8'd250, 8'd56);
    checks++; if (spec_p !== 16'd14000 || err) failures++;

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check(x[N-1:0], y[N-1:0]);

    $display("counter mispredictions %0d, adder misses %0d, clean %0d",
             n_cnt_miss, n_add_miss, n_clean);
    checks++; if (n_cnt_miss == 0) failures++;
    checks++; if (n_add_miss == 0) failures++;
    checks++; if (n_clean == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
