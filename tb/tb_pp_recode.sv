// tb_pp_recode: checks partial-product generation and recoding at 8 x 8, recoded
// columns 5..9, for all 65536 operand pairs. Per column, the tree bits plus the A
// terms must add up to the column's number of high partial products; the weighted
// column sums must give a * b; selected bits are checked against A = a_i,j & a_j,i
// and O = a_i,j | a_j,i and the plain a_i,j of an unrecoded column; unused rows must
// be zero. Watchdog: 1 ms of simulated time.
module tb_pp_recode;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 8;

  logic [N-1:0] a, b;
  logic [2*N-1:0][N-1:0] pp, and_t;

  pp_recode #(.N(N), .RLO(5), .RHI(9)) dut (.a(a), .b(b), .pp(pp), .and_t(and_t));

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d: got %0d want %0d", what, a, b, got, want);
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
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        longint total;
        total = 0;
        a = x[N-1:0]; b = y[N-1:0];
        #1;
        for (int c = 0; c < 2 * N; c++) begin
          int want, got;
          want = 0;
          got = 0;
          for (int i = 0; i < N; i++)
            if (c - i >= 0 && c - i < N) want += int'(a[i] & b[c-i]);
          for (int r = 0; r < N; r++) got += int'(pp[c][r]) + int'(and_t[c][r]);
          expect_eq(got, want, $sformatf("column %0d sum", c));
          total += longint'(got) << c;
        end
        expect_eq(int'(total), x * y, "weighted sum");
        // recoded column 7: pair (1,6) at row 1
        expect_eq(int'(and_t[7][1]), int'(a[1] & b[6] & a[6] & b[1]), "A_1,6");
        expect_eq(int'(pp[7][1]), int'((a[1] & b[6]) | (a[6] & b[1])), "O_1,6");
        // recoded column 8: rows 0..2 pairs (1,7),(2,6),(3,5), row 3 diagonal a_4,4
        expect_eq(int'(pp[8][3]), int'(a[4] & b[4]), "diagonal a_4,4");
        expect_eq(int'(and_t[8][2]), int'(a[3] & b[5] & a[5] & b[3]), "A_3,5");
        // unrecoded column 3: a_0,3 .. a_3,0 at rows 0..3
        for (int i = 0; i < 4; i++)
          expect_eq(int'(pp[3][i]), int'(a[i] & b[3-i]), "plain column 3");
        // unused rows: column 7 has 4 O terms, 4 A terms
        expect_eq(int'(pp[7][N-1:4]), 0, "pp column 7 padding");
        expect_eq(int'(and_t[3]), 0, "no A terms in column 3");
        expect_eq(int'(pp[15]), 0, "column 15 empty");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
