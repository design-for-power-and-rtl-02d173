// pp_recode: partial-product generation and recoding.
//
// Forms the N x N partial products a_i,j = a[i] & b[j]; a_i,j has weight 2**(i+j)
// and sits in column i+j. In the recoded columns RLO..RHI every pair a_i,j, a_j,i
// with i < j (both in the same column) is replaced by
//   A_i,j = a_i,j & a_j,i   and   O_i,j = a_i,j | a_j,i ,
// which keeps the column sum (A + O = a_i,j + a_j,i) while A_i,j is high with
// probability 1/16 only. The A terms go to the column's speculative counter, the O
// terms and the diagonal a_i,i to the speculative carry-save tree. Columns outside
// RLO..RHI pass all their a_i,j to the tree unchanged.
//
// Interface: pp[c] lists, from row 0 up, the tree bits of column c: O terms by
// increasing i, then the diagonal term (non-recoded columns: a_i,c-i by increasing i).
// and_t[c] lists the A terms of column c by increasing i. Unused rows are 0. Row
// counts per column are mult_pkg::pp_height and mult_pkg::and_count. Combinational.
//
// The recoding equations follow the source design; the recoded range for N = 8
// (columns 5..9, the five tallest columns) is this design's choice.
module pp_recode #(
  parameter int N   = 8,
  parameter int RLO = 5,
  parameter int RHI = 9
) (
  input  logic [N-1:0]             a,
  input  logic [N-1:0]             b,
  output logic [2*N-1:0][N-1:0]    pp,
  output logic [2*N-1:0][N-1:0]    and_t
);
  import mult_pkg::*;

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int ILO = pp_ilo(c, N);
    localparam int ILH = pp_ihi(c, N);
    localparam int NP  = pp_pairs(c, N);
    localparam bit REC = is_recoded(c, RLO, RHI);
    localparam int HPP = pp_height(c, N, RLO, RHI);
    localparam int HA  = and_count(c, N, RLO, RHI);

    for (genvar i = ILO; i <= ILH; i++) begin : g_i
      localparam int J = c - i;
      if (!REC) begin : g_plain
        assign pp[c][i - ILO] = a[i] & b[J];
      end else if (i < J) begin : g_pair
        logic pij, pji;
        assign pij = a[i] & b[J];
        assign pji = a[J] & b[i];
        assign and_t[c][i - ILO] = pij & pji;
        assign pp[c][i - ILO]    = pij | pji;
      end else if (i == J) begin : g_diag
        assign pp[c][NP] = a[i] & b[i];
      end
    end

    for (genvar r = HPP; r < N; r++) begin : g_pp_zero
      assign pp[c][r] = 1'b0;
    end
    for (genvar r = HA; r < N; r++) begin : g_and_zero
      assign and_t[c][r] = 1'b0;
    end
  end

endmodule
