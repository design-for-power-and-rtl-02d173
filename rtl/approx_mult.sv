// approx_mult: N x N unsigned speculative multiplier with error flag and exact
// (non-speculative) result.
//
// Datapath, all combinational:
//  1. pp_recode forms the partial products and, in columns RLO..RHI, replaces each
//     pair a_i,j / a_j,i by A = AND and O = OR of the two.
//  2. In each recoded column one spec_counter adds the column's A terms into S
//     (same column) and C (next column), assuming at most three of them are high.
//  3. The speculative tdm_tree adds the direct bits, the S and the C bits into two
//     rows; spec_adder (window K) adds those rows into the speculative product.
//  4. For each counter with four or more inputs a correction_block raises E when the
//     counter was wrong and gives the missing amount EW. The correction tdm_tree
//     adds EW to the two speculative rows and exact_adder gives the exact product.
//  5. error_flag ORs all E signals and the speculative adder's own miss signal.
// err = 0 guarantees spec_p == a * b; exact_p == a * b always.
//
// Interface: a, b (N bits) in; spec_p, exact_p (2N bits) and err out. No clock.
// The structure (recoding, speculative counters, correction blocks, two carry-save
// trees, speculative and exact adders, OR-ed error flag) follows the source design
// and its 8 x 8 size. The recoded range for N = 8, the window K, the form of the
// correction word and the inclusion of the adder's miss in err are this design's
// choices. For the 16 x 16 arrangement of the source use N = 16, RLO = 11, RHI = 22.
module approx_mult #(
  parameter int N   = 8,
  parameter int RLO = 5,
  parameter int RHI = 9,
  parameter int K   = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] spec_p,
  output logic [2*N-1:0] exact_p,
  output logic           err
);
  import mult_pkg::*;

  localparam int    W   = 2 * N;
  localparam hvec_t H1  = tree1_heights(N, RLO, RHI);
  localparam int    H1R = tree_rows(H1, W);
  localparam hvec_t H2  = tree2_heights(N, RLO, RHI);
  localparam int    H2R = tree_rows(H2, W);

  logic [W-1:0][N-1:0] pp, and_t;
  logic [W-1:0]        s_col, c_col, e_col;
  wire  [W-1:0][H1R-1:0] t1_in;
  wire  [W-1:0][H2R-1:0] t2_in;
  logic [W-1:0]        t1_r0, t1_r1, t2_r0, t2_r1;
  logic                add_err;

  pp_recode #(.N(N), .RLO(RLO), .RHI(RHI)) u_pp (
    .a(a), .b(b), .pp(pp), .and_t(and_t)
  );

  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int M   = and_count(c, N, RLO, RHI);
    localparam int MB  = and_count(c - 1, N, RLO, RHI);
    localparam int HPP = pp_height(c, N, RLO, RHI);

    // speculative counter of this column
    if (M >= 1) begin : g_cnt
      spec_counter #(.M(M)) u_cnt (
        .x(and_t[c][M-1:0]), .s(s_col[c]), .c(c_col[c])
      );
    end else begin : g_nocnt
      assign s_col[c] = 1'b0;
      assign c_col[c] = 1'b0;
    end

    // correction block (only a counter with four or more inputs can be wrong)
    if (M >= 4) begin : g_cor
      localparam int EWW = ew_width(M);
      logic [EWW-1:0] ew;
      correction_block #(.M(M), .EWW(EWW)) u_cor (
        .x(and_t[c][M-1:0]), .e(e_col[c]), .ew(ew)
      );
      for (genvar k = 0; k < EWW; k++) begin : g_ew
        if (c + 1 + k < W) begin : g_in
          assign t2_in[c+1+k][ew_row(c, k, N, RLO, RHI)] = ew[k];
        end
      end
    end else begin : g_nocor
      assign e_col[c] = 1'b0;
    end

    // speculative tree input: direct bits, own S, C from the column below
    for (genvar r = 0; r < HPP; r++) begin : g_t1pp
      assign t1_in[c][r] = pp[c][r];
    end
    if (M >= 1) begin : g_t1s
      assign t1_in[c][HPP] = s_col[c];
    end
    if (MB >= 2) begin : g_t1c
      assign t1_in[c][HPP + ((M >= 1) ? 1 : 0)] = c_col[c-1];
    end
    for (genvar r = int'(H1[c]); r < H1R; r++) begin : g_t1z
      assign t1_in[c][r] = 1'b0;
    end

    // correction tree input: the two speculative rows, then EW bits (above)
    assign t2_in[c][0] = t1_r0[c];
    assign t2_in[c][1] = t1_r1[c];
    for (genvar r = int'(H2[c]); r < H2R; r++) begin : g_t2z
      assign t2_in[c][r] = 1'b0;
    end
  end

  tdm_tree #(.W(W), .HEIGHT(H1), .HMAX(H1R)) u_spec_tree (
    .col(t1_in), .row0(t1_r0), .row1(t1_r1)
  );

  spec_adder #(.W(W), .K(K)) u_spec_add (
    .a(t1_r0), .b(t1_r1), .sum(spec_p), .err(add_err)
  );

  tdm_tree #(.W(W), .HEIGHT(H2), .HMAX(H2R)) u_corr_tree (
    .col(t2_in), .row0(t2_r0), .row1(t2_r1)
  );

  exact_adder #(.W(W)) u_add (
    .a(t2_r0), .b(t2_r1), .sum(exact_p)
  );

  error_flag #(.NE(W + 1)) u_err (
    .e({add_err, e_col}), .flag(err)
  );

endmodule
