// tdm_tree: carry-save reduction tree. It adds up a matrix of bits given column by
// column (column c has weight 2**c) and leaves the total as two W-bit rows whose sum,
// modulo 2**W, equals the sum of all input bits.
//
// Each column is handled as a queue in arrival order. In every level a column with
// more than two bits feeds its earliest bits, three at a time, into full adders; the
// bits it has left over go first in the next level's queue, then the adders' sums,
// then the carries coming up from the column below. Bits that are produced late thus
// wait at the back while early ones are consumed first, which is the principle of the
// three-dimensional (TDM) reduction: a signal is combined with others that become
// valid at about the same time. The TDM method also picks, per full adder, which pin
// a late signal enters; that is a timing choice of the netlist and is not modelled
// here (the full adder is symmetric). Reduction uses full adders only and stops when
// every column holds at most two bits.
//
// Interface: col[c][r] is bit r of column c; only rows r < HEIGHT[c] are read. row0
// and row1 are the carry-save result. Carries out of column W-1 are dropped. Purely
// combinational; the depth is mult_pkg::num_levels(HEIGHT, W) full adders.
//
// The defaults describe an exact 8 x 8 partial-product matrix.
module tdm_tree #(
  parameter int              W      = 16,
  parameter mult_pkg::hvec_t HEIGHT = mult_pkg::ppm_heights(8),
  parameter int              HMAX   = mult_pkg::tree_rows(HEIGHT, W)
) (
  input  logic [W-1:0][HMAX-1:0] col,
  output logic [W-1:0]           row0,
  output logic [W-1:0]           row1
);
  import mult_pkg::*;

  localparam int NLEV = num_levels(HEIGHT, W);

  // st[s][c][r]: bit r of column c at the input of level s.
  wire [W-1:0][HMAX-1:0] st [NLEV+1];

  for (genvar c = 0; c < W; c++) begin : g_in
    for (genvar r = 0; r < HMAX; r++) begin : g_row
      if (r < int'(HEIGHT[c])) begin : g_used
        assign st[0][c][r] = col[c][r];
      end else begin : g_pad
        assign st[0][c][r] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < NLEV; s++) begin : g_lev
    localparam hvec_t HS = level_heights(HEIGHT, W, s);
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H    = int'(HS[c]);
      localparam int NFA  = fa_count(H);
      localparam int REM  = H - 3 * NFA;
      localparam int NFAB = (c > 0) ? fa_count(int'(HS[(c > 0) ? c - 1 : 0])) : 0;
      localparam int HU   = (c + 1 < W) ? int'(HS[(c + 1 < W) ? c + 1 : c]) : 0;
      localparam int BASEU = HU - 2 * fa_count(HU);  // first carry row in column c+1

      for (genvar r = 0; r < REM; r++) begin : g_pass
        assign st[s+1][c][r] = st[s][c][3*NFA + r];
      end

      for (genvar f = 0; f < NFA; f++) begin : g_fa
        logic co;
        full_adder u_fa (
          .a  (st[s][c][3*f]),
          .b  (st[s][c][3*f + 1]),
          .ci (st[s][c][3*f + 2]),
          .s  (st[s+1][c][REM + f]),
          .co (co)
        );
        if (c + 1 < W) begin : g_up
          assign st[s+1][c+1][BASEU + f] = co;
        end
      end

      for (genvar r = REM + NFA + NFAB; r < HMAX; r++) begin : g_zero
        assign st[s+1][c][r] = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < W; c++) begin : g_out
    assign row0[c] = st[NLEV][c][0];
    assign row1[c] = st[NLEV][c][1];
  end

endmodule
