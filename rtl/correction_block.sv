// correction_block: misprediction detection and correction word for one
// speculative (m:2) counter.
//
// It sees the same M inputs as the counter. When more than three are high the
// counter's 2C + S falls short of the true count n by n - 2 - (n mod 2), which is
// always even. The block raises e and gives the shortfall divided by two on ew,
// which therefore carries the weight of the column above the counter's. For n <= 3
// e = 0 and ew = 0. The correction tree adds ew to the speculative tree's rows to
// form the exact product.
//
// Interface: x (M bits) in; e and ew (EWW bits, EWW = clog2(M/2)) out. Meant for
// M >= 4; a counter with fewer inputs cannot be wrong and gets no correction block.
// Combinational. The source design names the block and its outputs E and EW; how
// they are computed is this design's own.
module correction_block #(
  parameter int M   = 5,
  parameter int EWW = (M >= 4) ? $clog2(M / 2) : 1
) (
  input  logic [M-1:0]   x,
  output logic           e,
  output logic [EWW-1:0] ew
);
  localparam int CW = $clog2(M + 1);

  logic [CW-1:0] n_high;

  always_comb begin
    n_high = '0;
    for (int k = 0; k < M; k++) n_high = n_high + CW'(x[k]);
  end

  assign e  = (n_high > CW'(3));
  assign ew = e ? EWW'((n_high >> 1) - CW'(1)) : '0;
endmodule
