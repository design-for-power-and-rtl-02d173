// spec_adder: speculative carry-propagate adder of the "almost correct" kind.
//
// Sum bit i is a[i] ^ b[i] ^ c_i where c_i is the carry that the K bits below i would
// produce on their own (carry into bit i-K taken as 0). Every sum bit thus depends on
// at most K+1 bit positions, so the critical path grows with K instead of W. The
// result is wrong exactly when a carry generated at some bit j-1 would travel through
// a run of K or more propagate bits j..j+K-1 and on into bit j+K < W; err flags that
// case (one AND of K+1 signals per position), so err = 0 guarantees sum == a + b
// modulo 2**W.
//
// Interface: a, b (W bits) in; sum (W bits) and err out. Combinational.
// The source design only names a speculative ("almost correct") adder; the window
// K = 8 and the error detector are this design's choices.
module spec_adder #(
  parameter int W = 16,
  parameter int K = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         err
);
  logic [W-1:0] p, g, cin;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic cc;
      cc = 1'b0;
      for (int j = ((i - K) > 0 ? i - K : 0); j < i; j++) cc = g[j] | (p[j] & cc);
      cin[i] = cc;
    end
  end

  assign sum = p ^ cin;

  always_comb begin
    err = 1'b0;
    for (int j = 1; j + K < W; j++) err = err | (g[j-1] & (&p[j +: K]));
  end
endmodule
