// exact_adder: exact carry-propagate adder, sum = a + b modulo 2**W. It turns the
// two rows of the correction tree into the non-speculative product. Written as one
// addition so that synthesis picks the adder architecture. Combinational.
module exact_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  assign sum = a + b;
endmodule
