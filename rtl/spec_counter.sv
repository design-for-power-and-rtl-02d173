// spec_counter: speculative (m:2) counter.
//
// Counts the M input bits into only two outputs, S (weight 1) and C (weight 2), on
// the assumption that at most three inputs are high, so that 2C + S equals the count:
//   S = parity of the inputs,   C = "at least two inputs are high".
// When four or more inputs are high the outputs are wrong; correction_block detects
// that case. For M = 5 the source design draws C as the OR of the carry of a modified
// full adder on x0..x2, the carry of a modified half adder on x3, x4, and the AND of
// "any of x0..x2" with "any of x3, x4"; this module computes the same function for
// any M with a chain of "any so far" / "two so far" signals.
//
// Interface: x (M bits) in, s and c out. Combinational.
module spec_counter #(
  parameter int M = 5
) (
  input  logic [M-1:0] x,
  output logic         s,
  output logic         c
);
  logic [M-1:0] any_so_far;  // some x[0..k] is high
  logic [M-1:0] two_so_far;  // at least two of x[0..k] are high

  assign any_so_far[0] = x[0];
  assign two_so_far[0] = 1'b0;
  for (genvar k = 1; k < M; k++) begin : g_chain
    assign any_so_far[k] = any_so_far[k-1] | x[k];
    assign two_so_far[k] = two_so_far[k-1] | (any_so_far[k-1] & x[k]);
  end

  assign s = ^x;
  assign c = two_so_far[M-1];
endmodule
