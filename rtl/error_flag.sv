// error_flag: OR of all misprediction signals. The flag is high when the speculative
// product may differ from the exact one: when any speculative counter saw more than
// three high inputs or when the speculative adder's window missed a carry.
// Interface: e (NE bits) in, flag out. Combinational.
module error_flag #(
  parameter int NE = 2
) (
  input  logic [NE-1:0] e,
  output logic          flag
);
  assign flag = |e;
endmodule
