// operand_mux: the 2:1 multiplexer in front of the shared division unit.
// sel = 0 passes in0 (the real numerator), sel = 1 passes in1 (the
// imaginary numerator), as labelled in the source paper's module-reuse diagram.
// It is parameterized by width so the same block also steers the
// matching zero flag. Interface: sel, in0, in1 in; out out; combinational.
module operand_mux #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
