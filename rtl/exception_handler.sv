// exception_handler: flags the cases the floating point division unit
// cannot handle. real_zero, imag_zero and infinity go high when the real
// numerator, the imaginary numerator or the denominator is zero, as the
// document specifies. Only true zeros (either sign) are flagged: a
// subnormal operand is normalized and divided like any other value.
// Interface: num_real, num_imag, denom in; three flags out; combinational.
module exception_handler (
  input  logic [31:0] num_real,
  input  logic [31:0] num_imag,
  input  logic [31:0] denom,
  output logic        real_zero,
  output logic        imag_zero,
  output logic        infinity
);

  always_comb begin
    real_zero = (num_real[30:0] == 31'd0);
    imag_zero = (num_imag[30:0] == 31'd0);
    infinity  = (denom[30:0] == 31'd0);
  end

endmodule
