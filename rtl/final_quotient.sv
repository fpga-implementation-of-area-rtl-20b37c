// final_quotient: final quotient computation of the division unit.
//
// Scales the table quotient (a binary32 word with exponent 126 or 127) by
// the exponent from exp_calc, i.e. multiplies it by 2^(e_quo - 127), and
// attaches the sign from the xor of the operand signs, as the source paper
// describes. Exponents above 254 give infinity; exponents below 1 give a
// signed zero (subnormals are flushed, this design's choice).
// The cases flagged by the exception handler override the arithmetic:
//   den_zero -> +infinity (the flag is called "infinity" in the source paper;
//               the value returned is this design's choice),
//   num_zero -> zero with the quotient's sign.
// Interface: sign, e_quo, q_lut, num_zero, den_zero in; q out; combinational.
module final_quotient
  import fp_pkg::*;
(
  input  logic              sign,
  input  logic signed [9:0] e_quo,
  input  logic       [31:0] q_lut,
  input  logic              num_zero,
  input  logic              den_zero,
  output logic       [31:0] q
);

  fp32_t lut;
  logic signed [10:0] e_res;

  always_comb begin
    lut   = q_lut;
    e_res = $signed({3'd0, lut.exp}) + 11'(e_quo) - 11'sd127;
    if (den_zero)
      q = FP_POS_INF;
    else if (num_zero)
      q = {sign, 31'd0};
    else if (e_res >= 11'sd255)
      q = {sign, 31'h7F80_0000};
    else if (e_res <= 11'sd0)
      q = {sign, 31'd0};
    else
      q = {sign, e_res[7:0], lut.frac};
  end

endmodule
