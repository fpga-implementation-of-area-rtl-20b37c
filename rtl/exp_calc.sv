// exp_calc: exponent calculator of the division unit,
//   e_quo = e_num - e_deno + 127.
// Exponents are 10-bit signed values: the inputs can lie below 1 for
// normalized subnormal operands, and the result is checked for overflow and
// underflow only after the significand quotient is known (the source paper's
// diagram prints an 8-bit exponent path; the two extra bits are this
// design's addition). Over the operand range -22..255 the result lies in
// -151..404 and never wraps.
// Interface: e_num, e_den in; e_quo out; combinational.
module exp_calc
  import fp_pkg::*;
(
  input  logic signed [9:0] e_num,
  input  logic signed [9:0] e_den,
  output logic signed [9:0] e_quo
);

  always_comb begin
    e_quo = e_num - e_den + 10'sd127;
  end

endmodule
