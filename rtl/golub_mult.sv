// golub_mult: complex multiplier x = y * z with y = a + ib, z = c + id,
// using Golub's method of three real multiplications and five additions:
//   t1 = (a + b)(c + d),  t2 = a*c,  t3 = b*d
//   num_real = t2 - t3,   num_imag = t1 - t2 - t3
// In the divider the caller negates d first, so that the outputs are the
// real and imaginary numerators of (a + ib)(c - id), as the source paper
// describes. The structure (three fp_mul and five fp_add instances) follows
// the source paper; every operation rounds to single precision, so num_imag can
// differ from the exactly rounded b*c - a*d by the cancellation in t1 - t2 - t3.
// Interface: a, b, c, d in; num_real, num_imag out; purely combinational.
module golub_mult (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic [31:0] d,
  output logic [31:0] num_real,
  output logic [31:0] num_imag
);

  logic [31:0] s_ab, s_cd, t1, t2, t3, t1m2;

  fp_add u_add_ab (.x(a), .y(b), .sub(1'b0), .z(s_ab));
  fp_add u_add_cd (.x(c), .y(d), .sub(1'b0), .z(s_cd));
  fp_mul u_mul_t1 (.x(s_ab), .y(s_cd), .z(t1));
  fp_mul u_mul_t2 (.x(a), .y(c), .z(t2));
  fp_mul u_mul_t3 (.x(b), .y(d), .z(t3));
  fp_add u_sub_re (.x(t2), .y(t3), .sub(1'b1), .z(num_real));
  fp_add u_sub_i1 (.x(t1), .y(t2), .sub(1'b1), .z(t1m2));
  fp_add u_sub_i2 (.x(t1m2), .y(t3), .sub(1'b1), .z(num_imag));

endmodule
