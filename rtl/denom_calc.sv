// denom_calc: denominator calculator D = c*c + d*d, the squared magnitude of
// the divisor c + id, which is the product of the divisor with its conjugate.
// Two fp_mul instances and one fp_add instance; the source paper gives the
// formula and names the unit, the structure is this design's own.
// Interface: c, d in; denom out; purely combinational.
module denom_calc (
  input  logic [31:0] c,
  input  logic [31:0] d,
  output logic [31:0] denom
);

  logic [31:0] cc, dd;

  fp_mul u_mul_cc (.x(c), .y(c), .z(cc));
  fp_mul u_mul_dd (.x(d), .y(d), .z(dd));
  fp_add u_add    (.x(cc), .y(dd), .sub(1'b0), .z(denom));

endmodule
