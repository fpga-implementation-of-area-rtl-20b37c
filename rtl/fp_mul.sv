// fp_mul: combinational IEEE 754 single-precision multiplier.
//
// Multiplies the two 24-bit significands, normalizes the 48-bit product by at
// most one place, rounds to nearest with ties to even and adds the exponents.
// Subnormal inputs are read as zero; results below the normal range are
// flushed to zero and results above it become infinity. Infinity and NaN
// follow IEEE rules (0 * inf gives a quiet NaN).
// The source paper names a floating point multiplier without describing it; this
// implementation is this design's own.
// Interface: x, y in; z out; purely combinational.
module fp_mul
  import fp_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] z
);

  fp32_t xa, ya;
  logic        s;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        g, st, rnd_up;
  logic [24:0] mant_r;
  logic signed [10:0] e_res;

  always_comb begin
    xa   = x;
    ya   = y;
    s    = xa.sign ^ ya.sign;
    prod = {1'b1, xa.frac} * {1'b1, ya.frac};
    e_res = $signed({3'd0, xa.exp}) + $signed({3'd0, ya.exp}) - 11'sd127;
    if (prod[47]) begin
      mant  = prod[47:24];
      g     = prod[23];
      st    = |prod[22:0];
      e_res = e_res + 11'sd1;
    end else begin
      mant  = prod[46:23];
      g     = prod[22];
      st    = |prod[21:0];
    end
    rnd_up = g & (st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 11'sd1;
    end

    if ((is_special(x) && x[22:0] != 0) || (is_special(y) && y[22:0] != 0))
      z = FP_QNAN;
    else if (is_special(x) || is_special(y))
      z = (is_zero(x) || is_zero(y)) ? FP_QNAN : {s, 31'h7F80_0000};
    else if (is_zero(x) || is_zero(y))
      z = {s, 31'd0};
    else if (e_res >= 11'sd255)
      z = {s, 31'h7F80_0000};
    else if (e_res <= 11'sd0)
      z = {s, 31'd0};
    else
      z = {s, e_res[7:0], mant_r[22:0]};
  end

endmodule
