// fp_add: combinational IEEE 754 single-precision adder/subtractor.
//
// Computes z = x + y (sub = 0) or z = x - y (sub = 1), rounded to nearest,
// ties to even. The smaller operand is aligned to the larger with guard,
// round and sticky bits kept, the significands are added or subtracted, the
// sum is renormalized by a leading-zero count and then rounded.
// Subnormal inputs are read as zero and subnormal results are flushed to
// zero; an exact zero difference is +0. Infinity and NaN inputs give the IEEE
// result (inf - inf gives a quiet NaN). Overflow gives infinity.
// The source paper uses a floating point adder inside its multiplier and divider
// units without describing it; this implementation is this design's own.
// Interface: x, y, sub in; z out; no clock, purely combinational.
module fp_add
  import fp_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  input  logic        sub,
  output logic [31:0] z
);

  fp32_t xa, ya, big, sml;
  logic        x_zero, y_zero;
  logic [7:0]  ediff;
  logic [26:0] mbig, msml;      // 1.23 significand followed by G, R, S
  logic [26:0] msml_sh;
  logic        sticky;
  logic [27:0] sum;             // one carry bit above mbig
  logic        eff_sub;
  logic        rs;              // result sign
  logic [4:0]  lz;
  logic [27:0] norm;
  logic signed [9:0] e_res;
  logic [23:0] mant;
  logic        g, st, rnd_up;
  logic [24:0] mant_r;

  always_comb begin
    xa = x;
    ya = y;
    ya.sign = y[31] ^ sub;
    x_zero = is_zero(x);
    y_zero = is_zero(y);
    // Order operands by magnitude so that the difference is never negative.
    if ({xa.exp, xa.frac} >= {ya.exp, ya.frac}) begin
      big = xa; sml = ya;
    end else begin
      big = ya; sml = xa;
    end
    eff_sub = big.sign ^ sml.sign;
    ediff   = big.exp - sml.exp;
    mbig    = {1'b1, big.frac, 3'b000};
    msml    = is_zero(sml) ? 27'd0 : {1'b1, sml.frac, 3'b000};
    // Alignment shift with sticky collection.
    if (ediff >= 8'd27) begin
      msml_sh = 27'd0;
      sticky  = |msml;
    end else begin
      msml_sh = msml >> ediff;
      sticky  = |(msml & ~(27'h7FF_FFFF << ediff));
    end
    msml_sh[0] = msml_sh[0] | sticky;
    sum = eff_sub ? {1'b0, mbig} - {1'b0, msml_sh} : {1'b0, mbig} + {1'b0, msml_sh};
    rs  = big.sign;
    // Leading-zero count of sum[27:0].
    lz = 5'd0;
    for (int i = 27; i >= 0; i--) begin
      if (sum[i]) begin
        lz = 5'(27 - i);
        break;
      end
    end
    // Normalize so that the leading one lands in bit 27.
    norm  = sum << lz;
    e_res = $signed({2'b00, big.exp}) + 10'sd1 - $signed({5'd0, lz});
    mant  = norm[27:4];
    g     = norm[3];
    st    = |norm[2:0];
    rnd_up = g & (st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 10'sd1;
    end

    // Result selection.
    if (is_special(x) || is_special(y)) begin
      if ((is_special(x) && x[22:0] != 0) || (is_special(y) && y[22:0] != 0))
        z = FP_QNAN;
      else if (is_special(x) && is_special(y))
        z = (xa.sign == ya.sign) ? {xa.sign, 31'h7F80_0000} : FP_QNAN;
      else if (is_special(x))
        z = {xa.sign, 31'h7F80_0000};
      else
        z = {ya.sign, 31'h7F80_0000};
    end else if (x_zero && y_zero) begin
      z = {xa.sign & ya.sign, 31'd0};
    end else if (y_zero) begin
      z = x;
    end else if (x_zero) begin
      z = ya;
    end else if (sum == 28'd0) begin
      z = 32'd0;
    end else if (e_res >= 10'sd255) begin
      z = {rs, 31'h7F80_0000};
    end else if (e_res <= 10'sd0) begin
      z = {rs, 31'd0};
    end else begin
      z = {rs, e_res[7:0], mant_r[22:0]};
    end
  end

endmodule
