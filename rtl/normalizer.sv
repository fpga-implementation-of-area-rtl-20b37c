// normalizer: brings a single-precision value into the form the division
// unit works on: sign s, exponent e and a normalized value n with
// 1 <= n < 2, so that x = (-1)^s * n * 2^(e - 127).
//
// For a normal input this is a split of the fields. A subnormal input has
// no hidden one: its fraction is shifted left until the leading one reaches
// the hidden-bit position and the exponent is lowered by the shift, which
// takes it below 1 (down to -22), hence the 10-bit signed e. A zero input
// gives n = 1 and e = 0; zeros are caught by the exception handler.
// n is itself a binary32 word: sign 0, exponent 127 and the normalized
// fraction. The source paper gives the [1, 2) range and the 32-bit width of n
// (block diagram); the encoding, the 10-bit exponent and the handling of
// subnormals are this design's choices.
// Interface: x in; s, e, n out; combinational.
module normalizer
  import fp_pkg::*;
(
  input  logic [31:0]       x,
  output logic              s,
  output logic signed [9:0] e,
  output logic [31:0]       n
);

  fp32_t       xf;
  logic [4:0]  sh;          // shift that brings the leading one to bit 23
  logic [23:0] m;

  always_comb begin
    xf = x;
    s  = xf.sign;
    sh = 5'd0;
    for (int i = 0; i <= 22; i++) begin
      if (xf.frac[i]) sh = 5'(23 - i);
    end
    if (xf.exp != 8'd0) begin
      e = $signed({2'b00, xf.exp});
      m = {1'b1, xf.frac};
    end else if (xf.frac != 23'd0) begin
      e = 10'sd1 - $signed({5'd0, sh});
      m = {1'b0, xf.frac} << sh;
    end else begin
      e = 10'sd0;
      m = 24'h80_0000;
    end
    n = {1'b0, 8'(BIAS), m[22:0]};
  end

endmodule
