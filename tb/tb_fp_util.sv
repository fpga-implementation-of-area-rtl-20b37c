// tb_fp_util: reference arithmetic for the testbenches, independent of the
// design. Values are carried as SystemVerilog reals (binary64); from_f32
// reads zeros, subnormals and normal values exactly; to_f32
// rounds a binary64 value to binary32 with round-to-nearest-even, flushing
// results below the normal range to zero and returning infinity above it,
// which is the number format the design implements. For a sum or product of
// two binary32 values (exponents within 29 of each other for sums) and for a
// quotient, the binary64 value rounded this way is the correctly rounded
// binary32 result.
package tb_fp_util;

  function automatic real from_f32(input logic [31:0] x);
    logic [63:0] db;
    if (x[30:23] == 8'd0) begin            // zero or subnormal: frac * 2^-149
      real v;
      v = real'(x[22:0]);
      for (int i = 0; i < 149; i++) v = v / 2.0;
      return x[31] ? -v : v;
    end
    db = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(db);
  endfunction

  function automatic logic [31:0] to_f32(input real r);
    logic [63:0] db;
    logic        s, g, st;
    int          e;
    logic [52:0] m;
    logic [24:0] mr;
    db = $realtobits(r);
    s  = db[63];
    if (db[62:0] == 63'd0) return {s, 31'd0};
    e  = int'(db[62:52]) - 1023 + 127;
    m  = {1'b1, db[51:0]};
    mr = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mr[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {s, 31'h7F80_0000};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  // 2^k for an integer k.
  function automatic real pow2(input int k);
    real r;
    r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  // Random normal binary32 value with exponent in [emin, emax].
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
