// tb_complex_div: end-to-end test of the module-reuse complex divider at its
// default configuration.
//   - (2 + i) / (1 + 2i) must give 0.8 - 0.6i (0x3F4CCCCD, 0xBF19999A) with
//     all flags low and both selects high at the end;
//   - done must come CDIV_LATENCY cycles after the start edge, Qreal must be
//     written while the selects are low and Qimag after they switch;
//   - random operands are compared with a reference that evaluates the same
//     formulas (Golub's three-multiplication numerators with the conjugate
//     divisor, c*c + d*d, and a correctly rounded division) in independent
//     binary64 arithmetic rounded to binary32 after every operation, and
//     loosely with the exact complex quotient;
//   - each mechanism is made to happen and counted: the select switch of the
//     shared division unit, a zero real numerator, a zero imaginary
//     numerator, a zero denominator, quotient overflow to infinity,
//     underflow to zero, and a start ignored while busy. A mechanism that
//     never happened counts as a failure.
module tb_complex_div;
  import fp_pkg::*;
  import tb_fp_util::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] a, b, c, d, Qreal, Qimag;
  logic real_zero, imag_zero, infinity, selm, seld, busy, done;
  int checks = 0, failures = 0;
  int n_switch = 0, n_rz = 0, n_iz = 0, n_inf = 0, n_ovf = 0, n_unf = 0, n_ignored = 0;

  complex_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count select switches from low to high.
  logic selm_q = 0;
  always @(posedge clk) begin
    selm_q <= selm;
    if (selm && !selm_q && rst_n) n_switch++;
  end

  task automatic expect_that(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] r32(input real r);
    return (r == 0.0) ? 32'd0 : to_f32(r);
  endfunction
  function automatic logic [31:0] add32(input logic [31:0] x, y);
    return r32(from_f32(x) + from_f32(y));
  endfunction
  function automatic logic [31:0] sub32(input logic [31:0] x, y);
    return r32(from_f32(x) - from_f32(y));
  endfunction
  function automatic logic [31:0] mul32(input logic [31:0] x, y);
    return r32(from_f32(x) * from_f32(y));
  endfunction

  // Reference for one part: numerator n over denominator den.
  function automatic logic [31:0] div32(input logic [31:0] n, den);
    if (den[30:23] == 0) return 32'h7F80_0000;
    if (n[30:23] == 0)   return {n[31] ^ den[31], 31'd0};
    return to_f32(from_f32(n) / from_f32(den));
  endfunction

  task automatic run(input logic [31:0] ai, bi, ci, di, input bit poke_busy);
    logic [31:0] dn, t1, t2, t3, nr, ni, den, er, ei;
    bit wrote_re;
    int cyc;
    real zr, zi, ar, br, cr, dr, mag;
    // Reference, written out from the formulas.
    dn  = {~di[31], di[30:0]};
    t1  = mul32(add32(ai, bi), add32(ci, dn));
    t2  = mul32(ai, ci);
    t3  = mul32(bi, dn);
    nr  = sub32(t2, t3);
    ni  = sub32(sub32(t1, t2), t3);
    den = add32(mul32(ci, ci), mul32(di, di));
    er  = div32(nr, den);
    ei  = div32(ni, den);

    a = ai; b = bi; c = ci; d = di; start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    wrote_re = 0;
    while (!done) begin
      if (poke_busy && cyc == 5) begin
        a = 32'h4120_0000; start = 1;   // must be ignored
      end else begin
        start = 0;
      end
      @(posedge clk);
      #1 cyc++;
      // The real part must already be held when the selects switch.
      if (!wrote_re && selm) begin
        wrote_re = 1;
        expect_that(Qreal === er, "Qreal held at select switch");
      end
    end
    expect_that(wrote_re, "selects switched during the operation");
    if (poke_busy) n_ignored++;
    expect_that(cyc == CDIV_LATENCY, "latency");
    expect_that(Qreal === er, "Qreal");
    expect_that(Qimag === ei, "Qimag");
    expect_that(selm && seld, "selects high at end");
    expect_that(real_zero == (nr[30:23] == 0), "real_zero flag");
    expect_that(imag_zero == (ni[30:23] == 0), "imag_zero flag");
    expect_that(infinity == (den[30:23] == 0), "infinity flag");
    if (failures > 0 && failures < 10)
      $display("  case %h %h %h %h -> %h %h (exp %h %h)", ai, bi, ci, di, Qreal, Qimag, er, ei);
    if (real_zero) n_rz++;
    if (imag_zero) n_iz++;
    if (infinity) n_inf++;
    if (!infinity && ((Qreal[30:23] == 8'hFF) || (Qimag[30:23] == 8'hFF))) n_ovf++;
    if ((!real_zero && nr[30:23] != 0 && Qreal[30:23] == 0) ||
        (!imag_zero && ni[30:23] != 0 && Qimag[30:23] == 0)) n_unf++;
    // Loose check against the exact complex quotient for ordinary operands.
    ar = from_f32(ai); br = from_f32(bi); cr = from_f32(ci); dr = from_f32(di);
    mag = cr * cr + dr * dr;
    if (!infinity && Qreal[30:23] != 8'hFF && Qimag[30:23] != 8'hFF && mag > 1e-30 && mag < 1e30) begin
      zr = (ar * cr + br * dr) / mag;
      zi = (br * cr - ar * dr) / mag;
      checks++;
      if ((from_f32(Qreal) - zr) ** 2 + (from_f32(Qimag) - zi) ** 2 >
          1e-8 * ((ar * ar + br * br) / mag) + 1e-30) begin
        failures++;
        if (failures < 10) $display("FAIL exact: %e %e vs %e %e", from_f32(Qreal), from_f32(Qimag), zr, zi);
      end
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    a = 0; b = 0; c = 0; d = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    expect_that(!selm && !seld && !busy && !done, "reset state");

    // The source paper's example: (2 + i) / (1 + 2i).
    run(32'h4000_0000, 32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000, 1'b0);
    expect_that(Qreal === 32'h3F4C_CCCD && Qimag === 32'hBF19_999A, "example 0.8 - 0.6i");
    expect_that(!real_zero && !imag_zero && !infinity, "example flags");

    run(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000, 32'hBF80_0000, 1'b1);  // (1+i)/(1-i): real 0
    run(32'h3F80_0000, 32'h4000_0000, 32'h3F80_0000, 32'h4000_0000, 1'b0);  // (1+2i)/(1+2i): imag 0
    run(32'h4040_0000, 32'h4080_0000, 32'h0000_0000, 32'h0000_0000, 1'b0);  // divide by zero
    run(32'h7E00_0000, 32'h7E00_0000, 32'h2000_0000, 32'h2000_0000, 1'b0);  // overflow
    run(32'h0100_0000, 32'h0100_0000, 32'h5E00_0000, 32'h5E00_0000, 1'b0);  // underflow
    run(32'hC0A0_0000, 32'h0000_0000, 32'h0000_0000, 32'h4000_0000, 1'b0);  // -5 / 2i = 2.5i

    for (int i = 0; i < 300; i++)
      run(rand_f32(110, 144), rand_f32(110, 144), rand_f32(110, 144), rand_f32(110, 144),
          i % 50 == 0);

    $display("mechanisms: switch=%0d real_zero=%0d imag_zero=%0d infinity=%0d overflow=%0d underflow=%0d ignored_start=%0d",
             n_switch, n_rz, n_iz, n_inf, n_ovf, n_unf, n_ignored);
    checks += 7;
    if (n_switch == 0)  failures++;
    if (n_rz == 0)      failures++;
    if (n_iz == 0)      failures++;
    if (n_inf == 0)     failures++;
    if (n_ovf == 0)     failures++;
    if (n_unf == 0)     failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
