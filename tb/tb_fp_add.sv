// tb_fp_add: checks fp_add against binary64 reference arithmetic rounded to
// binary32: directed cases (cancellation, zeros, rounding ties, overflow,
// infinity and NaN) and random operand pairs of both signs with exponents
// close enough for the reference to be exact.
module tb_fp_add;
  import tb_fp_util::*;

  logic [31:0] x, y, z;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.x(x), .y(y), .sub(sub), .z(z));

  task automatic check(input logic [31:0] xi, input logic [31:0] yi, input logic si,
                       input logic [31:0] exp_z);
    x = xi; y = yi; sub = si;
    #1;
    checks++;
    if (z !== exp_z) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h expected %h", xi, si ? "-" : "+", yi, z, exp_z);
    end
  endtask

  function automatic logic [31:0] ref_add(input logic [31:0] xi, input logic [31:0] yi,
                                          input logic si);
    real r;
    r = si ? from_f32(xi) - from_f32(yi) : from_f32(xi) + from_f32(yi);
    if (r == 0.0) return 32'd0;
    return to_f32(r);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p, q;
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);   // 1 + 1 = 2
    check(32'h4000_0000, 32'h3F80_0000, 1'b1, 32'h3F80_0000);   // 2 - 1 = 1
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);   // 1 - 1 = +0
    check(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);   // 1 + 2^-24: tie, even
    check(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002);   // tie, rounds up to even
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);   // overflow
    check(32'h0000_0000, 32'h4040_0000, 1'b1, 32'hC040_0000);   // 0 - 3
    check(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h8000_0000);   // -0 + -0
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);   // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);   // inf + 1
    check(32'h4000_0000, 32'h3FFF_FFFF, 1'b1, 32'h3400_0000);   // cancellation
    for (int i = 0; i < 20000; i++) begin
      p = rand_f32(100, 150);
      q = rand_f32(int'(p[30:23]) - 26 < 1 ? 1 : int'(p[30:23]) - 26,
                   int'(p[30:23]) + 26 > 254 ? 254 : int'(p[30:23]) + 26);
      sub = 1'($urandom);
      check(p, q, sub, ref_add(p, q, sub));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
