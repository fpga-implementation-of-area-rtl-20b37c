// tb_final_quotient: scaling of the table quotient by 2^(e_quo - 127),
// the sign, overflow to infinity, flush to zero, and the substitutions for
// a zero numerator and a zero denominator.
module tb_final_quotient;
  import tb_fp_util::*;

  logic sign, num_zero, den_zero;
  logic signed [9:0] e_quo;
  logic [31:0] q_lut, q;
  int checks = 0, failures = 0;

  final_quotient dut (.*);

  task automatic check(input logic [31:0] expv);
    #1;
    checks++;
    if (q !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL s=%b e=%0d lut=%h nz=%b dz=%b: got %h exp %h",
                                  sign, e_quo, q_lut, num_zero, den_zero, q, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    num_zero = 0; den_zero = 0;
    // 0.8 with exponent 127: the real part of (2 + i)/(1 + 2i)
    sign = 0; e_quo = 10'sd127; q_lut = 32'h3F4C_CCCD; check(32'h3F4C_CCCD);
    sign = 1; e_quo = 10'sd127; q_lut = 32'h3F19_999A; check(32'hBF19_999A);
    for (int i = 0; i < 5000; i++) begin
      sign  = 1'($urandom);
      e_quo = 10'(int'($urandom_range(0, 400)) - 100);
      q_lut = {1'b0, 7'h3F, 1'($urandom), 23'($urandom)};  // exponent 126 or 127
      v = from_f32(q_lut) * pow2(int'(e_quo) - 127);
      check(to_f32(sign ? -v : v));
    end
    num_zero = 1; sign = 1; e_quo = 10'sd130; check(32'h8000_0000);
    den_zero = 1; check(32'h7F80_0000);
    num_zero = 0; check(32'h7F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
