// tb_fp_mul: checks fp_mul against binary64 products rounded to binary32:
// directed cases (exact products, zero, infinity, NaN, overflow, underflow)
// and random operands over the whole exponent range.
module tb_fp_mul;
  import tb_fp_util::*;

  logic [31:0] x, y, z;
  int checks = 0, failures = 0;

  fp_mul dut (.x(x), .y(y), .z(z));

  task automatic check(input logic [31:0] xi, input logic [31:0] yi, input logic [31:0] exp_z);
    x = xi; y = yi;
    #1;
    checks++;
    if (z !== exp_z) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", xi, yi, z, exp_z);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p, q;
    check(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);   // 2 * 3 = 6
    check(32'hBF80_0000, 32'h4040_0000, 32'hC040_0000);   // -1 * 3
    check(32'h0000_0000, 32'hC040_0000, 32'h8000_0000);   // 0 * -3 = -0
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf * 0
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);   // inf * -2
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // underflow flushed
    check(32'h3DCC_CCCD, 32'h3DCC_CCCD, to_f32(from_f32(32'h3DCC_CCCD) * from_f32(32'h3DCC_CCCD)));
    for (int i = 0; i < 20000; i++) begin
      p = rand_f32(1, 254);
      q = rand_f32(1, 254);
      check(p, q, to_f32(from_f32(p) * from_f32(q)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
