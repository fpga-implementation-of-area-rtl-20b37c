// tb_denom_calc: checks D = c*c + d*d against reference arithmetic with a
// rounding after each operation, plus exact integer cases.
module tb_denom_calc;
  import tb_fp_util::*;

  logic [31:0] c, d, denom;
  int checks = 0, failures = 0;

  denom_calc dut (.*);

  task automatic check(input logic [31:0] ci, di, input logic [31:0] e);
    c = ci; d = di;
    #1;
    checks++;
    if (denom !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h: got %h exp %h", ci, di, denom, e);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p, q, cc, dd;
    check(32'h3F80_0000, 32'h4000_0000, 32'h40A0_0000);   // 1 + 4 = 5
    check(32'hC040_0000, 32'h4080_0000, 32'h41C8_0000);   // 9 + 16 = 25
    check(32'h0000_0000, 32'h0000_0000, 32'h0000_0000);   // zero divisor
    for (int i = 0; i < 10000; i++) begin
      p  = rand_f32(110, 144);
      q  = rand_f32(110, 144);
      cc = to_f32(from_f32(p) * from_f32(p));
      dd = to_f32(from_f32(q) * from_f32(q));
      check(p, q, to_f32(from_f32(cc) + from_f32(dd)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
