// tb_lut_divider: divides random normalized values in [1, 2) and compares
// the result with the correctly rounded binary32 quotient; checks that done
// comes exactly DIV_LATENCY cycles after the start edge and that a start
// while busy is ignored.
module tb_lut_divider;
  import fp_pkg::*;
  import tb_fp_util::*;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [31:0] n_num, n_den, q;
  int checks = 0, failures = 0;

  lut_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [31:0] x, input logic [31:0] y);
    int cyc;
    logic [31:0] expq;
    n_num = x; n_den = y; start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    // A second start during the division must have no effect.
    n_num = 32'h3FFF_FFFF; start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    expq = to_f32(from_f32(x) / from_f32(y));
    checks += 2;
    if (q !== expq) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h exp %h", x, y, q, expq);
    end
    if (cyc != DIV_LATENCY) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", cyc);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] x, y;
    n_num = 0; n_den = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    divide(32'h3F80_0000, 32'h3FA0_0000);   // 1 / 1.25 = 0.8
    divide(32'h3FC0_0000, 32'h3FA0_0000);   // 1.5 / 1.25 = 1.2
    divide(32'h3FFF_FFFF, 32'h3F80_0000);   // largest quotient
    divide(32'h3F80_0000, 32'h3FFF_FFFF);   // smallest quotient
    divide(32'h3FA0_0000, 32'h3FA0_0000);   // exactly 1
    for (int i = 0; i < 3000; i++) begin
      x = {9'h07F, 23'($urandom)};
      y = {9'h07F, 23'($urandom)};
      divide(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
