// tb_fp_div: the division unit on random binary32 operands of both signs
// over a wide exponent range, against the correctly rounded quotient
// (with overflow to infinity and flush to zero), subnormal operands on
// either side; the zero-numerator and
// zero-denominator substitutions; done exactly DIV_LATENCY cycles after start.
module tb_fp_div;
  import fp_pkg::*;
  import tb_fp_util::*;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic s_num, s_den, num_zero, den_zero;
  logic signed [9:0] e_num, e_den;
  logic [31:0] n_num, n_den, q;
  int checks = 0, failures = 0;

  fp_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent normalization: x = (-1)^s * n * 2^(e - 127), 1 <= n < 2.
  task automatic split(input logic [31:0] x, output logic s, output logic signed [9:0] e,
                       output logic [31:0] n);
    logic [23:0] m;
    s = x[31];
    if (x[30:23] != 0) begin
      e = 10'(x[30:23]); m = {1'b1, x[22:0]};
    end else begin
      e = 10'sd1; m = {1'b0, x[22:0]};
      if (m == 0) m = 24'h80_0000;
      while (!m[23]) begin
        m = m << 1; e = e - 10'sd1;
      end
    end
    n = {9'h07F, m[22:0]};
  endtask

  task automatic divide(input logic [31:0] x, input logic [31:0] y, input logic [31:0] expq);
    int cyc;
    split(x, s_num, e_num, n_num);
    split(y, s_den, e_den, n_den);
    num_zero = (x[30:0] == 0); den_zero = (y[30:0] == 0);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    // Operands change after the start cycle; the result must not.
    s_num = ~s_num; e_num = e_num + 10'sd3; num_zero = ~num_zero;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks += 2;
    if (q !== expq) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h exp %h", x, y, q, expq);
    end
    if (cyc != DIV_LATENCY) failures++;
  endtask

  initial begin
    logic [31:0] x, y;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    divide(32'h4080_0000, 32'h40A0_0000, 32'h3F4C_CCCD);   //  4 / 5 = 0.8
    divide(32'hC040_0000, 32'h40A0_0000, 32'hBF19_999A);   // -3 / 5 = -0.6
    divide(32'h0000_0000, 32'h40A0_0000, 32'h0000_0000);   //  0 / 5
    divide(32'h8000_0000, 32'h40A0_0000, 32'h8000_0000);   // -0 / 5
    divide(32'h0000_0000, 32'h0000_0000, 32'h7F80_0000);   // zero denominator
    divide(32'h7F00_0000, 32'h0080_0000, 32'h7F80_0000);   // overflow
    divide(32'h0080_0000, 32'h7F00_0000, 32'h0000_0000);   // underflow
    divide(32'h0000_0003, 32'h0000_0001, 32'h4040_0000);   // subnormal / subnormal = 3
    divide(32'h0040_0000, 32'h3F00_0000, 32'h0080_0000);   // 2^-127 / 0.5 = 2^-126
    divide(32'h3F80_0000, 32'h0020_0000, 32'h7F80_0000);   // 1 / 2^-128 overflows
    for (int i = 0; i < 500; i++) begin
      x = {1'($urandom), 8'd0, 23'($urandom)};
      y = rand_f32(100, 154);
      if (x[30:0] == 0) x[0] = 1'b1;
      divide(x, y, to_f32(from_f32(x) / from_f32(y)));
      divide(y, x, to_f32(from_f32(y) / from_f32(x)));
    end
    for (int i = 0; i < 3000; i++) begin
      x = rand_f32(1, 254);
      y = rand_f32(1, 254);
      divide(x, y, to_f32(from_f32(x) / from_f32(y)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
