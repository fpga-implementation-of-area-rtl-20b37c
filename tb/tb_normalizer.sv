// tb_normalizer: for normal and subnormal inputs the value n must lie in
// [1, 2) and, scaled by the extracted sign and exponent, give back the input
// value; a subnormal's exponent must lie below 1.
module tb_normalizer;
  import tb_fp_util::*;

  logic [31:0] x, n;
  logic        s;
  logic signed [9:0] e;
  int checks = 0, failures = 0;

  normalizer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real nv, xv;
    for (int i = 0; i < 2000; i++) begin
      if (i == 0)      x = 32'h4080_0000;
      else if (i == 1) x = 32'h0000_0001;                      // smallest subnormal
      else if (i == 2) x = 32'h807F_FFFF;                      // largest subnormal
      else if (i % 4 == 0) x = {1'($urandom), 8'd0, 23'($urandom >> $urandom_range(0, 22))};
      else             x = rand_f32(1, 254);
      if (x[30:0] == 0) x = 32'h0000_0010;
      #1;
      nv = from_f32(n);
      xv = from_f32(x);
      checks += 2;
      if (!(nv >= 1.0 && nv < 2.0)) failures++;
      if (x[30:23] == 0) begin
        checks++;
        if (e > 0) failures++;
      end
      if ((s ? -nv : nv) * pow2(int'(e) - 127) != xv) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h s=%b e=%0d n=%h", x, s, e, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
