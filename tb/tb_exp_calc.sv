// tb_exp_calc: exhaustive check of e_quo = e_num - e_den + 127 over all
// pairs of operand exponents in -22..255 (normalized subnormals included),
// including results outside 0..255.
module tb_exp_calc;
  logic signed [9:0] e_num, e_den;
  logic signed [9:0] e_quo;
  int checks = 0, failures = 0;

  exp_calc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -22; i < 256; i++) begin
      for (int j = -22; j < 256; j++) begin
        e_num = 10'(i); e_den = 10'(j);
        #1;
        checks++;
        if (int'(e_quo) != i - j + 127) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
