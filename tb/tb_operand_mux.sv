// tb_operand_mux: sel = 0 must pass in0 and sel = 1 must pass in1.
module tb_operand_mux;
  logic        sel;
  logic [31:0] in0, in1, out;
  int checks = 0, failures = 0;

  operand_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in0 = $urandom; in1 = $urandom; sel = 1'(i);
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
