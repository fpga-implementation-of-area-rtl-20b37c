// tb_exception_handler: each flag must be high exactly for a zero of either
// sign on its own input (a subnormal is not zero) and ignore the others.
module tb_exception_handler;
  logic [31:0] num_real, num_imag, denom;
  logic real_zero, imag_zero, infinity;
  int checks = 0, failures = 0;

  exception_handler dut (.*);

  function automatic logic [31:0] pick(input logic zero);
    logic [31:0] v;
    v = $urandom;
    if (zero) v[30:0] = 31'd0;
    else if ($urandom_range(0, 3) == 0) v[30:23] = 8'd0;   // subnormal
    if (!zero && v[30:0] == 31'd0) v[0] = 1'b1;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic zr, zi, zd;
    for (int i = 0; i < 400; i++) begin
      {zr, zi, zd} = 3'(i);
      num_real = pick(zr); num_imag = pick(zi); denom = pick(zd);
      #1;
      checks += 3;
      if (real_zero !== zr) failures++;
      if (imag_zero !== zi) failures++;
      if (infinity  !== zd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
