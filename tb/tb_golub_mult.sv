// tb_golub_mult: checks Golub's complex multiplier. Directed products of
// small integers are exact; random products are compared with the same
// three-multiplication formula evaluated in reference arithmetic, rounding
// after every operation as the hardware does, and with the direct formula
// ac - bd, ad + bc within a relative tolerance.
module tb_golub_mult;
  import tb_fp_util::*;

  logic [31:0] a, b, c, d, num_real, num_imag;
  int checks = 0, failures = 0;

  golub_mult dut (.*);

  function automatic logic [31:0] r32(input real r);
    return (r == 0.0) ? 32'd0 : to_f32(r);
  endfunction

  task automatic check(input logic [31:0] ai, bi, ci, di, input logic [31:0] er, ei);
    a = ai; b = bi; c = ci; d = di;
    #1;
    checks += 2;
    if (num_real !== er) begin
      failures++;
      if (failures < 10) $display("FAIL real %h %h %h %h: got %h exp %h", ai, bi, ci, di, num_real, er);
    end
    if (num_imag !== ei) begin
      failures++;
      if (failures < 10) $display("FAIL imag %h %h %h %h: got %h exp %h", ai, bi, ci, di, num_imag, ei);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p0, p1, p2, p3, t1, t2, t3, ab, cd, t12, er, ei;
    real dr, di_, gr, gi;
    // (2 + i)(1 - 2i) = 4 - 3i
    check(32'h4000_0000, 32'h3F80_0000, 32'h3F80_0000, 32'hC000_0000, 32'h4080_0000, 32'hC040_0000);
    // (3 + 4i)(5 + 6i) = -9 + 38i
    check(32'h4040_0000, 32'h4080_0000, 32'h40A0_0000, 32'h40C0_0000, 32'hC110_0000, 32'h4218_0000);
    for (int i = 0; i < 5000; i++) begin
      p0 = rand_f32(120, 134); p1 = rand_f32(120, 134);
      p2 = rand_f32(120, 134); p3 = rand_f32(120, 134);
      ab  = r32(from_f32(p0) + from_f32(p1));
      cd  = r32(from_f32(p2) + from_f32(p3));
      t1  = r32(from_f32(ab) * from_f32(cd));
      t2  = r32(from_f32(p0) * from_f32(p2));
      t3  = r32(from_f32(p1) * from_f32(p3));
      er  = r32(from_f32(t2) - from_f32(t3));
      t12 = r32(from_f32(t1) - from_f32(t2));
      ei  = r32(from_f32(t12) - from_f32(t3));
      check(p0, p1, p2, p3, er, ei);
      // Sanity against the direct product (loose: Golub's form cancels).
      dr  = from_f32(p0) * from_f32(p2) - from_f32(p1) * from_f32(p3);
      di_ = from_f32(p0) * from_f32(p3) + from_f32(p1) * from_f32(p2);
      gr  = from_f32(num_real);
      gi  = from_f32(num_imag);
      checks++;
      if ((gr - dr) * (gr - dr) + (gi - di_) * (gi - di_) >
          1.0e-9 * (dr * dr + di_ * di_ + from_f32(p0) * from_f32(p0) * 1.0e3)) begin
        failures++;
        if (failures < 10) $display("FAIL direct: %f %f vs %f %f", gr, gi, dr, di_);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
