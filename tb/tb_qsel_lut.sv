// tb_qsel_lut: for every table index that the radix-4 recurrence can reach
// (|y| <= 8/3 d for some d of the divisor interval), the selected digit q
// must keep the next remainder in bounds, (q - 2/3) d <= y <= (q + 2/3) d,
// for a grid of points y and d inside the index's box (y in [Y/8, (Y+1)/8),
// d in [1 + i/8, 1 + (i+1)/8)) that satisfy |y| <= 8/3 d.
module tb_qsel_lut;
  logic signed [6:0] y_hat;
  logic        [2:0] d_hat;
  logic signed [2:0] q;
  int checks = 0, failures = 0;

  qsel_lut dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real y, dv, qq;
    bit  bad;
    for (int yi = -64; yi < 64; yi++) begin
      for (int di = 0; di < 8; di++) begin
        y_hat = 7'(yi); d_hat = 3'(di);
        #1;
        qq  = real'(int'(q));
        bad = 0;
        for (int sy = 0; sy < 16; sy++) begin
          for (int sd = 0; sd <= 16; sd++) begin
            y  = (real'(yi) + real'(sy) / 16.0) / 8.0;
            dv = 1.0 + (real'(di) + real'(sd) / 16.0) / 8.0;
            if (y <= 8.0 / 3.0 * dv && y >= -8.0 / 3.0 * dv) begin
              if (y < (qq - 2.0 / 3.0) * dv - 1e-12 || y > (qq + 2.0 / 3.0) * dv + 1e-12) bad = 1;
            end
          end
        end
        checks++;
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL Y=%0d d=%0d q=%0d", yi, di, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
