// tb_quotient_demux: random write sequences against a two-register model;
// a write with sel = 0 must change only Qreal, with sel = 1 only Qimag.
module tb_quotient_demux;
  logic clk = 0, rst_n = 0, we = 0, sel = 0;
  logic [31:0] q, Qreal, Qimag, m_re, m_im;
  int checks = 0, failures = 0;

  quotient_demux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_re = 0; m_im = 0; q = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks += 2;
    if (Qreal !== 0) failures++;
    if (Qimag !== 0) failures++;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); sel = 1'($urandom); q = $urandom;
      @(posedge clk);
      if (we) begin
        if (sel) m_im = q; else m_re = q;
      end
      #1;
      checks += 2;
      if (Qreal !== m_re) failures++;
      if (Qimag !== m_im) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
