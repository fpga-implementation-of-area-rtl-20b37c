// quotient_demux: the demultiplexer behind the shared division unit, with
// the registers that hold each part of the quotient while the other part is
// being computed (both required by the source paper's module-reuse scheme).
// When we is high on a rising edge, q is written to Qreal (sel = 0) or to
// Qimag (sel = 1); the other register keeps its value. Both reset to 0.
// Interface: clk, rst_n, we, sel, q in; Qreal, Qimag out.
module quotient_demux (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic        sel,
  input  logic [31:0] q,
  output logic [31:0] Qreal,
  output logic [31:0] Qimag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      Qreal <= '0;
      Qimag <= '0;
    end else if (we) begin
      if (sel) Qimag <= q;
      else     Qreal <= q;
    end
  end

endmodule
