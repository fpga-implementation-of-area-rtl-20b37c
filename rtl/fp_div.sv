// fp_div: floating point division unit (one of the dashed "FP division"
// boxes of the source paper's block diagram).
//
// Takes a dividend and divisor already split by the normalization module
// into sign, biased exponent and normalized value in [1, 2), and produces
// the binary32 quotient. As in the source paper it holds an xor gate for the
// quotient sign, the exponent calculator (e_num - e_den + 127), the look-up
// table divider for the normalized values and the final quotient
// computation that joins them. The zero flags from the exception handler
// are passed to the final stage, which substitutes the special results.
// Timing: start is sampled on a rising edge while idle; sign, exponent and
// flags are captured then. q is valid with a one-cycle done pulse
// DIV_LATENCY = 15 cycles after the start edge and holds until the next
// result. The operand inputs need only be valid in the start cycle.
module fp_div
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        s_num,
  input  logic signed [9:0] e_num,
  input  logic [31:0] n_num,
  input  logic        s_den,
  input  logic signed [9:0] e_den,
  input  logic [31:0] n_den,
  input  logic        num_zero,
  input  logic        den_zero,
  output logic [31:0] q,
  output logic        done,
  output logic        busy
);

  logic               sign_c, sign_r;
  logic signed [9:0]  e_c, e_r;
  logic               nz_r, dz_r;
  logic        [31:0] q_lut;

  assign sign_c = s_num ^ s_den;       // the xor gate

  exp_calc u_exp (.e_num(e_num), .e_den(e_den), .e_quo(e_c));

  lut_divider u_lut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .n_num(n_num), .n_den(n_den),
    .q(q_lut), .done(done), .busy(busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_r <= 1'b0;
      e_r    <= '0;
      nz_r   <= 1'b0;
      dz_r   <= 1'b0;
    end else if (start && !busy) begin
      sign_r <= sign_c;
      e_r    <= e_c;
      nz_r   <= num_zero;
      dz_r   <= den_zero;
    end
  end

  final_quotient u_final (
    .sign(sign_r), .e_quo(e_r), .q_lut(q_lut),
    .num_zero(nz_r), .den_zero(dz_r), .q(q)
  );

endmodule
