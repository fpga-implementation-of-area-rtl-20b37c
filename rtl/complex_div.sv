// complex_div: single-precision complex divider with module reuse.
//
// Computes (a + ib) / (c + id) = (a + ib)(c - id) / (c^2 + d^2). Golub's
// multiplier forms the real and imaginary numerators from a, b, c and the
// negated d (three real multiplications), the denominator calculator forms
// c^2 + d^2, and the exception handler flags zero numerators and a zero
// denominator. Instead of one division unit per part, a single unit is
// shared: a multiplexer feeds it the real numerator, a demultiplexer stores
// the result in the Qreal register, the select lines switch, and the same
// unit then divides the imaginary numerator into Qimag. This structure is
// the source paper's; the registers between the stages and the sequencer are
// this design's own.
// Interface: a, b, c, d are binary32 words sampled on the rising edge where
// start is high and the unit is idle. Qreal and Qimag hold the result from
// the done pulse, CDIV_LATENCY = 35 cycles after that edge, until the next
// operation writes them. real_zero, imag_zero and infinity are valid from
// the second cycle of the operation on. selm and seld are the multiplexer
// and demultiplexer selects. Reset is asynchronous and active low.
module complex_div
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic [31:0] d,
  output logic [31:0] Qreal,
  output logic [31:0] Qimag,
  output logic        real_zero,
  output logic        imag_zero,
  output logic        infinity,
  output logic        selm,
  output logic        seld,
  output logic        busy,
  output logic        done
);

  logic load_in, load_front, div_start, div_done, div_busy, q_we;

  reuse_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .div_done(div_done),
    .load_in(load_in), .load_front(load_front), .div_start(div_start),
    .selm(selm), .seld(seld), .q_we(q_we), .busy(busy), .done(done)
  );

  // Operand registers.
  logic [31:0] a_r, b_r, c_r, d_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; c_r <= '0; d_r <= '0;
    end else if (load_in) begin
      a_r <= a; b_r <= b; c_r <= c; d_r <= d;
    end
  end

  // Front end: numerators with the conjugate of the divisor, denominator, flags.
  logic [31:0] d_conj, num_real, num_imag, denom;
  logic        rz_c, iz_c, inf_c;

  assign d_conj = {~d_r[31], d_r[30:0]};

  golub_mult u_golub (
    .a(a_r), .b(b_r), .c(c_r), .d(d_conj),
    .num_real(num_real), .num_imag(num_imag)
  );

  denom_calc u_denom (.c(c_r), .d(d_r), .denom(denom));

  exception_handler u_exc (
    .num_real(num_real), .num_imag(num_imag), .denom(denom),
    .real_zero(rz_c), .imag_zero(iz_c), .infinity(inf_c)
  );

  logic [31:0] num_real_r, num_imag_r, denom_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_real_r <= '0; num_imag_r <= '0; denom_r <= '0;
      real_zero  <= 1'b0; imag_zero <= 1'b0; infinity <= 1'b0;
    end else if (load_front) begin
      num_real_r <= num_real; num_imag_r <= num_imag; denom_r <= denom;
      real_zero  <= rz_c; imag_zero <= iz_c; infinity <= inf_c;
    end
  end

  // Shared division unit behind the multiplexer.
  logic [31:0] num_sel;
  logic        num_zero_sel;

  operand_mux #(.W(32)) u_mux (.sel(selm), .in0(num_real_r), .in1(num_imag_r), .out(num_sel));
  operand_mux #(.W(1))  u_mux_zero (.sel(selm), .in0(real_zero), .in1(imag_zero), .out(num_zero_sel));

  logic        s_num, s_den;
  logic signed [9:0] e_num, e_den;
  logic [31:0] n_num, n_den, div_q;

  normalizer u_norm_num (.x(num_sel), .s(s_num), .e(e_num), .n(n_num));
  normalizer u_norm_den (.x(denom_r), .s(s_den), .e(e_den), .n(n_den));

  fp_div u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .s_num(s_num), .e_num(e_num), .n_num(n_num),
    .s_den(s_den), .e_den(e_den), .n_den(n_den),
    .num_zero(num_zero_sel), .den_zero(infinity),
    .q(div_q), .done(div_done), .busy(div_busy)
  );

  quotient_demux u_demux (
    .clk(clk), .rst_n(rst_n), .we(q_we), .sel(seld), .q(div_q),
    .Qreal(Qreal), .Qimag(Qimag)
  );

  // The shared unit must be idle whenever the sequencer starts it.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
