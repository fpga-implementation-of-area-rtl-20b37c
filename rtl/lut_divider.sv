// lut_divider: divides two normalized values, n_num / n_den with both in
// [1, 2), and returns the quotient rounded to single precision.
//
// This is the "look up table" box of the source paper's division unit. It is
// built as a radix-4 digit recurrence whose digits come from the quotient
// selection table qsel_lut (digits -2..2), which needs only a few top bits
// of the partial remainder and of the divisor per step:
//   w0 = n_num / 4,  w(j+1) = 4 w(j) - q(j+1) * n_den,  Q = sum q(j) 4^-j.
// The remainder is kept non-redundant (full subtract each step). After
// SRT_ITER = 14 steps 4Q holds 28 quotient bits; a negative final remainder
// is corrected by taking one unit off Q, a nonzero one sets the sticky bit,
// and the quotient is rounded to nearest even. The result is a binary32 word
// with sign 0 and exponent 127 (quotient in [1, 2)) or 126 (in (0.5, 1)).
// The source paper does not say how the table is organized or how many steps
// the division takes; the recurrence and its size are this design's own.
// Timing: start is sampled on a rising clock edge while the unit is idle;
// 14 iteration cycles follow and q is valid with a one-cycle done pulse
// DIV_LATENCY = 15 cycles after the start edge. q holds until the next result.
// start while busy is ignored.
module lut_divider
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n_num,
  input  logic [31:0] n_den,
  output logic [31:0] q,
  output logic        done,
  output logic        busy
);

  localparam int unsigned CW = $clog2(SRT_ITER + 1);

  logic signed [31:0] w;         // partial remainder, 25 fraction bits
  logic        [25:0] dfix;      // divisor, 25 fraction bits
  logic signed [29:0] qacc;      // quotient digits, weight 4^-14 per unit
  logic      [CW-1:0] cnt;

  // One recurrence step.
  logic signed [31:0] y, qd, w_next;
  logic signed [6:0]  y_hat;
  logic signed [2:0]  digit;

  always_comb begin
    y     = w <<< 2;
    y_hat = y[28:22];
  end

  qsel_lut u_qsel (.y_hat(y_hat), .d_hat(dfix[24:22]), .q(digit));

  always_comb begin
    unique case (digit)
      3'sd2:   qd = $signed({5'd0, dfix, 1'b0});
      3'sd1:   qd = $signed({6'd0, dfix});
      -3'sd1:  qd = -$signed({6'd0, dfix});
      -3'sd2:  qd = -$signed({5'd0, dfix, 1'b0});
      default: qd = '0;
    endcase
    w_next = y - qd;
  end

  // Correction and rounding of the finished quotient.
  logic signed [29:0] qc;
  logic signed [31:0] wc;
  logic        [23:0] mant;
  logic               g, st, rnd_up;
  logic        [24:0] mant_r;
  logic        [7:0]  e_out;

  always_comb begin
    if (w < 0) begin
      qc = qacc - 30'sd1;
      wc = w + $signed({6'd0, dfix});
    end else begin
      qc = qacc;
      wc = w;
    end
    // qc * 2^-26 is the quotient n_num / n_den (truncated), in (0.5, 2).
    if (qc[26]) begin
      mant  = qc[26:3];
      g     = qc[2];
      st    = (|qc[1:0]) | (wc != 0);
      e_out = 8'd127;
    end else begin
      mant  = qc[25:2];
      g     = qc[1];
      st    = qc[0] | (wc != 0);
      e_out = 8'd126;
    end
    rnd_up = g & (st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd_up);
    if (mant_r[24]) begin
      // Only possible from just below 1.0, since n_num / n_den < 2.
      mant_r = mant_r >> 1;
      e_out  = e_out + 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w    <= '0;
      dfix <= '0;
      qacc <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          w    <= $signed({8'd0, 1'b1, n_num[22:0]});   // n_num/4 with 25 fraction bits
          dfix <= {1'b1, n_den[22:0], 2'b00};
          qacc <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else if (cnt != CW'(SRT_ITER)) begin
        w    <= w_next;
        qacc <= (qacc <<< 2) + 30'(digit);
        cnt  <= cnt + 1'b1;
      end else begin
        q    <= {1'b0, e_out, mant_r[22:0]};
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

  // The recurrence keeps |w| <= 2/3 * divisor; a violation means a wrong table.
  assert property (@(posedge clk) disable iff (!rst_n)
                   busy |-> ((w < 0 ? -w : w) * 3 <= $signed({5'd0, dfix, 1'b0})))
    else $error("lut_divider: partial remainder out of bounds");

endmodule
