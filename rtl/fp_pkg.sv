// fp_pkg: types and constants shared by the single-precision complex divider.
//
// fp32_t splits an IEEE 754 binary32 word into its sign, biased exponent and
// fraction fields. The constants name the special encodings the datapath
// produces, the size of the digit-recurrence divider and the latencies that
// follow from it. The adder and multiplier read subnormal inputs as zero and
// every unit flushes results that would be subnormal to zero; only the
// division path accepts subnormal operands (a choice of this design, as is
// everything in this package except the binary32 format itself).
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  localparam int unsigned BIAS = 127;

  localparam logic [31:0] FP_POS_INF = 32'h7F80_0000;
  localparam logic [31:0] FP_QNAN    = 32'h7FC0_0000;

  // Radix-4 digit recurrence: 14 iterations give 28 quotient bits, enough for
  // 24 significand bits plus guard and sticky in both result ranges.
  localparam int unsigned SRT_ITER = 14;

  // Cycles from the start edge of a division to its done pulse.
  localparam int unsigned DIV_LATENCY = SRT_ITER + 1;

  // Cycles from the start edge of a complex division to its done pulse:
  // input register, front-end register, then per part one start cycle, the
  // division and one write cycle; the second part is followed by done.
  localparam int unsigned CDIV_LATENCY = 3 + 2 * (DIV_LATENCY + 1);

  function automatic logic is_zero(input logic [31:0] x);
    return x[30:23] == 8'd0;          // zero or subnormal (read as zero)
  endfunction

  function automatic logic is_special(input logic [31:0] x);
    return x[30:23] == 8'hFF;         // infinity or NaN
  endfunction

endpackage
