// qsel_lut: quotient selection look-up table of the division unit.
//
// The source paper's division unit finds the quotient from a look-up table fed
// with bits of the normalized dividend and divisor, and leaves its contents
// open. Here the table is the digit-selection table of a radix-4 digit
// recurrence (SRT) with digits {-2..2} (redundancy 2/3): it takes the top
// bits of the shifted partial remainder y = 4w (7-bit two's complement, 3
// fraction bits, truncated) and the three divisor fraction bits after the
// hidden one, and returns the digit q with
//   (q - 2/3) d <= y <= (q + 2/3) d  for every y and d the index can stand for.
// The table is a constant built at elaboration by evaluating the rule below
// for all 1024 indices;
// it holds in integers, with y = Y/8 and d in [D/8, (D+1)/8), D = 8 + d_hat:
//   lower bound  3Y     >= (3q - 2) * D'   (skipped for q = -2)
//   upper bound  3(Y+1) <= (3q + 2) * D'   (skipped for q = +2)
// for both ends D' in {D, D+1}. Candidates are tried in the order 0, +1, -1,
// +2, -2; indices that the recurrence cannot reach give 0.
// Interface: y_hat, d_hat in; q out (signed 3-bit); combinational.
module qsel_lut (
  input  logic signed [6:0] y_hat,
  input  logic        [2:0] d_hat,
  output logic signed [2:0] q
);

  function automatic logic signed [2:0] select_digit(input int y, input int dh);
    int order [5];
    int k, d0, d1;
    bit lo_ok, hi_ok;
    order = '{0, 1, -1, 2, -2};
    d0 = 8 + dh;
    d1 = 9 + dh;
    for (int j = 0; j < 5; j++) begin
      k = order[j];
      lo_ok = (k == -2) || ((3 * y >= (3 * k - 2) * d0) && (3 * y >= (3 * k - 2) * d1));
      hi_ok = (k == 2)  || ((3 * (y + 1) <= (3 * k + 2) * d0) && (3 * (y + 1) <= (3 * k + 2) * d1));
      if (lo_ok && hi_ok) return 3'(k);
    end
    return 3'sd0;
  endfunction

  // The whole table, entry {Y, d_hat} at bits 3*index +: 3, built once at
  // elaboration.
  function automatic logic [3071:0] build_table();
    logic [3071:0] t;
    logic [9:0]    idx;
    t = '0;
    for (int i = 0; i < 1024; i++) begin
      idx = 10'(i);
      t[3 * i +: 3] = select_digit(int'($signed(idx[9:3])), int'(idx[2:0]));
    end
    return t;
  endfunction

  localparam logic [3071:0] QSEL_TABLE = build_table();

  assign q = QSEL_TABLE[3 * {y_hat, d_hat} +: 3];

endmodule
