# Single-precision complex divider with a shared division unit

This RTL computes the quotient of two complex numbers in IEEE 754 binary32:

    (a + ib) / (c + id) = (a + ib)(c - id) / (c^2 + d^2)

The complex division becomes one complex multiplication and two real divisions
that share one denominator. The numerator product uses Golub's
three-multiplication form. The two real divisions are the expensive part, and
they do not get a divider each. One floating point division unit divides the
real numerator first and then the imaginary one. A multiplexer picks its
operand and a demultiplexer steers its result into one of two holding
registers. This *module reuse* costs one extra division time and a little
control. In exchange it saves a whole division unit.

The architecture follows the paper "FPGA Implementation of Area-Efficient
IEEE 754 Complex Divider". Its two-divider version, which the paper uses only
as a baseline, is not included. The paper leaves many details open: how the
quotient look-up table works, the rounding, the timing, the control and the
exception results. Those choices are this design's own, and the section
"What is specified and what is chosen" below separates the two.

## Data flow

```
 a  b  c  d                     (binary32, captured on start)
 |  |  |  '--[sign flip]--.     conjugate of the divisor
 v  v  v                  v
 +------------------------------+      +-------------+
 | golub_mult                   |      | denom_calc  |
 |  t1 = (a+b)(c-d')  t2 = ac   |      | D = c*c+d*d |
 |  t3 = b d'         d' = -d   |      +------+------+
 |  Num_real = t2 - t3          |             |
 |  Num_imag = t1 - t2 - t3     |             |
 +------+---------------+-------+             |
        |               |   exception_handler: real_zero, imag_zero, infinity
        v               v                     |
   [ front-end register: Num_real, Num_imag, D, flags ]
        |               |                     |
        +--> operand_mux (selm) <--+          |
                 |                            |
            normalizer               normalizer
                 |                            |
                 v                            v
        +--------------------------------------------+
        | fp_div                                     |
        |  xor of signs  -> sign                     |
        |  exp_calc      -> e_num - e_den + 127      |
        |  lut_divider   -> n_num / n_den in (0.5,2) |
        |     (radix-4 recurrence, qsel_lut table)   |
        |  final_quotient -> sign, scaled exponent   |
        +---------------------+----------------------+
                              v
                 quotient_demux (seld): Qreal / Qimag registers
```

`reuse_ctrl` sequences the whole operation. `complex_div` is the top level.

## The division unit

The unit divides two values that `normalizer` has already split. Each value
is a sign, an exponent (10-bit signed) and a significand `n` with
1 <= n < 2. The significand is carried as a binary32 word whose exponent
field is 127. Four parts work on these:

* The quotient's sign is the xor of the operand signs.
* `exp_calc` forms the quotient exponent `e_num - e_den + 127`.
* `lut_divider` divides the significands and returns a correctly rounded
  binary32 value in (0.5, 2), so its exponent field is 126 or 127.
* `final_quotient` multiplies that value by 2^(e - 127). This adds to its
  exponent field. It then attaches the sign and handles overflow, underflow
  and the flagged special cases.

### Significand division: radix-4 digit recurrence with a selection table

The significand quotient is produced two bits per clock. Each step chooses
a digit q in {-2, -1, 0, 1, 2} and updates the partial remainder:

    w0 = n_num / 4
    w(j+1) = 4 w(j) - q(j+1) * n_den
    Q = sum q(j) 4^-j,  and n_num / n_den = 4Q + (remainder term)

With this redundant digit set the remainder can stay within
|w| <= (2/3) n_den. So the digit can be chosen from a few leading bits of
`y = 4w` and of the divisor, with no full comparison needed. `qsel_lut` is
that choice as a 1024-entry table. Its index is y truncated to 7 bits
(two's complement, 3 fraction bits) and the 3 divisor bits below the hidden
one. An entry holds a digit q that satisfies

    (q - 2/3) d <= y <= (q + 2/3) d

for every y and d that its index can stand for. The table is not stored as
numbers. It is built when the design is elaborated, from this rule written
in integers (y = Y/8, d between D/8 and (D+1)/8 with D = 8 + d_hat):

    3Y      >= (3q - 2) * D'    for D' = D and D + 1   (not needed for q = -2)
    3(Y+1)  <= (3q + 2) * D'    for D' = D and D + 1   (not needed for q = +2)

Candidates are tried in the order 0, +1, -1, +2, -2. Indices the recurrence
cannot reach get 0. Every reachable index has a valid digit with these bit
counts, and `tb_qsel_lut` checks this on a grid of points inside every
cell. An assertion in `lut_divider` checks the bound |w| <= 2/3 d on every
cycle of every simulation.

The remainder is kept in non-redundant form: a full 32-bit subtract in each
step. The truncated estimate is therefore always at or below the true value
by less than 1/8. That is why 3 fraction bits are enough.

After 14 steps, 4Q holds 28 quotient bits. If the last remainder is
negative, one unit is taken off Q. A nonzero remainder sets the sticky bit.
The result is then rounded to 24 bits, to nearest with ties to even. The
quotient lies in (0.5, 2), so the leading one is at one of two positions.
That is the only normalization needed, and the guard and sticky bits are
exact in both cases. So each part of the complex quotient is the correctly
rounded quotient of the rounded numerator and the rounded denominator.

## Module reuse: sequencing and timing

`reuse_ctrl` is a seven-state machine. Edge numbers count rising clock
edges after the edge (edge 0) on which `start` is sampled. The state column
gives the state left at that edge:

| edge | state    | what happens at the edge                                   |
|------|----------|------------------------------------------------------------|
| 0    | IDLE     | a, b, c, d captured; `selm`, `seld` cleared                 |
| 1    | FRONT    | Num_real, Num_imag, D and the three flags registered        |
| 2    | RE_START | the division unit samples Num_real / D (`selm` = 0)         |
| 18   | RE_WAIT  | result (ready since edge 17) written to Qreal (`seld` = 0); both selects go to 1 |
| 19   | IM_START | the division unit samples Num_imag / D (`selm` = 1)         |
| 35   | IM_WAIT  | result (ready since edge 34) written to Qimag (`seld` = 1); `done` is high in the cycle that follows |

The division unit takes 15 cycles (`DIV_LATENCY`): 14 recurrence steps and
one rounding step. A complex division takes `CDIV_LATENCY` = 35 cycles. Both
constants are in `fp_pkg`. A `start` while `busy` is ignored. `selm` and
`seld` stay high after an operation and are cleared by the next `start`.
This matches the observed behaviour of the original, where both selects
read 1 once the operation has finished.

The front end (Golub's multiplier, the denominator and the flags) is
combinational between two registers. Its path is long: an add, a multiply
and two subtracts in series. Pipelining it would change only the first
rows of the table above.

## Number format and special cases

* Rounding is to nearest with ties to even in every adder, multiplier and
  the divider.
* `fp_add` and `fp_mul` read subnormal inputs as zero. They flush subnormal
  results to zero and turn overflow into infinity. Infinity and NaN inputs
  follow IEEE rules.
* The division path accepts subnormal operands: `normalizer` shifts their
  leading one into place. Quotients below the normal range are flushed to
  zero. Quotients above it become infinity of the right sign.
* `real_zero`, `imag_zero` and `infinity` are high when Num_real, Num_imag or
  D is exactly zero. A zero numerator makes that part of the quotient a
  zero carrying the xor of the operand signs. A zero denominator
  (c = d = 0) makes both parts +infinity. The flag name comes from the
  original. Returning +infinity instead of NaN is this design's choice.
* The division unit gives infinity and NaN operands no special treatment.
  If the inputs are infinite or NaN, or if Num_real, Num_imag or
  c^2 + d^2 overflows to infinity in the front end, the quotient that comes
  out is meaningless. Keep |a|, |b|, |c| and |d| well inside the
  single-precision range, below about 1e19 for the denominator's squares,
  or add a check at the input.

### Accuracy

Each operation rounds to single precision. The real part is
(ac + bd) / (c^2 + d^2), with every operation rounded, and it is usually
within a few units in the last place. The imaginary numerator is formed as
t1 - t2 - t3, and it can lose relative accuracy when bc is close to ad,
because t1 is much larger than the result. The testbench compares the full
datapath against the same operation sequence computed independently. It
also makes a looser comparison with the exact complex quotient. For large
or small operands, c^2 + d^2 can overflow or underflow before the division.
The design does no operand scaling to avoid that.

## What is specified and what is chosen

Taken from the source paper:

* the block structure: Golub's multiplier fed with the conjugate divisor,
  a denominator calculator, an exception handler with the flags
  `real_zero`, `imag_zero` and `infinity`, normalization to [1, 2), and a
  division unit made of an xor gate, an exponent calculator
  (`e_num - e_den + 127`), a quotient selection look-up table and a final
  quotient stage;
* Golub's formulas with three multiplications and five additions;
* one shared division unit between a 2:1 multiplexer
  (0 = real, 1 = imaginary) and a demultiplexer with holding registers;
* the select lines switching once the real part is done;
* the example (2 + i) / (1 + 2i) = 0.8 - 0.6i, with the bit patterns
  0x3F4CCCCD and 0xBF19999A, which the top-level testbench reproduces
  exactly.

This design's own:

* the contents of the look-up table, which here is an SRT radix-4
  digit-selection table iterated 14 times, and its index widths;
* rounding and subnormal handling;
* the values returned in the exception cases;
* the 10-bit exponent paths, where the original diagram shows 8 bits;
* the registers around the front end, the controller, the start/done
  handshake and the 35-cycle latency;
* an asynchronous active-low reset.

## Files

| file | contents |
|------|----------|
| `rtl/fp_pkg.sv` | binary32 struct type, special values, `SRT_ITER`, latencies |
| `rtl/complex_div.sv` | top level |
| `rtl/reuse_ctrl.sv` | sequencer (selm, seld, start of the division, writes) |
| `rtl/golub_mult.sv` | complex multiplier, 3 multiplications + 5 additions |
| `rtl/denom_calc.sv` | c*c + d*d |
| `rtl/exception_handler.sv` | zero flags |
| `rtl/operand_mux.sv` | 2:1 multiplexer, parameter `W` |
| `rtl/normalizer.sv` | sign / exponent / significand in [1, 2), subnormals normalized |
| `rtl/fp_div.sv` | division unit |
| `rtl/exp_calc.sv` | quotient exponent |
| `rtl/lut_divider.sv` | radix-4 significand divider with rounding |
| `rtl/qsel_lut.sv` | digit-selection table |
| `rtl/final_quotient.sv` | exponent scaling, sign, overflow, special cases |
| `rtl/quotient_demux.sv` | demultiplexer and the Qreal / Qimag registers |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | binary32 adder/subtractor and multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fp_util.sv` | reference binary32 arithmetic built on `real` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it as a failure if it hangs. The reference values are computed
in binary64 `real` arithmetic and rounded to binary32 in
`tb/tb_fp_util.sv`. They never come from the design's own modules. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp_pkg.sv tb/tb_fp_util.sv tb/tb_complex_div.sv --top-module tb_complex_div
./obj_dir/Vtb_complex_div
```

Verilator finds the other modules through `-Irtl` (one module per file,
named after the module). Any other testbench runs the same way with its
own name. `tb_complex_div` runs the top at its default configuration
through the following:

* the worked example;
* a zero real numerator and a zero imaginary numerator;
* a zero divisor;
* overflow and underflow of the quotient;
* a start while busy;
* 300 random divisions.

It also counts each of these mechanisms and fails if one never happened.
It checks the 35-cycle latency, and it checks that Qreal is already held
when the selects switch.

Every module's testbench has been checked against a deliberately broken
copy of its module, and each such copy makes the testbench fail.
Verilator lint (`-Wall`) reports only unused-bit and unused-parameter
warnings, plus a note that reset feeds both the asynchronous flops and the
assertions' `disable iff`.

## Changing the design

* `SRT_ITER` in `fp_pkg` sets the number of radix-4 steps. Fewer steps give
  fewer quotient bits: below 14, results are no longer correctly rounded.
  The latencies follow from it.
* The selection rule in `qsel_lut` is written for 3 remainder fraction bits
  and 3 divisor bits. Widening the index only needs the index widths and the
  integer scale factors changed. Narrowing it below what the rule allows
  leaves reachable cells with no valid digit; `tb_qsel_lut` detects that.
* To get the two-divider architecture back, instantiate two `fp_div` units
  fed directly from Num_real and Num_imag. The multiplexer, the demultiplexer
  and the second pass of `reuse_ctrl` are then no longer needed.
