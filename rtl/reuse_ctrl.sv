// reuse_ctrl: sequencer of the module-reuse complex divider.
//
// The source paper trades the second division unit for time: the shared unit
// first divides the real numerator, and once Qreal is obtained the select
// lines of the multiplexer and the demultiplexer (selm, seld) switch from
// low to high and the imaginary part is divided. The source paper names these
// select lines and the extra control they need, but not the controller;
// the state sequence below is this design's own:
//   IDLE     wait for start; load_in registers a, b, c, d
//   FRONT    load_front registers the numerators, denominator and flags
//   RE_START div_start with selm = 0
//   RE_WAIT  on div_done write Qreal (q_we, seld = 0); selm, seld -> 1
//   IM_START div_start with selm = 1
//   IM_WAIT  on div_done write Qimag (q_we, seld = 1)
//   FINISH   done pulse, back to IDLE
// selm and seld are registers: cleared by a new start, set when Qreal is
// written, and left high after the operation, as in the source paper's waveform.
// Timing: done is high CDIV_LATENCY = 35 cycles after the start edge.
// start is ignored while busy.
module reuse_ctrl
  import fp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic div_done,
  output logic load_in,
  output logic load_front,
  output logic div_start,
  output logic selm,
  output logic seld,
  output logic q_we,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {
    IDLE, FRONT, RE_START, RE_WAIT, IM_START, IM_WAIT, FINISH
  } state_t;

  state_t state, state_n;

  always_comb begin
    state_n    = state;
    load_in    = 1'b0;
    load_front = 1'b0;
    div_start  = 1'b0;
    q_we       = 1'b0;
    done       = 1'b0;
    unique case (state)
      IDLE:     if (start) begin load_in = 1'b1; state_n = FRONT; end
      FRONT:    begin load_front = 1'b1; state_n = RE_START; end
      RE_START: begin div_start = 1'b1; state_n = RE_WAIT; end
      RE_WAIT:  if (div_done) begin q_we = 1'b1; state_n = IM_START; end
      IM_START: begin div_start = 1'b1; state_n = IM_WAIT; end
      IM_WAIT:  if (div_done) begin q_we = 1'b1; state_n = FINISH; end
      FINISH:   begin done = 1'b1; state_n = IDLE; end
      default:  state_n = IDLE;
    endcase
    busy = (state != IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      selm  <= 1'b0;
      seld  <= 1'b0;
    end else begin
      state <= state_n;
      if (state == IDLE && start) begin
        selm <= 1'b0;
        seld <= 1'b0;
      end else if (state == RE_WAIT && div_done) begin
        selm <= 1'b1;
        seld <= 1'b1;
      end
    end
  end

  // The divider result may only be written while a part is being waited for.
  assert property (@(posedge clk) disable iff (!rst_n)
                   q_we |-> (state == RE_WAIT || state == IM_WAIT));
  // The real part is always written with the selects low, the imaginary part
  // with them high.
  assert property (@(posedge clk) disable iff (!rst_n)
                   q_we |-> (seld == (state == IM_WAIT)));

endmodule
