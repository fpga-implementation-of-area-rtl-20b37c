// tb_reuse_ctrl: drives the sequencer with a model of the division unit that
// answers each div_start with div_done after a random delay, and checks the
// order of the control signals: load_in on start, load_front next, the first
// division with selm = 0 and its write with seld = 0, both selects high for
// the second division and its write, then one done pulse. Starts while busy
// must be ignored, a new start must clear the selects, and with the real
// division latency done must come CDIV_LATENCY cycles after the start edge.
module tb_reuse_ctrl;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, div_done = 0;
  logic load_in, load_front, div_start, selm, seld, q_we, busy, done;
  int checks = 0, failures = 0;
  int delay = DIV_LATENCY;

  reuse_ctrl dut (.*);

  always #5 clk = ~clk;

  // Division unit model: div_done is high `delay` cycles after the start edge.
  int cnt = 0;
  always @(posedge clk) begin
    div_done <= 1'b0;
    if (div_start) begin
      cnt <= delay;
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) div_done <= 1'b1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_that(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_op(input bit check_latency);
    int cyc, n_start, n_we, n_done;
    #1 start = 1;
    #1 expect_that(load_in && !busy, "load_in on start");
    @(posedge clk);
    #1 start = 1;   // held high while busy: must be ignored
    #1 cyc = 0;
    expect_that(load_front && !selm && !seld, "front load with selects cleared");
    n_start = 0; n_we = 0; n_done = 0;
    while (!done) begin
      if (div_start) begin
        expect_that(selm == (n_start == 1), "selm during div_start");
        n_start++;
      end
      if (q_we) begin
        expect_that(seld == (n_we == 1), "seld during write");
        expect_that(div_done, "write only with div_done");
        n_we++;
      end
      expect_that(!load_in, "no reload while busy");
      @(posedge clk);
      start = 0;
      #2 cyc++;
    end
    expect_that(n_start == 2 && n_we == 2, "two divisions and two writes");
    expect_that(selm && seld, "selects high after operation");
    if (check_latency) begin expect_that(cyc == CDIV_LATENCY, "complex latency"); if (cyc != CDIV_LATENCY) $display("latency %0d", cyc); end
    @(posedge clk);
    #2 expect_that(!done && !busy, "single done pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_that(!selm && !seld && !busy, "reset state");
    @(posedge clk);
    run_op(1);
    for (int i = 0; i < 200; i++) begin
      delay = 1 + int'($urandom_range(0, 20));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      run_op(delay == DIV_LATENCY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
