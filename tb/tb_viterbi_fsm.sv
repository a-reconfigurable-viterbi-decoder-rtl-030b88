// tb_viterbi_fsm: drives the state machine with a reference segment/stage
// counter (K = 5: 2 segments per stage, windows of 30 stages) and random input
// gaps, and checks: a stage lasts 2 cycles and the next symbols are taken in
// its last cycle; the metric bank swaps every stage and init ends after the
// first stage; the period advances once per window and wraps after four; a
// traceback pass loads one cycle after a window ends and steps exactly WL
// cycles; B2 runs from the first window on and B1 from the third; start
// restarts everything.
module tb_viterbi_fsm;
  import viterbi_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  mode_t mode = MODE_K5;
  logic in_ready, accept, fp_busy, pm_bank, pm_init, tb_load, tb_step, b1_on, b2_on;
  logic seg_last, win_last;
  logic [1:0] period;
  int u = 0, c = 0;
  localparam int SEGS = 2, WL = 30;
  int checks = 0, failures = 0;

  viterbi_fsm dut (.*);
  always #5 clk = ~clk;

  assign seg_last = (u == SEGS - 1);
  assign win_last = seg_last && (c == WL - 1);

  always @(posedge clk) begin
    if (start) begin u <= 0; c <= 0; end
    else if (fp_busy) begin
      if (seg_last) begin u <= 0; c <= win_last ? 0 : c + 1; end
      else u <= u + 1;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // cycle-level checker
  int wins = 0, steps_seen = 0, stages = 0;
  logic prev_bank;
  logic [1:0] exp_period = 0;
  int n_wrap = 0, n_load = 0;
  logic win_end_q = 0;
  always @(posedge clk) begin
    if (rst_n && !start) begin
      chk(tb_load == win_end_q, "tb_load one cycle after window end");
      if (tb_load) begin
        chk(steps_seen == 0 || steps_seen == WL, "pass length");
        steps_seen = 0;
        n_load++;
        chk(b2_on == (wins >= 1), "b2_on");
        chk(b1_on == (wins >= 3), "b1_on");
      end
      if (tb_step) steps_seen++;
      chk(period == exp_period, "period");
      chk(pm_init == (stages == 0), "pm_init");
      chk(pm_bank == stages[0], "metric bank alternates per stage");
      win_end_q = fp_busy && win_last;
      if (fp_busy && seg_last) stages++;
      if (fp_busy && win_last) begin
        wins++;
        if (exp_period == 3) n_wrap++;
        exp_period = exp_period + 1;
      end
    end else begin
      win_end_q = 0;
    end
  end

  initial begin
    int last_acc;
    bit gap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      wins = 0; stages = 0; exp_period = 0; steps_seen = 0;
      last_acc = -1;
      for (int s = 0; s < WL * 6 + (run * 17); s++) begin
        gap = ($urandom_range(7) == 0);
        if (gap) begin
          in_valid = 0;
          repeat ($urandom_range(4, 1)) @(negedge clk);
        end
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        chk(accept, "accept with valid and ready");
        if (last_acc >= 0 && !gap) chk($time - last_acc == SEGS * 10, "stage length");
        last_acc = $time;
        @(negedge clk);
        in_valid = 0;
      end
      repeat (3 * WL) @(negedge clk);
      chk(!fp_busy, "idle after last stage");
    end
    chk(n_wrap >= 1, "period ring wrapped");
    chk(n_load >= 6, "traceback passes started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
