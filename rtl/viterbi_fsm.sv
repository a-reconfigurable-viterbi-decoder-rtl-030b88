// viterbi_fsm: control state machine of the decoder.
//
// The decoder works in windows of WL trellis stages. Four window periods,
// 0-L, L-2L, 2L-3L and 3L-4L, follow each other in a ring; the period selects
// which path-history RAM is written and which two are read (see ph_memory).
// When the forward processor finishes a window the period advances and a
// traceback pass starts: the dummy processor B2 traces the window just
// written back from state 0, and the decoding processor B1, loaded with the
// state B2 reached in the previous pass, traces the window written three
// periods ago and emits its bits. B2 runs once one window exists, B1 once
// three windows exist, so the first decoded bits appear after three windows.
// A pass takes WL+1 cycles: a load cycle that issues the first read, then one
// stage per cycle.
//
// Forward processor control: a set of soft symbols is taken with
// in_valid/in_ready; the processor is busy for one stage, one segment (8
// states) per cycle, and takes the next set in the stage's last cycle, so a
// stage costs exactly 2^(K-1)/8 cycles. The path-metric banks swap at every
// stage end; pm_init marks the first stage after start.
//
// start restarts everything (periods, counters, metrics) and is how a new
// trellis is selected. The period ring and the B1/B2 roles follow the source
// architecture; the handshake, the fill count and start are this design's
// interface.
module viterbi_fsm
  import viterbi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_t      mode,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       seg_last,
  input  logic       win_last,
  output logic       accept,
  output logic       fp_busy,
  output logic       pm_bank,
  output logic       pm_init,
  output logic [1:0] period,
  output logic       tb_load,
  output logic       tb_step,
  output logic       b1_on,
  output logic       b2_on
);

  typedef enum logic [1:0] {
    PER_0L   = 2'd0,
    PER_L2L  = 2'd1,
    PER_2L3L = 2'd2,
    PER_3L4L = 2'd3
  } period_t;

  period_t    per;
  logic [1:0] fill;     // completed windows, saturating at 3
  logic [5:0] steps;    // traceback stages left in the current pass
  logic       stage_end, win_end;

  assign in_ready  = !start && (!fp_busy || seg_last);
  assign accept    = in_valid && in_ready;
  assign stage_end = fp_busy && seg_last;
  assign win_end   = fp_busy && win_last;
  assign period    = per;
  assign tb_step   = (steps != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      per     <= PER_0L;
      fill    <= '0;
      fp_busy <= 1'b0;
      pm_bank <= 1'b0;
      pm_init <= 1'b1;
      tb_load <= 1'b0;
      steps   <= '0;
      b1_on   <= 1'b0;
      b2_on   <= 1'b0;
    end else if (start) begin
      per     <= PER_0L;
      fill    <= '0;
      fp_busy <= 1'b0;
      pm_bank <= 1'b0;
      pm_init <= 1'b1;
      tb_load <= 1'b0;
      steps   <= '0;
      b1_on   <= 1'b0;
      b2_on   <= 1'b0;
    end else begin
      if (accept)         fp_busy <= 1'b1;
      else if (stage_end) fp_busy <= 1'b0;

      if (stage_end) begin
        pm_bank <= !pm_bank;
        pm_init <= 1'b0;
      end

      tb_load <= win_end;
      if (win_end) begin
        per   <= period_t'(per + 2'd1);
        fill  <= (fill == 2'd3) ? fill : fill + 2'd1;
        b2_on <= 1'b1;
        b1_on <= (fill >= 2'd2);
      end

      if (tb_load)      steps <= wl_of(mode);
      else if (tb_step) steps <= steps - 6'd1;
    end
  end

  // A traceback pass must end before the next window does.
  assert property (@(posedge clk) disable iff (start) win_end |-> steps == '0)
    else $error("traceback pass overran its window period");

endmodule
