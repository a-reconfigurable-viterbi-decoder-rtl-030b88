// viterbi_top: reconfigurable soft-decision Viterbi decoder, constraint length
// 5, 6, 7 or 9, rate 1/2 to 1/5, any generator polynomials.
//
// Forward processor: each trellis stage, the branch metric calculator scores
// all 32 code words against the stage's soft symbols; for 8 target states per
// cycle (one segment) the switching network, driven by the configuration
// (input) RAMs, gives each of the 8 ACS units the metrics of its two branches,
// and the path-metric memory gives the metrics of its two predecessors 2j and
// 2j+1. The 8 new metrics go to the other metric bank, the 8 decision bits to
// the path-history RAM of the current window at the row the write-address
// generator forms from the (segment, stage) counters. A stage takes
// 2^(K-1)/8 cycles: 32 for K=9, 2 for K=5.
//
// Traceback: at the end of every window of WL = 6K stages, the dummy processor
// B2 traces the new window back from state 0 and hands its end state to the
// decoding processor B1, which one period later traces the window before it
// and emits WL decoded bits, last stage first, tagged with their stage number
// dec_pos. The first bits come three windows after start.
//
// Interface:
//   start/mode/rate_n  restart with a new trellis; mode and rate are latched.
//   in_valid/in_ready  one set of rate_n soft symbols (signed 4-bit, positive
//                      = code bit 0) per trellis stage.
//   cfg_*              write port of the four configuration RAMs; word r of
//                      address t holds the even-branch code words of ACS 2r
//                      (bits 4:0) and 2r+1 (bits 9:5) for segment t. A word
//                      written in the cycle fp_seg equals its address is used
//                      at once, so a new trellis can be loaded during the
//                      first stage after start.
//   fp_busy/fp_first_stage  the forward processor is working / is in the
//                      first stage after start.
//   dec_valid/dec_bit/dec_pos  decoded output.
//
// The partition into blocks and the schedule follow the source architecture;
// the interface, the metric widths and the output order are this design's.
module viterbi_top
  import viterbi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mode_t             mode,
  input  logic [2:0]        rate_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  sym_t              in_sym    [MAX_N],
  input  logic [NUM_IRAM-1:0] cfg_we,
  input  logic [4:0]        cfg_addr,
  input  logic [IRAM_W-1:0] cfg_wdata [NUM_IRAM],
  output logic [4:0]        fp_seg,
  output logic              fp_busy,
  output logic              fp_first_stage,
  output logic              cfg_bypass,
  output logic              dec_valid,
  output logic              dec_bit,
  output logic [5:0]        dec_pos
);

  // ---------------- configuration and control ----------------
  mode_t      mode_q;
  logic [2:0] rate_q;
  sym_t       sym_q [MAX_N];

  logic       accept, pm_bank, pm_init;
  logic [1:0] period;
  logic       tb_load, tb_step, b1_on, b2_on;
  logic       seg_last, win_last;
  logic [4:0] u;
  logic [10:0] wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_K9;
      rate_q <= 3'd2;
    end else if (start) begin
      mode_q <= mode;
      rate_q <= rate_n;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) sym_q <= in_sym;
  end

  viterbi_fsm u_fsm (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode_q),
    .in_valid(in_valid), .in_ready(in_ready), .seg_last(seg_last), .win_last(win_last),
    .accept(accept), .fp_busy(fp_busy), .pm_bank(pm_bank), .pm_init(pm_init),
    .period(period), .tb_load(tb_load), .tb_step(tb_step), .b1_on(b1_on), .b2_on(b2_on)
  );

  ph_write_addr_gen u_wag (
    .clk(clk), .rst_n(rst_n), .clear(start), .en(fp_busy), .mode(mode_q),
    .u(u), .c(), .seg_last(seg_last), .win_last(win_last), .addr(wr_addr)
  );

  assign fp_seg         = u;
  assign fp_first_stage = pm_init;

  // ---------------- forward processor ----------------
  bm_t  bm [NUM_CW];
  bm_t  bm_even [NUM_ACS];
  bm_t  bm_odd  [NUM_ACS];
  pm_t  pm_rd1 [NUM_ACS];
  pm_t  pm_rd2 [NUM_ACS];
  pm_t  pm_new [NUM_ACS];
  logic [NUM_ACS-1:0] decision;
  logic [4:0] seg_mask, row1, row2;

  bmc u_bmc (.sym(sym_q), .rate_n(rate_q), .bm(bm));

  bm_switch u_sw (
    .clk(clk), .seg(u), .bm(bm),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .bm_even(bm_even), .bm_odd(bm_odd), .cfg_bypass(cfg_bypass)
  );

  // Segment t needs predecessors 16t..16t+15 modulo the number of states:
  // rows 2t and 2t+1 modulo the number of segments.
  assign seg_mask = 5'(segs_of(mode_q) - 6'd1);
  assign row1     = {u[3:0], 1'b0} & seg_mask;
  assign row2     = {u[3:0], 1'b1} & seg_mask;

  pm_memory #(.ROWS(MAX_SEGS)) u_pm (
    .clk(clk), .rd_bank(pm_bank), .init(pm_init),
    .rd_row1(row1), .rd_row2(row2), .rd_data1(pm_rd1), .rd_data2(pm_rd2),
    .we(fp_busy), .wr_row(u), .wr_data(pm_new)
  );

  for (genvar a = 0; a < NUM_ACS; a++) begin : g_acs
    // ACS 0-3 take their predecessor pairs from read port 1, ACS 4-7 from port 2.
    if (a < NUM_ACS / 2) begin : g_p1
      acs u_acs (
        .pm_even(pm_rd1[2*a]), .pm_odd(pm_rd1[2*a+1]),
        .bm_even(bm_even[a]), .bm_odd(bm_odd[a]),
        .pm_new(pm_new[a]), .decision(decision[a])
      );
    end else begin : g_p2
      acs u_acs (
        .pm_even(pm_rd2[2*a-NUM_ACS]), .pm_odd(pm_rd2[2*a-NUM_ACS+1]),
        .bm_even(bm_even[a]), .bm_odd(bm_odd[a]),
        .pm_new(pm_new[a]), .decision(decision[a])
      );
    end
  end

  // ---------------- path history and traceback ----------------
  logic [7:0]  b1_data, b2_data, b2_state;
  logic [4:0]  u_b1, u_b2;
  logic [5:0]  c_rd;
  logic [10:0] addr_b1, addr_b2;
  logic        b1_dec;

  ph_memory u_ph (
    .clk(clk), .period(period),
    .wr_en(fp_busy), .wr_addr(wr_addr), .wr_data(decision),
    .rd_en(tb_load || tb_step), .b1_addr(addr_b1), .b2_addr(addr_b2),
    .b1_data(b1_data), .b2_data(b2_data)
  );

  traceback_addr_gen u_rag (
    .clk(clk), .rst_n(rst_n), .load(tb_load), .dec(tb_step), .mode(mode_q),
    .u_b1(u_b1), .u_b2(u_b2), .c(c_rd), .addr_b1(addr_b1), .addr_b2(addr_b2)
  );

  // B1 starts from the state B2 reached in the previous pass; B2 from state 0.
  traceback_proc u_b1_proc (
    .clk(clk), .rst_n(rst_n), .mode(mode_q), .load(tb_load), .load_state(b2_state),
    .step(tb_step && b1_on), .rd_data(b1_data), .u_next(u_b1), .state(), .dec_bit(b1_dec)
  );

  traceback_proc u_b2_proc (
    .clk(clk), .rst_n(rst_n), .mode(mode_q), .load(tb_load), .load_state(8'd0),
    .step(tb_step && b2_on), .rd_data(b2_data), .u_next(u_b2), .state(b2_state), .dec_bit()
  );

  assign dec_valid = tb_step && b1_on;
  assign dec_bit   = b1_dec;
  assign dec_pos   = c_rd;

endmodule
