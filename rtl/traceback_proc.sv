// traceback_proc: traceback (reverse) processor.
//
// An 8-bit state register D8..D1 holds the trellis state whose survivor is
// being followed. Each step, the decision byte of the state's 8-state segment
// arrives on rd_data; multiplexer M1 picks the state's own decision bit D with
// the three low state bits (D3..D1), and the state moves one stage back:
// S <= {S << 1, D}, keeping only the K-1 state bits of the mode. The decoded
// bit of a stage is the top state bit S[K-2], the input bit that led into the
// state.
//
// load writes load_state into the register (state 0 for the dummy processor,
// the dummy's end state for the decoding processor). u_next gives the segment
// bits S[7:3] of the state the register holds after the coming edge, so the
// address generator can fetch its row one cycle early (see traceback_addr_gen).
// state and dec_bit show the register's current state and its decoded bit.
//
// The shift rule, the decoded-bit rule and M1 follow the source architecture;
// the mask that stands for the switches between D8..D5 and the early segment
// bits are this design's choices.
module traceback_proc
  import viterbi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_t      mode,
  input  logic       load,
  input  logic [7:0] load_state,
  input  logic       step,
  input  logic [7:0] rd_data,
  output logic [4:0] u_next,
  output logic [7:0] state,
  output logic       dec_bit
);

  logic [7:0] s_next;
  logic       d;

  assign d = rd_data[state[2:0]];  // M1

  always_comb begin
    if (load)      s_next = load_state & state_mask(mode);
    else if (step) s_next = {state[6:0], d} & state_mask(mode);
    else           s_next = state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= s_next;
  end

  assign u_next  = s_next[7:3];
  assign dec_bit = state[k_of(mode) - 2];

endmodule
