// traceback_addr_gen: read-address generator of the two traceback processors.
//
// One 6-bit down counter and one 10-bit shifter are shared by the decoding
// processor B1 and the dummy processor B2, which walk their windows in lock
// step; each processor has its own buffer network that adds its own segment
// bits. load sets the counter to the last stage of a window (WL - 1); dec
// counts it down by one, a jump of one stage (one group of segment rows).
//
// Timing: the address is formed from the counter's next value (the value it
// takes at the coming clock edge), and the processors supply the segment bits
// of their next state. With a synchronous RAM the row of stage c is then on
// the RAM output in the cycle in which c is the counter value, so B1 and B2
// advance one trellis stage per clock. The shared counter, the shifter and the
// buffer settings follow the source architecture; forming the address from the
// next counter value is this design's choice.
module traceback_addr_gen
  import viterbi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        dec,
  input  mode_t       mode,
  input  logic [4:0]  u_b1,
  input  logic [4:0]  u_b2,
  output logic [5:0]  c,
  output logic [10:0] addr_b1,
  output logic [10:0] addr_b2
);

  logic [5:0] c_next;
  logic [9:0] shifted;
  addr_cfg_t  cfg;

  assign cfg    = addr_cfg(mode);
  assign c_next = load ? wl_of(mode) - 6'd1 : (dec ? c - 6'd1 : c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else        c <= c_next;
  end

  addr_shifter u_shift (.c(c_next), .sh(cfg.sh), .y(shifted));
  addr_buffers u_buf1  (.u(u_b1), .shifted(shifted), .buf_en(cfg.buf_en), .addr(addr_b1));
  addr_buffers u_buf2  (.u(u_b2), .shifted(shifted), .buf_en(cfg.buf_en), .addr(addr_b2));

endmodule
