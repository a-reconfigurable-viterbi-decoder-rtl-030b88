// ph_write_addr_gen: reconfigurable write-address generator of the
// path-history memory.
//
// A 5-bit up counter U walks the 8-state segments of one trellis stage and
// wraps after segs_of(mode) values (its count_to); each wrap advances a 6-bit
// up counter C, the stage within the current window, which wraps after
// WL = 6K values. C goes through the 10-bit shifter and, with U, through the
// buffer network; the buffer enables and shift come from the mode. The result
// is the row C * segs + U of the RAM that receives the 8 decision bits of the
// current cycle.
//
// en advances the counters by one segment; clear restarts both at 0. seg_last
// and win_last flag the last segment of a stage and of a window. The counter
// chain, count_to wrap values, shifter and buffer settings follow the source
// architecture; clear and the flags are this design's interface.
module ph_write_addr_gen
  import viterbi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  mode_t       mode,
  output logic [4:0]  u,
  output logic [5:0]  c,
  output logic        seg_last,
  output logic        win_last,
  output logic [10:0] addr
);

  logic [5:0] u_count_to, c_count_to;
  addr_cfg_t  cfg;
  logic [9:0] shifted;

  assign u_count_to = segs_of(mode);
  assign c_count_to = wl_of(mode);
  assign cfg        = addr_cfg(mode);

  assign seg_last = ({1'b0, u} == u_count_to - 6'd1);
  assign win_last = seg_last && (c == c_count_to - 6'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u <= '0;
      c <= '0;
    end else if (clear) begin
      u <= '0;
      c <= '0;
    end else if (en) begin
      if (seg_last) begin
        u <= '0;
        c <= win_last ? 6'd0 : c + 6'd1;
      end else begin
        u <= u + 5'd1;
      end
    end
  end

  addr_shifter u_shift (.c(c), .sh(cfg.sh), .y(shifted));
  addr_buffers u_buf   (.u(u), .shifted(shifted), .buf_en(cfg.buf_en), .addr(addr));

endmodule
