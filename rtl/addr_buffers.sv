// addr_buffers: buffer network B1-B8 that assembles an 11-bit path-history
// RAM address from segment bits U4..U0 and the shifter output.
//
//   addr[10:5] = shifted[9:4]
//   addr[4:1]  = U4..U1 through B1..B4, or shifted[3:0] through B5..B8
//   addr[0]    = U0 (always)
//
// B1 shares address bit 4 with B5, B2 bit 3 with B6, B3 bit 2 with B7 and B4
// bit 1 with B8. In the source architecture these are tri-state buffers onto a
// shared address bus; here each bit is an AND-OR of the two buffers, which is
// the same function because no mode enables both buffers of a bit (a bit with
// neither enabled reads 0). With the mode settings of viterbi_pkg the address
// equals C * segments + U. Combinational.
module addr_buffers (
  input  logic [4:0]  u,
  input  logic [9:0]  shifted,
  input  logic [7:0]  buf_en,   // bit 0 = B1 ... bit 7 = B8
  output logic [10:0] addr
);

  always_comb begin
    addr[10:5] = shifted[9:4];
    addr[0]    = u[0];
    for (int i = 0; i < 4; i++) begin
      // B(i+1) drives address bit 4-i from U(4-i); B(i+5) from shifted[3-i].
      addr[4-i] = (buf_en[i] & u[4-i]) | (buf_en[i+4] & shifted[3-i]);
    end
  end

endmodule
