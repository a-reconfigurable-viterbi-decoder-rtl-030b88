// input_ram: one branch-metric configuration RAM (32 words).
//
// Each word holds the code word selects of two ACS units for one segment of the
// trellis (one 8-state group). Reads are asynchronous, writes synchronous. When
// a word is written in the same cycle it is read, the read returns the word
// being written, so a new trellis can be loaded while the forward processor
// already uses it: the first stage after a switch reads each segment's word in
// the very cycle the host writes it.
//
// Depth 32 and the asynchronous-read/synchronous-write organisation follow the
// source architecture. The word is 10 bits (two 5-bit selects, rates down to
// 1/5) where the source RAM is 8 bits wide; with 4-bit selects it would be
// 8 bits but limited to rate 1/4. The write-through path is this design's
// reading of "simultaneous read during write".
module input_ram #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 10
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  output logic                     bypass
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign bypass = we && (waddr == raddr);
  assign rdata  = bypass ? wdata : mem[raddr];

endmodule
