// ph_ram: one path-history RAM, 2K words of 8 decision bits.
//
// Separate write and read ports, both synchronous: a word written at a clock
// edge is stored at that edge; a read address presented with re high is
// registered and its word appears on rdata after the edge. rdata holds its
// value while re is low. The size and the port organisation follow the source
// architecture, which used a 2K x 8 macro; here it is an array.
module ph_ram #(
  parameter int DEPTH = 2048,
  parameter int WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
