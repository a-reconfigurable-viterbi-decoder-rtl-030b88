// ph_memory: path-history memory, four 2K x 8 RAMs holding one traceback
// window each.
//
// The RAM roles rotate with the window period p (0..3) of the state machine:
//   RAM p       written by the forward processor (current window),
//   RAM p-1     read by the dummy traceback processor B2 (last window),
//   RAM p+1     read by the decoding traceback processor B1 (window p-3),
//   RAM p+2     idle,
// all indices modulo 4. For p = 0 this is: write RAM 1, B1 reads RAM 2, idle
// RAM 3, B2 reads RAM 4 (RAMs numbered from 1), as in the source schedule.
//
// Reads are synchronous: the data of an address issued with rd_en appears on
// b1_data/b2_data one cycle later, routed by the period in which the address
// was issued. The rotation follows the source architecture.
module ph_memory
  import viterbi_pkg::*;
(
  input  logic             clk,
  input  logic [1:0]       period,
  input  logic             wr_en,
  input  logic [PH_AW-1:0] wr_addr,
  input  logic [PH_W-1:0]  wr_data,
  input  logic             rd_en,
  input  logic [PH_AW-1:0] b1_addr,
  input  logic [PH_AW-1:0] b2_addr,
  output logic [PH_W-1:0]  b1_data,
  output logic [PH_W-1:0]  b2_data
);

  logic [PH_W-1:0]  rdata [NUM_PHRAM];
  logic [PH_AW-1:0] raddr [NUM_PHRAM];
  logic [1:0]       b1_ram, b2_ram, b1_ram_q, b2_ram_q;

  assign b1_ram = period + 2'd1;
  assign b2_ram = period - 2'd1;

  for (genvar r = 0; r < NUM_PHRAM; r++) begin : g_ram
    assign raddr[r] = (2'(r) == b1_ram) ? b1_addr : b2_addr;
    ph_ram #(.DEPTH(1 << PH_AW), .WIDTH(PH_W)) u_ram (
      .clk   (clk),
      .we    (wr_en && (2'(r) == period)),
      .waddr (wr_addr),
      .wdata (wr_data),
      .re    (rd_en && (2'(r) == b1_ram || 2'(r) == b2_ram)),
      .raddr (raddr[r]),
      .rdata (rdata[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      b1_ram_q <= b1_ram;
      b2_ram_q <= b2_ram;
    end
  end

  assign b1_data = rdata[b1_ram_q];
  assign b2_data = rdata[b2_ram_q];

endmodule
