// pm_memory: path (state) metric memory of the forward processor.
//
// Two banks of 32 rows; a row holds the metrics of 8 consecutive states
// (row r = states 8r..8r+7). During a trellis stage one bank is read and the
// other written, and the roles swap every stage (rd_bank). Two read ports give
// the 16 predecessor metrics of one segment: port 1 reads row 2t, port 2 row
// 2t+1, feeding ACS 0-3 and ACS 4-7. The write port stores the 8 new metrics
// of segment t in the other bank.
//
// While init is high (the first stage after a start) the read ports return the
// start metrics instead of the bank contents: 0 for state 0 and -INIT_PENALTY
// for all others, since the encoder starts in state 0.
//
// The banked, dual-read/single-write organisation follows the source
// architecture, which used SRAM macros; here the banks are arrays with
// asynchronous read and synchronous write, and the init substitution is this
// design's choice.
module pm_memory
  import viterbi_pkg::*;
#(
  parameter int ROWS = 32
) (
  input  logic                    clk,
  input  logic                    rd_bank,
  input  logic                    init,
  input  logic [$clog2(ROWS)-1:0] rd_row1,
  input  logic [$clog2(ROWS)-1:0] rd_row2,
  output pm_t                     rd_data1 [NUM_ACS],
  output pm_t                     rd_data2 [NUM_ACS],
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  pm_t                     wr_data  [NUM_ACS]
);

  pm_t bank0 [ROWS][NUM_ACS];
  pm_t bank1 [ROWS][NUM_ACS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < NUM_ACS; i++) begin
        if (rd_bank) bank0[wr_row][i] <= wr_data[i];
        else         bank1[wr_row][i] <= wr_data[i];
      end
    end
  end

  function automatic pm_t start_metric(logic [$clog2(ROWS)-1:0] row, int lane);
    return (row == '0 && lane == 0) ? pm_t'(0) : pm_t'(-INIT_PENALTY);
  endfunction

  always_comb begin
    for (int i = 0; i < NUM_ACS; i++) begin
      if (init) begin
        rd_data1[i] = start_metric(rd_row1, i);
        rd_data2[i] = start_metric(rd_row2, i);
      end else if (rd_bank) begin
        rd_data1[i] = bank1[rd_row1][i];
        rd_data2[i] = bank1[rd_row2][i];
      end else begin
        rd_data1[i] = bank0[rd_row1][i];
        rd_data2[i] = bank0[rd_row2][i];
      end
    end
  end

endmodule
