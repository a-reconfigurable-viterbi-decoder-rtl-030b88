// bm_switch: switching network that hands each ACS unit its branch metrics.
//
// Four input RAMs are read at the segment the forward processor is working on.
// RAM r holds the selects of ACS 2r (low half of the word) and ACS 2r+1 (high
// half). A select c names the code word on the branch from the even
// predecessor 2j of the ACS unit's target state j; the branch from the odd
// predecessor 2j+1 carries the complementary code word ~c. This holds for any
// code whose generator polynomials all have their first and last taps set,
// which is the case for every standard code this decoder targets. The selected
// metrics are taken from the 32-entry table of the branch metric calculator.
//
// Asynchronous read path from seg/bm to bm_even/bm_odd; RAM writes on clk.
// cfg_bypass reports a cycle in which a configuration word was read while it
// was being written (dynamic switch-over).
module bm_switch
  import viterbi_pkg::*;
(
  input  logic                 clk,
  input  logic [4:0]           seg,
  input  bm_t                  bm        [NUM_CW],
  input  logic [NUM_IRAM-1:0]  cfg_we,
  input  logic [4:0]           cfg_addr,
  input  logic [IRAM_W-1:0]    cfg_wdata [NUM_IRAM],
  output bm_t                  bm_even   [NUM_ACS],
  output bm_t                  bm_odd    [NUM_ACS],
  output logic                 cfg_bypass
);

  logic [IRAM_W-1:0] word [NUM_IRAM];
  logic [NUM_IRAM-1:0] byp;

  for (genvar r = 0; r < NUM_IRAM; r++) begin : g_ram
    input_ram #(.DEPTH(MAX_SEGS), .WIDTH(IRAM_W)) u_ram (
      .clk    (clk),
      .we     (cfg_we[r]),
      .waddr  (cfg_addr),
      .wdata  (cfg_wdata[r]),
      .raddr  (seg),
      .rdata  (word[r]),
      .bypass (byp[r])
    );
  end

  assign cfg_bypass = |byp;

  always_comb begin
    for (int a = 0; a < NUM_ACS; a++) begin
      logic [CW_W-1:0] cw;
      cw         = word[a / 2][(a % 2) * CW_W +: CW_W];
      bm_even[a] = bm[cw];
      bm_odd[a]  = bm[~cw];
    end
  end

endmodule
