// tb_bm_switch: loads random code word selects into the four configuration
// RAMs and random branch metrics, then checks for every segment that ACS a
// gets bm[c] on its even branch and bm[~c] on its odd branch, with c taken
// from RAM a/2, half a%2. Also checks that a word written in the cycle it is
// read is used at once.
module tb_bm_switch;
  import viterbi_pkg::*;
  logic clk = 0;
  logic [4:0] seg = '0;
  bm_t bm [NUM_CW];
  logic [NUM_IRAM-1:0] cfg_we = '0;
  logic [4:0] cfg_addr = '0;
  logic [IRAM_W-1:0] cfg_wdata [NUM_IRAM];
  bm_t bm_even [NUM_ACS];
  bm_t bm_odd [NUM_ACS];
  logic cfg_bypass;
  logic [CW_W-1:0] sel [MAX_SEGS][NUM_ACS];
  int checks = 0, failures = 0;

  bm_switch dut (.*);
  always #5 clk = ~clk;

  task automatic check_seg(int t);
    seg = 5'(t);
    #1;
    for (int a = 0; a < NUM_ACS; a++) begin
      logic [CW_W-1:0] c = sel[t][a];
      checks++;
      if (bm_even[a] !== bm[c] || bm_odd[a] !== bm[~c]) begin
        failures++;
        if (failures < 10) $display("FAIL seg %0d acs %0d", t, a);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NUM_CW; c++) bm[c] = bm_t'($urandom_range(80) - 40);
    for (int t = 0; t < MAX_SEGS; t++) begin
      @(negedge clk);
      cfg_we = '1; cfg_addr = 5'(t);
      for (int a = 0; a < NUM_ACS; a++) sel[t][a] = CW_W'($urandom);
      for (int r = 0; r < NUM_IRAM; r++) cfg_wdata[r] = {sel[t][2*r+1], sel[t][2*r]};
    end
    @(negedge clk);
    cfg_we = '0;
    for (int t = 0; t < MAX_SEGS; t++) check_seg(t);
    // dynamic: rewrite each segment while reading it
    for (int t = 0; t < MAX_SEGS; t++) begin
      @(negedge clk);
      cfg_we = '1; cfg_addr = 5'(t);
      for (int a = 0; a < NUM_ACS; a++) sel[t][a] = CW_W'($urandom);
      for (int r = 0; r < NUM_IRAM; r++) cfg_wdata[r] = {sel[t][2*r+1], sel[t][2*r]};
      check_seg(t);
      checks++;
      if (!cfg_bypass) begin failures++; $display("FAIL no bypass flag"); end
    end
    @(negedge clk);
    cfg_we = '0;
    for (int t = 0; t < MAX_SEGS; t++) check_seg(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
