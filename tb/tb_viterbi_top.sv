// tb_viterbi_top: end-to-end test of the decoder at its default size.
//
// For each of several trellises (K = 9 rate 1/2, 1/3 and 1/4, K = 5 rate 1/2
// and 1/5, K = 7, K = 6) the bench encodes random bits with a reference
// convolutional encoder, turns the code bits into noisy 4-bit soft symbols
// with a few strongly wrong symbols, feeds them with random input stalls and
// compares the decoded bits with the sent bits. The configuration RAM
// contents are computed from the generator polynomials; some runs load them
// before start, the others load them during the first trellis stage, the
// dynamic switch-over. One run is abandoned mid-stream and the next start
// must recover from it. Also checked: one stage per 2^(K-1)/8 cycles, the
// first decoded bit exactly three windows plus two cycles after the first
// symbol, and that every mechanism (mode switch, dynamic load, stall, period
// ring wrap, error correction, mid-stream restart) happened.
module tb_viterbi_top;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  mode_t mode = MODE_K9;
  logic [2:0] rate_n = 3'd2;
  logic in_valid = 0, in_ready;
  sym_t in_sym [MAX_N];
  logic [NUM_IRAM-1:0] cfg_we = '0;
  logic [4:0] cfg_addr = '0;
  logic [IRAM_W-1:0] cfg_wdata [NUM_IRAM];
  logic [4:0] fp_seg;
  logic fp_busy, fp_first_stage, cfg_bypass, dec_valid, dec_bit;
  logic [5:0] dec_pos;

  viterbi_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_abort = 0, n_mode_switch = 0, n_dyn_bypass = 0, n_stall = 0, n_wrap = 0, n_corrected = 0;

  // reference data
  localparam int MAXBITS = 54 * 12;
  logic info [MAXBITS];
  logic got  [MAXBITS];
  logic seen [MAXBITS];
  logic [IRAM_W-1:0] rows [MAX_SEGS][NUM_IRAM];
  logic dyn_load = 0;

  // decoded-output collector: B1 emits positions WL-1..0 of one window
  int out_win = 0, wl_cur = 54;
  int first_dec_cyc = -1;
  always @(posedge clk) begin
    if (dec_valid) begin
      if (first_dec_cyc < 0) first_dec_cyc = cyc;
      if (out_win * wl_cur + int'(dec_pos) < MAXBITS) begin
        got[out_win * wl_cur + int'(dec_pos)]  = dec_bit;
        seen[out_win * wl_cur + int'(dec_pos)] = 1'b1;
      end
      if (dec_pos == 0) out_win++;
    end
    if (cfg_bypass) n_dyn_bypass++;
  end

  // dynamic loading: write the row the forward processor reads this cycle
  always @(negedge clk) begin
    if (dyn_load) begin
      if (fp_busy && fp_first_stage) begin
        cfg_we   <= '1;
        cfg_addr <= fp_seg;
        for (int r = 0; r < NUM_IRAM; r++) cfg_wdata[r] <= rows[fp_seg][r];
      end else begin
        cfg_we <= '0;
      end
    end
  end

  function automatic logic parity(int unsigned v);
    return ^v;
  endfunction

  // Rows of the configuration RAMs for a code: ACS a in segment t handles
  // target state j = 8t+a; the branch from predecessor 2j carries input
  // bit j[K-2] with encoder register {u, 2j mod N}.
  task automatic make_rows(int k, int n, int unsigned g[MAX_N]);
    int ns = 1 << (k - 1);
    for (int t = 0; t < MAX_SEGS; t++)
      for (int r = 0; r < NUM_IRAM; r++) rows[t][r] = '0;
    for (int t = 0; t < ns / 8; t++) begin
      for (int a = 0; a < NUM_ACS; a++) begin
        int j = 8 * t + a;
        int unsigned p0 = (2 * j) % ns;
        int unsigned u  = (j >> (k - 2)) & 1;
        int unsigned rg = (u << (k - 1)) | p0;
        logic [CW_W-1:0] cw = '0;
        for (int i = 0; i < n; i++) cw[i] = parity(g[i] & rg);
        rows[t][a / 2][(a % 2) * CW_W +: CW_W] = cw;
      end
    end
  endtask

  task automatic static_load(int k);
    for (int t = 0; t < (1 << (k - 1)) / 8; t++) begin
      @(negedge clk);
      cfg_we = '1;
      cfg_addr = 5'(t);
      for (int r = 0; r < NUM_IRAM; r++) cfg_wdata[r] = rows[t][r];
    end
    @(negedge clk);
    cfg_we = '0;
  endtask

  function automatic sym_t soft_sym(logic c, bit strong_error);
    int v;
    if (strong_error) v = c ? 3 : -3;
    else v = (c ? -4 : 4) + int'($urandom_range(4)) - 2;
    if (v > 7) v = 7;
    if (v < -8) v = -8;
    return sym_t'(v);
  endfunction

  // One complete decode: nwin data windows plus two tail windows.
  task automatic run(string name, mode_t m, int k, int n, int unsigned g[MAX_N], bit dynamic, int nwin,
                    int stop_after = -1);
    int wl = 6 * k, segs = (1 << (k - 1)) / 8;
    int unsigned st = 0;
    int nbits = (nwin + 2) * wl;
    int errs = 0, n_err_sym = 0;
    int last_acc = -1, stage_fail = 0, first_acc = -1;
    bit gap;

    make_rows(k, n, g);
    if (!dynamic) static_load(k);
    @(negedge clk);
    mode = m; rate_n = 3'(n); start = 1;
    dyn_load = dynamic;
    @(negedge clk);
    start = 0;
    n_mode_switch++;
    out_win = 0; wl_cur = wl; first_dec_cyc = -1;
    for (int i = 0; i < MAXBITS; i++) begin seen[i] = 0; got[i] = 0; end

    for (int s = 0; s < nbits; s++) begin
      int unsigned rg;
      info[s] = (s < nwin * wl) ? 1'($urandom) : 1'b0;
      rg = (int'(info[s]) << (k - 1)) | st;
      st = rg >> 1;
      // no stalls in the first three windows, so the latency check is exact
      gap = (s >= 3 * wl) && ($urandom_range(15) == 0);
      if (gap) begin
        repeat ($urandom_range(3, 1)) begin
          @(negedge clk);
          in_valid = 0;
        end
        n_stall++;
      end
      for (int i = 0; i < MAX_N; i++) begin
        bit se = (i == 0) && (s % 23 == 11);
        if (se) n_err_sym++;
        in_sym[i] = (i < n) ? soft_sym(parity(g[i] & rg), se) : sym_t'(0);
      end
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      if (first_acc < 0) first_acc = cyc;
      if (last_acc >= 0 && !gap && cyc - last_acc != segs) stage_fail++;
      last_acc = cyc;
      @(negedge clk);
      in_valid = 0;
      if (s == stop_after) begin
        // abandoned mid-stream: the next run's start must recover from here
        dyn_load = 0;
        n_abort++;
        $display("%s: abandoned after %0d stages", name, s + 1);
        return;
      end
    end
    // let the last traceback pass run out
    repeat (wl * segs + 3 * wl) @(negedge clk);
    dyn_load = 0;

    checks++;
    if (stage_fail != 0) begin
      failures++;
      $display("FAIL %s: %0d stages did not take %0d cycles", name, stage_fail, segs);
    end
    checks++;
    if (first_dec_cyc - first_acc != 3 * wl * segs + 2) begin
      failures++;
      $display("FAIL %s: first decoded bit after %0d cycles, expected %0d", name,
               first_dec_cyc - first_acc, 3 * wl * segs + 2);
    end
    for (int i = 0; i < nwin * wl; i++) begin
      checks++;
      if (!seen[i] || got[i] !== info[i]) begin
        errs++;
        failures++;
      end
    end
    if (out_win >= 4) n_wrap++;
    if (errs == 0 && n_err_sym > 0) n_corrected++;
    $display("%s: %0d bits, %0d wrong, %0d strong symbol errors, %0d windows out", name, nwin * wl, errs, n_err_sym, out_win);
  endtask

  int unsigned g[MAX_N];

  initial begin
    for (int i = 0; i < MAX_N; i++) in_sym[i] = '0;
    for (int r = 0; r < NUM_IRAM; r++) cfg_wdata[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    g = '{'o753, 'o561, 0, 0, 0};             run("K9 r1/2 static",  MODE_K9, 9, 2, g, 0, 8);
    g = '{'o753, 'o561, 0, 0, 0};             run("K9 r1/2 abandoned", MODE_K9, 9, 2, g, 0, 8, 130);
    g = '{'o23, 'o33, 0, 0, 0};               run("K5 r1/2 dynamic", MODE_K5, 5, 2, g, 1, 6);
    g = '{'o171, 'o133, 0, 0, 0};             run("K7 r1/2 static",  MODE_K7, 7, 2, g, 0, 5);
    g = '{'o53, 'o75, 0, 0, 0};               run("K6 r1/2 dynamic", MODE_K6, 6, 2, g, 1, 5);
    g = '{'o557, 'o663, 'o711, 0, 0};         run("K9 r1/3 dynamic", MODE_K9, 9, 3, g, 1, 3);
    g = '{'o23, 'o33, 'o25, 'o37, 'o35};      run("K5 r1/5 dynamic", MODE_K5, 5, 5, g, 1, 4);
    g = '{'o765, 'o671, 'o513, 'o473, 0};     run("K9 r1/4 static",  MODE_K9, 9, 4, g, 0, 2);

    checks++; if (n_mode_switch < 2) begin failures++; $display("FAIL: no mode switch"); end
    checks++; if (n_dyn_bypass == 0) begin failures++; $display("FAIL: no dynamic configuration load"); end
    checks++; if (n_abort == 0) begin failures++; $display("FAIL: no restart mid-stream"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL: no input stall"); end
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL: period ring never wrapped"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL: no symbol errors corrected"); end
    $display("mechanisms: mid-stream restarts %0d, mode switches %0d, dynamic bypass cycles %0d, stalls %0d, ring wraps %0d, runs with corrected errors %0d",
             n_abort, n_mode_switch, n_dyn_bypass, n_stall, n_wrap, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
