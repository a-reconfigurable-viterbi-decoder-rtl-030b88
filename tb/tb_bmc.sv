// tb_bmc: checks the branch metric calculator against an integer reference:
// metric(c) = sum over i < n of (c_i ? -r_i : r_i), for random symbols, every
// code word and every rate from 1/2 to 1/5, plus the extreme symbol values.
module tb_bmc;
  import viterbi_pkg::*;
  sym_t sym [MAX_N];
  logic [2:0] rate_n;
  bm_t bm [NUM_CW];
  int checks = 0, failures = 0;

  bmc dut (.*);

  task automatic check_all();
    for (int c = 0; c < NUM_CW; c++) begin
      int exp = 0;
      for (int i = 0; i < int'(rate_n); i++) exp += c[i] ? -int'(sym[i]) : int'(sym[i]);
      checks++;
      if (int'(bm[c]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL rate %0d cw %0d: got %0d exp %0d", rate_n, c, bm[c], exp);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < MAX_N; i++) sym[i] = sym_t'($urandom);
      rate_n = 3'(2 + (t % 4));
      #1 check_all();
    end
    for (int v = 0; v < 2; v++) begin
      for (int i = 0; i < MAX_N; i++) sym[i] = v ? sym_t'(-8) : sym_t'(7);
      rate_n = 3'd5;
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
