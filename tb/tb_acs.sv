// tb_acs: checks the add-compare-select unit: the larger of the two sums wins
// (ties to the even predecessor), decision = 1 when the odd one wins, and the
// comparison stays correct when the metrics wrap around 2^PM_W.
module tb_acs;
  import viterbi_pkg::*;
  pm_t pm_even, pm_odd, pm_new;
  bm_t bm_even, bm_odd;
  logic decision;
  int checks = 0, failures = 0;

  acs dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int base, de, se, so;
      bit exp_d;
      base = int'($urandom_range(4095));
      de = int'($urandom_range(600)) - 300;
      bm_even = bm_t'(int'($urandom_range(80)) - 40);
      bm_odd  = bm_t'(int'($urandom_range(80)) - 40);
      if (t % 50 == 0) bm_odd = bm_even;
      if (t % 50 == 0) de = 0;
      pm_even = pm_t'(base);
      pm_odd  = pm_t'(base + de);
      // true (unwrapped) sums relative to base
      se = int'(bm_even);
      so = de + int'(bm_odd);
      exp_d = so > se;
      #1;
      checks++;
      if (decision !== exp_d || pm_new !== pm_t'(base + (exp_d ? so : se))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d d=%0b exp %0b", t, decision, exp_d);
      end
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
