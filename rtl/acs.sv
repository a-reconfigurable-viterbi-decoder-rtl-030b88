// acs: add-compare-select unit.
//
// Target state j of the trellis has the two predecessors 2j and 2j+1 (modulo
// the number of states). The unit adds each predecessor's path metric to the
// metric of its branch and keeps the larger sum. The decision bit is 1 when the
// odd predecessor 2j+1 wins; it is the bit a traceback shifts back in to
// recover that predecessor. Ties go to the even predecessor.
//
// The maximum rule follows the source architecture's butterfly. Metrics are
// unsigned PM_W-bit values that are allowed to wrap: the comparison looks at
// the sign of the difference, so no normalisation is needed as long as all
// metrics of a stage stay within 2^(PM_W-1) of each other (this design's
// choice). Purely combinational.
module acs
  import viterbi_pkg::*;
(
  input  pm_t  pm_even,
  input  pm_t  pm_odd,
  input  bm_t  bm_even,
  input  bm_t  bm_odd,
  output pm_t  pm_new,
  output logic decision
);

  pm_t sum_even, sum_odd, diff;

  always_comb begin
    sum_even = pm_even + {{(PM_W-BM_W){bm_even[BM_W-1]}}, bm_even};
    sum_odd  = pm_odd  + {{(PM_W-BM_W){bm_odd[BM_W-1]}}, bm_odd};
    diff     = sum_odd - sum_even;
    decision = !diff[PM_W-1] && (diff != '0);
    pm_new   = decision ? sum_odd : sum_even;
  end

endmodule
