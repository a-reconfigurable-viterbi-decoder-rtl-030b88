// bmc: branch metric calculator.
//
// Scores every possible code word of a rate-1/n code (n = rate_n, 2..5) against
// one trellis stage's soft input symbols. Code word bit i is the expected value
// of code bit i; a positive soft symbol stands for a 0. The metric is the
// correlation sum_i (c_i ? -r_i : +r_i), which ranks code words exactly as the
// squared Euclidean distance does and is maximised by the ACS units. Symbols at
// positions i >= rate_n add nothing, so one table of 32 metrics serves every
// rate from 1/2 to 1/5.
//
// The soft input format (4-bit signed, two fractional bits) follows the source
// architecture; the correlation form and the masking of unused symbols are this
// design's choices. Purely combinational.
module bmc
  import viterbi_pkg::*;
(
  input  sym_t       sym   [MAX_N],
  input  logic [2:0] rate_n,
  output bm_t        bm    [NUM_CW]
);

  always_comb begin
    for (int c = 0; c < NUM_CW; c++) begin
      bm_t acc;
      acc = '0;
      for (int i = 0; i < MAX_N; i++) begin
        if (i < int'(rate_n)) begin
          if (c[i]) acc = acc - bm_t'(sym[i]);
          else      acc = acc + bm_t'(sym[i]);
        end
      end
      bm[c] = acc;
    end
  end

endmodule
