// viterbi_pkg: types and constants shared by the reconfigurable Viterbi decoder.
//
// The decoder runs one of four trellises, selected by mode_t. The mode order is
// that of the buffer configuration table of the address generators: constraint
// length 9 (256 states, e.g. 3GPP/CDMA2000), 5 (16 states, GSM), 7 (64 states,
// IS-95/802.16) and 6 (32 states, IS-54). For each mode the package gives the
// number of trellis states, the number of 8-state segments (one per clock cycle
// of the forward processor), the traceback window length WL = 6K, and the
// tri-state buffer enables and shift amount that map a segment/stage counter
// pair onto a path-history RAM address.
//
// Metric widths (soft symbol 4 bits, branch metric 7 bits, path metric 12
// bits with modulo comparison) are this design's choice except for the 4-bit
// soft input, which follows the source architecture.
package viterbi_pkg;

  localparam int NUM_ACS    = 8;    // ACS units, 8 states per cycle
  localparam int MAX_STATES = 256;  // K = 9
  localparam int MAX_SEGS   = MAX_STATES / NUM_ACS;  // 32
  localparam int SYM_W      = 4;    // soft symbol, signed 4Q2
  localparam int MAX_N      = 5;    // up to rate 1/5
  localparam int NUM_CW     = 1 << MAX_N;  // code words the BMC scores
  localparam int BM_W       = 7;    // signed, holds +-40
  localparam int PM_W       = 12;   // path metric, compared modulo 2^PM_W
  localparam int CW_W       = MAX_N;       // code word select per ACS
  localparam int NUM_IRAM   = 4;    // input (configuration) RAMs
  localparam int IRAM_W     = 2 * CW_W;    // two ACS selects per RAM word
  localparam int PH_AW      = 11;   // 2K x 8 path-history RAMs
  localparam int PH_W       = 8;
  localparam int NUM_PHRAM  = 4;
  localparam int INIT_PENALTY = 256; // start metric of states other than 0

  typedef enum logic [1:0] {
    MODE_K9 = 2'd0,
    MODE_K5 = 2'd1,
    MODE_K7 = 2'd2,
    MODE_K6 = 2'd3
  } mode_t;

  typedef logic signed [SYM_W-1:0] sym_t;
  typedef logic signed [BM_W-1:0]  bm_t;
  typedef logic        [PM_W-1:0]  pm_t;

  // Address network configuration: buf_en[0] is B1 ... buf_en[7] is B8.
  typedef struct packed {
    logic [7:0] buf_en;
    logic [2:0] sh;
  } addr_cfg_t;

  function automatic int unsigned k_of(mode_t m);
    case (m)
      MODE_K9: return 9;
      MODE_K5: return 5;
      MODE_K7: return 7;
      default: return 6;
    endcase
  endfunction

  // Segments per stage = 2^(K-1) / 8; a power of two from 2 to 32.
  function automatic logic [5:0] segs_of(mode_t m);
    return 6'(1 << (k_of(m) - 4));
  endfunction

  // Window length: six constraint lengths.
  function automatic logic [5:0] wl_of(mode_t m);
    return 6'(6 * k_of(m));
  endfunction

  // Mask of valid state bits (K-1 bits).
  function automatic logic [7:0] state_mask(mode_t m);
    return 8'((1 << (k_of(m) - 1)) - 1);
  endfunction

  // Buffer enables and left shift per mode.
  function automatic addr_cfg_t addr_cfg(mode_t m);
    case (m)
      MODE_K9: return '{buf_en: 8'b0000_1111, sh: 3'd4};  // B1-B4
      MODE_K5: return '{buf_en: 8'b1111_0000, sh: 3'd0};  // B5-B8
      MODE_K7: return '{buf_en: 8'b0011_1100, sh: 3'd2};  // B3-B6
      default: return '{buf_en: 8'b0111_1000, sh: 3'd1};  // B4-B7
    endcase
  endfunction

endpackage
