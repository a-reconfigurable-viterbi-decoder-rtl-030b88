# Reconfigurable Viterbi decoder with eight ACS units

This is a soft-decision Viterbi decoder for convolutional codes. One piece of
hardware serves several standards. It can be switched at run time between
constraint lengths 9, 7, 6 and 5 (256, 64, 32 and 16 trellis states) and code
rates 1/2 to 1/5, with any generator polynomials. The polynomials are not
hard-wired: a small configuration RAM tells the datapath which branch metric
belongs to which trellis branch.

The design does not give each state its own add-compare-select (ACS) unit, and
it does not serve all states with one unit either. It sits between the two:
**eight ACS units handle eight target states per clock cycle**. One trellis
stage therefore takes 2^(K-1)/8 cycles: 32 cycles for K = 9 and 2 for K = 5.
Survivors are recovered by windowed traceback with two traceback processors.
A dummy processor finds a reliable start state, and a decoding processor then
emits the bits.

| Mode (`mode_t`) | K | States | Cycles per decoded bit | Window WL = 6K | Typical standards |
|---|---|---|---|---|---|
| `MODE_K9` | 9 | 256 | 32 | 54 | W-CDMA, CDMA2000, UMTS |
| `MODE_K5` | 5 | 16 | 2 | 30 | GSM, PDC |
| `MODE_K7` | 7 | 64 | 8 | 42 | IS-95, IEEE 802.16 |
| `MODE_K6` | 6 | 32 | 4 | 36 | IS-54 |

The target clock of the source architecture is 20 MHz. At that clock K = 9
decodes 625 kbit/s and K = 5 decodes 10 Mbit/s.

## Trellis convention

All blocks use one state numbering, and the configuration RAM contents depend
on it, so it comes first. State s has K-1 bits. The newest input bit is the
most significant bit:

    encoder register  = {u, s}          (K bits, u = current input bit)
    next state        = {u, s[K-2:1]}
    code bit i        = parity(g_i & {u, s})

Here g_i is the generator polynomial written as a K-bit number, for example
octal 753 and 561 for K = 9. A target state j therefore has the two
predecessors 2j and 2j+1 (mod 2^(K-1)), and the input bit that led into j is
its top bit j[K-2]. An ACS unit's decision bit D is 1 when predecessor 2j+1
wins. Tracing back one stage is then a shift: S_prev = {S[K-3:0], D}.

## Forward processor: eight states per cycle

In each cycle the forward processor handles one **segment**: target states
8t .. 8t+7.

* `bmc` scores all 32 five-bit code words against the stage's soft symbols. It
  uses the correlation metric `sum(c_i ? -r_i : +r_i)`; larger is better.
  Symbols beyond the code rate count as zero, so a single 32-entry table serves
  every rate.
* `bm_switch` reads the four configuration RAMs (`input_ram`) at address t.
  It hands each ACS unit the metrics of its two branches.
* `pm_memory` has two banks of 32 rows of 8 path metrics. Read port 1 returns
  row 2t and read port 2 returns row 2t+1 (mod segments), which are the 16
  predecessors 16t .. 16t+15. ACS 0-3 take their pairs from port 1 and ACS 4-7
  from port 2. The 8 new metrics go to row t of the other bank, and the banks
  swap after every stage. For K = 9 a bank is filled in 32 cycles; for K = 5 it
  takes 2.
* The 8 decision bits go to the path-history RAM of the current window.
* Path metrics are 12-bit values that are allowed to wrap. `acs` compares them
  by the sign of their difference, so no normalisation is needed. In the first
  stage after `start`, the metric memory supplies start metrics instead of its
  contents: 0 for state 0 and -256 for all other states.

### Programming a code into the configuration RAMs

Word r of configuration address t holds two code words:

* bits 4:0 hold the code word of ACS 2r's branch from predecessor 2j;
* bits 9:5 hold the same for ACS 2r+1.

Here j = 8t + a is the target state of ACS a. The code word bits are

    c_i = parity(g_i & {j[K-2], (2j mod 2^(K-1))})     for i < n

The branch from the odd predecessor 2j+1 uses the complement ~c. This is
correct when every generator has its first and last taps set. All the standard
codes listed above meet that condition. Only addresses 0 .. 2^(K-1)/8 - 1 are
used. `tb/tb_viterbi_top.sv` (`make_rows`) computes the table this way.

The RAMs can be loaded before `start`. They can also be loaded *dynamically*
during the first trellis stage after `start`. In the cycle in which `fp_seg`
equals t and `fp_busy` and `fp_first_stage` are high, write row t. The read of
that row returns the word being written (write-through), and `cfg_bypass`
pulses. After that stage the rows are stored and only read. A new trellis can
therefore take over with no separate loading phase.

## Path history and reconfigurable addressing

Decisions are kept in four 2K x 8 RAMs (`ph_ram`, grouped in `ph_memory`), one
traceback window per RAM. Each trellis stage occupies 2^(K-1)/8 consecutive
rows, one row per segment. The row address is C * segments + U, where C is the
stage within the window and U is the segment. The address is not built with a
multiplier. A counter/shifter/buffer network forms it instead:

* `ph_write_addr_gen` has a 5-bit segment counter U and a 6-bit stage counter
  C. Each counter wraps at its mode-dependent terminal count (segments and WL).
  C counts once per U wrap.
* `addr_shifter` forms `{4'b0, C} << SH`.
* `addr_buffers` is the buffer network B1-B8:
  * address bits 10:5 are shifter bits 9:4;
  * address bit 0 is U0;
  * address bits 4:1 come either from U4..U1 (through B1..B4) or from shifter
    bits 3:0 (through B5..B8).

| K | B1 B2 B3 B4 | B5 B6 B7 B8 | SH | Address |
|---|---|---|---|---|
| 9 | on on on on | off off off off | 4 | C5..C0 U4..U0 |
| 5 | off off off off | on on on on | 0 | 0000 C5..C0 U0 |
| 7 | off off on on | on on off off | 2 | 00 C5..C0 U2 U1 U0 |
| 6 | off off off on | on on on off | 1 | 000 C5..C0 U1 U0 |

In the source architecture the buffers are tri-state drivers onto the address
bus. Here they are AND-OR gates. The function is the same, because no mode
turns on both buffers of a bit.

A window uses 1728, 60, 336 or 144 of the 2048 rows of each RAM, for K = 9, 5,
7 and 6.

## Windowed traceback and the four-period schedule

The decoder works in windows of WL stages. `viterbi_fsm` cycles through four
periods, 0-L, L-2L, 2L-3L and 3L-4L. Each period lasts as long as the forward
processor takes to fill one window.

| Period | RAM 1 | RAM 2 | RAM 3 | RAM 4 |
|---|---|---|---|---|
| 0-L   | write FP | read B1 | idle | read B2 |
| L-2L  | read B2 | write FP | read B1 | idle |
| 2L-3L | idle | read B2 | write FP | read B1 |
| 3L-4L | read B1 | idle | read B2 | write FP |

At the start of each period both traceback processors (`traceback_proc`) are loaded:

* **B2 (dummy)** starts from state 0 at the end of the window just written. It
  traces that window back. After WL stages its state is reliable regardless of
  where it started.
* **B1 (decoding)** starts from the state B2 reached in the *previous* period.
  That state is the survivor state at the end of the window written three
  periods ago. B1 traces that window back and outputs its top state bit at
  every stage.

The first decoded bit therefore appears three windows after the first
symbol. Precisely, it appears 3 * WL * segments + 2 cycles after the first
symbols are accepted, when the input is never stalled.

B1 and B2 share a single 6-bit down counter and shifter (`traceback_addr_gen`).
Each has its own buffer set that adds its own segment bits. M1 in `traceback_proc`
picks the decision bit with the three low state bits.

The PH RAMs are synchronous, so the data of a row arrives one cycle after its
address. The address is therefore formed from the *next* value of the counter
and of each state register. With this, a traceback pass takes WL + 1 cycles:
one load cycle, then one stage per cycle. This matters for K = 5, where a whole
window period is only 60 cycles long. An assertion in `viterbi_fsm` checks that
a pass always ends before the next window does.

## Interface and timing (`viterbi_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `mode`, `rate_n` | in | restart with a new trellis. `mode` and `rate_n` (2..5) are latched. Periods, counters and metrics restart. |
| `in_valid`, `in_ready`, `in_sym[5]` | in/out/in | one set of soft symbols per trellis stage. Each is signed 4-bit (two fractional bits). Positive means code bit 0. Symbols at index >= `rate_n` are ignored. |
| `cfg_we[4]`, `cfg_addr`, `cfg_wdata[4]` | in | write port of the four configuration RAMs |
| `fp_seg`, `fp_busy`, `fp_first_stage` | out | segment being processed, for dynamic loading |
| `cfg_bypass` | out | a configuration word was used in the cycle it was written |
| `dec_valid`, `dec_bit`, `dec_pos` | out | decoded bit and its stage number within its window |

* **Rate:** a symbol set is accepted in the last cycle of the previous stage.
  A continuous stream therefore runs at exactly one stage per 2^(K-1)/8 cycles.
* **Output order:** each window's bits come out last stage first. `dec_pos`
  runs WL-1 down to 0, and a window is complete when `dec_pos` reaches 0. The
  consumer puts bit `dec_pos` of the n-th window at position n * WL + `dec_pos`.
* **Flushing:** the bits of window w come out after window w+2 has been
  written. To flush the last data window, feed two more windows of symbols, for
  example for tail bits.
* `start` can be given at any time. It abandons the current stream.

## Departures from the source architecture and limits

* **Configuration RAM width.** Each configuration RAM word is 10 bits (two
  5-bit code words) so that rate 1/5 works. The source architecture uses
  32 x 8 RAMs. That width matches 4-bit code words, which would limit the
  decoder to rate 1/4. Changing `MAX_N` in `viterbi_pkg` to 4 gives that
  variant.
* **Complement rule.** The odd-predecessor branch always uses the complemented
  code word (see above). A code whose polynomials lack an end tap would need
  both code words stored.
* **Traceback switches B9-B11.** The source describes B9-B11 between the state
  flip-flops only for K = 9 (all on) and K = 5 (all off). Here they are
  replaced by a mask that keeps state bits above K-2 at zero.
* **Traceback addressing.** As described above, addresses come from next-state
  values so that a traceback step takes one cycle.
* **Left to the designer.** The source gives no values for these, and they are
  this design's choices: the path-metric width and wrap-around comparison, the
  start metrics, the metric form (correlation instead of Euclidean distance,
  which ranks identically), the valid/ready handshake, `start`, and the
  reversed output order.
* **Memories.** All memories are plain arrays: path metrics and configuration
  with asynchronous read, path history with synchronous read. In an ASIC they
  would be replaced by SRAM macros of the same organisation.
* **Not included:** clock gating of idle blocks. The surrounding turbo-decoder
  array is also not included (interleaver, LLR calculator, further BMCs and
  reverse processors). In the source platform those parts share the input RAMs
  and the metric RAMs with this decoder.

Storage at the default size: 65536 bits of path history, 6144 bits of path
metrics and 1280 configuration bits, plus about 80 flip-flops of control.

## Files

`rtl/` holds one module or package per file:

* `viterbi_pkg` — modes, widths, per-mode tables.
* `bmc`, `input_ram`, `bm_switch`, `acs`, `pm_memory` — the forward processor.
* `addr_shifter`, `addr_buffers`, `ph_write_addr_gen`, `ph_ram`, `ph_memory` —
  path history.
* `traceback_addr_gen`, `traceback_proc` — traceback.
* `viterbi_fsm` — the state machine.
* `viterbi_top` — the whole decoder.

`tb/` holds one self-checking bench per module, named `tb_<module>`. Each bench
prints `TB_RESULT checks=N failures=M`.

`tb_viterbi_top` is the end-to-end bench. It runs at the default size and
covers:

* K = 9 at rates 1/2, 1/3 and 1/4, K = 7, K = 6, and K = 5 at rates 1/2 and
  1/5;
* noisy symbols with scattered wrong symbols;
* random input stalls;
* static and dynamic configuration loading.

It also checks the stage rate and the three-window latency. It counts every
mechanism and fails if any of them never occurs: mode switch, dynamic load,
stall, period wrap, error correction, and a restart in the middle of a stream. The K = 6 polynomials (53, 75) and
the K = 5 rate-1/5 polynomials it uses are test codes, not taken from a
standard.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/viterbi_pkg.sv rtl/*.sv \
        tb/tb_viterbi_top.sv --top-module tb_viterbi_top -o sim
    ./obj_dir/sim

A unit bench needs only the package and its module, plus that module's
children, for example:

    verilator --binary --timing --assert -Irtl rtl/viterbi_pkg.sv \
        rtl/ph_write_addr_gen.sv rtl/addr_shifter.sv rtl/addr_buffers.sv \
        tb/tb_ph_write_addr_gen.sv --top-module tb_ph_write_addr_gen -o sim

The end-to-end bench simulates in well under a second.
