// tb_ph_write_addr_gen: for each mode, runs the counters through two windows
// with random idle cycles and checks U, C, the flags and the address
// C * segments + U against a reference count, then checks clear.
module tb_ph_write_addr_gen;
  import viterbi_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  mode_t mode = MODE_K9;
  logic [4:0] u;
  logic [5:0] c;
  logic seg_last, win_last;
  logic [10:0] addr;
  int checks = 0, failures = 0;

  ph_write_addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    mode_t m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = m.first();
    do begin
      int segs, wl, eu, ec;
      segs = int'(segs_of(m)); wl = int'(wl_of(m));
      eu = 0; ec = 0;
      @(negedge clk);
      mode = m; clear = 1;
      @(negedge clk);
      clear = 0;
      for (int n = 0; n < 2 * segs * wl; ) begin
        en = ($urandom_range(7) != 0);
        #1;
        checks++;
        if (int'(u) != eu || int'(c) != ec || int'(addr) != ec * segs + eu ||
            seg_last != (eu == segs - 1) || win_last != (eu == segs - 1 && ec == wl - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL %s u=%0d/%0d c=%0d/%0d addr=%0d", m.name(), u, eu, c, ec, addr);
        end
        @(negedge clk);
        if (en) begin
          n++;
          eu++;
          if (eu == segs) begin eu = 0; ec = (ec + 1) % wl; end
        end
      end
      // clear mid-window
      en = 1;
      repeat (5) @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0; en = 0;
      #1;
      checks++;
      if (u != 0 || c != 0) begin failures++; $display("FAIL clear"); end
      m = m.next();
    end while (m != m.first());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
