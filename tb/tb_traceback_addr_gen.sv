// tb_traceback_addr_gen: loads the down counter and counts it through a window for
// each mode; the addresses must be (next counter value) * segments + U for
// each processor's own U, and the counter must start at WL-1.
module tb_traceback_addr_gen;
  import viterbi_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, dec = 0;
  mode_t mode = MODE_K9;
  logic [4:0] u_b1 = '0, u_b2 = '0;
  logic [5:0] c;
  logic [10:0] addr_b1, addr_b2;
  int checks = 0, failures = 0;

  traceback_addr_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(int ec, int segs);
    checks++;
    if (int'(addr_b1) != ec * segs + int'(u_b1) || int'(addr_b2) != ec * segs + int'(u_b2)) begin
      failures++;
      if (failures < 10) $display("FAIL %s ec=%0d a1=%0d a2=%0d", mode.name(), ec, addr_b1, addr_b2);
    end
  endtask

  initial begin
    mode_t m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = m.first();
    do begin
      int segs, wl, ec;
      segs = int'(segs_of(m)); wl = int'(wl_of(m));
      mode = m;
      @(negedge clk);
      load = 1; dec = 0;
      u_b1 = 5'($urandom_range(segs - 1)); u_b2 = 5'($urandom_range(segs - 1));
      #1 chk(wl - 1, segs);
      @(negedge clk);
      load = 0;
      checks++;
      if (int'(c) != wl - 1) begin failures++; $display("FAIL load value %0d", c); end
      ec = wl - 1;
      for (int s = 0; s < wl - 1; s++) begin
        dec = ($urandom_range(3) != 0);
        u_b1 = 5'($urandom_range(segs - 1)); u_b2 = 5'($urandom_range(segs - 1));
        if (dec) ec--;
        #1 chk(ec, segs);
        @(negedge clk);
        checks++;
        if (int'(c) != ec) begin failures++; $display("FAIL count %0d exp %0d", c, ec); end
      end
      dec = 0;
      m = m.next();
    end while (m != m.first());
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
