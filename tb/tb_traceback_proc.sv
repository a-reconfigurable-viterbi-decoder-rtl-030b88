// tb_traceback_proc: feeds the traceback processor decision bytes from a random
// survivor table and checks each step against the reference rule
// S <= {S << 1, D} (K-1 bits), the decoded bit S[K-2], the segment bits of
// the next state, and loading, for every mode.
module tb_traceback_proc;
  import viterbi_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  mode_t mode = MODE_K9;
  logic [7:0] load_state = '0, rd_data = '0, state;
  logic [4:0] u_next;
  logic dec_bit;
  int checks = 0, failures = 0;

  traceback_proc dut (.*);
  always #5 clk = ~clk;

  initial begin
    mode_t m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = m.first();
    do begin
      int k, ns, es;
      k = int'(k_of(m));
      ns = 1 << (k - 1);
      mode = m;
      @(negedge clk);
      load = 1; load_state = 8'($urandom_range(ns - 1));
      es = int'(load_state);
      #1;
      checks++;
      if (int'(u_next) != es >> 3) begin failures++; $display("FAIL load u_next"); end
      @(negedge clk);
      load = 0;
      for (int s = 0; s < 200; s++) begin
        int d;
        step = ($urandom_range(3) != 0);
        rd_data = 8'($urandom);
        d = rd_data[es % 8];
        #1;
        checks++;
        if (int'(state) != es || dec_bit != es[k - 2]) begin
          failures++;
          if (failures < 10) $display("FAIL %s state %0d exp %0d", m.name(), state, es);
        end
        if (step) es = ((es << 1) | d) % ns;
        checks++;
        if (int'(u_next) != es >> 3) begin failures++; $display("FAIL u_next"); end
        @(negedge clk);
      end
      step = 0;
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
