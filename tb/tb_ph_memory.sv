// tb_ph_memory: in each of the four periods writes a different pattern into
// the RAM the period assigns to the forward processor, and checks that B2
// reads the RAM written one period earlier and B1 the RAM written three
// periods earlier, with one cycle of read latency.
module tb_ph_memory;
  import viterbi_pkg::*;
  logic clk = 0;
  logic [1:0] period = '0;
  logic wr_en = 0, rd_en = 0;
  logic [10:0] wr_addr = '0, b1_addr = '0, b2_addr = '0;
  logic [7:0] wr_data = '0, b1_data, b2_data;
  int checks = 0, failures = 0;

  ph_memory dut (.*);
  always #5 clk = ~clk;

  // pattern written during window w at address a
  function automatic logic [7:0] pat(int w, int a);
    return 8'((w * 37 + a * 11 + (a >> 3)) ^ (w << 5));
  endfunction

  initial begin
    for (int w = 0; w < 9; w++) begin
      period = 2'(w);
      // write 64 words of window w, reading back older windows meanwhile
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 11'(a * 7); wr_data = pat(w, a * 7);
        rd_en = 1; b1_addr = 11'(((a + 5) % 64) * 7); b2_addr = 11'(((a + 9) % 64) * 7);
        @(posedge clk);
        #1;
        if (w >= 1) begin
          checks++;
          if (b2_data !== pat(w - 1, ((a + 9) % 64) * 7)) begin
            failures++;
            if (failures < 10) $display("FAIL B2 w=%0d a=%0d", w, a);
          end
        end
        if (w >= 3) begin
          checks++;
          if (b1_data !== pat(w - 3, ((a + 5) % 64) * 7)) begin
            failures++;
            if (failures < 10) $display("FAIL B1 w=%0d a=%0d", w, a);
          end
        end
      end
    end
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
