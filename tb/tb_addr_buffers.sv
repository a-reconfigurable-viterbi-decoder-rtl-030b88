// tb_addr_buffers: with the buffer/shift settings of each mode, the shifter
// and buffer network must form the address C * segments + U for every stage
// C of a window and every segment U; the four examples spelled out for
// K = 9 and K = 6 (C5..C0 U4..U0 and 000 C5..C0 U1 U0) are covered by this.
module tb_addr_buffers;
  import viterbi_pkg::*;
  logic [4:0] u;
  logic [9:0] shifted;
  logic [7:0] buf_en;
  logic [10:0] addr;
  int checks = 0, failures = 0;

  addr_buffers dut (.*);

  initial begin
    mode_t m;
    m = m.first();
    do begin
      addr_cfg_t cfg;
      int segs, wl;
      cfg = addr_cfg(m);
      segs = int'(segs_of(m));
      wl = int'(wl_of(m));
      for (int cc = 0; cc < wl; cc++) begin
        for (int uu = 0; uu < segs; uu++) begin
          u = 5'(uu);
          shifted = 10'(cc << cfg.sh);
          buf_en = cfg.buf_en;
          #1;
          checks++;
          if (int'(addr) != cc * segs + uu) begin
            failures++;
            if (failures < 10) $display("FAIL mode %s c=%0d u=%0d addr=%0d", m.name(), cc, uu, addr);
          end
        end
      end
      m = m.next();
    end while (m != m.first());
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
