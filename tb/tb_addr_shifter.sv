// tb_addr_shifter: checks the shifter output against C * 2^sh for every
// counter value and every shift the mode table uses.
module tb_addr_shifter;
  logic [5:0] c;
  logic [2:0] sh;
  logic [9:0] y;
  int checks = 0, failures = 0;

  addr_shifter dut (.*);

  initial begin
    for (int s = 0; s <= 4; s++) begin
      for (int v = 0; v < 64; v++) begin
        c = 6'(v); sh = 3'(s);
        #1;
        checks++;
        if (int'(y) != v * (1 << s)) begin
          failures++;
          $display("FAIL c=%0d sh=%0d y=%0d", v, s, y);
        end
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
